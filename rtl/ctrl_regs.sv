// ctrl_regs: the reconfiguration control peripheral with the configuration,
// sub-band order (SBO) and flag registers.
//
// A plain register port stands for the processor bus (one write or read per
// clock, reads combinational):
//   addr 0 CONFIG  bits 3j+2:3j  demanded configuration of SB(j+1), rate_cfg_t
//                  bits 14:12    configuration of the fifth sub-band (SB5)
//   addr 1 SBO     bits 3z+2:3z  sub-band held by zone z (0 none, 1..4)
//                  bit 12        spare bit: take the next replica (software voting)
//                  bit 13        hardware voter enabled
//   addr 2 FLAG    bits 3:0      one bit per zone, set on a detected fault;
//                                writing 1 clears a bit; writing 1 to bit
//                                4+z sets bit z (fault found by software)
// Hardware sets flag bits through flag_set and the reconfiguration engine
// clears the bit of a zone it has rewritten through flag_clr; a set in the
// same clock as a clear wins. After reset every sub-band is empty, zone z
// holds SB(z+1), the spare bit is 0 and the voter is enabled.
// The three registers and the 4-bit flag register are the document's; the
// addresses, bit layout and reset values are this design's.
module ctrl_regs
  import demux_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [1:0]           addr,
  input  logic [31:0]          wdata,
  output logic [31:0]          rdata,
  input  logic [NUM_ZONES-1:0] flag_set,
  input  logic [NUM_ZONES-1:0] flag_clr,
  output rate_cfg_t            sb_cfg  [NUM_SB],
  output rate_cfg_t            sb5_cfg,
  output logic [SB_W-1:0]      zone_sb [NUM_ZONES],
  output logic                 spare,
  output logic                 vote_en,
  output logic [NUM_ZONES-1:0] flags
);

  logic [14:0] cfg_r;
  logic [13:0] sbo_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_r <= '0;
      sbo_r <= {1'b1, 1'b0, 3'd4, 3'd3, 3'd2, 3'd1};
      flags <= '0;
    end else begin
      if (wr_en && addr == 2'd0) cfg_r <= wdata[14:0];
      if (wr_en && addr == 2'd1) sbo_r <= wdata[13:0];
      flags <= (flags & ~flag_clr & ~((wr_en && addr == 2'd2) ? wdata[NUM_ZONES-1:0] : '0))
               | flag_set | ((wr_en && addr == 2'd2) ? wdata[2*NUM_ZONES-1:NUM_ZONES] : '0);
    end
  end

  always_comb begin
    case (addr)
      2'd0:    rdata = {17'b0, cfg_r};
      2'd1:    rdata = {18'b0, sbo_r};
      2'd2:    rdata = {{(32-NUM_ZONES){1'b0}}, flags};
      default: rdata = '0;
    endcase
    for (int j = 0; j < NUM_SB; j++) sb_cfg[j] = rate_cfg_t'(cfg_r[3*j +: 3]);
    sb5_cfg = rate_cfg_t'(cfg_r[14:12]);
    for (int z = 0; z < NUM_ZONES; z++) zone_sb[z] = sbo_r[3*z +: 3];
    spare   = sbo_r[12];
    vote_en = sbo_r[13];
  end

endmodule
