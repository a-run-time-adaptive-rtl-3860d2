// capture_regs: zone output and feedback registers for voting by
// configuration readback.
//
// Instead of a hardware voter, the outputs of the four zones are registered
// and their flip-flop state is captured and read back, and a processor
// compares the replicas. For every zone this block keeps an output register
// (a 32-bit signature of the zone's latest carrier bundle: the XOR of its
// carriers' {re, im} words, carrier i rotated left by i bits so that the
// same error in an even number of carriers does not cancel) and a feedback
// register holding the previous signature, so that a disagreement that has already passed stays visible
// for one more bundle. A gcapture pulse copies both registers of every zone
// into the captured state, which stays put until the next pulse; that is what
// a readback returns.
//
// Comparison rule for the reader of the captured state: replicas whose
// captured outputs differ point to a permanent fault in the odd one; equal
// outputs with one differing feedback value point to a transient fault.
//
// Output and feedback registers and the capture command follow the document;
// the signature width and the rotate-XOR folding are this design's choices.
module capture_regs
  import demux_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  carriers_t   zone_out [NUM_ZONES],
  input  logic        gcapture,
  output logic [31:0] cap_out  [NUM_ZONES],
  output logic [31:0] cap_fb   [NUM_ZONES]
);

  logic [31:0] out_r [NUM_ZONES];
  logic [31:0] fb_r  [NUM_ZONES];
  logic [31:0] sig   [NUM_ZONES];

  always_comb begin
    for (int z = 0; z < NUM_ZONES; z++) begin
      sig[z] = '0;
      for (int i = 0; i < MAX_CARRIERS; i++) begin
        logic [31:0] w;
        w = zone_out[z].c[i];
        sig[z] ^= (i == 0) ? w : ((w << i) | (w >> (32 - i)));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int z = 0; z < NUM_ZONES; z++) begin
        out_r[z]   <= '0;
        fb_r[z]    <= '0;
        cap_out[z] <= '0;
        cap_fb[z]  <= '0;
      end
    end else begin
      for (int z = 0; z < NUM_ZONES; z++) begin
        if (zone_out[z].valid) begin
          out_r[z] <= sig[z];
          fb_r[z]  <= out_r[z];
        end
        if (gcapture) begin
          cap_out[z] <= out_r[z];
          cap_fb[z]  <= fb_r[z];
        end
      end
    end
  end

endmodule
