// reconfig_engine: sequencing part of the reconfiguration engine (the
// enhanced HWICAP) for the four reconfiguration zones.
//
// For each zone the demanded configuration is that of the sub-band the SBO
// register places there (CONFIG register), or empty. A zone is rewritten when
// its loaded configuration or sub-band differs from the demanded one, or when its flag
// bit reports a fault (repair: the same configuration is written again, which
// removes a configuration upset). Zones are rewritten one at a time, lowest
// number first. A rewrite holds zone_loading[z] high for the time the partial
// bitstream takes to write,
//   cover / empty 29.52 us, PBS1 103.3 us, PBS2 191.9 us, PBS3 and PBS4 280.44 us
// (conventional partial configurations), converted to clocks with CLK_MHZ,
// and then until the next sync pulse, so that the fresh zone starts in step
// with the zones already running (sync marks the start of a frame period
// that all stage decimators share). It then clears the zone's flag bit
// (flag_clr pulse) and keeps zone_ok[z] low for SETTLE_SYNCS more sync
// periods, while the zone's filter history fills, so that the voter ignores
// it in that time. A zone whose demand has changed but which has not been
// rewritten yet is not in service either.
//
// The trigger conditions and the write times are the document's; the sync
// alignment, the settling period and the ordering are this design's. The
// transfer of bitstream data to the configuration port itself belongs to the
// FPGA and is not modelled.
module reconfig_engine
  import demux_pkg::*;
#(
  parameter int CLK_MHZ      = 90,
  parameter int SETTLE_SYNCS = 6   // at least 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  rate_cfg_t            sb_cfg       [NUM_SB],
  input  logic [SB_W-1:0]      zone_sb      [NUM_ZONES],
  input  logic [NUM_ZONES-1:0] flags,
  input  logic                 sync,
  output rate_cfg_t            zone_cfg     [NUM_ZONES],
  output logic                 zone_loading [NUM_ZONES],
  output logic                 zone_ok      [NUM_ZONES],
  output logic [NUM_ZONES-1:0] flag_clr,
  output logic                 busy,
  output logic [15:0]          n_reconfig,
  output logic [15:0]          n_repair
);

  // Write times in ns of the conventional partial configurations.
  function automatic int unsigned write_ns(rate_cfg_t c);
    case (c)
      CFG_4M:  return 103300;
      CFG_2M:  return 191900;
      CFG_1M:  return 280440;
      CFG_05M: return 280440;
      default: return 29520;
    endcase
  endfunction

  function automatic logic [31:0] write_cycles(rate_cfg_t c);
    return 32'((longint'(write_ns(c)) * CLK_MHZ + 999) / 1000);
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_WAIT_SYNC} state_t;

  localparam int STW = $clog2(SETTLE_SYNCS + 1);

  state_t           state;
  logic [1:0]       cur;
  rate_cfg_t        tgt;
  logic [SB_W-1:0]  tgt_sb;
  logic [SB_W-1:0]  loaded_sb [NUM_ZONES];
  logic             is_repair;
  logic [31:0]      timer;
  logic [STW-1:0]   settle [NUM_ZONES];
  rate_cfg_t        want   [NUM_ZONES];
  logic [NUM_ZONES-1:0] need;

  always_comb begin
    for (int z = 0; z < NUM_ZONES; z++) begin
      want[z] = CFG_EMPTY;
      for (int j = 0; j < NUM_SB; j++)
        if (zone_sb[z] == SB_W'(j + 1)) want[z] = sb_cfg[j];
      need[z] = (want[z] != zone_cfg[z]) || (want[z] != CFG_EMPTY && zone_sb[z] != loaded_sb[z]) || (flags[z] && settle[z] == '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= '0;
      tgt        <= CFG_EMPTY;
      tgt_sb     <= '0;
      is_repair  <= 1'b0;
      timer      <= '0;
      flag_clr   <= '0;
      n_reconfig <= '0;
      n_repair   <= '0;
      for (int z = 0; z < NUM_ZONES; z++) begin
        zone_cfg[z]     <= CFG_EMPTY;
        loaded_sb[z]    <= '0;
        zone_loading[z] <= 1'b0;
        settle[z]       <= '0;
      end
    end else begin
      flag_clr <= '0;
      if (sync)
        for (int z = 0; z < NUM_ZONES; z++)
          if (settle[z] != '0) settle[z] <= settle[z] - 1'b1;
      case (state)
        S_IDLE: begin
          for (int z = NUM_ZONES - 1; z >= 0; z--) begin
            if (need[z]) begin
              cur       <= 2'(z);
              tgt       <= want[z];
              tgt_sb    <= (want[z] == CFG_EMPTY) ? '0 : zone_sb[z];
              is_repair <= (want[z] == zone_cfg[z]) && (want[z] == CFG_EMPTY || zone_sb[z] == loaded_sb[z]);
              timer     <= write_cycles(want[z]);
              state     <= S_WRITE;
              for (int k = 0; k < NUM_ZONES; k++) zone_loading[k] <= (k == z);
            end
          end
        end
        S_WRITE: begin
          if (timer <= 32'd1) state <= S_WAIT_SYNC;
          else                timer <= timer - 1'b1;
        end
        S_WAIT_SYNC: begin
          if (sync) begin
            zone_cfg[cur]     <= tgt;
            loaded_sb[cur]    <= tgt_sb;
            zone_loading[cur] <= 1'b0;
            settle[cur]       <= STW'(SETTLE_SYNCS);
            flag_clr[cur]     <= 1'b1;
            n_reconfig        <= n_reconfig + 1'b1;
            if (is_repair) n_repair <= n_repair + 1'b1;
            state             <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy = (state != S_IDLE);
    for (int z = 0; z < NUM_ZONES; z++)
      zone_ok[z] = !zone_loading[z] && (settle[z] == '0) && (zone_cfg[z] != CFG_EMPTY)
                   && (want[z] == zone_cfg[z]) && (zone_sb[z] == loaded_sb[z]);
  end

endmodule
