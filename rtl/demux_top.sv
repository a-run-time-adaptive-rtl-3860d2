// demux_top: run-time adaptive demultiplexer of a DVB on-board processor.
//
// The real ADC samples of the channel go through the static STR10 filter bank.
// Its bins 1..4 are the four 24Rs sub-bands SB1..SB4; the upper half of bin 5
// is the half-width fifth sub-band, which stays in the static part in a fixed
// copy of the zone branch and delivers 1, 2, 4 or 8 carriers (4 to 0.5 MHz)
// as CONFIG[14:12] demands. SB1..SB4 are processed in four reconfiguration
// zones (rzone). The zone selector sends each sub-band to the zone or zones
// that the SBO register names, so a sub-band can be run once, twice (duplex)
// or three times (TMR) at the price of leaving other sub-bands out. The
// adaptive voter votes redundant replicas and flags a faulty zone; a set
// flag makes the reconfiguration engine rewrite that zone, which removes the
// upset. The engine also rewrites zones whenever the CONFIG or SBO register
// changes the demand. With the voter disabled, the zone outputs are still
// recorded in capture registers that a gcapture pulse freezes for readback,
// and software picks the good replica through the SBO spare bit.
//
// Interface:
//   adc_valid/adc_data   one 10-bit sample per clock at most (input clock)
//   reg_*                register port of ctrl_regs (CONFIG 0, SBO 1, FLAG 2)
//   seu_inject[z]        pulse: upset in the configuration of zone z
//   gcapture             capture the output/feedback registers
//   demdec_out[ch]       19-bit words to DEMDEC ch (SB1..SB4, then SB5),
//                        updated on demdec_ce, one clock in OUT_DIV
//   status outputs       flags, loaded zone configurations, engine counters
// Timing: a frame period (sync) is 256 STR10 frames, the period after which
// the decimators of all four stages of a zone are back in phase.
//
// What follows the document: the static/reconfigurable split, the four zones,
// the selector, the adaptive voter with the flag register triggering repair,
// and the capture registers for readback voting. The number formats, the
// sub-band to bin assignment, the sync period and the way the fifth sub-band
// reuses the zone branch are this design's choices. The selector's
// per-sub-band replica count is not used here and is left unconnected on
// purpose.
module demux_top
  import demux_pkg::*;
#(
  parameter int CLK_MHZ      = 90,
  parameter int TAPS         = 4,
  parameter int SETTLE_SYNCS = 6,
  parameter int OUT_DIV      = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adc_valid,
  input  logic signed [9:0]    adc_data,
  input  logic                 reg_wr,
  input  logic [1:0]           reg_addr,
  input  logic [31:0]          reg_wdata,
  output logic [31:0]          reg_rdata,
  input  logic [NUM_ZONES-1:0] seu_inject,
  input  logic                 gcapture,
  output logic [31:0]          cap_out      [NUM_ZONES],
  output logic [31:0]          cap_fb       [NUM_ZONES],
  output logic                 demdec_ce,
  output logic [18:0]          demdec_out   [NUM_SB+1],
  output logic [NUM_ZONES-1:0] flags,
  output rate_cfg_t            zone_cfg     [NUM_ZONES],
  output logic                 zone_loading [NUM_ZONES],
  output logic                 zone_ok      [NUM_ZONES],
  output logic                 reconfig_busy,
  output logic [15:0]          n_reconfig,
  output logic [15:0]          n_repair,
  output logic [NUM_ZONES-1:0] flag_events
);

  // ------------------------------------------------------------ static STR10
  logic  f_valid;
  cplx_t fbins [10];

  str10 #(.TAPS(TAPS)) u_str10 (
    .clk(clk), .rst_n(rst_n), .adc_valid(adc_valid), .adc_data(adc_data),
    .out_valid(f_valid), .out_bins(fbins));

  // Frame period shared by all decimators: 4^4 STR10 frames.
  logic [7:0] fcnt;
  logic       sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       fcnt <= '0;
    else if (f_valid) fcnt <= fcnt + 1'b1;
  end
  assign sync = f_valid && (fcnt == 8'hFF);

  // --------------------------------------------------------------- registers
  rate_cfg_t            sb_cfg  [NUM_SB];
  rate_cfg_t            sb5_cfg;
  logic [SB_W-1:0]      zone_sb [NUM_ZONES];
  logic                 spare, vote_en;
  logic [NUM_ZONES-1:0] flag_set, flag_clr;

  ctrl_regs u_regs (
    .clk(clk), .rst_n(rst_n), .wr_en(reg_wr), .addr(reg_addr), .wdata(reg_wdata),
    .rdata(reg_rdata), .flag_set(flag_set), .flag_clr(flag_clr),
    .sb_cfg(sb_cfg), .sb5_cfg(sb5_cfg), .zone_sb(zone_sb), .spare(spare), .vote_en(vote_en), .flags(flags));

  reconfig_engine #(.CLK_MHZ(CLK_MHZ), .SETTLE_SYNCS(SETTLE_SYNCS)) u_engine (
    .clk(clk), .rst_n(rst_n), .sb_cfg(sb_cfg), .zone_sb(zone_sb), .flags(flags),
    .sync(sync), .zone_cfg(zone_cfg), .zone_loading(zone_loading), .zone_ok(zone_ok),
    .flag_clr(flag_clr), .busy(reconfig_busy), .n_reconfig(n_reconfig), .n_repair(n_repair));

  // ------------------------------------------------------- zones and routing
  cplx_t     sb_in         [NUM_SB];
  logic      zone_in_valid [NUM_ZONES];
  cplx_t     zone_in       [NUM_ZONES];
  carriers_t zone_out      [NUM_ZONES];
  carriers_t sel_out       [NUM_SB];
  carriers_t sb_out        [NUM_SB];
  logic [2:0] replicas     [NUM_SB];

  always_comb for (int j = 0; j < NUM_SB; j++) sb_in[j] = fbins[j + 1];

  zone_selector u_sel (
    .zone_sb(zone_sb), .spare(spare), .sb_valid(f_valid), .sb_in(sb_in),
    .zone_in_valid(zone_in_valid), .zone_in(zone_in), .zone_out(zone_out),
    .sel_out(sel_out), .replicas(replicas));

  for (genvar z = 0; z < NUM_ZONES; z++) begin : g_zone
    rzone #(.TAPS(TAPS)) u_zone (
      .clk(clk), .rst_n(rst_n), .cfg(zone_cfg[z]), .loading(zone_loading[z]),
      .seu_inject(seu_inject[z]), .in_valid(zone_in_valid[z]), .in_sample(zone_in[z]),
      .out(zone_out[z]));
  end

  adaptive_voter u_voter (
    .vote_en(vote_en), .zone_sb(zone_sb), .zone_ok(zone_ok), .zone_out(zone_out),
    .sel_out(sel_out), .sb_out(sb_out), .flag_set(flag_set));

  assign flag_events = flag_set;

  capture_regs u_cap (
    .clk(clk), .rst_n(rst_n), .zone_out(zone_out), .gcapture(gcapture),
    .cap_out(cap_out), .cap_fb(cap_fb));

  // ------------------------------------------------ static fifth sub-band
  // The half-width fifth sub-band is the upper half of STR10 bin 5. It runs
  // through a static copy of the zone branch; of its carriers only the upper
  // half (the last count/2) lie in the sub-band. An 8 MHz demand does not
  // fit the half-width band and is treated as empty. A change of CONFIG[14:12]
  // clears the branch for one clock.
  rate_cfg_t sb5_want, sb5_q;
  carriers_t sb5_z, sb5_out;

  always_comb sb5_want = (sb5_cfg == CFG_8M) ? CFG_EMPTY : sb5_cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sb5_q <= CFG_EMPTY;
    else        sb5_q <= sb5_want;
  end

  rzone #(.TAPS(TAPS)) u_sb5 (
    .clk(clk), .rst_n(rst_n), .cfg(sb5_q), .loading(sb5_want != sb5_q),
    .seu_inject(1'b0), .in_valid(f_valid), .in_sample(fbins[5]), .out(sb5_z));

  always_comb begin
    sb5_out       = '0;
    sb5_out.valid = sb5_z.valid;
    sb5_out.count = sb5_z.count >> 1;
    for (int i = 0; i < MAX_CARRIERS / 2; i++)
      sb5_out.c[i] = sb5_z.c[CNT_W'(i) + (sb5_z.count >> 1)];
  end

  // ------------------------------------------------------- output interface
  carriers_t to_out [NUM_SB+1];
  always_comb begin
    for (int j = 0; j < NUM_SB; j++) to_out[j] = sb_out[j];
    to_out[NUM_SB] = sb5_out;
  end

  output_if #(.NCH(NUM_SB+1), .OUT_DIV(OUT_DIV)) u_out (
    .clk(clk), .rst_n(rst_n), .bundle(to_out), .out_ce(demdec_ce), .demdec_out(demdec_out));

endmodule
