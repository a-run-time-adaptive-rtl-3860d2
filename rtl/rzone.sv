// rzone: one reconfiguration zone of the demultiplexer, with the sub-band
// branch that the loaded partial configuration describes.
//
// The zone receives the stream of one 24Rs sub-band (a bin of the STR10) and
// produces that sub-band's carriers at the rate its configuration demands:
//   CFG_8M  (cover) the sub-band stream itself, one 8 MHz carrier
//   CFG_4M  (PBS1)  stage 1:        2 carriers of 4 MHz
//   CFG_2M  (PBS2)  stages 1-2:     4 carriers of 2 MHz
//   CFG_1M  (PBS3)  stages 1-3:     8 carriers of 1 MHz
//   CFG_05M (PBS4)  stages 1-4:    16 carriers of 0.5 MHz
//   CFG_EMPTY       nothing
// Each stage is a 4-bin STR4 serving twice the streams of the one before; bins
// 3 and 1 of every stream (lower and upper half of its band) become the two
// streams of the next stage, passed through a pair_fifo. A stage that the
// configuration does not use receives nothing, which stands for the logic a
// partial configuration leaves out.
//
// Dynamic partial reconfiguration is modelled by the cfg and loading inputs:
// while loading is high the zone is being rewritten, its state is cleared and
// it delivers nothing; afterwards it runs the configuration on cfg. An upset
// (seu_inject) is sticky, as a configuration-memory upset is: from then on the
// zone's carriers are corrupted (bits 7:0 of every real part inverted) until
// the zone is rewritten.
//
// Output: one carrier bundle per time index; out.valid is high for one cycle,
// out.count gives the carriers and out.c[0..count-1] holds them in ascending
// frequency. The stage sequence and carrier counts follow the document; the
// per-stage use of bins, the stream multiplexing and the upset model are this
// design's choices.
module rzone
  import demux_pkg::*;
#(
  parameter int TAPS = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  rate_cfg_t cfg,
  input  logic      loading,
  input  logic      seu_inject,
  input  logic      in_valid,
  input  cplx_t     in_sample,
  output carriers_t out
);

  // ---------------------------------------------------------------- stages
  logic       s_in_v  [4];
  logic [2:0] s_in_id [4];
  cplx_t      s_in_d  [4];
  logic       s_out_v [4];
  logic [2:0] s_out_id[4];
  cplx_t      s_bins  [4][4];
  logic       f_push  [4];

  logic [0:0] st1_id_o, st2_id_o;
  logic [1:0] st3_id_o;
  logic [2:0] st4_id_o;

  logic stage_on [4];
  always_comb begin
    stage_on[0] = !loading && (cfg inside {CFG_4M, CFG_2M, CFG_1M, CFG_05M});
    stage_on[1] = !loading && (cfg inside {CFG_2M, CFG_1M, CFG_05M});
    stage_on[2] = !loading && (cfg inside {CFG_1M, CFG_05M});
    stage_on[3] = !loading && (cfg == CFG_05M);
  end

  assign s_in_v[0]  = in_valid && stage_on[0];
  assign s_in_id[0] = 3'd0;
  assign s_in_d[0]  = in_sample;

  str4 #(.TAPS(TAPS), .NSTREAMS(1)) u_st1 (
    .clk(clk), .rst_n(rst_n), .clear(loading),
    .in_valid(s_in_v[0]), .in_stream(s_in_id[0][0:0]), .in_sample(s_in_d[0]),
    .out_valid(s_out_v[0]), .out_stream(st1_id_o), .out_bins(s_bins[0]));
  str4 #(.TAPS(TAPS), .NSTREAMS(2)) u_st2 (
    .clk(clk), .rst_n(rst_n), .clear(loading),
    .in_valid(s_in_v[1]), .in_stream(s_in_id[1][0:0]), .in_sample(s_in_d[1]),
    .out_valid(s_out_v[1]), .out_stream(st2_id_o), .out_bins(s_bins[1]));
  str4 #(.TAPS(TAPS), .NSTREAMS(4)) u_st3 (
    .clk(clk), .rst_n(rst_n), .clear(loading),
    .in_valid(s_in_v[2]), .in_stream(s_in_id[2][1:0]), .in_sample(s_in_d[2]),
    .out_valid(s_out_v[2]), .out_stream(st3_id_o), .out_bins(s_bins[2]));
  str4 #(.TAPS(TAPS), .NSTREAMS(8)) u_st4 (
    .clk(clk), .rst_n(rst_n), .clear(loading),
    .in_valid(s_in_v[3]), .in_stream(s_in_id[3]), .in_sample(s_in_d[3]),
    .out_valid(s_out_v[3]), .out_stream(st4_id_o), .out_bins(s_bins[3]));

  assign s_out_id[0] = 3'(st1_id_o);
  assign s_out_id[1] = 3'(st2_id_o);
  assign s_out_id[2] = 3'(st3_id_o);
  assign s_out_id[3] = st4_id_o;

  // Stream p of stage s feeds streams 2p (bin 3) and 2p+1 (bin 1) of stage s+1.
  for (genvar s = 0; s < 3; s++) begin : g_link
    logic fv;
    assign f_push[s] = s_out_v[s] && stage_on[s+1];
    pair_fifo #(.DEPTH(8)) u_fifo (
      .clk(clk), .rst_n(rst_n), .clear(loading),
      .push(f_push[s]),
      .push_id0({s_out_id[s][1:0], 1'b0}), .push_d0(s_bins[s][3]),
      .push_id1({s_out_id[s][1:0], 1'b1}), .push_d1(s_bins[s][1]),
      .out_valid(fv), .out_id(s_in_id[s+1]), .out_d(s_in_d[s+1]));
    assign s_in_v[s+1] = fv && stage_on[s+1];
  end
  assign f_push[3] = 1'b0;

  // ------------------------------------------------------ carrier bundles
  carriers_t bundle;
  logic      upset;
  int        last;

  always_comb begin
    case (cfg)
      CFG_4M:  last = 0;
      CFG_2M:  last = 1;
      CFG_1M:  last = 2;
      default: last = 3;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bundle <= '0;
      upset  <= 1'b0;
    end else if (loading) begin
      bundle <= '0;
      upset  <= 1'b0;
    end else begin
      if (seu_inject) upset <= 1'b1;
      bundle.valid <= 1'b0;
      bundle.count <= CNT_W'(carriers_of(cfg));
      if (cfg == CFG_8M) begin
        if (in_valid) begin
          bundle.valid <= 1'b1;
          bundle.c[0]  <= in_sample;
        end
      end else if (cfg != CFG_EMPTY) begin
        if (s_out_v[last]) begin
          bundle.c[2*s_out_id[last]]     <= s_bins[last][3];
          bundle.c[2*s_out_id[last] + 1] <= s_bins[last][1];
          bundle.valid <= (s_out_id[last] == 3'((1 << last) - 1));
        end
      end
    end
  end

  always_comb begin
    out = bundle;
    if (upset) begin
      for (int i = 0; i < MAX_CARRIERS; i++) out.c[i].re[7:0] = ~bundle.c[i].re[7:0];
    end
  end

endmodule
