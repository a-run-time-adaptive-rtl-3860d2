// pfb_core: time-multiplexed polyphase filter bank (channeliser), the common
// engine of the STR10 and STR4 structures.
//
// Each of NSTREAMS independent complex input streams has its own delay line of
// L = NBINS*TAPS samples and its own decimation counter. Every DECIM-th sample
// of a stream starts one output frame for that stream: the delay line is
// weighted by the prototype low-pass h[n] and folded into NBINS polyphase sums
//   u[m] = sum_t h[m + NBINS*t] * x[m + NBINS*t]      (x[0] = newest sample)
// which an NBINS-point DFT turns into the bins
//   y[k] = sum_m u[m] * exp(-j*2*pi*k*m/NBINS).
// (This is the weighted-overlap-add form of a polyphase DFT filter bank.)
// u is truncated to integer after the Q15 prototype, y after the Q14 twiddles,
// and y is saturated to DW bits; a tone at a bin centre leaves with its own
// amplitude.
//
// Interface: in_valid/in_stream/in_sample take one sample per cycle at most.
// A frame appears on out_bins with out_valid high for one cycle, two cycles
// after the sample that completed it, together with the stream it belongs to.
// clear empties all delay lines and counters synchronously (used when a zone
// is reconfigured). The number of bins and the decimation factor are the
// document's; the tap count, the prototype and the number formats are this
// design's own choices.
module pfb_core
  import demux_pkg::*;
#(
  parameter int NBINS    = 4,
  parameter int DECIM    = 4,
  parameter int TAPS     = 4,
  parameter int NSTREAMS = 1,
  localparam int SW      = (NSTREAMS > 1) ? $clog2(NSTREAMS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            in_valid,
  input  logic [SW-1:0]   in_stream,
  input  cplx_t           in_sample,
  output logic            out_valid,
  output logic [SW-1:0]   out_stream,
  output cplx_t           out_bins [NBINS]
);

  localparam int L  = NBINS * TAPS;
  localparam int CW = $clog2(DECIM + 1);

  typedef int coef_t [L];
  typedef int tw_t   [NBINS];

  function automatic coef_t mk_h();
    coef_t t;
    for (int n = 0; n < L; n++) t[n] = proto_coef(NBINS, TAPS, n);
    return t;
  endfunction
  function automatic tw_t mk_c();
    tw_t t;
    for (int i = 0; i < NBINS; i++) t[i] = tw_cos(NBINS, i);
    return t;
  endfunction
  function automatic tw_t mk_s();
    tw_t t;
    for (int i = 0; i < NBINS; i++) t[i] = tw_sin(NBINS, i);
    return t;
  endfunction

  localparam coef_t H    = mk_h();
  localparam tw_t   TCOS = mk_c();
  localparam tw_t   TSIN = mk_s();

  cplx_t          line [NSTREAMS][L];
  logic [CW-1:0]  cnt  [NSTREAMS];
  logic           pend;
  logic [SW-1:0]  pend_s;

  // Delay lines and decimation counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTREAMS; s++) begin
        cnt[s] <= '0;
        for (int i = 0; i < L; i++) line[s][i] <= '0;
      end
      pend   <= 1'b0;
      pend_s <= '0;
    end else if (clear) begin
      for (int s = 0; s < NSTREAMS; s++) begin
        cnt[s] <= '0;
        for (int i = 0; i < L; i++) line[s][i] <= '0;
      end
      pend <= 1'b0;
    end else begin
      pend <= 1'b0;
      if (in_valid) begin
        line[in_stream][0] <= in_sample;
        for (int i = 1; i < L; i++) line[in_stream][i] <= line[in_stream][i-1];
        if (cnt[in_stream] == CW'(DECIM - 1)) begin
          cnt[in_stream] <= '0;
          pend           <= 1'b1;
          pend_s         <= in_stream;
        end else begin
          cnt[in_stream] <= cnt[in_stream] + 1'b1;
        end
      end
    end
  end

  // Polyphase fold and DFT of the stream whose frame is pending.
  // Widths: h*x needs 32 bits, a branch sum of TAPS products 32+log2(TAPS);
  // a folded value u keeps 20 bits (|u| stays below 2^19 since sum|h| < 4);
  // a DFT sum of NBINS products of u and a Q14 twiddle fits in 48 bits.
  localparam int UW = 20;
  localparam int AW = 48;

  typedef logic signed [UW-1:0] u_t;
  typedef logic signed [AW-1:0] acc_t;

  u_t    ur [NBINS];
  u_t    ui [NBINS];
  cplx_t y  [NBINS];

  function automatic logic signed [DW-1:0] sat(acc_t v);
    if (v > acc_t'((1 <<< (DW - 1)) - 1)) return {1'b0, {(DW-1){1'b1}}};
    if (v < -acc_t'(1 <<< (DW - 1)))      return {1'b1, {(DW-1){1'b0}}};
    return v[DW-1:0];
  endfunction

  always_comb begin
    for (int m = 0; m < NBINS; m++) begin
      acc_t ar, ai;
      ar = '0;
      ai = '0;
      for (int t = 0; t < TAPS; t++) begin
        ar += acc_t'(H[m + NBINS*t]) * acc_t'(line[pend_s][m + NBINS*t].re);
        ai += acc_t'(H[m + NBINS*t]) * acc_t'(line[pend_s][m + NBINS*t].im);
      end
      ur[m] = u_t'(ar >>> 15);
      ui[m] = u_t'(ai >>> 15);
    end
    for (int k = 0; k < NBINS; k++) begin
      acc_t yr, yi;
      yr = '0;
      yi = '0;
      for (int m = 0; m < NBINS; m++) begin
        yr += acc_t'(ur[m]) * acc_t'(TCOS[(k*m) % NBINS]) + acc_t'(ui[m]) * acc_t'(TSIN[(k*m) % NBINS]);
        yi += acc_t'(ui[m]) * acc_t'(TCOS[(k*m) % NBINS]) - acc_t'(ur[m]) * acc_t'(TSIN[(k*m) % NBINS]);
      end
      y[k].re = sat(yr >>> 14);
      y[k].im = sat(yi >>> 14);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_stream <= '0;
      for (int k = 0; k < NBINS; k++) out_bins[k] <= '0;
    end else begin
      out_valid <= pend & ~clear;
      if (pend) begin
        out_stream <= pend_s;
        for (int k = 0; k < NBINS; k++) out_bins[k] <= y[k];
      end
    end
  end

endmodule
