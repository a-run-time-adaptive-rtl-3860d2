// demux_pkg: types and constants shared by the reconfigurable DVB demultiplexer.
//
// Samples travel as complex numbers (cplx_t) with DW-bit two's-complement real
// and imaginary parts. The carriers a sub-band produces for one time index
// travel together as a carrier bundle (carriers_t): a valid flag, the number of
// carriers and up to MAX_CARRIERS samples. A reconfiguration zone holds one of
// the partial configurations listed in rate_cfg_t; the names follow the partial
// bitstreams (cover, PBS1..PBS4) and the carrier frequencies they produce.
//
// The filter-bank coefficients are not part of the document. They are computed
// here at elaboration time: a Hann-windowed sinc low-pass prototype with a
// cut-off of half a bin spacing, normalised to unit DC gain, in Q15, and
// DFT twiddle factors cos/sin(2*pi*k/N) in Q14.
package demux_pkg;

  localparam int DW           = 16;  // bits per real/imaginary part
  localparam int NUM_ZONES    = 4;   // reconfiguration zones
  localparam int NUM_SB       = 4;   // reconfigurable 24Rs sub-bands
  localparam int MAX_CARRIERS = 16;  // 0.5 MHz carriers per 24Rs sub-band
  localparam int CNT_W        = 5;   // width of a carrier count (0..16)
  localparam int OUT_IQ_W     = 9;   // bits per I/Q part on a DEMDEC port
  localparam int SB_W         = 3;   // width of one SBO field (0 = empty, 1..4 = SB)

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Partial configuration loaded into a zone.
  typedef enum logic [2:0] {
    CFG_EMPTY = 3'd0,  // blank zone
    CFG_8M    = 3'd1,  // cover: 8 MHz carrier passed through
    CFG_4M    = 3'd2,  // PBS1: stage 1
    CFG_2M    = 3'd3,  // PBS2: stages 1-2
    CFG_1M    = 3'd4,  // PBS3: stages 1-3
    CFG_05M   = 3'd5   // PBS4: stages 1-4
  } rate_cfg_t;

  typedef struct packed {
    logic                         valid;
    logic [CNT_W-1:0]             count;
    cplx_t [MAX_CARRIERS-1:0]     c;
  } carriers_t;

  // Number of carriers one sub-band delivers in each configuration (Table I / 4).
  function automatic int unsigned carriers_of(rate_cfg_t cfg);
    case (cfg)
      CFG_8M:  return 1;
      CFG_4M:  return 2;
      CFG_2M:  return 4;
      CFG_1M:  return 8;
      CFG_05M: return 16;
      default: return 0;
    endcase
  endfunction

  localparam real PI = 3.14159265358979323846;

  // Prototype low-pass coefficient n of a filter of length ntap*nbins, Q15.
  function automatic int proto_coef(int nbins, int ntap, int n);
    int  l;
    real c, x, w, sum, v;
    l   = nbins * ntap;
    c   = (l - 1) / 2.0;
    sum = 0.0;
    v   = 0.0;
    for (int i = 0; i < l; i++) begin
      real h;
      x = (i - c) / nbins;
      w = 0.5 - 0.5 * $cos(2.0 * PI * (i + 1) / (l + 1));
      h = (x == 0.0) ? 1.0 : $sin(PI * x) / (PI * x);
      h = h * w;
      sum += h;
      if (i == n) v = h;
    end
    return int'($floor(v / sum * 32768.0 + 0.5));
  endfunction

  // Twiddle factors of an N-point DFT, Q14.
  function automatic int tw_cos(int n, int m);
    return int'($floor($cos(2.0 * PI * m / n) * 16384.0 + 0.5));
  endfunction

  function automatic int tw_sin(int n, int m);
    return int'($floor($sin(2.0 * PI * m / n) * 16384.0 + 0.5));
  endfunction

endpackage
