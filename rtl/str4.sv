// str4: one 4-bin polyphase stage of a sub-band branch (STR4a..STR4d).
//
// It splits each of NSTREAMS complex input streams into 4 bins, decimating by
// 4. Each stream keeps its own delay line and decimation counter, so one
// stage can serve the 1, 2, 4 or 8 streams of successive stages of a branch
// with a single datapath, one input sample per clock at most. Of the 4 bins,
// bins 1 and 3 (centred at +fs/4 and -fs/4, the two halves of the input
// band) are the ones the branch uses; every stage therefore doubles the
// number of carriers and halves their bandwidth.
//
// Timing: a frame leaves two cycles after every fourth sample of a stream,
// with out_valid high for one cycle and out_stream naming the stream. clear
// empties the stage (fresh partial configuration). The 4 bins and the
// decimation by 4 are the document's; the stream multiplexing, the choice of
// the used bins, the taps and the formats are this design's.
module str4
  import demux_pkg::*;
#(
  parameter int TAPS     = 4,
  parameter int NSTREAMS = 1,
  localparam int SW      = (NSTREAMS > 1) ? $clog2(NSTREAMS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  input  logic [SW-1:0] in_stream,
  input  cplx_t         in_sample,
  output logic          out_valid,
  output logic [SW-1:0] out_stream,
  output cplx_t         out_bins [4]
);

  pfb_core #(.NBINS(4), .DECIM(4), .TAPS(TAPS), .NSTREAMS(NSTREAMS)) u_pfb (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear),
    .in_valid  (in_valid),
    .in_stream (in_stream),
    .in_sample (in_sample),
    .out_valid (out_valid),
    .out_stream(out_stream),
    .out_bins  (out_bins)
  );

endmodule
