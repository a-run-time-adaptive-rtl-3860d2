// str10: the 10-bin polyphase structure at the front of the demultiplexer.
//
// It takes the real 10-bit ADC samples of the 33 MHz channel, one per clock
// at most, and splits them into 10 complex frequency bins, decimating by 5
// (so the bins are oversampled by two). With bin spacing fs/10 and a real
// input, bins 1..4 carry the four 24Rs sub-bands SB1..SB4 (their 8 MHz
// carriers and the inputs of the sub-band stages) and bin 5 carries the
// half-width fifth sub-band; bins 0 and 6..9 are not used downstream.
//
// A sample enters as re = adc_data << 6 (full scale of the 16-bit format),
// im = 0. Timing: one frame of 10 bins leaves, with out_valid high for one
// cycle, two cycles after every fifth accepted sample. The bin count and the
// decimation follow the document; the assignment of sub-bands to bins, the
// tap count and the number formats are this design's own.
module str10
  import demux_pkg::*;
#(
  parameter int TAPS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adc_valid,
  input  logic signed [9:0] adc_data,
  output logic              out_valid,
  output cplx_t             out_bins [10]
);

  cplx_t      smp;
  logic [0:0] unused_stream;

  always_comb begin
    smp.re = {adc_data, 6'b0};
    smp.im = '0;
  end

  pfb_core #(.NBINS(10), .DECIM(5), .TAPS(TAPS), .NSTREAMS(1)) u_pfb (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (1'b0),
    .in_valid  (adc_valid),
    .in_stream (1'b0),
    .in_sample (smp),
    .out_valid (out_valid),
    .out_stream(unused_stream),
    .out_bins  (out_bins)
  );

endmodule
