// output_if: the output interface towards the five demodulator-decoders.
//
// Each sub-band's carriers of one time index arrive together as a bundle;
// carriers slower than the 8 MHz ones are delivered multiplexed in time. The
// output runs at one word per OUT_DIV input clocks (the 48Rs output clock,
// five times slower than the input clock), marked by out_ce. In every output
// slot, channel ch sends the next carrier of its latest bundle as a 19-bit
// word {valid, I[8:0], Q[8:0]} (the 9 most significant bits of each part);
// once all carriers of the bundle are sent it sends zeros with valid low. A
// new bundle restarts the sequence with its carrier 0; the assertion checks
// that a bundle has been sent completely before the next one of the same
// size arrives. Words change only on out_ce cycles. The reset is
// asynchronous; that the assertion also uses it, synchronously, through
// disable iff is harmless (lint reports it as a mixed sync/async net).
//
// The five channels, the 18+1 bits and the slower output clock follow the
// document; the word layout and the valid bit are this design's.
module output_if
  import demux_pkg::*;
#(
  parameter int NCH     = 5,
  parameter int OUT_DIV = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  carriers_t   bundle [NCH],
  output logic        out_ce,
  output logic [18:0] demdec_out [NCH]
);

  localparam int DVW = $clog2(OUT_DIV + 1);

  logic [DVW-1:0] div;
  carriers_t      buf_r [NCH];
  logic [CNT_W:0] idx   [NCH];

  assign out_ce = (div == DVW'(OUT_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0;
      for (int ch = 0; ch < NCH; ch++) begin
        buf_r[ch]      <= '0;
        idx[ch]        <= '0;
        demdec_out[ch] <= '0;
      end
    end else begin
      div <= out_ce ? '0 : div + 1'b1;
      for (int ch = 0; ch < NCH; ch++) begin
        if (out_ce) begin
          if (idx[ch] < (CNT_W+1)'(buf_r[ch].count)) begin
            demdec_out[ch] <= {1'b1,
                               buf_r[ch].c[idx[ch][CNT_W-1:0]].re[DW-1 -: OUT_IQ_W],
                               buf_r[ch].c[idx[ch][CNT_W-1:0]].im[DW-1 -: OUT_IQ_W]};
            idx[ch] <= idx[ch] + 1'b1;
          end else begin
            demdec_out[ch] <= '0;
          end
        end
        if (bundle[ch].valid) begin
          buf_r[ch] <= bundle[ch];
          idx[ch]   <= '0;
        end
      end
    end
  end

  for (genvar ch = 0; ch < NCH; ch++) begin : g_chk
    a_sent: assert property (@(posedge clk) disable iff (!rst_n)
      bundle[ch].valid |-> (int'(idx[ch]) + (out_ce ? 1 : 0) >= int'(buf_r[ch].count))
                        || (buf_r[ch].count != bundle[ch].count));
  end

endmodule
