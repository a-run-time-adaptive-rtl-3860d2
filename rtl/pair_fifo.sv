// pair_fifo: small FIFO between two sub-band stages.
//
// A stage frame yields two samples at once (bins 3 and 1 of one stream), which
// become two streams of the next stage; the next stage accepts one sample
// per clock. This FIFO takes a pair per push and returns one entry per clock
// whenever it holds one (pop is implied by out_valid). Each entry carries the
// sample and the index of the stream it belongs to. DEPTH must be even; with
// the decimation of the stages the FIFO never holds more than two pairs, and
// an assertion checks that it never overflows. clear empties it. A helper of
// this design, not a block named in the document.
module pair_fifo
  import demux_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        push,
  input  logic [2:0]  push_id0,
  input  cplx_t       push_d0,
  input  logic [2:0]  push_id1,
  input  cplx_t       push_d1,
  output logic        out_valid,
  output logic [2:0]  out_id,
  output cplx_t       out_d
);

  localparam int AW = $clog2(DEPTH);

  typedef struct packed {
    logic [2:0] id;
    cplx_t      d;
  } entry_t;

  entry_t          mem [DEPTH];
  logic [AW-1:0]   wp, rp;
  logic [AW:0]     level;
  logic            pop;

  assign pop       = (level != '0);
  assign out_valid = pop;
  assign out_id    = mem[rp].id;
  assign out_d     = mem[rp].d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (clear) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) begin
        mem[wp]        <= '{id: push_id0, d: push_d0};
        mem[wp + 1'b1] <= '{id: push_id1, d: push_d1};
        wp             <= wp + AW'(2);
      end
      if (pop) rp <= rp + 1'b1;
      level <= level + (push ? (AW+1)'(2) : '0) - (pop ? (AW+1)'(1) : '0);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (level <= (AW+1)'(DEPTH - 2)));

endmodule
