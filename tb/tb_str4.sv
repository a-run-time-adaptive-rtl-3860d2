// tb_str4: self-checking test of a 4-bin STR4 stage serving four streams.
//
// Random complex samples go to randomly chosen streams with random gaps. Each
// frame is compared with the filter-bank formula (real numbers, tolerance 6
// LSB) over the history of its own stream, must name the right stream, and
// must arrive two clocks after every fourth sample of that stream (decimation
// by 4). A clear in the middle must empty all histories.
module tb_str4;
  import demux_pkg::*;
  import tb_pfb_ref_pkg::*;

  localparam int NS = 4;

  logic       clk = 0;
  logic       rst_n = 0;
  logic       clear = 0;
  logic       in_valid = 0;
  logic [1:0] in_stream = '0;
  cplx_t      in_sample = '0;
  logic       out_valid;
  logic [1:0] out_stream;
  cplx_t      out_bins [4];

  int checks = 0, failures = 0, frames = 0;

  str4 #(.NSTREAMS(NS)) dut (.*);

  always #5 clk = ~clk;

  ci_t hist [NS][$];
  int  nsamp [NS];
  int  due_cycle[$];
  int  due_stream[$];
  real exp_r[$], exp_i[$];
  int  cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && clear) begin
      for (int s = 0; s < NS; s++) begin
        hist[s].delete();
        nsamp[s] = 0;
      end
    end else if (rst_n && in_valid) begin
      ci_t x;
      x.re = int'(in_sample.re);
      x.im = int'(in_sample.im);
      hist[in_stream].push_front(x);
      if (hist[in_stream].size() > 16) void'(hist[in_stream].pop_back());
      nsamp[in_stream]++;
      if (nsamp[in_stream] % 4 == 0) begin
        due_cycle.push_back(cyc + 2);
        due_stream.push_back(int'(in_stream));
        for (int k = 0; k < 4; k++) begin
          real yr, yi;
          frame_real(hist[in_stream], 4, 4, k, yr, yi);
          exp_r.push_back(yr);
          exp_i.push_back(yi);
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      frames++;
      checks++;
      if (due_cycle.size() == 0 || due_cycle.pop_front() != cyc ||
          due_stream.pop_front() != int'(out_stream)) begin
        failures++;
        $display("frame %0d: wrong cycle or stream", frames);
      end
      for (int k = 0; k < 4; k++) begin
        real er, ei;
        er = exp_r.pop_front();
        ei = exp_i.pop_front();
        checks++;
        if ((er - real'(out_bins[k].re)) ** 2 > 36.0 || (ei - real'(out_bins[k].im)) ** 2 > 36.0) begin
          failures++;
          if (failures < 10)
            $display("frame %0d bin %0d: got %0d,%0d expected %f,%f", frames, k,
                     out_bins[k].re, out_bins[k].im, er, ei);
        end
      end
    end
  end

  initial begin
    for (int s = 0; s < NS; s++) nsamp[s] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 1200; i++) begin
      @(posedge clk);
      in_valid     <= ($urandom_range(0, 4) != 0);
      in_stream    <= 2'($urandom);
      in_sample.re <= 16'($signed(16'($urandom)) >>> 1);
      in_sample.im <= 16'($signed(16'($urandom)) >>> 1);
      clear        <= (i == 600);
      if (i == 600) in_valid <= 0;
    end
    @(posedge clk);
    in_valid <= 0;
    clear    <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (frames < 150 || due_cycle.size() != 0) begin
      failures++;
      $display("frames %0d pending %0d", frames, due_cycle.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
