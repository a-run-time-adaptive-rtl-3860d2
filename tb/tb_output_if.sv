// tb_output_if: self-checking test of the time-multiplexed DEMDEC outputs.
//
// Channel 0 gets a one-carrier bundle every 5 clocks (8 MHz carriers),
// channel 1 a bundle of random size (2, 4, 8 or 16 carriers) with enough
// clocks between bundles to send them, channel 2 nothing. out_ce must come
// exactly once every OUT_DIV = 5 clocks; on each, a channel must send its
// next carrier as {1, I[15:7], Q[15:7]} in order, and zeros once its bundle
// is sent. Every carrier sent must be the next one expected, in order, and
// all must be sent.
module tb_output_if;
  import demux_pkg::*;

  localparam int NCH = 3;

  logic        clk = 0;
  logic        rst_n = 0;
  carriers_t   bundle [NCH];
  logic        out_ce;
  logic [18:0] demdec_out [NCH];

  int checks = 0, failures = 0;

  output_if #(.NCH(NCH), .OUT_DIV(5)) dut (.*);

  always #5 clk = ~clk;

  logic [18:0] expq [NCH][$];
  int cyc = 0, last_ce = -1, sent = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Words appear one clock after out_ce.
  logic ce_d = 0;
  always @(posedge clk) begin
    ce_d <= out_ce & rst_n;
    if (rst_n && out_ce) begin
      checks++;
      if (last_ce >= 0 && cyc - last_ce != 5) begin
        failures++;
        $display("out_ce period %0d", cyc - last_ce);
      end
      last_ce = cyc;
    end
    if (ce_d) begin
      for (int ch = 0; ch < NCH; ch++) begin
        logic [18:0] e;
        e = 19'h0;
        if (demdec_out[ch][18]) e = (expq[ch].size() > 0) ? expq[ch].pop_front() : 19'h1;
        checks++;
        if (demdec_out[ch] != e) begin
          failures++;
          if (failures < 10) $display("ch %0d got %h expected %h", ch, demdec_out[ch], e);
        end
        if (e[18]) sent++;
      end
    end
  end

  task automatic give(int ch, int n);
    bundle[ch].valid = 1;
    bundle[ch].count = 5'(n);
    for (int i = 0; i < MAX_CARRIERS; i++) begin
      bundle[ch].c[i] = {$urandom};
      if (i < n) expq[ch].push_back({1'b1, bundle[ch].c[i].re[15:7], bundle[ch].c[i].im[15:7]});
    end
  endtask

  int total = 0;
  initial begin
    for (int ch = 0; ch < NCH; ch++) bundle[ch] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // align to the slot: give bundles right after an out_ce
    @(posedge clk iff out_ce);
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int ch = 0; ch < NCH; ch++) bundle[ch].valid = 0;
      if (t % 5 == 0) begin
        give(0, 1);
        total++;
      end
      if (t % 100 == 0) begin
        int n;
        n = 2 << $urandom_range(0, 3);
        give(1, n);
        total += n;
      end
    end
    @(negedge clk);
    for (int ch = 0; ch < NCH; ch++) bundle[ch].valid = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (sent != total) begin
      failures++;
      $display("sent %0d of %0d", sent, total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
