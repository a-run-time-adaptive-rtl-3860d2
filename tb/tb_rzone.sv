// tb_rzone: self-checking test of a reconfiguration zone in all its
// configurations.
//
// For every configuration (cover, PBS1..PBS4, in a shuffled order and with a
// rewrite in between) the zone gets random complex sub-band samples, one
// every five clocks as the STR10 delivers them. A reference model of the
// branch, built from the bit-exact filter-bank arithmetic with bins 3 and 1
// of every stream feeding the next stage, predicts every carrier bundle; each
// bundle is compared carrier by carrier, and the number of bundles must be
// the input count divided by 4 per stage. An empty zone must stay silent. An
// injected upset must corrupt every following bundle (bits 7:0 of the real
// parts inverted) until the zone is rewritten.
module tb_rzone;
  import demux_pkg::*;
  import tb_pfb_ref_pkg::*;

  logic      clk = 0;
  logic      rst_n = 0;
  rate_cfg_t cfg = CFG_EMPTY;
  logic      loading = 0;
  logic      seu_inject = 0;
  logic      in_valid = 0;
  cplx_t     in_sample = '0;
  carriers_t out;

  int checks = 0, failures = 0;

  rzone dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------- reference model
  typedef struct {
    int  s;
    int  p;
    ci_t x;
  } work_t;

  ci_t  hs [4][8][$];
  int   cnt [4][8];
  int   last;
  ci_t  cur [16];
  ci_t  expq [$];   // 16 entries per expected bundle
  int   exp_count;
  logic upset_exp;
  int   got_bundles;

  function automatic void ref_reset();
    for (int s = 0; s < 4; s++)
      for (int p = 0; p < 8; p++) begin
        hs[s][p].delete();
        cnt[s][p] = 0;
      end
    expq.delete();
  endfunction

  function automatic void ref_feed(ci_t x);
    work_t w[$];
    w.push_back('{s: 0, p: 0, x: x});
    while (w.size() > 0) begin
      work_t e;
      e = w.pop_front();
      hs[e.s][e.p].push_front(e.x);
      if (hs[e.s][e.p].size() > 16) void'(hs[e.s][e.p].pop_back());
      cnt[e.s][e.p]++;
      if (cnt[e.s][e.p] % 4 == 0) begin
        ci_t lo, hi;
        lo = frame_int(hs[e.s][e.p], 4, 4, 3);
        hi = frame_int(hs[e.s][e.p], 4, 4, 1);
        if (e.s == last) begin
          cur[2*e.p]     = lo;
          cur[2*e.p + 1] = hi;
          if (e.p == (1 << last) - 1) for (int i = 0; i < 16; i++) expq.push_back(cur[i]);
        end else begin
          w.push_back('{s: e.s + 1, p: 2*e.p,     x: lo});
          w.push_back('{s: e.s + 1, p: 2*e.p + 1, x: hi});
        end
      end
    end
  endfunction

  // ------------------------------------------------------------- checking
  always @(posedge clk) begin
    if (rst_n && out.valid) begin
      got_bundles++;
      checks++;
      if (cfg == CFG_EMPTY || expq.size() == 0) begin
        failures++;
        $display("unexpected bundle, cfg %0d", cfg);
      end else begin
        ci_t e [16];
        for (int i = 0; i < 16; i++) e[i] = expq.pop_front();
        if (int'(out.count) != exp_count) begin
          failures++;
          $display("count %0d expected %0d", out.count, exp_count);
        end
        for (int i = 0; i < exp_count; i++) begin
          int er;
          er = upset_exp ? ((e[i].re & ~255) | (~e[i].re & 255)) : e[i].re;
          checks++;
          if (int'(out.c[i].re) != er || int'(out.c[i].im) != e[i].im) begin
            failures++;
            if (failures < 10)
              $display("cfg %0d carrier %0d: got %0d,%0d expected %0d,%0d", cfg, i,
                       out.c[i].re, out.c[i].im, er, e[i].im);
          end
        end
      end
    end
  end

  // -------------------------------------------------------------- stimulus
  task automatic load(rate_cfg_t c);
    @(posedge clk);
    loading <= 1;
    repeat (3) @(posedge clk);
    cfg       <= c;
    loading   <= 0;
    upset_exp  = 0;
    ref_reset();
    exp_count = int'(carriers_of(c));
    case (c)
      CFG_4M:  last = 0;
      CFG_2M:  last = 1;
      CFG_1M:  last = 2;
      default: last = 3;
    endcase
    got_bundles = 0;
  endtask

  task automatic drive(int n, rate_cfg_t c);
    for (int i = 0; i < n; i++) begin
      ci_t x;
      @(posedge clk);
      x.re = int'($signed(16'($urandom))) / 2;
      x.im = int'($signed(16'($urandom))) / 2;
      in_valid     <= 1;
      in_sample.re <= 16'(x.re);
      in_sample.im <= 16'(x.im);
      if (c == CFG_8M) begin
        expq.push_back(x);
        for (int i = 1; i < 16; i++) expq.push_back('{re: 0, im: 0});
      end else if (c != CFG_EMPTY) begin
        ref_feed(x);
      end
      @(posedge clk);
      in_valid <= 0;
      repeat (3) @(posedge clk);
    end
    repeat (40) @(posedge clk);
  endtask

  function automatic int expected_bundles(rate_cfg_t c, int n);
    case (c)
      CFG_8M:  return n;
      CFG_4M:  return n / 4;
      CFG_2M:  return n / 16;
      CFG_1M:  return n / 64;
      CFG_05M: return n / 256;
      default: return 0;
    endcase
  endfunction

  initial begin
    rate_cfg_t order [6] = '{CFG_2M, CFG_8M, CFG_05M, CFG_EMPTY, CFG_4M, CFG_1M};
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    foreach (order[i]) begin
      n = (order[i] == CFG_05M) ? 1024 : (order[i] == CFG_1M ? 512 : 128);
      load(order[i]);
      drive(n, order[i]);
      checks++;
      if (got_bundles != expected_bundles(order[i], n) || expq.size() != 0) begin
        failures++;
        $display("cfg %0d: %0d bundles, expected %0d", order[i], got_bundles,
                 expected_bundles(order[i], n));
      end
    end
    // upset: corrupted output until the zone is rewritten
    load(CFG_4M);
    drive(16, CFG_4M);
    @(posedge clk);
    seu_inject <= 1;
    @(posedge clk);
    seu_inject <= 0;
    upset_exp = 1;
    drive(32, CFG_4M);
    checks++;
    if (got_bundles != 12) begin
      failures++;
      $display("upset phase: %0d bundles", got_bundles);
    end
    load(CFG_4M);
    drive(32, CFG_4M);
    checks++;
    if (got_bundles != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
