// tb_demux_top: end-to-end test of the adaptive demultiplexer at its default
// parameters (90 MHz clock scale for the rewrite times).
//
// A processor model drives the register port, random ADC samples arrive on
// every clock, and the test walks through the design's mechanisms:
//   1. placement: demand 0.5, 8, 4 and 2 MHz from SB1..SB4 with the sub-bands
//      placed in zones in the order 2, 3, 1, 4; all four zones are rewritten.
//      The 8 MHz words of SB2 are compared with the filter-bank formula
//      applied to the ADC samples, and every channel must carry its number
//      of carriers per frame period (16, 1 per frame, 2 per 4 frames, 4 per
//      16 frames; the fifth sub-band, at 4 MHz, 1 per 4 frames).
//   2. TMR (mode switch): SB3 at 2 MHz in zones 1, 2 and 4, SB2 at 4 MHz in
//      zone 3; SB1 and SB4 must go silent, and the fifth sub-band, switched
//      to 0.5 MHz, must deliver 8 carriers per frame period. An upset in zone 2 must be masked
//      (the voted SB3 bundle equals healthy zone 1's while zone 2's differs),
//      flagged, seen as the odd one in the captured registers, repaired by a
//      rewrite, and the flag cleared.
//   3. duplex: SB3 in zones 1 and 2 only; an upset in zone 1 flags both.
//   4. voting by readback: the hardware voter off, TMR again, an upset in
//      zone 1 (the replica the selector forwards). The processor model pulses
//      gcapture, compares the captured zone registers, finds zone 1 in the
//      minority, sets the spare bit (SB3 must then come from zone 2) and
//      reports zone 1 through the flag register for repair.
// The processor's software voting is modelled here, in the testbench; the
// mask checks look at the voter's internal bundles by hierarchical name.
// Each mechanism is counted; one that never happened is a failure.
module tb_demux_top;
  import demux_pkg::*;
  import tb_pfb_ref_pkg::*;

  logic                 clk = 0;
  logic                 rst_n = 0;
  logic                 adc_valid = 0;
  logic signed [9:0]    adc_data = '0;
  logic                 reg_wr = 0;
  logic [1:0]           reg_addr = '0;
  logic [31:0]          reg_wdata = '0;
  logic [31:0]          reg_rdata;
  logic [NUM_ZONES-1:0] seu_inject = '0;
  logic                 gcapture = 0;
  logic [31:0]          cap_out      [NUM_ZONES];
  logic [31:0]          cap_fb       [NUM_ZONES];
  logic                 demdec_ce;
  logic [18:0]          demdec_out   [NUM_SB+1];
  logic [NUM_ZONES-1:0] flags;
  rate_cfg_t            zone_cfg     [NUM_ZONES];
  logic                 zone_loading [NUM_ZONES];
  logic                 zone_ok      [NUM_ZONES];
  logic                 reconfig_busy;
  logic [15:0]          n_reconfig;
  logic [15:0]          n_repair;
  logic [NUM_ZONES-1:0] flag_events;

  demux_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // ----------------------------------------------------------- ADC source
  ci_t hist[$];
  int  nsamp = 0;
  logic [18:0] sb2_exp[$];
  logic        track_sb2 = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      adc_valid <= 1'b1;
      adc_data  <= 10'($urandom);
    end
    if (rst_n && adc_valid) begin
      ci_t s;
      s.re = int'(adc_data) * 64;
      s.im = 0;
      hist.push_front(s);
      if (hist.size() > 40) void'(hist.pop_back());
      nsamp++;
      if (nsamp % 5 == 0 && track_sb2) begin
        ci_t y;
        y = frame_int(hist, 10, 4, 2);
        begin
          logic [15:0] yr, yi;
          yr = 16'(y.re);
          yi = 16'(y.im);
          sb2_exp.push_back({1'b1, yr[15:7], yi[15:7]});
        end
      end
    end
  end

  // ------------------------------------------------------ output monitors
  int   words [NUM_SB+1];
  logic ce_d = 0;
  int   sb2_matched = 0, sb2_bad = 0;
  logic sb2_synced = 0;

  always @(posedge clk) begin
    ce_d <= demdec_ce && rst_n;
    if (ce_d) begin
      for (int ch = 0; ch <= NUM_SB; ch++) if (demdec_out[ch][18]) words[ch]++;
      if (track_sb2 && demdec_out[1][18]) begin
        if (!sb2_synced) begin
          while (sb2_exp.size() > 0 && sb2_exp[0] != demdec_out[1]) void'(sb2_exp.pop_front());
          if (sb2_exp.size() > 0) begin
            void'(sb2_exp.pop_front());
            sb2_synced = 1;
            sb2_matched++;
          end
        end else if (sb2_exp.size() > 0 && sb2_exp.pop_front() == demdec_out[1]) sb2_matched++;
        else sb2_bad++;
      end
    end
  end

  // SB3 voted output against the zones: equal to the healthy zone `ref_z`,
  // different from the corrupted zone `bad_z`.
  logic chk_mask = 0;
  int   ref_z = 0, bad_z = 1;
  int   mask_same = 0, mask_wrong = 0, bad_differs = 0;
  always @(posedge clk) begin
    if (chk_mask && dut.zone_out[ref_z].valid) begin
      if (dut.sb_out[2] == dut.zone_out[ref_z]) mask_same++;
      else mask_wrong++;
      if (dut.zone_out[bad_z] != dut.zone_out[ref_z]) bad_differs++;
    end
  end

  int flag_ev [NUM_ZONES];
  always @(posedge clk) if (rst_n) for (int z = 0; z < NUM_ZONES; z++) if (flag_events[z]) flag_ev[z]++;

  // ------------------------------------------------------ processor model
  task automatic wr(int a, logic [31:0] d);
    @(negedge clk);
    reg_wr    = 1;
    reg_addr  = 2'(a);
    reg_wdata = d;
    @(negedge clk);
    reg_wr    = 0;
  endtask

  function automatic logic [31:0] cfg_word(rate_cfg_t c1, rate_cfg_t c2, rate_cfg_t c3, rate_cfg_t c4,
                                          rate_cfg_t c5);
    return {17'b0, 3'(c5), 3'(c4), 3'(c3), 3'(c2), 3'(c1)};
  endfunction

  function automatic logic [31:0] sbo_word(int z1, int z2, int z3, int z4, logic spare, logic vote);
    return {18'b0, vote, spare, 3'(z4), 3'(z3), 3'(z2), 3'(z1)};
  endfunction

  task automatic wait_settled(int n_target);
    wait (n_reconfig >= 16'(n_target));
    repeat (2) @(posedge clk);
    while (reconfig_busy) @(posedge clk);
    // all zones in use back in service
    repeat (1280 * (6 + 1)) @(posedge clk);
  endtask

  task automatic seu(int z);
    @(negedge clk);
    seu_inject[z] = 1;
    @(negedge clk);
    seu_inject = '0;
  endtask

  int frame_period = 1280;   // 256 STR10 frames of 5 clocks
  int n_place = 0, n_mode = 0, n_tmr_mask = 0, n_dmr_detect = 0, n_repairs_seen = 0;
  int n_readback = 0, n_spare = 0, n_silent = 0, n_sb5_rate = 0;

  initial begin
    int w0 [NUM_SB+1];
    int nr;
    for (int z = 0; z < NUM_ZONES; z++) flag_ev[z] = 0;
    for (int ch = 0; ch <= NUM_SB; ch++) words[ch] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;

    // ---- 1. placement 2,3,1,4 with 0.5/8/4/2 MHz demanded from SB1..SB4
    wr(0, cfg_word(CFG_05M, CFG_8M, CFG_4M, CFG_2M, CFG_4M));
    wr(1, sbo_word(2, 3, 1, 4, 0, 1));
    wait_settled(4);
    check(zone_cfg[0] == CFG_8M && zone_cfg[1] == CFG_4M && zone_cfg[2] == CFG_05M && zone_cfg[3] == CFG_2M,
          "zones loaded for placement 2,3,1,4");
    track_sb2 = 1;
    @(posedge clk iff (dut.fcnt == 8'h00 && dut.f_valid));
    for (int ch = 0; ch <= NUM_SB; ch++) w0[ch] = words[ch];
    repeat (4 * frame_period) @(posedge clk);
    begin
      int d [NUM_SB+1];
      for (int ch = 0; ch <= NUM_SB; ch++) d[ch] = words[ch] - w0[ch];
      check(d[0] >= 4 * 16 - 16 && d[0] <= 4 * 16 + 16, $sformatf("SB1 0.5 MHz words %0d", d[0]));
      check(d[1] >= 4 * 256 - 2 && d[1] <= 4 * 256 + 2, $sformatf("SB2 8 MHz words %0d", d[1]));
      check(d[2] >= 4 * 128 - 4 && d[2] <= 4 * 128 + 4, $sformatf("SB3 4 MHz words %0d", d[2]));
      check(d[3] >= 4 * 64 - 8 && d[3] <= 4 * 64 + 8, $sformatf("SB4 2 MHz words %0d", d[3]));
      check(d[4] >= 4 * 64 - 2 && d[4] <= 4 * 64 + 2, $sformatf("SB5 words %0d", d[4]));
    end
    check(sb2_synced && sb2_matched > 1000 && sb2_bad == 0,
          $sformatf("SB2 8 MHz carrier against reference: %0d matched, %0d wrong", sb2_matched, sb2_bad));
    track_sb2 = 0;
    if (sb2_synced && sb2_bad == 0) n_place++;

    // ---- 2. TMR: SB3 at 2 MHz in zones 1,2,4; SB2 at 4 MHz in zone 3
    nr = int'(n_reconfig);
    wr(0, cfg_word(CFG_EMPTY, CFG_4M, CFG_2M, CFG_EMPTY, CFG_05M));
    wr(1, sbo_word(3, 3, 2, 3, 0, 1));
    wait_settled(nr + 4);
    n_mode++;
    check(zone_cfg[0] == CFG_2M && zone_cfg[1] == CFG_2M && zone_cfg[2] == CFG_4M && zone_cfg[3] == CFG_2M,
          "TMR configuration loaded");
    check(flags == 0, "no flag in a fault-free TMR");
    for (int ch = 0; ch <= NUM_SB; ch++) w0[ch] = words[ch];
    repeat (2 * frame_period) @(posedge clk);
    check(words[0] == w0[0] && words[3] == w0[3], "SB1 and SB4 silent when left out");
    check(words[4] - w0[4] >= 2 * 8 - 8 && words[4] - w0[4] <= 2 * 8 + 8,
          $sformatf("SB5 0.5 MHz words %0d", words[4] - w0[4]));
    if (words[4] - w0[4] >= 8) n_sb5_rate++;
    if (words[0] == w0[0] && words[3] == w0[3]) n_silent++;
    nr = int'(n_repair);
    ref_z = 0;
    bad_z = 1;
    chk_mask = 1;
    seu(1);
    repeat (2 * frame_period) @(posedge clk);
    chk_mask = 0;
    check(bad_differs > 0 && mask_same > 0 && mask_wrong == 0,
          $sformatf("TMR masks zone 2: %0d voted words right, %0d wrong, zone 2 wrong %0d times",
                    mask_same, mask_wrong, bad_differs));
    check(flag_ev[1] > 0 && flag_ev[0] == 0 && flag_ev[3] == 0, "TMR upset flags zone 2 only");
    @(negedge clk);
    gcapture = 1;
    @(negedge clk);
    gcapture = 0;
    check(cap_out[0] == cap_out[3] && cap_out[1] != cap_out[0], "captured replicas: zone 2 odd");
    wait (n_repair > 16'(nr));
    n_repairs_seen++;
    repeat (2) @(posedge clk);
    check(flags[1] == 0, "flag cleared after repair");
    if (flag_ev[1] > 0 && flag_ev[0] == 0 && flag_ev[3] == 0 && mask_wrong == 0 && mask_same > 0) n_tmr_mask++;
    repeat (7 * frame_period) @(posedge clk);
    check(flags == 0, "no flag after repair");

    // ---- 3. duplex: SB3 in zones 1 and 2
    nr = int'(n_reconfig);
    wr(1, sbo_word(3, 3, 2, 0, 0, 1));
    wait_settled(nr + 1);
    for (int z = 0; z < NUM_ZONES; z++) flag_ev[z] = 0;
    nr = int'(n_repair);
    seu(0);
    repeat (frame_period) @(posedge clk);
    check(flag_ev[0] > 0 && flag_ev[1] > 0, "duplex mismatch flags both zones");
    if (flag_ev[0] > 0 && flag_ev[1] > 0) n_dmr_detect++;
    wait (n_repair >= 16'(nr + 2));
    n_repairs_seen++;
    wait_settled(int'(n_reconfig));
    check(flags == 0, "duplex repaired");

    // ---- 4. voting by readback: voter off, TMR, upset in zone 1
    nr = int'(n_reconfig);
    wr(1, sbo_word(3, 3, 2, 3, 0, 0));
    wait_settled(nr + 1);
    for (int z = 0; z < NUM_ZONES; z++) flag_ev[z] = 0;
    seu(0);
    repeat (frame_period) @(posedge clk);
    check(flag_ev == '{0, 0, 0, 0}, "no hardware voting when disabled");
    // processor: capture, compare the three replicas of SB3 (zones 1, 2, 4)
    @(negedge clk);
    gcapture = 1;
    @(negedge clk);
    gcapture = 0;
    n_readback++;
    begin
      int bad;
      bad = -1;
      if (cap_out[0] != cap_out[1] && cap_out[1] == cap_out[3]) bad = 0;
      else if (cap_out[1] != cap_out[0] && cap_out[0] == cap_out[3]) bad = 1;
      else if (cap_out[3] != cap_out[0] && cap_out[0] == cap_out[1]) bad = 3;
      check(bad == 0, $sformatf("readback finds zone 1 faulty (found %0d)", bad + 1));
      if (bad == 0) begin
        wr(1, sbo_word(3, 3, 2, 3, 1, 0));   // spare bit: take the next replica
        n_spare++;
        nr = int'(n_repair);
        wr(2, 32'h10);                       // report zone 1 for repair
        // the output must now come from zone 2 while zone 1 is repaired
        ref_z = 1;
        bad_z = 0;
        mask_same = 0;
        mask_wrong = 0;
        bad_differs = 0;
        chk_mask = 1;
        wait (n_repair > 16'(nr));
        chk_mask = 0;
        n_repairs_seen++;
        check(mask_same > 0 && mask_wrong == 0 && bad_differs > 0,
              $sformatf("spare replica delivers SB3: %0d right, %0d wrong", mask_same, mask_wrong));
      end
    end
    wait_settled(int'(n_reconfig));
    @(negedge clk);
    gcapture = 1;
    @(negedge clk);
    gcapture = 0;
    n_readback++;
    check(cap_out[0] == cap_out[1] && cap_out[1] == cap_out[3], "replicas agree after repair");
    wr(1, sbo_word(3, 3, 2, 3, 0, 0));

    $display("mechanisms: placement %0d mode-switch %0d tmr-mask %0d dmr-detect %0d repairs %0d readback %0d spare %0d silent %0d sb5-rate %0d reconfigs %0d",
             n_place, n_mode, n_tmr_mask, n_dmr_detect, n_repairs_seen, n_readback, n_spare, n_silent, n_sb5_rate, n_reconfig);
    check(n_place > 0 && n_mode > 0 && n_tmr_mask > 0 && n_dmr_detect > 0 && n_repairs_seen >= 3 &&
          n_readback > 0 && n_spare > 0 && n_silent > 0 && n_sb5_rate > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
