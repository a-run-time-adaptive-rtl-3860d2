// tb_reconfig_engine: self-checking test of the reconfiguration sequencing.
//
// With a 1 MHz clock scale (1 clock per microsecond) and a sync pulse every
// 50 clocks, it demands the TMR example (SB3 at 2 MHz in zones 1, 2 and 4,
// SB2 at 4 MHz in zone 3) and checks that the zones are rewritten one at a
// time in order, that each rewrite lasts at least the partial bitstream's
// write time (PBS1 103.3 us, PBS2 191.9 us, cover 29.52 us, rounded up) and
// ends on a sync pulse, that the zone comes into service SETTLE_SYNCS sync
// periods later, and that a flag bit causes a repair of the same
// configuration, clears the flag and counts as a repair. A later change of
// demand must cause a rewrite of the affected zone only.
module tb_reconfig_engine;
  import demux_pkg::*;

  logic                 clk = 0;
  logic                 rst_n = 0;
  rate_cfg_t            sb_cfg       [NUM_SB];
  logic [SB_W-1:0]      zone_sb      [NUM_ZONES];
  logic [NUM_ZONES-1:0] flags = '0;
  logic                 sync = 0;
  rate_cfg_t            zone_cfg     [NUM_ZONES];
  logic                 zone_loading [NUM_ZONES];
  logic                 zone_ok      [NUM_ZONES];
  logic [NUM_ZONES-1:0] flag_clr;
  logic                 busy;
  logic [15:0]          n_reconfig;
  logic [15:0]          n_repair;

  int checks = 0, failures = 0;
  int cyc = 0;

  reconfig_engine #(.CLK_MHZ(1), .SETTLE_SYNCS(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    sync <= ((cyc % 50) == 49);
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0d: %s", cyc, what);
    end
  endtask

  // Record rewrite intervals per zone.
  int start_c [NUM_ZONES];
  int len_q   [$];
  int zone_q  [$];
  logic was_loading [NUM_ZONES];
  always @(posedge clk) begin
    if (rst_n) begin
      int nload;
      nload = 0;
      for (int z = 0; z < NUM_ZONES; z++) begin
        if (zone_loading[z]) nload++;
        if (zone_loading[z] && !was_loading[z]) start_c[z] = cyc;
        if (!zone_loading[z] && was_loading[z]) begin
          len_q.push_back(cyc - start_c[z]);
          zone_q.push_back(z);
        end
        was_loading[z] = zone_loading[z];
      end
      if (nload > 1) begin
        checks++;
        failures++;
        $display("two zones rewritten at once");
      end
    end
  end

  int flag_clr_seen [NUM_ZONES];
  always @(posedge clk) if (rst_n) for (int z = 0; z < NUM_ZONES; z++) if (flag_clr[z]) flag_clr_seen[z]++;

  initial begin
    for (int z = 0; z < NUM_ZONES; z++) begin
      zone_sb[z] = SB_W'(z + 1);
      was_loading[z] = 0;
      flag_clr_seen[z] = 0;
    end
    for (int j = 0; j < NUM_SB; j++) sb_cfg[j] = CFG_EMPTY;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);
    check(!busy && n_reconfig == 0, "nothing to do while all sub-bands are empty");
    // TMR example
    @(negedge clk);
    zone_sb = '{3'd3, 3'd3, 3'd2, 3'd3};
    sb_cfg[2] = CFG_2M;
    sb_cfg[1] = CFG_4M;
    wait (n_reconfig == 4);
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(zone_q.size() == 4, "four rewrites");
    for (int i = 0; i < 4; i++) begin
      int need;
      need = (i == 2) ? 104 : 192;
      check(zone_q[i] == i, "order of rewrites");
      check(len_q[i] >= need && len_q[i] <= need + 52, $sformatf("rewrite %0d took %0d", i, len_q[i]));
    end
    check(zone_cfg[0] == CFG_2M && zone_cfg[1] == CFG_2M && zone_cfg[2] == CFG_4M && zone_cfg[3] == CFG_2M,
          "loaded configurations");
    check(!zone_ok[3], "fresh zone not yet in service");
    repeat (110) @(posedge clk);
    @(negedge clk);
    check(zone_ok[0] && zone_ok[1] && zone_ok[2] && zone_ok[3], "all zones in service");
    // repair of zone 2 (index 1)
    flags = 4'b0010;
    wait (flag_clr[1]);
    repeat (2) @(posedge clk);
    @(negedge clk);
    flags = 4'b0000;
    check(n_repair == 1 && n_reconfig == 5 && zone_cfg[1] == CFG_2M, "repair counted");
    check(len_q[4] >= 192 && zone_q[4] == 1, "repair rewrote zone 2");
    check(flag_clr_seen[1] == 2, $sformatf("flag cleared after each rewrite of zone 2 (%0d)", flag_clr_seen[1]));
    // change of demand: SB2 goes to cover
    repeat (120) @(posedge clk);
    @(negedge clk);
    sb_cfg[1] = CFG_8M;
    wait (n_reconfig == 6);
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(zone_q[5] == 2 && len_q[5] >= 30 && zone_cfg[2] == CFG_8M && n_repair == 1, "cover rewrite of zone 3");
    repeat (200) @(posedge clk);
    check(n_reconfig == 6 && !busy, "idle afterwards");
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
