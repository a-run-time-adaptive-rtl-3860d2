// tb_adaptive_voter: self-checking test of the adaptive majority voter.
//
// Places SB3 in zones 1, 2 and 4 and SB2 in zone 3 (the TMR example), then
// random placements, and corrupts random replicas. Expected outputs and
// flags are derived from the placement: a single disagreeing TMR replica is
// masked and flagged, a duplex mismatch flags both zones, a zone out of
// service takes no part, and with voting disabled the selector's choice
// passes and nothing is flagged. A fourth replica is not voted.
module tb_adaptive_voter;
  import demux_pkg::*;

  logic            vote_en;
  logic [SB_W-1:0] zone_sb  [NUM_ZONES];
  logic            zone_ok  [NUM_ZONES];
  carriers_t       zone_out [NUM_ZONES];
  carriers_t       sel_out  [NUM_SB];
  carriers_t       sb_out   [NUM_SB];
  logic [NUM_ZONES-1:0] flag_set;

  int checks = 0, failures = 0;
  int masked = 0, flagged = 0;

  adaptive_voter dut (.*);

  carriers_t good [NUM_SB];

  task automatic run_case(int v [NUM_ZONES], logic ok [NUM_ZONES], logic bad [NUM_ZONES], logic en);
    logic [NUM_ZONES-1:0] ef;
    carriers_t eo [NUM_SB];
    vote_en = en;
    for (int z = 0; z < NUM_ZONES; z++) begin
      zone_sb[z] = SB_W'(v[z]);
      zone_ok[z] = ok[z];
      zone_out[z] = (v[z] == 0) ? '0 : good[v[z] - 1];
      if (bad[z]) zone_out[z].c[3].im = zone_out[z].c[3].im ^ 16'h0100;
    end
    for (int j = 0; j < NUM_SB; j++) begin
      sel_out[j] = '0;
      sel_out[j].count = 5'd31;   // marker: selector's value
      sel_out[j].c[0].re = 16'(j);
    end
    #1;
    ef = '0;
    for (int j = 0; j < NUM_SB; j++) begin
      int r [$];
      int nbad;
      for (int z = 0; z < NUM_ZONES; z++) if (v[z] == j + 1 && ok[z] && r.size() < 3) r.push_back(z);
      eo[j] = sel_out[j];
      nbad = 0;
      foreach (r[i]) if (bad[r[i]]) nbad++;
      if (en && r.size() == 2) begin
        eo[j] = zone_out[r[0]];
        if (nbad == 1) begin ef[r[0]] = 1; ef[r[1]] = 1; end
      end else if (en && r.size() == 3) begin
        if (nbad == 1) begin
          eo[j] = good[j];
          foreach (r[i]) if (bad[r[i]]) ef[r[i]] = 1;
          masked++;
        end else begin
          eo[j] = zone_out[r[0]];   // all bad alike: majority of bad equal replicas
          if (nbad == 2) begin
            foreach (r[i]) if (!bad[r[i]]) ef[r[i]] = 1;
            eo[j] = zone_out[bad[r[0]] ? r[0] : r[1]];
          end
        end
      end
    end
    checks++;
    if (flag_set != ef) begin
      failures++;
      $display("flags %b expected %b", flag_set, ef);
    end
    if (flag_set != 0) flagged++;
    for (int j = 0; j < NUM_SB; j++) begin
      checks++;
      if (sb_out[j] != eo[j]) begin
        failures++;
        $display("SB%0d output wrong", j + 1);
      end
    end
  endtask

  initial begin
    int   v   [NUM_ZONES];
    logic ok  [NUM_ZONES];
    logic bad [NUM_ZONES];
    for (int j = 0; j < NUM_SB; j++) begin
      good[j] = '0;
      good[j].valid = 1;
      good[j].count = 5'd4;
      for (int i = 0; i < 16; i++) good[j].c[i] = '{re: 16'($urandom), im: 16'($urandom)};
    end
    // TMR example: SB3 in zones 1,2,4, SB2 in zone 3, fault in zone 2
    v = '{3, 3, 2, 3};
    ok = '{1, 1, 1, 1};
    bad = '{0, 1, 0, 0};
    run_case(v, ok, bad, 1);
    checks++;
    if (flag_set != 4'b0010 || sb_out[2] != good[2] || sb_out[1] != sel_out[1]) begin
      failures++;
      $display("TMR example wrong");
    end
    // random placements
    for (int it = 0; it < 3000; it++) begin
      for (int z = 0; z < NUM_ZONES; z++) begin
        v[z]   = $urandom_range(0, 4);
        ok[z]  = ($urandom_range(0, 5) != 0);
        bad[z] = ($urandom_range(0, 4) == 0);
      end
      run_case(v, ok, bad, ($urandom_range(0, 4) != 0));
    end
    checks++;
    if (masked == 0 || flagged == 0) begin
      failures++;
      $display("masked %0d flagged %0d", masked, flagged);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
