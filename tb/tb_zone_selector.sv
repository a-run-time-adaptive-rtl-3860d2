// tb_zone_selector: self-checking test of the sub-band placement selector.
//
// Runs every SBO assignment of four zones (each zone empty or holding one of
// SB1..SB4, 625 combinations, among them the order 2,3,1,4 and every duplex
// and TMR placement) with both values of the spare bit. Each zone must get
// the stream of its sub-band (or nothing), and each SBj_out must be the
// bundle of the first zone holding SBj, of the second one when the spare bit
// is set and a second exists, or zeros when no zone holds it; the replica
// count is checked too.
module tb_zone_selector;
  import demux_pkg::*;

  logic [SB_W-1:0] zone_sb       [NUM_ZONES];
  logic            spare;
  logic            sb_valid;
  cplx_t           sb_in         [NUM_SB];
  logic            zone_in_valid [NUM_ZONES];
  cplx_t           zone_in       [NUM_ZONES];
  carriers_t       zone_out      [NUM_ZONES];
  carriers_t       sel_out       [NUM_SB];
  logic [2:0]      replicas      [NUM_SB];

  int checks = 0, failures = 0;

  zone_selector dut (.*);

  initial begin
    for (int j = 0; j < NUM_SB; j++) begin
      sb_in[j].re = 16'(100 + j);
      sb_in[j].im = 16'(-200 - j);
    end
    for (int z = 0; z < NUM_ZONES; z++) begin
      zone_out[z]       = '0;
      zone_out[z].valid = 1'b1;
      zone_out[z].count = 5'(z + 1);
      zone_out[z].c[0]  = '{re: 16'(1000 * (z + 1)), im: 16'(7)};
    end
    for (int code = 0; code < 625; code++) begin
      for (int sp = 0; sp < 2; sp++) begin
        int v [NUM_ZONES];
        int t;
        t = code;
        for (int z = 0; z < NUM_ZONES; z++) begin
          v[z] = t % 5;
          t = t / 5;
          zone_sb[z] = SB_W'(v[z]);
        end
        spare    = sp[0];
        sb_valid = code[0];
        #1;
        for (int z = 0; z < NUM_ZONES; z++) begin
          checks++;
          if (v[z] == 0) begin
            if (zone_in_valid[z] || zone_in[z] != '0) failures++;
          end else if (zone_in_valid[z] != sb_valid || zone_in[z] != sb_in[v[z] - 1]) begin
            failures++;
          end
        end
        for (int j = 1; j <= NUM_SB; j++) begin
          int first, second, n;
          carriers_t e;
          first = -1;
          second = -1;
          n = 0;
          for (int z = 0; z < NUM_ZONES; z++)
            if (v[z] == j) begin
              if (n == 0) first = z;
              if (n == 1) second = z;
              n++;
            end
          if (first < 0)                    e = '0;
          else if (sp == 1 && second >= 0) e = zone_out[second];
          else                              e = zone_out[first];
          checks++;
          if (sel_out[j-1] != e || int'(replicas[j-1]) != n) begin
            failures++;
            if (failures < 10) $display("code %0d sb %0d spare %0d wrong", code, j, sp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
