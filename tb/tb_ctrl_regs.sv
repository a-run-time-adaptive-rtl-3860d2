// tb_ctrl_regs: self-checking test of the configuration / SBO / flag registers.
//
// Checks the reset values, writes and reads back CONFIG and SBO and their
// decoded fields, sets flag bits from hardware, clears them by the engine's
// clear and by a software write of ones, and checks that a set wins over a
// clear in the same clock, and that software can set flag bits.
module tb_ctrl_regs;
  import demux_pkg::*;

  logic                 clk = 0;
  logic                 rst_n = 0;
  logic                 wr_en = 0;
  logic [1:0]           addr = '0;
  logic [31:0]          wdata = '0;
  logic [31:0]          rdata;
  logic [NUM_ZONES-1:0] flag_set = '0;
  logic [NUM_ZONES-1:0] flag_clr = '0;
  rate_cfg_t            sb_cfg  [NUM_SB];
  rate_cfg_t            sb5_cfg;
  logic [SB_W-1:0]      zone_sb [NUM_ZONES];
  logic                 spare;
  logic                 vote_en;
  logic [NUM_ZONES-1:0] flags;

  int checks = 0, failures = 0;

  ctrl_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk);
    wr_en = 1;
    addr  = 2'(a);
    wdata = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  logic [31:0] r0, r1, r2;
  task automatic rd_all();
    addr = 2'd0; #1; r0 = rdata;
    addr = 2'd1; #1; r1 = rdata;
    addr = 2'd2; #1; r2 = rdata;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    rd_all();
    check(r0 == 32'h0 && r1 == 32'h28D1 && r2 == 32'h0, "reset values");
    check(zone_sb[0] == 1 && zone_sb[1] == 2 && zone_sb[2] == 3 && zone_sb[3] == 4 && vote_en && !spare,
          "reset fields");
    for (int it = 0; it < 50; it++) begin
      logic [14:0] c;
      logic [13:0] s;
      c = 15'($urandom);
      s = 14'($urandom);
      wr(0, {17'h1ABCD, c});
      wr(1, {18'h3FFFF, s});
      rd_all();
      check(r0 == {17'b0, c} && r1 == {18'b0, s}, "read back");
      check(sb5_cfg == rate_cfg_t'(c[14:12]), "sb5_cfg field");
      for (int j = 0; j < NUM_SB; j++) check(sb_cfg[j] == rate_cfg_t'(c[3*j +: 3]), "sb_cfg field");
      for (int z = 0; z < NUM_ZONES; z++) check(zone_sb[z] == s[3*z +: 3], "zone_sb field");
      check(spare == s[12] && vote_en == s[13], "spare/vote bits");
    end
    @(negedge clk);
    flag_set = 4'b0101;
    @(negedge clk);
    flag_set = 4'b0000;
    rd_all();
    check(flags == 4'b0101 && r2 == 32'h5, "flags set");
    flag_clr = 4'b0001;
    @(negedge clk);
    flag_clr = 4'b0000;
    check(flags == 4'b0100, "engine clear");
    wr(2, 32'h4);
    check(flags == 4'b0000, "software clear");
    flag_set = 4'b1000;
    flag_clr = 4'b1000;
    @(negedge clk);
    flag_set = 0;
    flag_clr = 0;
    check(flags == 4'b1000, "set wins");
    wr(2, 32'h68);
    check(flags == 4'b0110, "software set and clear");
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
