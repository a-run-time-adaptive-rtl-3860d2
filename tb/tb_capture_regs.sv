// tb_capture_regs: self-checking test of the output/feedback capture registers.
//
// Feeds random bundles to the four zones (each zone valid at random), keeps a
// model of the latest and previous signature (XOR of all carriers, carrier i rotated
// left by i bits) per zone,
// and checks after every gcapture pulse that the captured state equals the
// model at the time of the pulse and then stays unchanged. It also replays
// the transient-fault rule: replicas agree now, one replica's previous value
// differed, and this must be visible in the captured feedback register.
module tb_capture_regs;
  import demux_pkg::*;

  logic        clk = 0;
  logic        rst_n = 0;
  carriers_t   zone_out [NUM_ZONES];
  logic        gcapture = 0;
  logic [31:0] cap_out  [NUM_ZONES];
  logic [31:0] cap_fb   [NUM_ZONES];

  int checks = 0, failures = 0;

  capture_regs dut (.*);

  always #5 clk = ~clk;

  logic [31:0] m_out [NUM_ZONES], m_fb [NUM_ZONES];
  logic [31:0] e_out [NUM_ZONES], e_fb [NUM_ZONES];

  function automatic logic [31:0] sig(carriers_t b);
    logic [31:0] s;
    s = '0;
    for (int i = 0; i < MAX_CARRIERS; i++) begin
      logic [31:0] w;
      w = {b.c[i].re, b.c[i].im};
      s = s ^ ((w << i) | (w >> ((32 - i) % 32)));
    end
    return s;
  endfunction

  task automatic capture_and_check();
    @(negedge clk);
    gcapture = 1;
    for (int z = 0; z < NUM_ZONES; z++) begin
      e_out[z] = m_out[z];
      e_fb[z]  = m_fb[z];
    end
    @(negedge clk);
    gcapture = 0;
    repeat (3) begin
      for (int z = 0; z < NUM_ZONES; z++) begin
        checks++;
        if (cap_out[z] != e_out[z] || cap_fb[z] != e_fb[z]) begin
          failures++;
          $display("zone %0d capture wrong", z);
        end
      end
      @(negedge clk);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n)
      for (int z = 0; z < NUM_ZONES; z++)
        if (zone_out[z].valid) begin
          m_fb[z]  <= m_out[z];
          m_out[z] <= sig(zone_out[z]);
        end
  end

  initial begin
    for (int z = 0; z < NUM_ZONES; z++) begin
      zone_out[z] = '0;
      m_out[z] = '0;
      m_fb[z] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      @(negedge clk);
      for (int z = 0; z < NUM_ZONES; z++) begin
        zone_out[z].valid = ($urandom_range(0, 2) == 0);
        zone_out[z].count = 5'd16;
        for (int i = 0; i < MAX_CARRIERS; i++) zone_out[z].c[i] = {$urandom};
      end
      if (it % 10 == 9) capture_and_check();
    end
    // transient fault: zone 1 differs once, then all agree again
    for (int step = 0; step < 2; step++) begin
      carriers_t b;
      @(negedge clk);
      b = '0;
      b.valid = 1;
      b.c[0] = {16'(step + 5), 16'h0};
      for (int z = 0; z < 3; z++) zone_out[z] = b;
      if (step == 0) zone_out[1].c[2].im = 16'h0040;
      zone_out[3] = '0;
    end
    @(negedge clk);
    for (int z = 0; z < NUM_ZONES; z++) zone_out[z].valid = 0;
    capture_and_check();
    checks++;
    if (!(cap_out[0] == cap_out[1] && cap_out[1] == cap_out[2] &&
          cap_fb[0] == cap_fb[2] && cap_fb[1] != cap_fb[0])) begin
      failures++;
      $display("transient not visible");
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
