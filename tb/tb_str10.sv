// tb_str10: self-checking test of the 10-bin STR10 filter bank.
//
// Drives random ADC samples with random gaps, then a pure tone at the centre
// of bin 3. Every frame is compared bin by bin with the filter-bank formula
// evaluated in real numbers (tolerance 12 LSB for the two truncations), its
// arrival is checked to be exactly two clocks after every fifth sample
// (decimation by 5), and for the tone the energy must sit in bins 3 and 7.
module tb_str10;
  import demux_pkg::*;
  import tb_pfb_ref_pkg::*;

  logic              clk = 0;
  logic              rst_n = 0;
  logic              adc_valid = 0;
  logic signed [9:0] adc_data = '0;
  logic              out_valid;
  cplx_t             out_bins [10];

  int checks = 0, failures = 0, frames = 0;

  str10 dut (.*);

  always #5 clk = ~clk;

  ci_t  hist[$];
  int   nsamp = 0;
  int   due_cycle[$];
  real  exp_r[$], exp_i[$];
  int   cyc = 0;
  logic tone_phase = 0;
  real  tone_mag [10];

  always @(posedge clk) cyc <= cyc + 1;

  // Reference: record each sample and, every fifth, the expected frame.
  always @(posedge clk) begin
    if (rst_n && adc_valid) begin
      ci_t s;
      s.re = int'(adc_data) * 64;
      s.im = 0;
      hist.push_front(s);
      if (hist.size() > 40) void'(hist.pop_back());
      nsamp++;
      if (nsamp % 5 == 0) begin
        due_cycle.push_back(cyc + 2);
        for (int k = 0; k < 10; k++) begin
          real yr, yi;
          frame_real(hist, 10, 4, k, yr, yi);
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
      if (due_cycle.size() == 0 || due_cycle.pop_front() != cyc) begin
        failures++;
        $display("frame %0d at wrong cycle %0d", frames, cyc);
      end
      for (int k = 0; k < 10; k++) begin
        real er, ei;
        er = exp_r.pop_front();
        ei = exp_i.pop_front();
        checks++;
        if ((er - real'(out_bins[k].re)) ** 2 > 144.0 || (ei - real'(out_bins[k].im)) ** 2 > 144.0) begin
          failures++;
          if (failures < 10)
            $display("frame %0d bin %0d: got %0d,%0d expected %f,%f", frames, k,
                     out_bins[k].re, out_bins[k].im, er, ei);
        end
        if (tone_phase) tone_mag[k] = $sqrt(real'(out_bins[k].re)**2 + real'(out_bins[k].im)**2);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // random samples, random gaps
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      adc_valid <= ($urandom_range(0, 3) != 0);
      adc_data  <= 10'($urandom);
    end
    // tone at the centre of bin 3, continuous
    tone_phase <= 1;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk);
      adc_valid <= 1;
      adc_data  <= 10'($rtoi($floor(400.0 * $cos(2.0 * PI * 3.0 * i / 10.0) + 0.5)));
    end
    @(posedge clk);
    adc_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (!(tone_mag[3] > 20.0 * tone_mag[1] && tone_mag[7] > 20.0 * tone_mag[5] && tone_mag[3] > 5000.0)) begin
      failures++;
      $display("tone not in bin 3: %f %f %f", tone_mag[1], tone_mag[3], tone_mag[5]);
    end
    checks++;
    if (frames < 80) failures++;
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
