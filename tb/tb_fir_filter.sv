// tb_fir_filter: random weights and random input samples; each output is
// compared with a reference convolution (round to nearest, saturate to
// EQ_W bits) of the samples driven two or more cycles earlier, which also
// checks the two-cycle latency. Large weights exercise saturation.
module tb_fir_filter;
  import prml_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] rf_in;
  logic signed [COEF_W-1:0] coef [NUM_TAPS];
  logic signed [EQ_W-1:0] eq_out;
  int checks = 0, failures = 0, n_sat = 0;
  int xs [NUM_TAPS+2];

  fir_filter dut (.clk, .rst_n, .rf_in, .coef, .eq_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    int r;
    for (int i = 0; i < NUM_TAPS+2; i++) xs[i] = 0;
    rf_in = '0;
    for (int j = 0; j < NUM_TAPS; j++) coef[j] = '0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      if (t % 500 == 0)
        for (int j = 0; j < NUM_TAPS; j++)
          coef[j] = COEF_W'(int'($urandom_range((t % 1000 == 0) ? 800 : 6000)) - ((t % 1000 == 0) ? 400 : 3000));
      rf_in = ADC_W'($urandom);
      for (int i = NUM_TAPS+1; i > 0; i--) xs[i] = xs[i-1];
      xs[0] = int'(rf_in);
      @(posedge clk); #1;
      // Now in cycle t+1: eq_out = sum coef[j]*rf(t-1-j).
      if (t % 500 > NUM_TAPS + 2) begin
        acc = 0;
        for (int j = 0; j < NUM_TAPS; j++) acc += longint'(coef[j]) * xs[j+1];
        acc = (acc + (1 << (COEF_FRAC-1))) >>> COEF_FRAC;
        r = (acc > 127) ? 127 : (acc < -128) ? -128 : int'(acc);
        if (acc > 127 || acc < -128) n_sat++;
        checks++;
        if (int'(eq_out) != r) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d eq_out=%0d expected %0d", t, eq_out, r);
        end
      end
      @(negedge clk);
    end
    checks++; if (n_sat == 0) begin failures++; $display("FAIL: no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
