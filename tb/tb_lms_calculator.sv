// tb_lms_calculator: random errors, tap vectors, gains and enables. A
// reference keeps each weight accumulator as a 64-bit integer, adds
// (eps * x_j) >> mu_shift when enabled and the error is valid, saturates
// to the accumulator range, and compares the top COEF_W bits with coef
// every cycle. Also checks the reset weights (1.0 on the centre tap).
module tb_lms_calculator;
  import prml_pkg::*;
  localparam int EXTRA = 8;
  localparam int A_W = COEF_W + EXTRA;
  logic clk = 0, rst_n = 0;
  logic en, err_valid;
  logic [3:0] mu_shift;
  logic signed [ERR_W-1:0] err;
  logic signed [ADC_W-1:0] x_vec [NUM_TAPS];
  logic signed [COEF_W-1:0] coef [NUM_TAPS];
  int checks = 0, failures = 0, n_sat = 0, n_upd = 0;
  longint acc [NUM_TAPS];

  lms_calculator #(.ACC_EXTRA(EXTRA)) dut (.clk, .rst_n, .en, .mu_shift, .err, .err_valid, .x_vec, .coef);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint g, lim_hi, lim_lo;
    lim_hi = (64'sd1 <<< (A_W-1)) - 1;
    lim_lo = -(64'sd1 <<< (A_W-1));
    en = 0; err_valid = 0; mu_shift = '0; err = '0;
    for (int j = 0; j < NUM_TAPS; j++) begin
      x_vec[j] = '0;
      acc[j] = (j == NUM_TAPS/2) ? (64'sd1 <<< (COEF_FRAC + EXTRA)) : 0;
    end
    @(posedge clk); #1;
    for (int j = 0; j < NUM_TAPS; j++) begin
      checks++;
      if (coef[j] != ((j == NUM_TAPS/2) ? COEF_W'(1 << COEF_FRAC) : '0)) begin
        failures++; $display("FAIL: reset weight %0d", j);
      end
    end
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      en        = ($urandom_range(7) != 0);
      err_valid = ($urandom_range(7) != 0);
      // Small gains and a fixed sign for a while drive weights to the rails.
      mu_shift  = (t < 3000) ? 4'($urandom_range(3)) : 4'($urandom_range(15));
      err       = (t < 3000) ? ERR_W'($urandom_range(255)) : ERR_W'($urandom);
      for (int j = 0; j < NUM_TAPS; j++) x_vec[j] = (t < 3000) ? ADC_W'($urandom_range(127)) : ADC_W'($urandom);
      if (en && err_valid) begin
        n_upd++;
        for (int j = 0; j < NUM_TAPS; j++) begin
          g = (longint'(err) * longint'(x_vec[j])) >>> mu_shift;
          acc[j] += g;
          if (acc[j] > lim_hi) begin acc[j] = lim_hi; n_sat++; end
          if (acc[j] < lim_lo) begin acc[j] = lim_lo; n_sat++; end
        end
      end
      @(posedge clk); #1;
      for (int j = 0; j < NUM_TAPS; j++) begin
        checks++;
        if (longint'(coef[j]) != (acc[j] >>> EXTRA)) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d tap %0d coef=%0d expected %0d", t, j, coef[j], acc[j] >>> EXTRA);
        end
      end
      @(negedge clk);
    end
    checks++; if (n_sat == 0 || n_upd == 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
