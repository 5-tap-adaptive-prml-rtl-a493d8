// tb_level_error_detector: random levels, equalizer samples and detected
// bits. The reference picks the level from the last five bits with its
// own table (PA8..NA8 built from the +/- pattern) and subtracts the EQ
// sample driven EQ_DLY+1 cycles before the error appears. Illegal bit
// patterns must clear err_valid.
module tb_level_error_detector;
  import prml_pkg::*;
  localparam int DLY = 6;
  logic clk = 0, rst_n = 0;
  logic signed [EQ_W-1:0] eq_in;
  logic vd_bit;
  level_vec_t levels;
  logic signed [ERR_W-1:0] err;
  logic err_valid;
  int checks = 0, failures = 0, n_inv = 0, n_val = 0;

  level_error_detector #(.EQ_DLY(DLY)) dut (.clk, .rst_n, .eq_in, .vd_bit, .levels, .err, .err_valid);

  always #5 clk = ~clk;

  // Reference level number of a 5-bit pattern (oldest bit first), or -1.
  function automatic int ref_index(input bit [4:0] p);
    // Legal patterns listed in level order.
    bit [4:0] tbl [16] = '{5'h1f, 5'h1e, 5'h1c, 5'h19, 5'h18, 5'h13, 5'h11, 5'h10,
                           5'h0f, 5'h0e, 5'h0c, 5'h07, 5'h06, 5'h03, 5'h01, 5'h00};
    for (int i = 0; i < 16; i++) if (tbl[i] == p) return i;
    return -1;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eqh [64];
    bit bh [64];
    int idx, e;
    for (int i = 0; i < 64; i++) begin eqh[i] = 0; bh[i] = 0; end
    for (int i = 0; i < NUM_LEVELS; i++) levels[i] = LVL_W'($urandom);
    eq_in = '0; vd_bit = 0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      eq_in  = EQ_W'($urandom);
      vd_bit = ($urandom_range(3) != 0) ? bh[0] : ~bh[0];
      for (int i = 63; i > 0; i--) begin eqh[i] = eqh[i-1]; bh[i] = bh[i-1]; end
      eqh[0] = int'(eq_in); bh[0] = vd_bit;
      // The pattern and error are formed in this cycle and registered.
      idx = ref_index({bh[4], bh[3], bh[2], bh[1], bh[0]});
      @(posedge clk); #1;
      if (t > 8) begin
        checks++;
        if (err_valid != (idx >= 0)) begin failures++; $display("FAIL: t=%0d valid", t); end
        if (idx >= 0) begin
          n_val++;
          e = int'(levels[idx]) - eqh[DLY];
          checks++;
          if (int'(err) != e) begin
            failures++;
            if (failures < 10) $display("FAIL: t=%0d err=%0d expected %0d", t, err, e);
          end
        end else n_inv++;
      end
      if (t % 777 == 0) for (int i = 0; i < NUM_LEVELS; i++) levels[i] = LVL_W'($urandom);
      @(negedge clk);
    end
    checks++; if (n_inv == 0 || n_val == 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
