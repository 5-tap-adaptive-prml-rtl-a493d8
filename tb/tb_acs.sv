// tb_acs: checks one two-way and one single-predecessor ACS unit against
// a reference: the smaller of the two sums is kept (ties go to input 0),
// sel reports the choice, and with the overflow control high the new
// metric loses 2^(SM_W-1). Also checks the one-cycle register timing and
// the reset value.
module tb_acs;
  localparam int SM_W = 14, BM_W = 9;
  logic clk = 0, rst_n = 0;
  logic [SM_W-1:0] sm_a, sm_b, sm2, sm1;
  logic [BM_W-1:0] bm_a, bm_b;
  logic ovf, sel2, sel1;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_sel1 = 0, n_sel0 = 0;

  acs #(.SM_W(SM_W), .BM_W(BM_W), .TWO_WAY(1'b1)) dut2 (
    .clk, .rst_n, .sm_a, .bm_a, .sm_b, .bm_b, .ovf, .sm(sm2), .sel(sel2));
  acs #(.SM_W(SM_W), .BM_W(BM_W), .TWO_WAY(1'b0)) dut1 (
    .clk, .rst_n, .sm_a, .bm_a, .sm_b, .bm_b, .ovf, .sm(sm1), .sel(sel1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sa, sb, exp2, exp1;
    bit exp_sel;
    sm_a = '0; sm_b = '0; bm_a = '0; bm_b = '0; ovf = 0;
    @(posedge clk); #1;
    check(sm2 == 0 && sm1 == 0, "reset value");
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ovf = ($urandom_range(3) == 0);
      if (ovf) begin
        sm_a = SM_W'(2**(SM_W-1) + $urandom_range(2**(SM_W-2)));
        sm_b = SM_W'(2**(SM_W-1) + $urandom_range(2**(SM_W-2)));
      end else begin
        sm_a = SM_W'($urandom_range(2**(SM_W-1)));
        sm_b = (i % 7 == 0) ? sm_a : SM_W'($urandom_range(2**(SM_W-1)));
      end
      bm_a = BM_W'($urandom_range(2**(BM_W-1)));
      bm_b = (i % 7 == 0) ? bm_a : BM_W'($urandom_range(2**(BM_W-1)));
      sa = int'(sm_a) + int'(bm_a);
      sb = int'(sm_b) + int'(bm_b);
      exp_sel = (sa < sb);
      exp2 = exp_sel ? sa : sb;
      exp1 = sa;
      if (ovf) begin exp2 -= 2**(SM_W-1); exp1 -= 2**(SM_W-1); n_ovf++; end
      #1;
      check(sel2 == exp_sel, "sel");
      check(sel1 == 1'b1, "single-predecessor sel");
      if (exp_sel) n_sel1++; else n_sel0++;
      @(posedge clk); #1;
      check(int'(sm2) == exp2, $sformatf("two-way metric %0d expected %0d", sm2, exp2));
      check(int'(sm1) == exp1, $sformatf("one-way metric %0d expected %0d", sm1, exp1));
    end
    check(n_ovf > 0 && n_sel1 > 0 && n_sel0 > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
