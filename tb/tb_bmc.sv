// tb_bmc: checks the branch metric |x - y| over the corners of the signed
// input ranges and over random pairs, against integer arithmetic.
module tb_bmc;
  import prml_pkg::*;
  logic signed [EQ_W-1:0]  x;
  logic signed [LVL_W-1:0] y;
  logic [BM_W-1:0]         bm;
  int checks = 0, failures = 0;

  bmc dut (.x, .y, .bm);

  task automatic try(input int xi, input int yi);
    int ref_bm;
    x = EQ_W'(xi); y = LVL_W'(yi);
    #1;
    ref_bm = (xi > yi) ? xi - yi : yi - xi;
    checks++;
    if (int'(bm) != ref_bm) begin
      failures++;
      $display("FAIL: x=%0d y=%0d bm=%0d expected %0d", xi, yi, bm, ref_bm);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(-128, 127); try(127, -128); try(0, 0); try(-1, 0); try(5, 5); try(-128, -128);
    for (int i = 0; i < 2000; i++)
      try(int'($urandom_range(255)) - 128, int'($urandom_range(255)) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
