// tb_channel_identifier: the RF input is the PR(14,24,26,16,6) response
// of a random 2T..8T stream plus +/-2 noise, while the identifier starts
// from the default PR(10,20,28,18,8) levels. Correct decisions are given
// RF_DLY cycles after their sample. Checks that
//  * each cycle at most one level changes, and only the one the last five
//    decisions select (selective update);
//  * a change has the size (x - L)/c given by the update rule, within the
//    rounding of the kept fraction bits;
//  * after training every level is within 1 of the true channel level;
//  * with the enable low nothing moves.
module tb_channel_identifier;
  import prml_pkg::*;
  localparam int DLY = 3;
  localparam int PRC [5] = '{14, 24, 26, 16, 6};
  localparam int N = 30000;
  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] rf_in;
  logic vd_bit, en;
  logic [3:0] ci_shift;
  level_vec_t levels;
  int checks = 0, failures = 0, n_upd = 0;

  channel_identifier #(.RF_DLY(DLY)) dut (.clk, .rst_n, .rf_in, .vd_bit, .en, .ci_shift, .levels);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  function automatic int true_level(input int i);
    int y = 0;
    for (int k = 0; k < 5; k++) y += LEVEL_PAT[i][4-k] ? PRC[k] : -PRC[k];
    return y;
  endfunction

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist [64];
    int rfh [64];
    level_t prev_lv [NUM_LEVELS];
    int y, run_left, nchg, sel_i, step;
    bit cur;
    bit [4:0] pat;
    run_left = 0; cur = 0;
    for (int i = 0; i < 64; i++) begin hist[i] = 0; rfh[i] = 0; end
    rf_in = '0; vd_bit = 0; en = 0; ci_shift = 4'd2;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < N; t++) begin
      en = (t >= 100);
      if (t > N / 2) ci_shift = 4'd5;
      if (run_left == 0) begin cur = ~cur; run_left = 2 + int'($urandom_range(6)); end
      run_left--;
      for (int i = 63; i > 0; i--) begin hist[i] = hist[i-1]; rfh[i] = rfh[i-1]; end
      hist[0] = cur;
      y = 0;
      for (int k = 0; k < 5; k++) y += hist[4-k] ? PRC[k] : -PRC[k];
      rf_in = ADC_W'(y + int'($urandom_range(4)) - 2);
      rfh[0] = int'(rf_in);
      vd_bit = hist[DLY];
      pat = {hist[DLY+4], hist[DLY+3], hist[DLY+2], hist[DLY+1], hist[DLY]};
      sel_i = -1;
      for (int i = 0; i < NUM_LEVELS; i++) if (LEVEL_PAT[i] == pat) sel_i = i;
      for (int i = 0; i < NUM_LEVELS; i++) prev_lv[i] = levels[i];
      @(posedge clk); #1;
      if (t > 20) begin
        nchg = 0;
        for (int i = 0; i < NUM_LEVELS; i++)
          if (levels[i] != prev_lv[i]) begin
            nchg++;
            check(i == sel_i && en, $sformatf("t=%0d level %0d changed, selected %0d", t, i, sel_i));
            // Integer view of the update: the move is about (x-L)/c.
            step = (rfh[DLY] - int'(prev_lv[i])) / (1 << ci_shift);
            check(int'(levels[i]) - int'(prev_lv[i]) >= step - 1 &&
                  int'(levels[i]) - int'(prev_lv[i]) <= step + 1, $sformatf("t=%0d step size", t));
          end
        check(nchg <= 1, "more than one level changed");
        if (nchg > 0) n_upd++;
      end
      @(negedge clk);
    end
    for (int i = 0; i < NUM_LEVELS; i++) begin
      check(int'(levels[i]) >= true_level(i) - 1 && int'(levels[i]) <= true_level(i) + 1,
            $sformatf("level %0d = %0d, channel %0d", i, levels[i], true_level(i)));
    end
    check(n_upd > 0, "no level ever updated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
