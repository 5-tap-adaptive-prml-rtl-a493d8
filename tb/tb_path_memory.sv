// tb_path_memory: drives random survivor selects into the register-
// exchange memory and compares the output bit stream with a reference
// that keeps each state's survivor as an integer shift register and finds
// predecessors from the state codes directly. The comparison is cycle by
// cycle, so it also checks one output per clock and the register timing.
module tb_path_memory;
  import prml_pkg::*;
  localparam int N = 12;
  logic clk = 0, rst_n = 0;
  logic [NUM_STATES-1:0] sel;
  logic bit_out;
  int checks = 0, failures = 0;

  path_memory #(.PM_LEN(N)) dut (.clk, .rst_n, .sel, .bit_out);

  always #5 clk = ~clk;

  longint unsigned q [NUM_STATES];
  bit expect_q [$];

  function automatic int find(input logic [3:0] code);
    for (int i = 0; i < NUM_STATES; i++) if (STATE_CODE[i] == code) return i;
    return -1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned nq [NUM_STATES];
    bit out_bit;
    logic [3:0] s;
    int p1, p0, src;
    for (int i = 0; i < NUM_STATES; i++) q[i] = 0;
    sel = '0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      sel = NUM_STATES'($urandom);
      // Reference update, computed before the edge.
      for (int i = 0; i < NUM_STATES; i++) begin
        s  = STATE_CODE[i];
        p1 = find({1'b1, s[3:1]});
        p0 = find({1'b0, s[3:1]});
        // A branch from 1xxx into s needs the run of s[3] to be legal.
        if (p1 >= 0 && {1'b1, s} inside {5'b11001, 5'b10011, 5'b10001, 5'b10000,
              5'b11111, 5'b11110, 5'b11100, 5'b11000}) ; else p1 = -1;
        if (p0 >= 0 && {1'b0, s} inside {5'b01111, 5'b01110, 5'b01100, 5'b00111,
              5'b00110, 5'b00011, 5'b00001, 5'b00000}) ; else p0 = -1;
        if (p1 >= 0 && p0 >= 0) src = sel[i] ? p1 : p0;
        else                    src = (p1 >= 0) ? p1 : p0;
        if (i == 0) out_bit = q[src][N-1];
        nq[i] = ((q[src] << 1) | longint'(s[0])) & ((64'd1 << N) - 1);
      end
      for (int i = 0; i < NUM_STATES; i++) q[i] = nq[i];
      @(posedge clk); #1;
      checks++;
      if (bit_out != out_bit) begin
        failures++;
        if (failures < 10) $display("FAIL: t=%0d bit_out=%0d expected %0d", t, bit_out, out_bit);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
