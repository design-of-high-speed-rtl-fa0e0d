// Exhaustive and wide-operand checks of three_operand_adder at other widths.
// N = 4: every one of the 2^13 combinations of a, b, c, cin (a 5-position,
// three-level prefix tree). N = 1: all 16 combinations (the smallest tree).
// N = 32: random vectors, a 33-position, six-level tree. Expected values are
// integer sums a + b + c + cin.
module tb_three_operand_adder_small;

  localparam int unsigned NUM_RANDOM = 20000;

  logic clk = 1'b0;
  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [3:0]  a4, b4, c4;
  logic        cin4;
  logic [5:0]  s4;
  logic        a1, b1, c1, cin1;
  logic [2:0]  s1;
  logic [31:0] a32, b32, c32;
  logic        cin32;
  logic [33:0] s32;

  always #5 clk = ~clk;

  three_operand_adder #(.N(4))  dut4  (.a(a4),  .b(b4),  .c(c4),  .cin(cin4),  .s(s4));
  three_operand_adder #(.N(1))  dut1  (.a(a1),  .b(b1),  .c(c1),  .cin(cin1),  .s(s1));
  three_operand_adder #(.N(32)) dut32 (.a(a32), .b(b32), .c(c32), .cin(cin32), .s(s32));

  initial begin : watchdog
    repeat (NUM_RANDOM + 9000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string name, input longint unsigned got, input longint unsigned want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got=%h want=%h", name, got, want);
    end
  endtask

  initial begin : stimulus
    {a1, b1, c1, cin1} = '0;
    a32 = '0; b32 = '0; c32 = '0; cin32 = 1'b0;
    for (int v = 0; v < (1 << 13); v++) begin
      {a4, b4, c4, cin4} = 13'(v);
      {a1, b1, c1, cin1} = 4'(v);
      @(posedge clk);
      check("N=4", longint'(s4), longint'(a4) + longint'(b4) + longint'(c4) + longint'(cin4));
      if (v < 16)
        check("N=1", longint'(s1), longint'(a1) + longint'(b1) + longint'(c1) + longint'(cin1));
    end
    for (int k = 0; k < int'(NUM_RANDOM); k++) begin
      a32 = $urandom; b32 = $urandom | $urandom; c32 = $urandom; cin32 = 1'($urandom);
      if (k == 0) begin a32 = '1; b32 = '1; c32 = '1; cin32 = 1'b1; end
      @(posedge clk);
      check("N=32", longint'(s32),
            longint'(a32) + longint'(b32) + longint'(c32) + longint'(cin32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_three_operand_adder_small
