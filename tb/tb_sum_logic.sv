// Self-checking testbench of sum_logic at the default N = 16. Random
// addends X and Y of N+1 bits are formed; the testbench computes their
// bit propagates and carries itself (integer arithmetic) and checks that
// the stage returns exactly X + Y.
module tb_sum_logic;

  localparam int unsigned N = 16;
  localparam int unsigned NUM_RANDOM = 3000;

  logic clk = 1'b0;
  logic [N:0]   p, g_grp;
  logic [N+1:0] s;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  sum_logic dut (.p(p), .g_grp(g_grp), .s(s));

  initial begin : watchdog
    repeat (NUM_RANDOM + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check(input logic [N:0] x, input logic [N:0] y);
    longint unsigned total, partial;
    logic [N:0] carries;
    // Carry out of position i of X + Y: bit i+1 of the sum of the low i+1 bits.
    for (int i = 0; i <= int'(N); i++) begin
      partial = (longint'(x) & ((64'd1 << (i + 1)) - 1)) + (longint'(y) & ((64'd1 << (i + 1)) - 1));
      carries[i] = partial[i+1];
    end
    total = longint'(x) + longint'(y);
    p = x ^ y;
    g_grp = carries;
    @(posedge clk);
    checks++;
    if (longint'(s) != total) begin
      failures++;
      $display("FAIL x=%h y=%h s=%h want=%h", x, y, s, total);
    end
  endtask

  initial begin : stimulus
    apply_and_check('0, '0);
    apply_and_check('1, 17'h00001);
    apply_and_check('1, '1);
    for (int k = 0; k < int'(NUM_RANDOM); k++)
      apply_and_check((N+1)'($urandom), (N+1)'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_sum_logic
