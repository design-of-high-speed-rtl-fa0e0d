// Self-checking testbench of bit_addition_logic at the default N = 16.
// Corner vectors and random vectors; for each, every bit position is checked
// against the integer sum of the three operand bits, and the words are
// checked against a + b + c = s + 2*cy.
module tb_bit_addition_logic;

  localparam int unsigned N = 16;
  localparam int unsigned NUM_RANDOM = 2000;

  logic clk = 1'b0;
  logic [N-1:0] a, b, c, s, cy;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  bit_addition_logic dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin : watchdog
    repeat (NUM_RANDOM + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check(input logic [N-1:0] va, vb, vc);
    longint unsigned lhs, rhs;
    int unsigned bits;
    a = va; b = vb; c = vc;
    @(posedge clk);
    for (int i = 0; i < int'(N); i++) begin
      bits = 32'(va[i]) + 32'(vb[i]) + 32'(vc[i]);
      checks++;
      if (s[i] !== bits[0] || cy[i] !== bits[1]) begin
        failures++;
        $display("FAIL bit %0d: a=%h b=%h c=%h s=%h cy=%h", i, va, vb, vc, s, cy);
      end
    end
    lhs = longint'(va) + longint'(vb) + longint'(vc);
    rhs = longint'(s) + 2 * longint'(cy);
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL word: a+b+c=%0d s+2cy=%0d", lhs, rhs);
    end
  endtask

  initial begin : stimulus
    apply_and_check('0, '0, '0);
    apply_and_check('1, '0, '0);
    apply_and_check('1, '1, '0);
    apply_and_check('1, '1, '1);
    apply_and_check(16'hAAAA, 16'h5555, 16'hFFFF);
    for (int k = 0; k < int'(NUM_RANDOM); k++)
      apply_and_check(N'($urandom), N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_bit_addition_logic
