// End-to-end, self-checking testbench of three_operand_adder with every
// parameter at its default (N = 16: a, b, c of 16 bits, s of 18 bits).
//
// Each vector is applied, allowed to settle for one testbench clock, and
// s is compared with a + b + c + cin computed in integer arithmetic.
// Directed corner vectors come first, then random vectors whose operands
// are drawn from several distributions (uniform, all-ones-heavy, sparse) so
// that long carry chains occur often.
//
// The testbench also counts how often the adder's mechanisms were
// exercised and fails if any never occurred:
//   cin_used    - the external carry input was 1
//   carry_out   - the carry-out bit s[N+1] was set
//   long_chain  - a carry rippled across at least N positions of the
//                 two-operand addition S + (2*cy + cin) inside the adder
//   max_sum     - all operands at their maximum with cin = 1
// The stage-1 words S and cy used for long_chain are recomputed here from
// a, b, c, not read from the design.
module tb_three_operand_adder;

  localparam int unsigned N = 16;
  localparam int unsigned NUM_RANDOM = 100000;

  logic clk = 1'b0;
  logic [N-1:0] a, b, c;
  logic         cin;
  logic [N+1:0] s;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned cnt_cin = 0;
  int unsigned cnt_cout = 0;
  int unsigned cnt_long = 0;
  int unsigned cnt_max = 0;

  always #5 clk = ~clk;

  three_operand_adder dut (.a(a), .b(b), .c(c), .cin(cin), .s(s));

  initial begin : watchdog
    repeat (NUM_RANDOM + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Longest run of positions a carry travels through in X + Y.
  function automatic int longest_chain(input longint unsigned x, input longint unsigned y);
    int run = 0;
    int best = 0;
    logic carry = 1'b0;
    for (int i = 0; i <= int'(N); i++) begin
      carry = (x[i] & y[i]) | ((x[i] ^ y[i]) & carry);
      run = carry ? run + 1 : 0;
      if (run > best) best = run;
    end
    return best;
  endfunction

  task automatic apply_and_check(input logic [N-1:0] va, vb, vc, input logic vcin);
    longint unsigned want;
    logic [N-1:0] sw, cw;
    a = va; b = vb; c = vc; cin = vcin;
    @(posedge clk);
    want = longint'(va) + longint'(vb) + longint'(vc) + longint'(vcin);
    checks++;
    if (longint'(s) != want) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h cin=%0b: s=%h want=%h", va, vb, vc, vcin, s, want);
    end
    sw = va ^ vb ^ vc;
    cw = (va & vb) | (vb & vc) | (va & vc);
    if (vcin) cnt_cin++;
    if (s[N+1]) cnt_cout++;
    if (longest_chain(longint'(sw), 2 * longint'(cw) + longint'(vcin)) >= int'(N)) cnt_long++;
    if (va == '1 && vb == '1 && vc == '1 && vcin) cnt_max++;
  endtask

  function automatic logic [N-1:0] rand_operand();
    case ($urandom_range(3))
      0:       return N'($urandom);
      1:       return N'($urandom | $urandom | $urandom);
      2:       return N'($urandom & $urandom);
      default: return ~N'(1 << $urandom_range(N - 1));
    endcase
  endfunction

  task automatic expect_seen(input string name, input int unsigned count);
    $display("mechanism %-10s seen %0d times", name, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never exercised", name);
    end
  endtask

  initial begin : stimulus
    apply_and_check('0, '0, '0, 1'b0);
    apply_and_check('0, '0, '0, 1'b1);
    apply_and_check('1, '0, '0, 1'b1);   // carry through all N sum bits
    apply_and_check('1, '1, '0, 1'b0);
    apply_and_check('1, '1, '1, 1'b0);
    apply_and_check('1, '1, '1, 1'b1);   // largest possible result
    apply_and_check(16'h8000, 16'h8000, 16'h8000, 1'b0);
    apply_and_check(16'h5555, 16'hAAAA, 16'h0001, 1'b0);
    apply_and_check(16'h1234, 16'h5678, 16'h9ABC, 1'b1);
    for (int k = 0; k < int'(NUM_RANDOM); k++)
      apply_and_check(rand_operand(), rand_operand(), rand_operand(), 1'($urandom));
    expect_seen("cin_used", cnt_cin);
    expect_seen("carry_out", cnt_cout);
    expect_seen("long_chain", cnt_long);
    expect_seen("max_sum", cnt_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_three_operand_adder
