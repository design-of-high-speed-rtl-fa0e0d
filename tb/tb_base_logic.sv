// Self-checking testbench of base_logic at the default N = 16. For each
// vector the N+1 (g, p) pairs are checked against the bits of the two
// addends X = s and Y = 2*cy + cin, built here as integers: g_i is the AND
// and p_i the XOR of bit i of X and Y.
module tb_base_logic;

  localparam int unsigned N = 16;
  localparam int unsigned NUM_RANDOM = 2000;

  logic clk = 1'b0;
  logic [N-1:0] s, cy;
  logic         cin;
  logic [N:0]   g, p;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned cin_used = 0;

  always #5 clk = ~clk;

  base_logic dut (.s(s), .cy(cy), .cin(cin), .g(g), .p(p));

  initial begin : watchdog
    repeat (NUM_RANDOM + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check(input logic [N-1:0] vs, vcy, input logic vcin);
    longint unsigned x, y;
    logic xb, yb;
    s = vs; cy = vcy; cin = vcin;
    @(posedge clk);
    x = longint'(vs);
    y = 2 * longint'(vcy) + longint'(vcin);
    if (vcin) cin_used++;
    for (int i = 0; i <= int'(N); i++) begin
      xb = x[i];
      yb = y[i];
      checks++;
      if (g[i] !== (xb & yb) || p[i] !== (xb ^ yb)) begin
        failures++;
        $display("FAIL pos %0d: s=%h cy=%h cin=%0b g=%h p=%h", i, vs, vcy, vcin, g, p);
      end
    end
  endtask

  initial begin : stimulus
    apply_and_check('0, '0, 1'b0);
    apply_and_check('1, '1, 1'b1);
    apply_and_check(16'h0001, 16'h0000, 1'b1);
    apply_and_check(16'h0000, 16'h8000, 1'b0);
    for (int k = 0; k < int'(NUM_RANDOM); k++)
      apply_and_check(N'($urandom), N'($urandom), 1'($urandom));
    checks++;
    if (cin_used == 0) begin
      failures++;
      $display("FAIL carry input never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_base_logic
