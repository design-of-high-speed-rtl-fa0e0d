// Self-checking testbench of pg_logic (Kogge-Stone prefix tree).
// Three instances: the default W = 17 (the three-operand adder's N+1
// positions, five levels), W = 16 (the four-level tree of the published
// figure) and W = 5 (checked exhaustively over all 2^10 inputs). The
// expected carries come from a bit-serial recurrence,
// G_{i:0} = g_i | p_i & G_{i-1:0}, i.e. a ripple-carry model.
module tb_pg_logic;

  localparam int unsigned NUM_RANDOM = 3000;

  logic clk = 1'b0;
  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [16:0] g17, p17, o17;
  logic [15:0] g16, p16, o16;
  logic [4:0]  g5,  p5,  o5;

  always #5 clk = ~clk;

  pg_logic              dut17 (.g_in(g17), .p_in(p17), .g_out(o17));
  pg_logic #(.W(16))    dut16 (.g_in(g16), .p_in(p16), .g_out(o16));
  pg_logic #(.W(5))     dut5  (.g_in(g5),  .p_in(p5),  .g_out(o5));

  initial begin : watchdog
    repeat (NUM_RANDOM + 1200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Ripple model of the group generates of the low w positions.
  function automatic logic [31:0] ripple(input logic [31:0] g, input logic [31:0] p,
                                         input int w);
    logic [31:0] r = '0;
    logic carry = 1'b0;
    for (int i = 0; i < w; i++) begin
      carry = g[i] | (p[i] & carry);
      r[i] = carry;
    end
    return r;
  endfunction

  task automatic check(input string name, input logic [31:0] got, input logic [31:0] want,
                       input logic [31:0] g, input logic [31:0] p);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: g=%h p=%h got=%h want=%h", name, g, p, got, want);
    end
  endtask

  initial begin : stimulus
    // Full propagate chains: a generate at bit 0 must reach every position.
    g17 = 17'h00001; p17 = '1; g16 = 16'h0001; p16 = '1; g5 = 5'h01; p5 = '1;
    @(posedge clk);
    check("W17 chain", 32'(o17), ripple(32'(g17), 32'(p17), 17), 32'(g17), 32'(p17));
    check("W16 chain", 32'(o16), ripple(32'(g16), 32'(p16), 16), 32'(g16), 32'(p16));
    check("W17 chain all set", 32'(o17), 32'h1FFFF, 32'(g17), 32'(p17));

    for (int v = 0; v < 1024; v++) begin
      {g5, p5} = 10'(v);
      @(posedge clk);
      check("W5", 32'(o5), ripple(32'(g5), 32'(p5), 5), 32'(g5), 32'(p5));
    end

    for (int k = 0; k < int'(NUM_RANDOM); k++) begin
      // Bias propagates high so that long carry chains are common.
      p17 = 17'($urandom | $urandom);
      g17 = 17'($urandom & $urandom) & ~p17;
      p16 = 16'($urandom | $urandom);
      g16 = 16'($urandom & $urandom & $urandom);
      @(posedge clk);
      check("W17", 32'(o17), ripple(32'(g17), 32'(p17), 17), 32'(g17), 32'(p17));
      check("W16", 32'(o16), ripple(32'(g16), 32'(p16), 16), 32'(g16), 32'(p16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_pg_logic
