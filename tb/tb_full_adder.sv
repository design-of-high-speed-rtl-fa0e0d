// Self-checking testbench of full_adder: all 8 input combinations, the
// expected sum and carry taken from the integer sum a_i + b_i + c_i.
module tb_full_adder;

  logic clk = 1'b0;
  logic a_i, b_i, c_i, s_i, cy_i;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  full_adder dut (.a_i(a_i), .b_i(b_i), .c_i(c_i), .s_i(s_i), .cy_i(cy_i));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned total;
    for (int v = 0; v < 8; v++) begin
      {a_i, b_i, c_i} = 3'(v);
      @(posedge clk);
      total = 32'(a_i) + 32'(b_i) + 32'(c_i);
      checks++;
      if ({cy_i, s_i} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> cy=%0b s=%0b, want %0d", a_i, b_i, c_i, cy_i, s_i, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_full_adder
