// Self-checking testbench of saltire_cell: all 4 input combinations. The
// expected generate is "both bits set" and the expected propagate "exactly
// one bit set", from the integer sum of the two inputs.
module tb_saltire_cell;

  logic clk = 1'b0;
  logic s_i, cy_im1, g, p;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  saltire_cell dut (.s_i(s_i), .cy_im1(cy_im1), .g(g), .p(p));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned total;
    for (int v = 0; v < 4; v++) begin
      {s_i, cy_im1} = 2'(v);
      @(posedge clk);
      total = 32'(s_i) + 32'(cy_im1);
      checks++;
      if (g !== (total == 2) || p !== (total == 1)) begin
        failures++;
        $display("FAIL s=%0b cy=%0b -> g=%0b p=%0b", s_i, cy_im1, g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_saltire_cell
