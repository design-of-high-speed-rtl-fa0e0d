// Self-checking testbench of black_cell: all 16 input combinations. The
// expected outputs come from the meaning of the operator: the merged group
// generates if the upper group generates, or the upper group propagates and
// the lower group generates; it propagates only if both groups propagate.
module tb_black_cell;

  logic clk = 1'b0;
  logic gk, pk, gj, pj, g, p;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  black_cell dut (.gk(gk), .pk(pk), .gj(gj), .pj(pj), .g(g), .p(p));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic exp_g, exp_p;
    for (int v = 0; v < 16; v++) begin
      {gk, pk, gj, pj} = 4'(v);
      @(posedge clk);
      exp_g = (gk == 1'b1) ? 1'b1 : ((pk == 1'b1) ? gj : 1'b0);
      exp_p = (pk == 1'b1) ? pj : 1'b0;
      checks++;
      if (g !== exp_g || p !== exp_p) begin
        failures++;
        $display("FAIL gk=%0b pk=%0b gj=%0b pj=%0b -> g=%0b p=%0b", gk, pk, gj, pj, g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_black_cell
