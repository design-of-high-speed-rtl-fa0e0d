// Self-checking testbench of grey_cell: all 8 input combinations; the
// expected generate is worked out as in tb_black_cell.
module tb_grey_cell;

  logic clk = 1'b0;
  logic gk, pk, gj, g;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  grey_cell dut (.gk(gk), .pk(pk), .gj(gj), .g(g));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic exp_g;
    for (int v = 0; v < 8; v++) begin
      {gk, pk, gj} = 3'(v);
      @(posedge clk);
      exp_g = (gk == 1'b1) ? 1'b1 : ((pk == 1'b1) ? gj : 1'b0);
      checks++;
      if (g !== exp_g) begin
        failures++;
        $display("FAIL gk=%0b pk=%0b gj=%0b -> g=%0b", gk, pk, gj, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_grey_cell
