// Self-checking testbench of the ADCL inverter cell: random input on every
// clk_phi edge; y must equal the complement of the input applied one edge
// (half a supply period) earlier, as in the cell's truth table.
module tb_adcl_inv;
  logic clk_phi = 1'b0, a, y, a_prev;
  int checks = 0, failures = 0;

  adcl_inv dut (.clk_phi, .a, .y);
  always #5 clk_phi = ~clk_phi;

  initial begin
    @(negedge clk_phi);
    a = 1'b0;
    for (int j = 0; j < 400; j++) begin
      a_prev = a;
      @(negedge clk_phi);
      checks++;
      if (y !== ~a_prev) failures++;
      a = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk_phi);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
