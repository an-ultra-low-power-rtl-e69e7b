// Self-checking testbench of the ADCL 2-input NOR cell: random inputs on every
// clk_phi edge; y must equal the NOR of the inputs applied one edge (half a
// supply period) earlier.  All four input combinations are counted and each
// must occur.
module tb_adcl_nor2;
  logic clk_phi = 1'b0, a, b, y, ap, bp;
  int checks = 0, failures = 0;
  int seen [4];

  adcl_nor2 dut (.clk_phi, .a, .b, .y);
  always #5 clk_phi = ~clk_phi;

  initial begin
    @(negedge clk_phi);
    {a, b} = 2'b00;
    for (int j = 0; j < 400; j++) begin
      {ap, bp} = {a, b};
      @(negedge clk_phi);
      checks++;
      seen[{ap, bp}]++;
      if (y !== ~(ap | bp)) failures++;
      {a, b} = 2'($urandom);
    end
    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) failures++;
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
