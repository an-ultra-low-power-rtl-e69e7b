// Self-checking testbench of the buffered ADCL 5-input NAND gate.
// A new random 5-bit input word is applied on every clk_phi edge (the
// all-ones word, the only one giving 0, is forced often); y must be the NAND
// of the word applied exactly 3 edges earlier.  Because the words change on
// every edge, an unbalanced IN5 path would mix words and fail.
module tb_adcl_nand5;
  localparam int N = 2000;
  logic clk_phi = 1'b0;
  logic [4:0] in;
  logic y;
  logic [4:0] hist [N];
  int checks = 0, failures = 0, zeros = 0;

  adcl_nand5 dut (.clk_phi, .in, .y);
  always #5 clk_phi = ~clk_phi;

  initial begin
    for (int j = 0; j < N; j++) begin
      @(negedge clk_phi);
      if (j >= 3) begin
        checks++;
        if (y !== ~&hist[j-3]) failures++;
        if (!y) zeros++;
      end
      hist[j] = ($urandom_range(0, 3) == 0) ? 5'h1F : 5'($urandom);
      in = hist[j];
    end
    checks++;
    if (zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk_phi);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
