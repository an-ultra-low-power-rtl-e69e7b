// Self-checking testbench of the ADCL delay buffer (two cascaded inverters):
// a random bit stream, one bit per clk_phi edge; y must reproduce the stream,
// uninverted, exactly 2 edges (one supply period) later.  A second instance
// with PAIRS = 3 checks the longer chain (6 edges).
module tb_adcl_delay_buf;
  localparam int N = 500;
  logic clk_phi = 1'b0, a, y1, y3;
  logic hist [N];
  int checks = 0, failures = 0;

  adcl_delay_buf              dut1 (.clk_phi, .a, .y(y1));
  adcl_delay_buf #(.PAIRS(3)) dut3 (.clk_phi, .a, .y(y3));
  always #5 clk_phi = ~clk_phi;

  initial begin
    for (int j = 0; j < N; j++) begin
      @(negedge clk_phi);
      if (j >= 2) begin checks++; if (y1 !== hist[j-2]) failures++; end
      if (j >= 6) begin checks++; if (y3 !== hist[j-6]) failures++; end
      hist[j] = 1'($urandom);
      a = hist[j];
    end
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
