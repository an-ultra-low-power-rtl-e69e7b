// Self-checking testbench of the CL-strobed output register: d changes at
// random between strobes; q must take d only on a rising edge of cl and hold
// it until the next strobe.
module tb_adcl_out_reg;
  logic cl = 1'b0;
  logic [3:0] d, q, expect_q;
  int checks = 0, failures = 0;

  adcl_out_reg dut (.cl, .d, .q);

  initial begin
    for (int j = 0; j < 300; j++) begin
      d = 4'($urandom);
      #3 cl = 1'b1;
      expect_q = d;
      #2;
      checks++;
      if (q !== expect_q) failures++;
      repeat (3) begin
        d = 4'($urandom);
        #2;
        checks++;
        if (q !== expect_q) failures++;
      end
      cl = 1'b0;
      #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
