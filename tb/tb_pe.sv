// tb_pe: checks the processing element against the product of random signed
// 16-bit operands, including the extreme values, and that the product appears
// exactly one clock after the operands.
module tb_pe;
  import sparsek_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  data_t k, x;
  acc_t  p;
  int checks = 0, failures = 0;

  pe dut (.clk, .k, .x, .p);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kk, xx;
    for (int n = 0; n < 1000; n++) begin
      kk = (n == 0) ? -32768 : (n == 1) ? 32767 : int'($signed(16'($urandom)));
      xx = (n == 0) ? -32768 : (n == 1) ? -32768 : int'($signed(16'($urandom)));
      @(negedge clk);
      k = data_t'(kk);
      x = data_t'(xx);
      @(posedge clk);
      @(negedge clk);
      k = data_t'(n);   // change the operands: the registered product must hold
      checks++;
      if (p != acc_t'(kk * xx)) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", kk, xx, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
