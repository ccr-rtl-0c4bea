// tb_acc_unit: checks the 64 accumulation adders with random products and
// partial sums, including wrap-around at 32 bits.
module tb_acc_unit;
  import sparsek_pkg::*;
  localparam int NB = 64;
  acc_t prod [NB], psum [NB], sum [NB];
  int checks = 0, failures = 0;

  acc_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      foreach (prod[g]) begin
        prod[g] = acc_t'($urandom);
        psum[g] = (n == 0) ? 32'sh7fffffff : acc_t'($urandom);
      end
      #1;
      foreach (sum[g]) begin
        checks++;
        if (sum[g] != acc_t'(int'(prod[g]) + int'(psum[g]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
