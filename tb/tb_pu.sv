// tb_pu: drives the 8 x 8 processing unit with a random scalar and a random
// block each cycle, back to back, and checks every product one cycle later.
module tb_pu;
  import sparsek_pkg::*;
  localparam int NB = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  data_t k, blk [NB];
  acc_t  prod [NB];
  int checks = 0, failures = 0;
  int exp_p [NB];

  pu dut (.clk, .k, .blk, .prod);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    k = data_t'($urandom);
    foreach (blk[g]) blk[g] = data_t'($urandom);
    for (int n = 0; n < 300; n++) begin
      foreach (blk[g]) exp_p[g] = int'(k) * int'(blk[g]);
      @(posedge clk);
      @(negedge clk);
      k = data_t'($urandom);
      foreach (blk[g]) blk[g] = data_t'($urandom);
      foreach (prod[g]) begin
        checks++;
        if (prod[g] != exp_p[g]) begin
          failures++;
          if (failures < 5) $display("FAIL pe %0d: %0d expected %0d", g, prod[g], exp_p[g]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
