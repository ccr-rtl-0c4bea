// tb_sparsek_scale: the PE-array scaling study. Runs the same kind of random
// sparse-kernel convolutions on accelerators built with 4 x 4, 9 x 9 and
// 16 x 16 PE arrays (the default is 8 x 8) and checks every output map and
// job cycle count, so the design is shown to work at array sizes other than
// the default, including one that is not a power of two.
module tb_sparsek_scale;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int c4, f4, c9, f9, c16, f16;
  logic d4, d9, d16;

  sparsek_scale_run #(.PX(4),  .PY(4))  u4  (.clk, .rst_n, .checks(c4),  .failures(f4),  .finished(d4));
  sparsek_scale_run #(.PX(9),  .PY(9))  u9  (.clk, .rst_n, .checks(c9),  .failures(f9),  .finished(d9));
  sparsek_scale_run #(.PX(16), .PY(16)) u16 (.clk, .rst_n, .checks(c16), .failures(f16), .finished(d16));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c9 + c16, f4 + f9 + f16 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (d4 && d9 && d16);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c9 + c16, f4 + f9 + f16);
    $finish;
  end
endmodule
