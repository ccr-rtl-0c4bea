// tb_kernel_buffer: fills the compressed kernel buffer at random addresses,
// then reads it with a new address every cycle and checks that each entry
// appears one clock after its address, as the controller's read-ahead needs.
module tb_kernel_buffer;
  import sparsek_pkg::*;
  localparam int DEPTH = 32768;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        wr_en = 1'b0;
  logic [14:0] wr_addr = '0, rd_addr = '0;
  kb_entry_t   wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  kb_entry_t model [int];
  int addrs [$];

  kernel_buffer dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int a = int'($urandom % DEPTH);
      automatic kb_entry_t d = kb_entry_t'($urandom);
      wr_en   <= 1'b1;
      wr_addr <= 15'(a);
      wr_data <= d;
      model[a] = d;
      @(posedge clk);
    end
    wr_en <= 1'b0;
    foreach (model[a]) addrs.push_back(a);
    addrs.shuffle();
    foreach (addrs[n]) begin
      rd_addr <= 15'(addrs[n]);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (rd_data != model[addrs[n]]) begin
        failures++;
        if (failures < 5) $display("FAIL addr %0d: %h expected %h", addrs[n], rd_data,
                                   model[addrs[n]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
