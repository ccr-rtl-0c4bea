// tb_imap_buffer: writes random 8 x 8 blocks of 16-bit elements to random
// words of the imap buffer and reads them back, checking every element one
// clock after its read address.
module tb_imap_buffer;
  import sparsek_pkg::*;
  localparam int NB = 64, DEPTH = 1024;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       wr_en = 1'b0;
  logic [9:0] wr_addr = '0, rd_addr = '0;
  data_t      wr_data [NB], rd_data [NB];
  int checks = 0, failures = 0;
  data_t model [DEPTH][NB];
  bit    valid [DEPTH];

  imap_buffer dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1500; n++) begin
      automatic int a = int'($urandom % DEPTH);
      for (int g = 0; g < NB; g++) begin
        model[a][g] = data_t'($urandom);
        wr_data[g] <= model[a][g];
      end
      valid[a] = 1'b1;
      wr_en   <= 1'b1;
      wr_addr <= 10'(a);
      @(posedge clk);
    end
    wr_en <= 1'b0;
    for (int a = 0; a < DEPTH; a++) if (valid[a]) begin
      rd_addr <= 10'(a);
      @(posedge clk);
      @(negedge clk);
      for (int g = 0; g < NB; g++) begin
        checks++;
        if (rd_data[g] != model[a][g]) begin
          failures++;
          if (failures < 5) $display("FAIL word %0d el %0d", a, g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
