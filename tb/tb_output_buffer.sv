// tb_output_buffer: drives all 64 banks of the output buffer with independent
// random reads and writes every cycle and compares the read data with a
// model. Reads of a word written in the same cycle must return the new value
// (write-first) and raise fwd; about one access in four is forced to collide
// so that this case is well covered.
module tb_output_buffer;
  import sparsek_pkg::*;
  localparam int NB = 64, DEPTH = 512;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [8:0] rd_addr [NB], wr_addr [NB];
  acc_t       rd_data [NB], wr_data [NB];
  logic       wr_en [NB], fwd [NB];
  int checks = 0, failures = 0, n_fwd = 0;
  acc_t model [NB][DEPTH];
  acc_t exp_d [NB];
  bit   exp_f [NB];

  output_buffer dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        model[b][a] = acc_t'($urandom);
        wr_en[b] = 1'b1; wr_addr[b] = 9'(a); wr_data[b] = model[b][a];
        rd_addr[b] = '0;
      end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        wr_en[b]   = ($urandom % 2) == 0;
        wr_addr[b] = 9'($urandom % DEPTH);
        wr_data[b] = acc_t'($urandom);
        rd_addr[b] = (($urandom % 4) == 0) ? wr_addr[b] : 9'($urandom % DEPTH);
        exp_f[b]   = wr_en[b] && (rd_addr[b] == wr_addr[b]);
        exp_d[b]   = exp_f[b] ? wr_data[b] : model[b][rd_addr[b]];
        if (wr_en[b]) model[b][wr_addr[b]] = wr_data[b];
      end
      @(posedge clk);
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (rd_data[b] != exp_d[b] || fwd[b] != exp_f[b]) begin
          failures++;
          if (failures < 5) $display("FAIL bank %0d: %h/%0d expected %h/%0d", b, rd_data[b],
                                     fwd[b], exp_d[b], exp_f[b]);
        end
        if (exp_f[b]) n_fwd++;
      end
    end
    checks++;
    if (n_fwd == 0) failures++;
    $display("forwarded reads: %0d", n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
