// tb_sparsek_layers: runs convolution layers of the shapes of the evaluated
// networks (VGG16, AlexNet, GoogLeNet) on the accelerator at its default size
// with randomly pruned kernels, one output channel per layer, and checks the
// complete output map against a direct evaluation. Layer shapes (stride-1
// layers only):
//   VGG16 conv3_2 tile : 56 x 56 imap, 3 x 3 kernel, 16 of the 256 input
//                        channels (a channel group as the 128 KB IB holds it;
//                        further groups are accumulated by later jobs)
//   AlexNet conv3      : 13 x 13 imap, 3 x 3 kernel, all 256 input channels
//   GoogLeNet 3a 5x5   : 28 x 28 imap, 5 x 5 kernel, all 16 input channels
// The kernels keep about 35 % of their weights. For each layer the test
// checks the cycle count (one cycle per nonzero weight and imap block) and
// prints the cycles a dense kernel would need on the same datapath.
module tb_sparsek_layers;
  import sparsek_pkg::*;

  localparam int PX = 8, PY = 8, NB = PX*PY;
  localparam int CMAX = 256, HMAX = 56, KMAX = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             kb_wr_en = 1'b0;
  logic [14:0]      kb_wr_addr = '0;
  kb_entry_t        kb_wr_data = '0;
  logic             ib_wr_en = 1'b0;
  logic [9:0]       ib_wr_addr = '0;
  data_t            ib_wr_data [NB];
  logic             start = 1'b0;
  job_cfg_t         cfg = '0;
  logic             busy, done;
  logic [8:0]       ob_rd_addr = '0;
  acc_t             ob_rd_data [NB];
  logic [31:0]      perf_cycles, perf_ops, perf_fwd;

  sparsek_top dut (.*);

  int checks = 0, failures = 0;
  int img  [CMAX][HMAX][HMAX];
  int kern [CMAX][KMAX][KMAX];
  int ref_o [HMAX+KMAX][HMAX+KMAX];

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  task automatic layer(input string name, input int c, input int h, input int w, input int r,
                       input int s, input int density);
    int e = h + r - 1, f = w + s - 1;
    int nbr = (h + PX - 1) / PX, nbc = (w + PY - 1) / PY, bpc = nbr * nbc;
    int nbro = (e + PX - 1) / PX, nbco = (f + PY - 1) / PY;
    int n = 0, bad = 0;
    // activations: about a third are zero (ReLU output), the rest small
    for (int ch = 0; ch < c; ch++)
      for (int x = 0; x < HMAX; x++)
        for (int y = 0; y < HMAX; y++)
          img[ch][x][y] = (x < h && y < w && rnd(0, 99) >= 30) ? rnd(1, 255) : 0;
    for (int ch = 0; ch < c; ch++)
      for (int i = 0; i < KMAX; i++)
        for (int j = 0; j < KMAX; j++) begin
          kern[ch][i][j] = 0;
          if (i < r && j < s && rnd(0, 99) < density)
            while (kern[ch][i][j] == 0) kern[ch][i][j] = rnd(-127, 127);
        end
    // load IB
    for (int ch = 0; ch < c; ch++)
      for (int br = 0; br < nbr; br++)
        for (int bc = 0; bc < nbc; bc++) begin
          for (int a = 0; a < PX; a++)
            for (int b = 0; b < PY; b++)
              ib_wr_data[a*PY+b] <= data_t'((br*PX+a < HMAX && bc*PY+b < HMAX) ?
                                            img[ch][br*PX+a][bc*PY+b] : 0);
          ib_wr_addr <= 10'(ch*bpc + br*nbc + bc);
          ib_wr_en   <= 1'b1;
          @(posedge clk);
        end
    ib_wr_en <= 1'b0;
    // load KB with the nonzero weights
    for (int ch = 0; ch < c; ch++)
      for (int i = 0; i < r; i++)
        for (int j = 0; j < s; j++)
          if (kern[ch][i][j] != 0) begin
            kb_wr_data <= '{val: data_t'(kern[ch][i][j]), ch: ch_t'(ch),
                            r: kcoord_t'(i), c: kcoord_t'(j)};
            kb_wr_addr <= 15'(n);
            kb_wr_en   <= 1'b1;
            n++;
            @(posedge clk);
          end
    kb_wr_en <= 1'b0;
    // reference
    for (int x = 0; x < e; x++)
      for (int y = 0; y < f; y++) begin
        int acc = 0;
        for (int ch = 0; ch < c; ch++)
          for (int i = 0; i < r; i++)
            for (int j = 0; j < s; j++) begin
              int xi = x - (r - 1) + i, yj = y - (s - 1) + j;
              if (xi >= 0 && xi < h && yj >= 0 && yj < w) acc += kern[ch][i][j] * img[ch][xi][yj];
            end
        ref_o[x][y] = acc;
      end
    // run
    cfg <= '{h: coord_t'(h), w: coord_t'(w), rm1: kcoord_t'(r - 1), sm1: kcoord_t'(s - 1),
             kb_base: 16'd0, kb_count: 16'(n), clear: 1'b1};
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do @(posedge clk); while (!done);
    checks++;
    if (perf_cycles != 32'(1 + nbro*nbco + n*bpc + 2)) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", name, perf_cycles, 1 + nbro*nbco + n*bpc + 2);
    end
    // compare
    for (int br = 0; br < nbro; br++)
      for (int bc = 0; bc < nbco; bc++) begin
        ob_rd_addr <= 9'(br * nbco + bc);
        @(posedge clk);
        @(negedge clk);
        for (int a = 0; a < PX; a++)
          for (int b = 0; b < PY; b++)
            if (br*PX + a < e && bc*PY + b < f) begin
              checks++;
              if (ob_rd_data[a*PY+b] != ref_o[br*PX+a][bc*PY+b]) begin
                failures++;
                bad++;
              end
            end
      end
    $display("%s: %0d of %0d weights nonzero, %0d cycles (dense kernel: %0d), %0d mismatches",
             name, n, c*r*s, perf_cycles, 1 + nbro*nbco + c*r*s*bpc + 2, bad);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    layer("VGG16 conv3_2 (16-channel group)", 16, 56, 56, 3, 3, 35);
    layer("AlexNet conv3", 256, 13, 13, 3, 3, 35);
    layer("GoogLeNet inception 3a 5x5", 16, 28, 28, 5, 5, 35);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
