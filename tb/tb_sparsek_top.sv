// tb_sparsek_top: end-to-end test of the SparseK accelerator at its default
// size (8 x 8 PEs, 128 KB buffers). Each job loads random input maps into IB
// (edge blocks zero-padded) and a randomly pruned kernel into KB as a list of
// its nonzero entries, runs the job, reads the whole full-mode output map back
// and compares it with a direct evaluation of
//   O(x, y) = sum_ch sum_i sum_j K(ch, i, j) * I(ch, x - (R-1) + i, y - (S-1) + j).
// It also checks the cycle count of every job (one setup cycle, one cycle per
// cleared OB word, one cycle per nonzero weight and imap block, two drain
// cycles) and that each mechanism occurred at least once: OB forwarding
// between overlapping back-to-back blocks, accumulation onto a previous job
// (clear off), output blocks cut at the map edge, skipped zero weights, an
// empty kernel, and a dense kernel.
module tb_sparsek_top;
  import sparsek_pkg::*;

  localparam int PX = 8, PY = 8, NB = PX*PY;
  localparam int CMAX = 8, HMAX = 64, KMAX = 7;

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
  int n_fwd = 0, n_accum = 0, n_edge = 0, n_skip = 0, n_empty = 0, n_dense = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  // random maps, values in [-vmax, vmax]
  task automatic make_imaps(input int c, input int h, input int w, input int vmax);
    for (int ch = 0; ch < c; ch++)
      for (int x = 0; x < HMAX; x++)
        for (int y = 0; y < HMAX; y++)
          img[ch][x][y] = (x < h && y < w) ? rnd(-vmax, vmax) : 0;
  endtask

  // kernel with roughly density_pct percent nonzeros
  task automatic make_kernel(input int c, input int r, input int s, input int density_pct);
    for (int ch = 0; ch < CMAX; ch++)
      for (int i = 0; i < KMAX; i++)
        for (int j = 0; j < KMAX; j++) begin
          kern[ch][i][j] = 0;
          if (ch < c && i < r && j < s && rnd(0, 99) < density_pct)
            while (kern[ch][i][j] == 0) kern[ch][i][j] = rnd(-300, 300);
        end
  endtask

  task automatic load_ib(input int c, input int h, input int w);
    int nbr = (h + PX - 1) / PX, nbc = (w + PY - 1) / PY;
    for (int ch = 0; ch < c; ch++)
      for (int br = 0; br < nbr; br++)
        for (int bc = 0; bc < nbc; bc++) begin
          for (int a = 0; a < PX; a++)
            for (int b = 0; b < PY; b++)
              ib_wr_data[a*PY+b] <= data_t'(img[ch][br*PX+a][bc*PY+b]);
          ib_wr_addr <= 10'(ch*nbr*nbc + br*nbc + bc);
          ib_wr_en   <= 1'b1;
          @(posedge clk);
        end
    ib_wr_en <= 1'b0;
  endtask

  // compressed kernel of channels [c_lo, c_hi): nonzero entries only unless
  // keep_zeros (a dense kernel stored the same way); returns the count
  task automatic load_kb(input int base, input int c_lo, input int c_hi, input int r,
                         input int s, input bit keep_zeros, output int n);
    n = 0;
    for (int ch = c_lo; ch < c_hi; ch++)
      for (int i = 0; i < r; i++)
        for (int j = 0; j < s; j++)
          if (keep_zeros || kern[ch][i][j] != 0) begin
            kb_wr_data <= '{val: data_t'(kern[ch][i][j]), ch: ch_t'(ch),
                            r: kcoord_t'(i), c: kcoord_t'(j)};
            kb_wr_addr <= 15'(base + n);
            kb_wr_en   <= 1'b1;
            n++;
            @(posedge clk);
          end
    kb_wr_en <= 1'b0;
  endtask

  function automatic void reference(input int c, input int h, input int w, input int r,
                                    input int s);
    for (int x = 0; x < h + r - 1; x++)
      for (int y = 0; y < w + s - 1; y++) begin
        int acc = 0;
        for (int ch = 0; ch < c; ch++)
          for (int i = 0; i < r; i++)
            for (int j = 0; j < s; j++) begin
              int xi = x - (r - 1) + i, yj = y - (s - 1) + j;
              if (xi >= 0 && xi < h && yj >= 0 && yj < w)
                acc += kern[ch][i][j] * img[ch][xi][yj];
            end
        ref_o[x][y] = acc;
      end
  endfunction

  task automatic run_job(input int h, input int w, input int r, input int s, input int base,
                         input int n, input bit clear);
    int e = h + r - 1, f = w + s - 1;
    int bpc = ((h + PX - 1) / PX) * ((w + PY - 1) / PY);
    int clr = clear ? ((e + PX - 1) / PX) * ((f + PY - 1) / PY) : 0;
    cfg <= '{h: coord_t'(h), w: coord_t'(w), rm1: kcoord_t'(r - 1), sm1: kcoord_t'(s - 1),
             kb_base: 16'(base), kb_count: 16'(n), clear: clear};
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do @(posedge clk); while (!done);
    check(perf_ops == 32'(n * bpc), $sformatf("ops %0d expected %0d", perf_ops, n * bpc));
    check(perf_cycles == 32'(1 + clr + n * bpc + 2),
          $sformatf("cycles %0d expected %0d", perf_cycles, 1 + clr + n * bpc + 2));
    if (perf_fwd != 0) n_fwd++;
    if (!clear) n_accum++;
    if ((e % PX) != 0 || (f % PY) != 0) n_edge++;
    if (n == 0) n_empty++;
  endtask

  task automatic compare_ob(input int h, input int w, input int r, input int s, input string tag);
    int e = h + r - 1, f = w + s - 1;
    int nbro = (e + PX - 1) / PX, nbco = (f + PY - 1) / PY;
    int bad = 0;
    for (int br = 0; br < nbro; br++)
      for (int bc = 0; bc < nbco; bc++) begin
        ob_rd_addr <= 9'(br * nbco + bc);
        @(posedge clk);
        @(negedge clk);
        for (int a = 0; a < PX; a++)
          for (int b = 0; b < PY; b++) begin
            int x = br*PX + a, y = bc*PY + b;
            if (x < e && y < f) begin
              checks++;
              if (ob_rd_data[a*PY+b] != ref_o[x][y]) begin
                bad++;
                failures++;
                if (bad < 4) $display("FAIL %s: O[%0d][%0d] = %0d, expected %0d", tag, x, y,
                                      ob_rd_data[a*PY+b], ref_o[x][y]);
              end
            end
          end
      end
    $display("%s: %0dx%0d output compared, %0d mismatches", tag, e, f, bad);
  endtask

  // one complete convolution: maps, kernel, run, compare
  task automatic conv_test(input int c, input int h, input int w, input int r, input int s,
                           input int density, input string tag);
    int n;
    make_imaps(c, h, w, 2000);
    make_kernel(c, r, s, density);
    load_ib(c, h, w);
    load_kb(0, 0, c, r, s, 1'b0, n);
    if (n < c * r * s) n_skip++;
    reference(c, h, w, r, s);
    run_job(h, w, r, s, 0, n, 1'b1);
    compare_ob(h, w, r, s, tag);
  endtask

  initial begin
    int n1, n2, nd;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // single imap block: every weight's block overlaps the previous one
    conv_test(2, 5, 5, 3, 3, 50, "5x5x2 k3x3");
    // several blocks, rectangular kernel, ragged edges
    conv_test(3, 13, 20, 3, 5, 40, "13x20x3 k3x5");
    // 1x1 kernel
    conv_test(4, 16, 9, 1, 1, 70, "16x9x4 k1x1");
    // large kernel as in the first AlexNet layer shape class
    conv_test(1, 17, 11, 7, 7, 30, "17x11x1 k7x7");
    // a VGG-style tile: 32x32, 3x3 kernel, 6 channels, 35 % dense
    conv_test(6, 32, 32, 3, 3, 35, "32x32x6 k3x3");

    // accumulation over two jobs: channels 0-1, then channel 2 added on top
    make_imaps(3, 12, 10, 1000);
    make_kernel(3, 3, 3, 60);
    load_ib(3, 12, 10);
    load_kb(100, 0, 2, 3, 3, 1'b0, n1);
    load_kb(200, 2, 3, 3, 3, 1'b0, n2);
    reference(3, 12, 10, 3, 3);
    run_job(12, 10, 3, 3, 100, n1, 1'b1);
    run_job(12, 10, 3, 3, 200, n2, 1'b0);
    compare_ob(12, 10, 3, 3, "two-job accumulation");

    // the same maps with the dense kernel (zeros stored): same result, more ops
    load_kb(300, 0, 3, 3, 3, 1'b1, nd);
    run_job(12, 10, 3, 3, 300, nd, 1'b1);
    check(nd == 27, "dense kernel entry count");
    n_dense++;
    compare_ob(12, 10, 3, 3, "dense kernel");
    check(n1 + n2 < nd, "sparse kernel needs fewer operations than dense");

    // empty kernel: the output map is cleared and nothing else happens
    make_kernel(3, 3, 3, 0);
    reference(3, 12, 10, 3, 3);
    run_job(12, 10, 3, 3, 0, 0, 1'b1);
    compare_ob(12, 10, 3, 3, "empty kernel");

    check(n_fwd > 0,   "OB forwarding occurred");
    check(n_accum > 0, "accumulating job occurred");
    check(n_edge > 0,  "edge-masked output occurred");
    check(n_skip > 0,  "zero weights skipped");
    check(n_empty > 0, "empty kernel job occurred");
    check(n_dense > 0, "dense kernel job occurred");
    $display("mechanisms: forward=%0d accumulate=%0d edge=%0d skip=%0d empty=%0d dense=%0d",
             n_fwd, n_accum, n_edge, n_skip, n_empty, n_dense);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
