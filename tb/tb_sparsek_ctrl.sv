// tb_sparsek_ctrl: runs the controller with a kernel buffer holding random
// compressed entries and checks, for several job shapes, the exact stream it
// issues: the clear pass (addresses 0 .. ceil(E/8)*ceil(F/8)-1), then one
// operation per cycle in the order nonzero entry, block row, block column,
// each with the entry's value and coordinates, the block origin and the IB
// word ch*blocks_per_channel + block; the derived geometry; and that done
// comes exactly two cycles after the last operation.
module tb_sparsek_ctrl;
  import sparsek_pkg::*;
  localparam int PX = 8, PY = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        kb_wr_en = 1'b0;
  logic [14:0] kb_wr_addr = '0, kb_rd_addr;
  kb_entry_t   kb_wr_data = '0, kb_rd_data;
  logic        start = 1'b0, busy, done, op_valid, clr_valid;
  job_cfg_t    cfg = '0;
  data_t       op_k;
  kcoord_t     op_r, op_c, g_rm1, g_sm1;
  coord_t      op_x0, op_y0, g_e, g_f;
  logic [9:0]  ib_rd_addr;
  logic [8:0]  g_nbco, clr_addr;
  int checks = 0, failures = 0;
  kb_entry_t   ents [64];

  kernel_buffer u_kb (.clk, .wr_en(kb_wr_en), .wr_addr(kb_wr_addr), .wr_data(kb_wr_data),
                      .rd_addr(kb_rd_addr), .rd_data(kb_rd_data));
  sparsek_ctrl dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic job(input int h, input int w, input int r, input int s, input int base,
                     input int n, input int nch, input bit clear);
    int e = h + r - 1, f = w + s - 1;
    int nbr = (h + PX - 1) / PX, nbc = (w + PY - 1) / PY;
    int nclr = clear ? ((e + PX - 1) / PX) * ((f + PY - 1) / PY) : 0;
    int seen_clr = 0, seen_op = 0, last_op = -1, t = 0, done_t = -1;
    // load entries
    for (int i = 0; i < n; i++) begin
      ents[i] = '{val: data_t'($urandom), ch: ch_t'($urandom % nch),
                  r: kcoord_t'($urandom % r), c: kcoord_t'($urandom % s)};
      kb_wr_en <= 1'b1; kb_wr_addr <= 15'(base + i); kb_wr_data <= ents[i];
      @(posedge clk);
    end
    kb_wr_en <= 1'b0;
    cfg <= '{h: coord_t'(h), w: coord_t'(w), rm1: kcoord_t'(r - 1), sm1: kcoord_t'(s - 1),
             kb_base: 16'(base), kb_count: 16'(n), clear: clear};
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (done_t < 0) begin
      @(negedge clk);
      t++;
      if (done) done_t = t;
      if (clr_valid) begin
        chk(seen_op == 0 && clr_addr == 9'(seen_clr), "clear address order");
        seen_clr++;
      end
      if (op_valid) begin
        int i = seen_op / (nbr * nbc), blk = seen_op % (nbr * nbc);
        chk(op_k == ents[i].val && op_r == ents[i].r && op_c == ents[i].c &&
            op_x0 == coord_t'((blk / nbc) * PX) && op_y0 == coord_t'((blk % nbc) * PY) &&
            ib_rd_addr == 10'(int'(ents[i].ch) * nbr * nbc + blk),
            $sformatf("op %0d", seen_op));
        chk(g_e == coord_t'(e) && g_f == coord_t'(f) && g_nbco == 9'((f + PY - 1) / PY) &&
            g_rm1 == kcoord_t'(r - 1) && g_sm1 == kcoord_t'(s - 1), "geometry");
        seen_op++;
        last_op = t;
      end
      if (t > 20000) break;
    end
    chk(seen_clr == nclr, $sformatf("clear cycles %0d expected %0d", seen_clr, nclr));
    chk(seen_op == n * nbr * nbc, $sformatf("ops %0d expected %0d", seen_op, n * nbr * nbc));
    chk(done_t == 1 + nclr + n * nbr * nbc + 2 + 1,
        $sformatf("done at %0d expected %0d", done_t, 1 + nclr + n * nbr * nbc + 3));
    if (n > 0) chk(done_t == last_op + 3, "done two cycles after last op");
    @(negedge clk);
    chk(!busy, "idle after done");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    job(5, 5, 3, 3, 0, 4, 2, 1'b1);        // one block per entry
    job(20, 13, 3, 5, 100, 7, 3, 1'b1);
    job(32, 32, 1, 1, 7, 3, 4, 1'b0);
    job(9, 17, 7, 7, 2000, 12, 1, 1'b1);
    job(16, 16, 3, 3, 0, 0, 1, 1'b1);      // empty kernel
    job(8, 8, 2, 2, 30000, 1, 8, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
