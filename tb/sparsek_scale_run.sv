// sparsek_scale_run: test driver used by tb_sparsek_scale. It instantiates
// the accelerator with a PX x PY PE array, runs a few random sparse-kernel
// convolutions on it, compares each full output map with a direct
// evaluation and checks the job cycle count. It reports its totals on
// checks/failures and raises finished when done.
module sparsek_scale_run
  import sparsek_pkg::*;
#(
  parameter int unsigned PX = 8,
  parameter int unsigned PY = 8
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int NB = PX*PY;
  localparam int HMAX = 40, KMAX = 5, CMAX = 3;

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

  sparsek_top #(.PX(PX), .PY(PY)) dut (.*);

  int img  [CMAX][HMAX][HMAX];
  int kern [CMAX][KMAX][KMAX];

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  task automatic conv(input int c, input int h, input int w, input int r, input int s);
    int e = h + r - 1, f = w + s - 1;
    int nbr = (h + PX - 1) / PX, nbc = (w + PY - 1) / PY, bpc = nbr * nbc;
    int nbro = (e + PX - 1) / PX, nbco = (f + PY - 1) / PY;
    int n = 0, bad = 0;
    for (int ch = 0; ch < c; ch++)
      for (int x = 0; x < HMAX; x++)
        for (int y = 0; y < HMAX; y++)
          img[ch][x][y] = (x < h && y < w) ? rnd(-500, 500) : 0;
    for (int ch = 0; ch < c; ch++)
      for (int i = 0; i < KMAX; i++)
        for (int j = 0; j < KMAX; j++)
          kern[ch][i][j] = (i < r && j < s && rnd(0, 99) < 45) ? rnd(1, 200) : 0;
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
    cfg <= '{h: coord_t'(h), w: coord_t'(w), rm1: kcoord_t'(r - 1), sm1: kcoord_t'(s - 1),
             kb_base: 16'd0, kb_count: 16'(n), clear: 1'b1};
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do @(posedge clk); while (!done);
    checks++;
    if (perf_cycles != 32'(1 + nbro*nbco + n*bpc + 2)) failures++;
    for (int br = 0; br < nbro; br++)
      for (int bc = 0; bc < nbco; bc++) begin
        ob_rd_addr <= 9'(br * nbco + bc);
        @(posedge clk);
        @(negedge clk);
        for (int a = 0; a < PX; a++)
          for (int b = 0; b < PY; b++) begin
            int x = br*PX + a, y = bc*PY + b;
            if (x < e && y < f) begin
              int acc = 0;
              for (int ch = 0; ch < c; ch++)
                for (int i = 0; i < r; i++)
                  for (int j = 0; j < s; j++) begin
                    int xi = x - (r - 1) + i, yj = y - (s - 1) + j;
                    if (xi >= 0 && xi < h && yj >= 0 && yj < w)
                      acc += kern[ch][i][j] * img[ch][xi][yj];
                  end
              checks++;
              if (ob_rd_data[a*PY+b] != acc) begin
                failures++;
                bad++;
              end
            end
          end
      end
    $display("%0dx%0d PEs: %0dx%0dx%0d imap, %0dx%0d kernel, %0d nonzero weights, %0d cycles, %0d mismatches",
             PX, PY, h, w, c, r, s, n, perf_cycles, bad);
  endtask

  initial begin
    checks = 0;
    failures = 0;
    finished = 1'b0;
    @(posedge rst_n);
    @(posedge clk);
    conv(2, 7, 9, 3, 3);
    conv(3, 30, 23, 3, 5);
    conv(1, 37, 40, 5, 5);
    finished = 1'b1;
  end
endmodule
