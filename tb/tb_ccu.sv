// tb_ccu: gives the coordinate computation unit random imap blocks, kernel
// coordinates and map sizes. The expected result is built element by element:
// product (a, b) of the block at imap (x0, y0) from kernel scalar (r, c) lands
// at buffer position (x0 + a - r + R - 1, y0 + b - c + S - 1); from that
// position the test derives the bank, the bank word and whether it is inside
// the E x F output map, and compares all 64 banks and the rotation, one cycle
// after the inputs. The hand-worked offsets of the CCR-1 example (kernel
// element (0, 1) of a 3 x 3 kernel) are included.
module tb_ccu;
  import sparsek_pkg::*;
  localparam int PX = 8, PY = 8, NB = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic    in_valid = 1'b0, out_valid;
  coord_t  x0, y0, e, f, ox, oy;
  kcoord_t r, c, rm1, sm1;
  logic [8:0] nbco, bank_addr [NB];
  logic       bank_mask [NB];
  logic [3:0] rot_x, rot_y;
  int checks = 0, failures = 0;

  ccu dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int h, input int w, input int rr, input int ss, input int br,
                     input int bc, input int kr, input int kc);
    int ee = h + rr - 1, ff = w + ss - 1, nb = (ff + PY - 1) / PY;
    int exp_a [NB];
    bit exp_m [NB];
    int oxx = br*PX - kr + rr - 1, oyy = bc*PY - kc + ss - 1;
    @(negedge clk);
    in_valid = 1'b1;
    x0 = coord_t'(br*PX); y0 = coord_t'(bc*PY);
    r = kcoord_t'(kr); c = kcoord_t'(kc);
    rm1 = kcoord_t'(rr - 1); sm1 = kcoord_t'(ss - 1);
    e = coord_t'(ee); f = coord_t'(ff); nbco = 9'(nb);
    for (int a = 0; a < PX; a++)
      for (int b = 0; b < PY; b++) begin
        int row = oxx + a, col = oyy + b;
        int bank = (row % PX) * PY + (col % PY);
        exp_a[bank] = (row / PX) * nb + col / PY;
        exp_m[bank] = row < ee && col < ff;
      end
    @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || ox != coord_t'(oxx) || oy != coord_t'(oyy) ||
        rot_x != 4'(oxx % PX) || rot_y != 4'(oyy % PY)) begin
      failures++;
      $display("FAIL origin (%0d,%0d) expected (%0d,%0d)", ox, oy, oxx, oyy);
    end
    for (int g = 0; g < NB; g++) begin
      checks++;
      if (bank_mask[g] != exp_m[g] || (exp_m[g] && bank_addr[g] != 9'(exp_a[g]))) begin
        failures++;
        if (failures < 6) $display("FAIL bank %0d: addr %0d mask %0d expected %0d %0d", g,
                                   bank_addr[g], bank_mask[g], exp_a[g], exp_m[g]);
      end
    end
  endtask

  initial begin
    // CCR-1 example: 4x4 imap, 3x3 kernel, element (0,1): alpha = 0, beta = -1
    // relative to a 1x1 sub-kernel, i.e. buffer origin (2, 1)
    one(4, 4, 3, 3, 0, 0, 0, 1);
    checks++;
    if (ox != 2 || oy != 1) failures++;
    // the 1x1 sub-kernel at (2, 0): alpha = -2, beta = 0, buffer origin (0, 2)
    one(4, 4, 3, 3, 0, 0, 2, 0);
    checks++;
    if (ox != 0 || oy != 2) failures++;
    for (int n = 0; n < 2000; n++) begin
      automatic int rr = 1 + int'($urandom % 11), ss = 1 + int'($urandom % 11);
      automatic int h = 1 + int'($urandom % 120), w = 1 + int'($urandom % 120);
      one(h, w, rr, ss, int'($urandom % ((h + PX - 1) / PX)), int'($urandom % ((w + PY - 1) / PY)),
          int'($urandom % rr), int'($urandom % ss));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
