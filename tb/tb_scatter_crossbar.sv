// tb_scatter_crossbar: for every rotation (0..7 x 0..7) and random data,
// checks that the scattering instance puts block element (a, b) in bank
// ((a + rot_x) mod 8, (b + rot_y) mod 8) and that the gathering instance
// undoes it.
module tb_scatter_crossbar;
  import sparsek_pkg::*;
  localparam int PX = 8, PY = 8, NB = 64;
  logic [3:0] rot_x, rot_y;
  acc_t pos [NB], bank [NB], back [NB];
  int checks = 0, failures = 0;

  scatter_crossbar #(.GATHER(1'b0)) u_sc (.rot_x, .rot_y, .din(pos), .dout(bank));
  scatter_crossbar #(.GATHER(1'b1)) u_ga (.rot_x, .rot_y, .din(bank), .dout(back));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int rx = 0; rx < PX; rx++)
        for (int ry = 0; ry < PY; ry++) begin
          rot_x = 4'(rx);
          rot_y = 4'(ry);
          foreach (pos[g]) pos[g] = acc_t'($urandom);
          #1;
          for (int a = 0; a < PX; a++)
            for (int b = 0; b < PY; b++) begin
              checks += 2;
              if (bank[((a + rx) % PX) * PY + (b + ry) % PY] != pos[a*PY+b]) failures++;
              if (back[a*PY+b] != pos[a*PY+b]) failures++;
            end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
