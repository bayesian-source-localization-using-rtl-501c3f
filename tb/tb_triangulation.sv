// tb_triangulation: sweeps UGV and grid positions over a 12 x 12 patch of the
// arena (and a few far corners of a 255-wide one) and compares the sector with
// one computed from the bearing atan2(dy, dx): sector = floor(angle / 45) + 1,
// angles on a sector boundary belonging to the sector they open, the UGV's
// own cell to sector 1. z_j must be the chosen sector's bit of a random z.
module tb_triangulation;
  import bslm_pkg::*;
  pos_t x_ugv, x_g;
  logic [7:0] z;
  logic [2:0] sector;
  logic z_j;
  int checks = 0, failures = 0;
  int per_sector [8];

  triangulation dut (.x_ugv(x_ugv), .x_g(x_g), .z(z), .sector(sector), .z_j(z_j));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sector(int dx, int dy);
    real ang;
    int ax, ay;
    if (dx == 0 && dy == 0) return 1;
    ax = dx < 0 ? -dx : dx;
    ay = dy < 0 ? -dy : dy;
    ang = $atan2(real'(dy), real'(dx)) * 180.0 / 3.14159265358979;
    if (ang < 0) ang += 360.0;
    if (dx == 0 || dy == 0 || ax == ay) ang = $floor(ang + 0.5); // exact multiple of 45
    return (int'($floor(ang / 45.0)) % 8) + 1;
  endfunction

  task automatic one(int ux, int uy, int gx, int gy);
    int exp_s;
    x_ugv = '{x: 8'(ux), y: 8'(uy)};
    x_g   = '{x: 8'(gx), y: 8'(gy)};
    z = 8'($urandom);
    #1;
    exp_s = ref_sector(gx - ux, gy - uy);
    checks++;
    if (int'(sector) + 1 != exp_s || z_j != z[exp_s-1]) begin
      failures++;
      if (failures < 10)
        $display("FAIL: ugv (%0d,%0d) grid (%0d,%0d): sector %0d exp %0d, z_j %b",
                 ux, uy, gx, gy, int'(sector) + 1, exp_s, z_j);
    end
    per_sector[exp_s-1]++;
  endtask

  initial begin
    for (int ux = 1; ux <= 12; ux++)
      for (int uy = 1; uy <= 12; uy++)
        for (int gx = 1; gx <= 12; gx++)
          for (int gy = 1; gy <= 12; gy++)
            one(ux, uy, gx, gy);
    for (int i = 0; i < 2000; i++)
      one($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    // the example of the arena drawing: UGV near (K-3, 3), K = 40
    one(37, 3, 3, 39);  // light source: sector 3
    one(37, 3, 40, 39); // distractor: sector 2
    one(37, 3, 1, 2);   // distractor: sector 5
    foreach (per_sector[s]) begin
      checks++;
      if (per_sector[s] == 0) begin failures++; $display("FAIL: sector %0d never seen", s + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
