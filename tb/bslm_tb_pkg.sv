// bslm_tb_pkg: the world around the localisation array, for the testbenches:
// a bearing-based sector reference, the photodiode noise model of the design
// (a photodiode fires with probability alpha when the source lies in its
// sector and alpha*beta otherwise), and a vehicle that steps one cell per
// time step in one of eight 45-degree directions towards the estimate.
package bslm_tb_pkg;

  // sector 1..8 of the bearing from (ux,uy) to (gx,gy); the cell under the
  // vehicle counts as sector 1
  function automatic int ref_sector(int ux, int uy, int gx, int gy);
    real ang;
    int dx, dy, ax, ay;
    dx = gx - ux; dy = gy - uy;
    if (dx == 0 && dy == 0) return 1;
    ax = dx < 0 ? -dx : dx;
    ay = dy < 0 ? -dy : dy;
    ang = $atan2(real'(dy), real'(dx)) * 180.0 / 3.14159265358979;
    if (ang < 0) ang += 360.0;
    if (dx == 0 || dy == 0 || ax == ay) ang = $floor(ang + 0.5);
    return (int'($floor(ang / 45.0)) % 8) + 1;
  endfunction

  function automatic bit bern(real p);
    return (real'($urandom_range(0, 999999)) / 1000000.0) < p;
  endfunction

  // eight photodiode bits, bit j-1 for sector j
  function automatic logic [7:0] photodiodes(int ux, int uy, int sx, int sy, real alpha, real beta);
    logic [7:0] z;
    int s;
    s = ref_sector(ux, uy, sx, sy);
    for (int j = 1; j <= 8; j++)
      z[j-1] = (j == s) ? bern(alpha) : bern(alpha * beta);
    return z;
  endfunction

  function automatic int sgn(int v);
    return (v > 0) ? 1 : (v < 0) ? -1 : 0;
  endfunction

  function automatic real cell_dist(int ax, int ay, int bx, int by);
    return $sqrt(real'((ax - bx) * (ax - bx) + (ay - by) * (ay - by)));
  endfunction

endpackage
