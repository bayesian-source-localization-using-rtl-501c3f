// triangulation: finds in which of the eight 45-degree sectors around the UGV
// a grid lies and selects that sector's photodiode bit.
//
// Sector j (1..8) covers bearings [45(j-1), 45j) degrees, counted
// anticlockwise from the +x direction, as the numbering around the vehicle in
// the arena drawing shows (1 east, 3 north-west of north, 5 west-south-west,
// 8 east-south-east). With dx = x_g - x_ugv and dy = y_g - y_ugv the sector
// follows from the signs of dx and dy and from comparing |dx| with |dy|; no
// angle is computed. A bearing that lies exactly on a boundary belongs to the
// sector it opens. The grid under the UGV itself (dx = dy = 0) has no bearing;
// this design assigns it sector 1. The comparisons, the boundary rule and that
// case are this design's choices; the published design gives only the function.
//
// Interface: positions are {x, y} grid indices; sector is the sector number
// minus one; z_j = z[sector]. Purely combinational.
module triangulation
  import bslm_pkg::*;
(
  input  pos_t             x_ugv,
  input  pos_t             x_g,
  input  logic [NSECT-1:0] z,
  output logic [2:0]       sector,
  output logic             z_j
);

  logic signed [CW:0] dx, dy;
  logic [CW:0] ax, ay;

  always_comb begin
    dx = $signed({1'b0, x_g.x}) - $signed({1'b0, x_ugv.x});
    dy = $signed({1'b0, x_g.y}) - $signed({1'b0, x_ugv.y});
    ax = dx[CW] ? -dx : dx;
    ay = dy[CW] ? -dy : dy;
    if (dx == 0 && dy == 0)       sector = 3'd0;
    else if (dx > 0 && dy >= 0)   sector = (ay < ax)  ? 3'd0 : 3'd1; // [0,45) / [45,90)
    else if (dx <= 0 && dy > 0)   sector = (ax < ay)  ? 3'd2 : 3'd3; // [90,135) / [135,180)
    else if (dx < 0 && dy <= 0)   sector = (ay < ax)  ? 3'd4 : 3'd5; // [180,225) / [225,270)
    else                          sector = (ax < ay)  ? 3'd6 : 3'd7; // [270,315) / [315,360)
    z_j = z[sector];
  end

endmodule
