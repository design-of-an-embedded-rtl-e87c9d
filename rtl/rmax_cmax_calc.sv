// rmax_cmax_calc: bit-plane analysis of the fifteen AC coefficients of a block.
//
// Each AC coefficient is split into a sign and a 9-bit magnitude (saturated at
// 511).  Bit p of every magnitude forms bit-plane p; the signs form the sign
// bit-plane.  For every magnitude plane the unit finds its zone, the smallest
// RMAX x CMAX rectangle anchored at the DC corner that holds all its ones
// (an all-zero plane gets the 1x1 zone, which carries no AC bits), and the
// plane content: the bits inside that zone in raster order, left aligned in
// 15 bits.  The start plane is the highest plane holding a one; any_ac = 0
// when every AC magnitude is zero.
//
// Interface: coef[0..15] (index 4*v+u, coef[0] = DC is ignored) in; planes,
// zones, contents, sign plane, start plane out.  Combinational.
// Per-plane independent zones, nine planes and one sign plane follow the
// document; the saturation at 511 is this design's guard against rounding.
module rmax_cmax_calc
  import ec_pkg::*;
(
  input  logic signed [COEF_W-1:0] coef    [16],
  output plane_t                   plane   [NPLANES],
  output plane_t                   sign_pl,
  output zone_t                    zone    [NPLANES],
  output logic [14:0]              content [NPLANES],
  output pidx_t                    start,
  output logic                     any_ac
);

  logic [MAG_W-1:0] mag [16];

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      logic [COEF_W-1:0] a;
      a = coef[i][COEF_W-1] ? COEF_W'(-coef[i]) : COEF_W'(coef[i]);
      mag[i]     = (i == 0) ? '0 : ((a > COEF_W'(511)) ? MAG_W'(511) : a[MAG_W-1:0]);
      sign_pl[i] = (i != 0) && coef[i][COEF_W-1];
    end
    start  = '0;
    any_ac = 1'b0;
    for (int p = 0; p < NPLANES; p++) begin
      for (int i = 0; i < 16; i++) plane[p][i] = mag[i][p];
      zone[p]    = zone_of(plane[p]);
      content[p] = zone_compact(plane[p], zone[p]);
      if (plane[p] != '0) begin
        start  = pidx_t'(p);
        any_ac = 1'b1;
      end
    end
  end

endmodule
