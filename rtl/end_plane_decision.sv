// end_plane_decision: choose the lowest bit-plane that still fits the budget.
//
// Walking from the start plane down, the bit usage of coding planes
// start..N is
//     sum over p in [N, start] of (4 + RMAX_p*CMAX_p - 1)      zone + content
//   + RMAX_s*CMAX_s - 1                                        sign bits
// where the sign zone (RMAX_s, CMAX_s) is the larger row and column bound of
// the coded planes.  The end plane is the lowest N whose usage is at most
// BUDGET.  The walk is unrolled into a chain of adders and comparators so the
// decision takes no clock cycle.  The start plane alone always fits (at most
// 4 + 15 + 15 = 34 bits).
//
// Interface: zone[0..8], start plane, any_ac in; end plane, sign zone and the
// number of AC-field bits the coded planes use out.  When any_ac = 0 nothing
// is coded: end = 0, used = 0, sign zone 1x1.  Combinational.
// The loop and its unrolling follow the document; counting the sign bits in
// the usage and the 8-bit accumulator width are this design's reading.
module end_plane_decision
  import ec_pkg::*;
#(
  parameter int unsigned BUDGET = AC_BUDGET
) (
  input  zone_t       zone [NPLANES],
  input  pidx_t       start,
  input  logic        any_ac,
  output pidx_t       end_pl,
  output zone_t       sign_zone,
  output logic [7:0]  used
);

  always_comb begin
    logic [7:0] acc;
    logic [7:0] cost;
    logic       fits;
    zone_t      sz;
    acc       = '0;
    sz        = '0;
    fits      = any_ac;
    end_pl    = '0;
    used      = '0;
    sign_zone = '0;
    cost      = '0;
    for (int p = NPLANES - 1; p >= 0; p--) begin
      if (any_ac && pidx_t'(p) <= start) begin
        acc  = acc + 8'(ZONE_W) + 8'(zone_bits(zone[p]));
        sz   = zone_max(sz, zone[p]);
        cost = acc + 8'(zone_bits(sz));
        if (fits && cost <= 8'(BUDGET)) begin
          end_pl    = pidx_t'(p);
          used      = cost;
          sign_zone = sz;
        end else begin
          fits = 1'b0;
        end
      end
    end
  end

endmodule
