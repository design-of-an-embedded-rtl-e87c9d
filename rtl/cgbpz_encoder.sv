// cgbpz_encoder: coarse grain bit-plane zonal encoder and data packing.
//
// Turns the sixteen 2-D DCT coefficients of a 4x4 block into one 64-bit
// segment in two clock cycles.
//   Cycle 1 (analysis): the DC coefficient is quantised to 8 bits (rounded
//     division by 4, i.e. the block mean); rmax_cmax_calc splits the AC
//     coefficients into planes and zones; end_plane_decision picks the end
//     plane and the sign zone; se_plane_mux forms the 6-bit start/end code.
//     Everything is registered.
//   Cycle 2 (packing): a chain of ripple_connector links serialises, in this
//     order, the fill plane (the plane below the end plane, taken inside the
//     sign zone), the coded planes from the end plane up to the start plane,
//     and the sign plane; four-bit links then push in the zone fields from the
//     end plane up to the start plane.  Whatever the fill plane has in excess
//     of the budget drops out at the bottom of the chain, so the bit count
//     end_plane_decision also reports (used) is not needed here.  The
//     segment is registered.
// Segment layout: see ec_pkg.
//
// Interface: in_valid with coef[0..15]; out_valid pulses with seg two cycles
// later.  A new block may enter every cycle.
// The format (DC 8 bits, start/end 6 bits, per-plane zones, sign zone
// derived from the coded planes, filling of left-over bits) follows the
// document; the fill plane choice (the next plane down, raster order) is
// this design's reading of it.
module cgbpz_encoder
  import ec_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [COEF_W-1:0] coef [16],
  output logic                     out_valid,
  output logic [SEG_W-1:0]         seg
);

  // ---------------- cycle 1: analysis ----------------
  plane_t      plane   [NPLANES];
  plane_t      sign_pl;
  zone_t       zone    [NPLANES];
  logic [14:0] content [NPLANES];
  pidx_t       start, end_pl;
  logic        any_ac;
  zone_t       sign_zone;
  logic [7:0]  used;
  logic [SE_W-1:0] se;
  logic [DC_W-1:0] dc_q;
  logic [14:0] fill_content;

  rmax_cmax_calc u_rc (
    .coef(coef), .plane(plane), .sign_pl(sign_pl), .zone(zone),
    .content(content), .start(start), .any_ac(any_ac)
  );

  end_plane_decision u_ep (
    .zone(zone), .start(start), .any_ac(any_ac),
    .end_pl(end_pl), .sign_zone(sign_zone), .used(used)
  );

  se_plane_mux u_se (.start(start), .end_pl(end_pl), .any_ac(any_ac), .code(se));

  always_comb begin
    logic signed [COEF_W:0] d;
    d = (COEF_W+1)'(coef[0]) + (COEF_W+1)'(2);
    if (d < 0)                          dc_q = '0;
    else if ((d >>> 2) > 255)           dc_q = 8'd255;
    else                                dc_q = DC_W'(d >>> 2);
    fill_content = (end_pl != '0) ? zone_compact(plane[end_pl - pidx_t'(1)], sign_zone) : '0;
  end

  logic            a_valid;
  logic [DC_W-1:0] a_dc;
  logic [SE_W-1:0] a_se;
  zone_t           a_zone    [NPLANES];
  logic [14:0]     a_content [NPLANES];
  logic [14:0]     a_sign;
  logic [14:0]     a_fill;
  zone_t           a_szone;
  pidx_t           a_start, a_end;
  logic            a_any;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_valid <= 1'b0;
    else        a_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      a_dc      <= dc_q;
      a_se      <= se;
      a_zone    <= zone;
      a_content <= content;
      a_sign    <= zone_compact(sign_pl, sign_zone);
      a_fill    <= fill_content;
      a_szone   <= sign_zone;
      a_start   <= start;
      a_end     <= end_pl;
      a_any     <= any_ac;
    end
  end

  // ---------------- cycle 2: content adaptive ripple connector ----------------
  logic [AC_BUDGET-1:0] link  [NPLANES+2];
  zone_t                lzone [NPLANES+1];
  logic [14:0]          lcont [NPLANES+1];

  always_comb begin
    for (int p = 0; p < NPLANES; p++) begin
      if (a_any && pidx_t'(p) >= a_end && pidx_t'(p) <= a_start) begin
        lzone[p] = a_zone[p];          // coded plane
        lcont[p] = a_content[p];
      end else if (a_any && a_end != '0 && pidx_t'(p) == a_end - pidx_t'(1)) begin
        lzone[p] = a_szone;            // fill plane, truncated by the chain
        lcont[p] = a_fill;
      end else begin
        lzone[p] = '0;                 // nothing
        lcont[p] = '0;
      end
    end
    lzone[NPLANES] = a_any ? a_szone : '0;  // sign plane
    lcont[NPLANES] = a_sign;
  end

  assign link[0] = '0;
  for (genvar g = 0; g <= NPLANES; g++) begin : g_link
    ripple_connector u_conn (
      .content(lcont[g]), .zone(lzone[g]), .prev(link[g]), .result(link[g+1])
    );
  end

  // zone fields, end plane first so that the start plane's field ends on top
  logic [AC_BUDGET-1:0] ac_field;
  always_comb begin
    ac_field = link[NPLANES+1];
    for (int p = 0; p < NPLANES; p++) begin
      if (a_any && pidx_t'(p) >= a_end && pidx_t'(p) <= a_start)
        ac_field = {a_zone[p], ac_field[AC_BUDGET-1:ZONE_W]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= a_valid;
  end

  always_ff @(posedge clk) begin
    if (a_valid) seg <= {a_dc, a_se, ac_field};
  end

endmodule
