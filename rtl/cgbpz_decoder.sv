// cgbpz_decoder: data rearrange, bit-plane zonal decoding and compensation.
//
// Rebuilds the sixteen DCT coefficients of a block from its 64-bit segment
// (layout in ec_pkg), combinationally:
//   1. Data rearrange: DC (8 bits, scaled back by 4), the start/end code and
//      the AC field are split; the zone fields of the coded planes are taken
//      from the top of the AC field and the sign zone is their union.
//   2. Ripple dis-connector: ripple_disconnector links peel off, in order,
//      the sign bits, the coded planes from the start plane down to the end
//      plane, and the fill bits of the plane below the end plane, each placed
//      back into its zone.  The number of fill bits actually stored is the
//      budget minus what the coded planes use.
//   3. Compensation: a nonzero magnitude gets a one in the bit-plane just
//      below its lowest coded plane (half of the truncated range), when such
//      a plane exists.  The sign is applied last.
//
// Interface: seg in; coef[0..15] out (index 4*v+u, coef[0] = DC).
// The format, the derivation of the sign zone and the compensation rule
// ("the (N-1)th plane is filled with 1 if the magnitude is not zero") follow
// the document; compensating fill-coded positions one plane lower is this
// design's extension of that rule.
module cgbpz_decoder
  import ec_pkg::*;
(
  input  logic [SEG_W-1:0]         seg,
  output logic signed [COEF_W-1:0] coef [16]
);

  logic            se_ok;
  pidx_t           s, e;
  zone_t           zone  [NPLANES];
  logic [NPLANES-1:0] coded;
  zone_t           szone;
  logic [7:0]      used;
  logic [AC_BUDGET-1:0] rem0;

  // ---------------- data rearrange ----------------
  always_comb begin
    logic [AC_BUDGET-1:0] r;
    se_decode(seg[AC_BUDGET +: SE_W], se_ok, s, e);
    r     = seg[AC_BUDGET-1:0];
    szone = '0;
    used  = '0;
    for (int p = NPLANES - 1; p >= 0; p--) begin
      coded[p] = se_ok && pidx_t'(p) <= s && pidx_t'(p) >= e;
      zone[p]  = '0;
      if (coded[p]) begin
        zone[p] = r[AC_BUDGET-1 -: ZONE_W];
        r       = r << ZONE_W;
        szone   = zone_max(szone, zone[p]);
        used    = used + 8'(ZONE_W) + 8'(zone_bits(zone[p]));
      end
    end
    if (se_ok) used = used + 8'(zone_bits(szone));
    rem0 = r;
  end

  // ---------------- ripple dis-connector ----------------
  // link 0: sign plane; links 1..9: planes 8..0 (coded planes and fill plane)
  logic [AC_BUDGET-1:0] rem  [NPLANES+2];
  zone_t                dz   [NPLANES+1];
  logic [14:0]          dcon [NPLANES+1];

  always_comb begin
    dz[0] = se_ok ? szone : '0;
    for (int p = 0; p < NPLANES; p++) begin
      if (coded[p])
        dz[NPLANES - p] = zone[p];
      else if (se_ok && e != '0 && pidx_t'(p) == e - pidx_t'(1))
        dz[NPLANES - p] = szone;
      else
        dz[NPLANES - p] = '0;
    end
  end

  assign rem[0] = rem0;
  for (genvar g = 0; g <= NPLANES; g++) begin : g_dis
    ripple_disconnector u_dis (
      .rem_in(rem[g]), .zone(dz[g]), .content(dcon[g]), .rem_out(rem[g+1])
    );
  end

  // ---------------- reconstruction and compensation ----------------
  always_comb begin
    plane_t           pl [NPLANES];
    plane_t           sgn;
    plane_t           fill_coded;
    logic [14:0]      fmask;
    logic [7:0]       nfill;
    logic [MAG_W-1:0] mag;
    pidx_t            low;

    sgn = zone_expand(dcon[0], szone);
    for (int p = 0; p < NPLANES; p++)
      pl[p] = zone_expand(dcon[NPLANES - p], dz[NPLANES - p]);

    // fill bits actually stored: the budget left by the coded planes
    nfill = 8'(AC_BUDGET) - used;
    if (nfill > 8'(zone_bits(szone))) nfill = 8'(zone_bits(szone));
    for (int j = 0; j < 15; j++) fmask[14 - j] = (8'(j) < nfill);
    fill_coded = (se_ok && e != '0) ? zone_expand(fmask, szone) : '0;

    coef[0] = COEF_W'({seg[SEG_W-1 -: DC_W], 2'b00});
    for (int i = 1; i < 16; i++) begin
      mag = '0;
      for (int p = 0; p < NPLANES; p++) mag[p] = pl[p][i];
      low = fill_coded[i] ? e - pidx_t'(1) : e;
      if (mag != '0 && low != '0) mag[low - pidx_t'(1)] = 1'b1;
      coef[i] = sgn[i] ? -COEF_W'(mag) : COEF_W'(mag);
    end
  end

endmodule
