// ec_pkg: constants, types and small combinational helpers shared by the
// embedded compressor/decompressor (EC).
//
// The EC codes every 4x4 pixel block into one 64-bit segment (compression
// ratio 2).  A 2-D DCT turns the block into one DC and fifteen AC
// coefficients.  The AC magnitudes are split into nine bit-planes plus one
// sign bit-plane and coded with coarse grain bit-plane zonal coding (CGBPZ):
// every coded plane carries a 4-bit zone (RMAX/CMAX) and the bits inside it.
//
// Segment layout, most significant bit first:
//   [63:56] DC coefficient, 8 bits (block mean)
//   [55:50] start plane / end plane pair, 6 bits (SE_EMPTY: no AC data)
//   [49:0]  AC field: zone fields of the coded planes (start plane first),
//           sign bits inside the sign zone, contents of the coded planes
//           (start plane first), then as many bits of the plane below the
//           end plane (inside the sign zone) as still fit.
//
// Coefficient and plane-bit index i = 4*v + u, v = vertical frequency (row),
// u = horizontal frequency (column); i = 0 is the DC position.
//
// The 8/6/50-bit split, nine magnitude planes and 4-bit zones follow the
// document; the 6-bit start/end code, the raster scan inside a zone, and the
// placement of the fill bits are this design's own choices.
package ec_pkg;

  localparam int unsigned PIX_W     = 8;   // pixel width
  localparam int unsigned NPLANES   = 9;   // AC magnitude bit-planes
  localparam int unsigned COEF_W    = 12;  // signed 2-D DCT coefficient (DC 0..1020)
  localparam int unsigned MAG_W     = 9;   // AC magnitude
  localparam int unsigned DC_W      = 8;   // coded DC
  localparam int unsigned SE_W      = 6;   // start/end plane field
  localparam int unsigned SEG_W     = 64;  // coded segment
  localparam int unsigned AC_BUDGET = 50;  // AC field bits
  localparam int unsigned ZONE_W    = 4;   // RMAX/CMAX field
  localparam int unsigned ROWQ_W    = 13;  // forward row-pass result, 2 fraction bits
  localparam int unsigned IROWQ_W   = 14;  // inverse column-pass result, 2 fraction bits

  localparam logic [SE_W-1:0] SE_EMPTY = 6'd63;

  // Zone of a bit-plane: rows 0..r and columns 0..c hold all its ones.
  typedef struct packed {
    logic [1:0] r;  // RMAX - 1
    logic [1:0] c;  // CMAX - 1
  } zone_t;

  typedef logic [15:0] plane_t;  // one bit per coefficient position
  typedef logic [3:0]  pidx_t;   // bit-plane index 0..8

  // Number of AC bits inside a zone: (RMAX * CMAX) - 1 (DC position excluded).
  function automatic logic [3:0] zone_bits(zone_t z);
    logic [4:0] n;
    n = ({3'b0, z.r} + 5'd1) * ({3'b0, z.c} + 5'd1) - 5'd1;
    return n[3:0];
  endfunction

  // Smallest zone that covers every one of the AC positions of a plane.
  function automatic zone_t zone_of(plane_t p);
    zone_t z;
    z = '0;
    for (int i = 1; i < 16; i++) begin
      if (p[i]) begin
        if (2'(i / 4) > z.r) z.r = 2'(i / 4);
        if (2'(i % 4) > z.c) z.c = 2'(i % 4);
      end
    end
    return z;
  endfunction

  // Zone covering two zones.
  function automatic zone_t zone_max(zone_t a, zone_t b);
    zone_t z;
    z.r = (a.r > b.r) ? a.r : b.r;
    z.c = (a.c > b.c) ? a.c : b.c;
    return z;
  endfunction

  // Collect the bits of a plane inside a zone in raster order.  The first
  // bit of the scan lands in bit 14 (the content is left aligned).
  function automatic logic [14:0] zone_compact(plane_t p, zone_t z);
    logic [14:0] o;
    int k;
    o = '0;
    k = 14;
    for (int i = 1; i < 16; i++) begin
      if (2'(i / 4) <= z.r && 2'(i % 4) <= z.c) begin
        o[k] = p[i];
        k--;
      end
    end
    return o;
  endfunction

  // Inverse of zone_compact.
  function automatic plane_t zone_expand(logic [14:0] o, zone_t z);
    plane_t p;
    int k;
    p = '0;
    k = 14;
    for (int i = 1; i < 16; i++) begin
      if (2'(i / 4) <= z.r && 2'(i % 4) <= z.c) begin
        p[i] = o[k];
        k--;
      end
    end
    return p;
  endfunction

  // Start/end plane pair (0 <= e <= s <= 8) to its 6-bit code s*(s+1)/2 + e.
  function automatic logic [SE_W-1:0] se_code(pidx_t s, pidx_t e);
    logic [6:0] s7, t;
    s7 = 7'(s);
    t  = ((s7 * (s7 + 7'd1)) >> 1) + 7'(e);
    return t[SE_W-1:0];
  endfunction

  // Inverse of se_code; valid = 0 for SE_EMPTY and unused codes.
  function automatic void se_decode(input logic [SE_W-1:0] code, output logic valid,
                                    output pidx_t s, output pidx_t e);
    valid = 1'b0;
    s = '0;
    e = '0;
    for (int si = 0; si < NPLANES; si++) begin
      if (code >= 6'((si * (si + 1)) / 2) && code <= 6'((si * (si + 1)) / 2 + si)) begin
        valid = 1'b1;
        s = 4'(si);
        e = 4'(code - 6'((si * (si + 1)) / 2));
      end
    end
  endfunction

endpackage
