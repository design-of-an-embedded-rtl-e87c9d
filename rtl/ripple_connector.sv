// ripple_connector: one link of the content adaptive ripple connector.
//
// A shifted-outcome generator forms the sixteen candidates
//     {content[14 -: k], prev[W-1:k]}  for k = bits inside each of the 16 zones
// (k = 0, 1, 2, 3, 1, 3, 5, 7, 2, 5, 8, 11, 3, 7, 11, 15) and a 16-to-1 mux
// steered by the 4-bit RMAX/CMAX zone picks one.  The plane content enters
// at the top and pushes the earlier contents down; bits pushed out of the
// bottom are lost, so the first link of a chain is the one truncated when a
// chain holds more than W bits.  Chaining ten links serialises nine planes and
// the sign plane within one clock cycle.
//
// Interface: content (left aligned, first scan bit in bit 14), zone, prev in;
// result out.  Combinational.
// Structure and the 50-bit width follow the document.
module ripple_connector
  import ec_pkg::*;
#(
  parameter int unsigned W = AC_BUDGET
) (
  input  logic [14:0]  content,
  input  zone_t        zone,
  input  logic [W-1:0] prev,
  output logic [W-1:0] result
);

  logic [W-1:0] cand [16];

  // shifted-outcome generator
  always_comb begin
    for (int z = 0; z < 16; z++) begin
      int k;
      k = ((z / 4) + 1) * ((z % 4) + 1) - 1;
      cand[z] = prev;
      for (int b = 0; b < W; b++) begin
        if (b >= W - k) cand[z][b] = content[14 - (W - 1 - b)];
        else            cand[z][b] = prev[b + k];
      end
    end
  end

  // 16-to-1 mux on RMAX/CMAX
  assign result = cand[zone];

endmodule
