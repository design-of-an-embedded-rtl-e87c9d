// ripple_disconnector: one link of the decoder's content adaptive ripple
// dis-connector, the mirror of ripple_connector.
//
// The k bits on top of the remaining AC field (k = bits inside the zone, as
// in ripple_connector) are the plane content; they come out left aligned in
// 15 bits with the rest cleared, and the remaining field moves up by k with
// zeros entering at the bottom.  A 16-to-1 mux on RMAX/CMAX selects k.
//
// Interface: rem_in, zone in; content, rem_out out.  Combinational.
module ripple_disconnector
  import ec_pkg::*;
#(
  parameter int unsigned W = AC_BUDGET
) (
  input  logic [W-1:0] rem_in,
  input  zone_t        zone,
  output logic [14:0]  content,
  output logic [W-1:0] rem_out
);

  logic [14:0]  c_cand [16];
  logic [W-1:0] r_cand [16];

  always_comb begin
    for (int z = 0; z < 16; z++) begin
      int k;
      k = ((z / 4) + 1) * ((z % 4) + 1) - 1;
      for (int j = 0; j < 15; j++) c_cand[z][14 - j] = (j < k) ? rem_in[W - 1 - j] : 1'b0;
      r_cand[z] = rem_in << k;
    end
  end

  assign content = c_cand[zone];
  assign rem_out = r_cand[zone];

endmodule
