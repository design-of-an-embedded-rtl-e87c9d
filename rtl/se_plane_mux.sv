// se_plane_mux: the "8 to 6" translation of the start and end planes.
//
// Start and end plane take 4 bits each, but with nine planes only the 45
// pairs 0 <= end <= start <= 8 occur, so one 6-bit code carries both:
//     code = start*(start+1)/2 + end          (0..44)
//     code = 63 (SE_EMPTY)                    when the block has no AC data
// The decompressor inverts the code with ec_pkg::se_decode.
//
// Interface: start, end_pl, any_ac in; code out.  Combinational.
// The 8-to-6 reduction is the document's; the code assignment is this
// design's own.
module se_plane_mux
  import ec_pkg::*;
(
  input  pidx_t            start,
  input  pidx_t            end_pl,
  input  logic             any_ac,
  output logic [SE_W-1:0]  code
);

  assign code = any_ac ? se_code(start, end_pl) : SE_EMPTY;

endmodule
