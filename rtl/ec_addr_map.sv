// ec_addr_map: address selection and mapping between the codec and SDRAM.
//
// Without compression a frame is stored as 1x4 pixel arrays, one per 32-bit
// word, at address {y, x4}: y is the pixel row, x4 the column of the array
// (row pitch 2^X_W words; 512 covers the 480 arrays of a 1920-pixel line).
// With the fixed compression ratio of 2, the four words of a 4x4 block
// (rows y with the same y/4, same x4) become the two words of one segment,
// stored at
//     {0, y[A_W-X_W-1:2], x4, word}
// so a compressed frame takes half the address space and the mapping is pure
// wiring.  A mux in front picks the deblocking-filter (write) address when
// sel_df is high, else the motion-compensation (read) address.
//
// Interface: sel_df, df_addr, mc_addr, word in; mem_addr out.  Combinational.
// The address mux, the 20-bit addresses on both sides and a converter made
// trivial by the fixed ratio of 2 follow the document; the address layout
// is this design's own.  Bits y[1:0] of the row address and the top address bit of
// the result carry no information (one segment per four rows, half-size
// compressed frame), which is why lint reports them unused.
module ec_addr_map #(
  parameter int unsigned A_W = 20,
  parameter int unsigned X_W = 9
) (
  input  logic           sel_df,
  input  logic [A_W-1:0] df_addr,
  input  logic [A_W-1:0] mc_addr,
  input  logic           word,
  output logic [A_W-1:0] mem_addr
);

  logic [A_W-1:0] a;
  logic [X_W-1:0] x4;
  logic [A_W-X_W-3:0] by;

  always_comb begin
    a        = sel_df ? df_addr : mc_addr;
    x4       = a[X_W-1:0];
    by       = a[A_W-1:X_W+2];
    mem_addr = {1'b0, by, x4, word};
  end

endmodule
