// ec_decompressor: embedded decompressor, 64-bit segment -> 4x4 pixel block.
//
// Two pipeline stages of two cycles each:
//   Stage 1  the segment arrives as two 32-bit bus words (bits 63:32 first);
//            with the second word cgbpz_decoder rebuilds and compensates the
//            coefficients, which are registered.
//   Stage 2  four 1-D inverse DCT units work on all four columns in the first
//            cycle (results kept with 2 fraction bits) and, reused, on all
//            four rows in the second (4 fraction bits); the rounded and
//            clipped pixels are registered.
// A block is out 4 cycles after its first word; back-to-back segments give
// one block every 2 cycles, 34 cycles for the sixteen blocks of a
// macroblock.
//
// Interface: in_valid/in_word carry bus words in order, two per segment
// (gaps allowed).  out_valid pulses with out_pix[0..15] (index 4*row+col),
// 8 bits each.  No back-pressure.
// Stage split, two cycles per stage, four shared 1-D units and the 34-cycle
// macroblock latency follow the document; word order and the double rounding
// of the row pass are this design's own.
module ec_decompressor
  import ec_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [31:0]          in_word,
  output logic                 out_valid,
  output logic [PIX_W-1:0]     out_pix [16]
);

  localparam int unsigned UOUT_W = 18;  // row pass: pixel with 4 fraction bits

  // ---------------- stage 1: data rearrange and CGBPZ decoding ----------------
  logic                     wsel;      // 0: expecting bits 63:32
  logic [31:0]              hi;
  logic signed [COEF_W-1:0] dcoef [16];
  logic signed [COEF_W-1:0] creg  [16];
  logic                     c_valid;

  cgbpz_decoder u_dec (.seg({hi, in_word}), .coef(dcoef));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel    <= 1'b0;
      c_valid <= 1'b0;
    end else begin
      c_valid <= in_valid && wsel;
      if (in_valid) wsel <= ~wsel;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !wsel) hi <= in_word;
    if (in_valid &&  wsel) creg <= dcoef;
  end

  // ---------------- stage 2: 2-D inverse DCT on four shared units ----------------
  logic                       ph1;     // second cycle of stage 2
  logic signed [IROWQ_W-1:0]  mid [4][4];   // [row][col], 2 fraction bits
  logic signed [IROWQ_W-1:0]  ux  [4][4];   // [unit][input]
  logic signed [UOUT_W-1:0]   uy  [4][4];   // [unit][output]

  always_comb begin
    for (int j = 0; j < 4; j++)
      for (int k = 0; k < 4; k++)
        ux[j][k] = ph1 ? mid[j][k]                          // unit j: row j
                       : IROWQ_W'(creg[4*k + j]);           // unit j: column j
  end

  for (genvar j = 0; j < 4; j++) begin : g_unit
    dct4_1d #(.IN_W(IROWQ_W), .OUT_W(UOUT_W), .SHIFT(6), .INVERSE(1'b1)) u_idct (
      .x(ux[j]), .y(uy[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph1       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      ph1       <= c_valid;
      out_valid <= ph1;
    end
  end

  always_ff @(posedge clk) begin
    if (c_valid)
      for (int j = 0; j < 4; j++)
        for (int k = 0; k < 4; k++) mid[k][j] <= IROWQ_W'(uy[j][k]);  // column j, row k
    if (ph1)
      for (int j = 0; j < 4; j++)
        for (int k = 0; k < 4; k++) begin
          logic signed [UOUT_W-1:0] v;
          v = (uy[j][k] + UOUT_W'(8)) >>> 4;
          out_pix[4*j + k] <= (v < 0) ? '0 : (v > 255) ? 8'd255 : PIX_W'(v);
        end
  end

  // a segment always comes as two words, so stage 2 never overlaps itself
  assert property (@(posedge clk) disable iff (!rst_n) c_valid |-> !ph1);

endmodule
