// ec_compressor: embedded compressor, 4x4 pixel block -> 64-bit segment.
//
// Three pipeline stages of four cycles each, one 1-D DCT unit in each of the
// first two:
//   Stage 1  one 1x4 pixel row arrives per cycle (the deblocking filter's
//            rate); its row DCT is written into one bank of a ping-pong
//            transpose buffer (2 fraction bits kept).
//   Stage 2  once a bank holds four rows, one column per cycle goes through
//            the column DCT into the coefficient buffer.
//   Stage 3  cgbpz_encoder analyses and packs the block (two cycles); the
//            segment leaves at the end of the fourth cycle of the stage.
// The first block of a macroblock therefore takes 12 cycles from its first
// row to its segment, and each further block 4 more: 72 cycles for sixteen
// blocks.  Rows may arrive with gaps; the later stages start when a block is
// complete and then run for a fixed four cycles.
//
// Interface: in_valid/in_pix carry one row (pixel 0 in bits 7:0), rows 0..3
// of a block in order; in_tag is sampled with row 0 and returned with the
// block's segment on out_tag (the top level uses it for the write address).
// out_valid pulses for one cycle with out_seg.  No back-pressure: the
// consumer must take every segment.
// The stage split, the four-cycle stages and the 72-cycle macroblock latency
// follow the document; the buffering between stages is this design's own.
module ec_compressor
  import ec_pkg::*;
#(
  parameter int unsigned TAG_W = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [4*PIX_W-1:0] in_pix,
  input  logic [TAG_W-1:0]   in_tag,
  output logic               out_valid,
  output logic [SEG_W-1:0]   out_seg,
  output logic [TAG_W-1:0]   out_tag
);

  // ---------------- stage 1: row DCT ----------------
  logic [1:0]                     row;
  logic                           wbank;
  logic signed [ROWQ_W-1:0]       tbuf [2][4][4];   // [bank][row][u]
  logic [TAG_W-1:0]               tag1 [2];
  logic signed [PIX_W:0]          rx [4];
  logic signed [ROWQ_W-1:0]       ry [4];

  always_comb
    for (int k = 0; k < 4; k++) rx[k] = (PIX_W+1)'({1'b0, in_pix[k*PIX_W +: PIX_W]});

  dct4_1d #(.IN_W(PIX_W+1), .OUT_W(ROWQ_W), .SHIFT(6), .INVERSE(1'b0)) u_row (.x(rx), .y(ry));

  logic s2_start;
  assign s2_start = in_valid && (row == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row   <= '0;
      wbank <= 1'b0;
    end else if (in_valid) begin
      row <= row + 2'd1;
      if (row == 2'd3) wbank <= ~wbank;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      tbuf[wbank][row] <= ry;
      if (row == 2'd0) tag1[wbank] <= in_tag;
    end
  end

  // ---------------- stage 2: column DCT ----------------
  logic                     s2_act;
  logic [1:0]               s2_col;
  logic                     s2_bank;
  logic [TAG_W-1:0]         tag2;
  logic signed [ROWQ_W-1:0] cx [4];
  logic signed [COEF_W-1:0] cy [4];
  logic signed [COEF_W-1:0] cbuf [16];             // index 4*v+u

  always_comb
    for (int r = 0; r < 4; r++) cx[r] = tbuf[s2_bank][r][s2_col];

  dct4_1d #(.IN_W(ROWQ_W), .OUT_W(COEF_W), .SHIFT(10), .INVERSE(1'b0)) u_col (.x(cx), .y(cy));

  logic s3_start;
  assign s3_start = s2_act && (s2_col == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_act <= 1'b0;
      s2_col <= '0;
    end else begin
      if (s2_start) begin
        s2_act <= 1'b1;
        s2_col <= '0;
      end else if (s2_act) begin
        s2_col <= s2_col + 2'd1;
        if (s2_col == 2'd3) s2_act <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (s2_start) begin
      s2_bank <= wbank;
      tag2    <= tag1[wbank];
    end
    if (s2_act)
      for (int v = 0; v < 4; v++) cbuf[4*v + int'(s2_col)] <= cy[v];
  end

  // ---------------- stage 3: CGBPZ encoding and packing ----------------
  logic             s3_act;
  logic [1:0]       s3_cnt;
  logic [TAG_W-1:0] tag3;
  logic             enc_valid;
  logic [SEG_W-1:0] enc_seg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_act <= 1'b0;
      s3_cnt <= '0;
    end else begin
      if (s3_start) begin
        s3_act <= 1'b1;
        s3_cnt <= '0;
      end else if (s3_act) begin
        s3_cnt <= s3_cnt + 2'd1;
        if (s3_cnt == 2'd3) s3_act <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk)
    if (s3_start) tag3 <= tag2;

  cgbpz_encoder u_enc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s3_act && s3_cnt == 2'd0), .coef(cbuf),
    .out_valid(enc_valid), .seg(enc_seg)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s3_act && s3_cnt == 2'd3;
  end

  always_ff @(posedge clk) begin
    if (s3_act && s3_cnt == 2'd3) begin
      out_seg <= enc_seg;
      out_tag <= tag3;
    end
  end

  // the encoder result is ready two cycles into stage 3
  assert property (@(posedge clk) disable iff (!rst_n)
                   (s3_act && s3_cnt == 2'd2) |-> enc_valid);

endmodule
