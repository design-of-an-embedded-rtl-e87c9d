// ec_codec_top: embedded compressor/decompressor between a video decoder and
// its external frame memory.
//
// Write path: the deblocking filter hands over 1x4 pixel rows (4 pixels per
// cycle) with their uncompressed frame address; ec_compressor turns every
// 4x4 block into a 64-bit segment, which a write sequencer stores as two
// 32-bit words at the address ec_addr_map derives from the block's first row.
// Read path: motion compensation (MC) requests a 4x4 block by the address of
// its first row; a read sequencer fetches the segment's two words, the
// memory returns them in order (mem_rvalid), ec_decompressor rebuilds the
// block and ec_mc_buffer holds it.  Once the first mc_need blocks of MC's
// fetch are present (mc_data_ready), MC reads the 1x4 rows it uses, one per
// cycle, by block position in the fetch (mc_rd_blk, in request order) and
// row (mc_rd_line), and frees the fetch's mc_rel_cnt blocks with
// mc_release.
// The memory port is shared: writes come first, and a pending read waits
// while a segment is being written (the compressor leaves the port free at
// least two cycles out of four).
//
// Interface: df_* from the deblocking filter; mc_req/mc_addr/mc_req_ready for
// block fetch requests (one accepted per cycle when mc_req_ready); mc_need,
// mc_data_ready, mc_rd, mc_rd_blk, mc_rd_line, mc_rdata, mc_release,
// mc_rel_cnt toward MC; mem_* toward the 32-bit SDRAM
// controller, whose read data may come any number of cycles later but in
// order.  buf_count/buf_overflow expose the MC buffer state.
// The partition into compressor, decompressor, address mapping and the MC
// buffer follows the document; sequencing and arbitration are this design's
// own.
module ec_codec_top
  import ec_pkg::*;
#(
  parameter int unsigned A_W    = 20,
  parameter int unsigned X_W    = 9,
  parameter int unsigned BUF_BLK = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  // deblocking filter
  input  logic               df_valid,
  input  logic [4*PIX_W-1:0] df_pix,
  input  logic [A_W-1:0]     df_addr,
  // motion compensation
  input  logic               mc_req,
  input  logic [A_W-1:0]     mc_addr,
  output logic               mc_req_ready,
  input  logic [3:0]         mc_need,
  output logic               mc_data_ready,
  input  logic               mc_rd,
  input  logic [3:0]         mc_rd_blk,
  input  logic [1:0]         mc_rd_line,
  output logic [4*PIX_W-1:0] mc_rdata,
  input  logic               mc_release,
  input  logic [3:0]         mc_rel_cnt,
  // external memory (32 bits per entry)
  output logic               mem_we,
  output logic               mem_re,
  output logic [A_W-1:0]     mem_addr,
  output logic [31:0]        mem_wdata,
  input  logic               mem_rvalid,
  input  logic [31:0]        mem_rdata,
  // status
  output logic [3:0]         buf_count,
  output logic               buf_overflow
);

  // ---------------- compressor and write sequencer ----------------
  logic             c_valid;
  logic [SEG_W-1:0] c_seg;
  logic [A_W-1:0]   c_tag;

  ec_compressor #(.TAG_W(A_W)) u_comp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(df_valid), .in_pix(df_pix), .in_tag(df_addr),
    .out_valid(c_valid), .out_seg(c_seg), .out_tag(c_tag)
  );

  logic             w_busy, w_word;
  logic [SEG_W-1:0] w_seg;
  logic [A_W-1:0]   w_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_busy <= 1'b0;
      w_word <= 1'b0;
    end else if (c_valid) begin
      w_busy <= 1'b1;
      w_word <= 1'b0;
    end else if (w_busy) begin
      w_word <= 1'b1;
      if (w_word) w_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk)
    if (c_valid) begin
      w_seg  <= c_seg;
      w_addr <= c_tag;
    end

  // ---------------- read sequencer ----------------
  // A request is taken while idle or in the cycle the previous block's
  // second word goes out, so back-to-back requests give one read per cycle.
  logic           r_busy, r_word, r_last;
  logic [A_W-1:0] r_addr;

  assign r_last       = r_busy && r_word && !w_busy;
  assign mc_req_ready = !r_busy || r_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_busy <= 1'b0;
      r_word <= 1'b0;
    end else if (mc_req && mc_req_ready) begin
      r_busy <= 1'b1;
      r_word <= 1'b0;
    end else if (r_last) begin
      r_busy <= 1'b0;
    end else if (r_busy && !w_busy) begin
      r_word <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (mc_req && mc_req_ready) r_addr <= mc_addr;

  // ---------------- shared memory port ----------------
  ec_addr_map #(.A_W(A_W), .X_W(X_W)) u_amap (
    .sel_df(w_busy), .df_addr(w_addr), .mc_addr(r_addr),
    .word(w_busy ? w_word : r_word), .mem_addr(mem_addr)
  );

  assign mem_we    = w_busy;
  assign mem_re    = r_busy && !w_busy;
  assign mem_wdata = w_word ? w_seg[31:0] : w_seg[63:32];

  // ---------------- decompressor and MC buffer ----------------
  logic             d_valid;
  logic [PIX_W-1:0] d_pix [16];

  ec_decompressor u_decomp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(mem_rvalid), .in_word(mem_rdata),
    .out_valid(d_valid), .out_pix(d_pix)
  );

  ec_mc_buffer #(.DEPTH(BUF_BLK)) u_buf (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(d_valid), .wr_pix(d_pix),
    .need(mc_need), .data_ready(mc_data_ready),
    .rd_en(mc_rd), .rd_blk(mc_rd_blk), .rd_line(mc_rd_line), .rd_row(mc_rdata),
    .release_grp(mc_release), .rel_cnt(mc_rel_cnt),
    .count(buf_count), .overflow(buf_overflow)
  );

  // one port: never read and write in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(mem_we && mem_re));

endmodule
