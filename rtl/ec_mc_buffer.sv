// ec_mc_buffer: block buffer between the decompressor and motion compensation.
//
// Motion compensation (MC) expects its reference data as an unbroken stream
// of 1x4 pixel rows, one per cycle, in the order it always used (e.g. for a
// 9x9 area nine pixel lines of three words each), while the decompressor
// delivers whole 4x4 blocks, one every two cycles at best.  Decoded blocks
// are written into a circular buffer of DEPTH blocks.  MC states how many
// blocks of its current fetch must be present before it can read without a
// break (need: all of them, or fewer when the rest will arrive before MC
// gets to them) and holds back its read enable until data_ready says they
// are there (the extra "EC decode" wait).  It then reads any row of any
// present block of the fetch, one per cycle, naming the block by its
// position in the fetch (rd_blk, 0 = oldest, i.e. the first block
// requested) and the row inside it (rd_line).  A release pulse frees the
// fetch's rel_cnt blocks at once, so MC reads only the rows it uses.
// DEPTH = 9 is the largest number of reference blocks a 4x4 prediction
// touches (fractional motion in both directions, a 9x9 pixel area).
//
// Interface: wr_valid/wr_pix write a block; need, data_ready, rd_en, rd_blk,
// rd_line, rd_row (combinational, pixel 0 in bits 7:0), release_grp and
// rel_cnt face MC;
// count gives the number of blocks held; overflow is sticky and set by a
// write into a full buffer (the block is dropped).  rd_en only qualifies the
// read: an assertion checks that MC reads only blocks already present; the
// data path is a plain read port.
// The buffer, the delayed MC read enable and nine blocks follow the document;
// the read addressing, the release pulse and the handshake are this design's
// own.
module ec_mc_buffer
  import ec_pkg::*;
#(
  parameter int unsigned DEPTH = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_valid,
  input  logic [PIX_W-1:0]   wr_pix [16],
  input  logic [3:0]         need,
  output logic               data_ready,
  input  logic               rd_en,
  input  logic [3:0]         rd_blk,
  input  logic [1:0]         rd_line,
  output logic [4*PIX_W-1:0] rd_row,
  input  logic               release_grp,
  input  logic [3:0]         rel_cnt,
  output logic [3:0]         count,
  output logic               overflow
);

  localparam int unsigned P_W = $clog2(DEPTH);

  logic [PIX_W-1:0] mem [DEPTH][16];
  logic [P_W-1:0]   wp, rp, ra;
  logic             do_wr;

  // slot index = (base + offset) mod DEPTH, offset < DEPTH
  function automatic logic [P_W-1:0] slot(logic [P_W-1:0] base, logic [3:0] off);
    logic [P_W+4:0] s;
    s = (P_W+5)'(base) + (P_W+5)'(off);
    if (s >= (P_W+5)'(DEPTH)) s = s - (P_W+5)'(DEPTH);
    return P_W'(s);
  endfunction

  assign do_wr      = wr_valid && (count < 4'(DEPTH));
  assign data_ready = (need != '0) && (count >= need);
  assign ra         = slot(rp, rd_blk);

  always_comb
    for (int k = 0; k < 4; k++) rd_row[k*PIX_W +: PIX_W] = mem[ra][4*int'(rd_line) + k];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= slot(wp, 4'd1);
      if (wr_valid && !do_wr) overflow <= 1'b1;
      if (release_grp && rel_cnt <= count) begin
        rp    <= slot(rp, rel_cnt);
        count <= count + 4'(do_wr) - rel_cnt;
      end else begin
        count <= count + 4'(do_wr);
      end
    end
  end

  always_ff @(posedge clk)
    if (do_wr) mem[wp] <= wr_pix;

  // MC reads only blocks that are present and frees only what it holds
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> rd_blk < count);
  assert property (@(posedge clk) disable iff (!rst_n) release_grp |-> rel_cnt <= count);

endmodule
