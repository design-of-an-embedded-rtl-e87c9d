// tb_ec_codec_top: end-to-end test of the embedded codec at its default
// parameters.
// A deblocking-filter model writes two macroblocks (an 8x4-block area of a
// frame) row by row; an SDRAM model with a two-cycle read latency stores
// what the codec writes.  Every written word is checked against the
// reference segment at the mapped address.  While the second macroblock is
// still being written, a motion-compensation model fetches groups of 1, 2,
// 3, 4, 6 and 9 reference blocks (the block counts of the motion-vector
// cases of the access analysis), naming each block by a random one of its
// four rows, waits for data_ready, reads the 1x4 words its prediction uses
// (4 or 9 pixel lines of 1 to 3 words, 4 to 27 reads), which must equal the
// reference decoder's output, and releases the fetch.
// Then, with the memory port free, one fetch of each size checks the
// decode wait, 2n + 6 cycles for n blocks with this memory model.  Last, the
// nine motion-vector cases run with a streaming start: MC waits only for the
// blocks it needs before the decoder can keep ahead of its reads, every read
// is checked to hit a block already decoded, and the cycles from request to
// last read, weighted by the case occurrences of the access analysis, must
// average at most 25 (the per-block budget at HD1080).  The same mix gives
// the ratio of memory words read with and without the codec (segments
// against the 1x4 rows MC would read), which must stay below 0.65.
// Counted mechanisms, each of which must occur: segments written, segments
// read, reads held back by a write, MC waits on data_ready, blocks with no
// AC data, truncated blocks, filled budgets, and every block count.
module tb_ec_codec_top;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic df_valid = 1'b0;
  logic [31:0] df_pix = '0;
  logic [19:0] df_addr = '0;
  logic mc_req = 1'b0;
  logic [19:0] mc_addr = '0;
  logic mc_req_ready;
  logic [3:0] mc_need = '0;
  logic mc_data_ready;
  logic mc_rd = 1'b0;
  logic [3:0] mc_rd_blk = '0;
  logic [1:0] mc_rd_line = '0;
  logic [31:0] mc_rdata;
  logic mc_release = 1'b0;
  logic [3:0] mc_rel_cnt = '0;
  logic mem_we, mem_re;
  logic [19:0] mem_addr;
  logic [31:0] mem_wdata;
  logic mem_rvalid;
  logic [31:0] mem_rdata;
  logic [3:0] buf_count;
  logic buf_overflow;

  ec_codec_top dut (.*);

  int checks = 0, failures = 0;
  int blkpix [4][8][16];   // [by][bx][pixel]
  int decpix [4][8][16];   // what MC must get back
  bit [63:0] segx [4][8];
  bit written [4][8];
  int n_words = 0, n_cyc = 0, last_wait = 0, last_total = 0, n_memrd = 0;
  longint t_acc;
  int n_wr = 0, n_rd = 0, n_stall = 0, n_wait = 0;
  int n_empty = 0, n_trunc = 0, n_fill = 0;
  int n_case [10];
  int rd_out = 0;
  int cases [6] = '{1, 2, 3, 4, 6, 9};
  // the nine motion-vector cases of the access analysis: rows h, columns w,
  // pixel lines nl, and occurrence in 1/1000
  int t9 [9][4] = '{'{1, 1, 4, 330}, '{2, 1, 4, 4}, '{3, 1, 9, 51},
                    '{1, 2, 4, 45}, '{2, 2, 4, 4}, '{3, 2, 9, 54},
                    '{1, 3, 4, 235}, '{2, 3, 4, 18}, '{3, 3, 9, 258}};

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- SDRAM model: 32-bit words, 2-cycle read latency ----------------
  logic [31:0] mem [bit [19:0]];
  logic [1:0]  rv_pipe = '0;
  logic [31:0] rd_pipe [2];
  always @(posedge clk) begin
    if (mem_we && rst_n) begin
      int w, x4, by;
      w = mem_addr[0];
      x4 = mem_addr[9:1];
      by = mem_addr[18:10];
      mem[mem_addr] = mem_wdata;
      checks++;
      if (by > 3 || x4 > 7 || mem_addr[19] ||
          mem_wdata !== (w ? segx[by][x4][31:0] : segx[by][x4][63:32])) failures++;
      if (w) begin
        written[by][x4] = 1;
        n_wr++;
      end
      if (!mc_req_ready) n_stall++;   // read sequencer busy but port taken
    end
    rv_pipe <= {rv_pipe[0], mem_re};
    rd_pipe[1] <= rd_pipe[0];
    rd_pipe[0] <= mem.exists(mem_addr) ? mem[mem_addr] : 32'hdeadbeef;
    if (mem_re && rst_n) begin
      n_memrd++;
      checks++;
      if (!mem.exists(mem_addr)) failures++;
    end
  end
  assign mem_rvalid = rv_pipe[1];
  assign mem_rdata  = rd_pipe[1];

  // ---------------- deblocking filter model ----------------
  task automatic write_mb(int mbx);
    for (int by = 0; by < 4; by++)
      for (int bx = 4 * mbx; bx < 4 * mbx + 4; bx++)
        for (int r = 0; r < 4; r++) begin
          @(negedge clk);
          df_valid = 1'b1;
          df_pix = {8'(blkpix[by][bx][4*r+3]), 8'(blkpix[by][bx][4*r+2]),
                    8'(blkpix[by][bx][4*r+1]), 8'(blkpix[by][bx][4*r])};
          df_addr = 20'((by * 4 + r) * 512 + bx);
        end
    @(negedge clk);
    df_valid = 1'b0;
  endtask

  // ---------------- motion compensation model ----------------
  // A fetch covers an h x w arrangement of blocks, of which MC uses nl pixel
  // lines (4, or 9 for vertical sub-pixel) of w words each, from pixel line
  // y0 of the area.  With stream = 0 MC waits for all h*w blocks; with
  // stream = 1 it waits only for as many as keep every read on a block
  // already decoded, given one new block every 2 cycles (idle port only).
  task automatic mc_fetch(int h, int w, int nl, bit stream, int y0_fix = -1);
    int n, bx0, by0, k, y0, m, j;
    longint t0;
    int list [9][2];
    n = h * w;
    if (y0_fix >= 0) y0 = y0_fix;
    else case (h)
      1: y0 = 0;
      2: y0 = $urandom_range(1, 3);      // four lines across two block rows
      default: y0 = $urandom_range(0, 3);  // nine lines inside three block rows
    endcase
    bx0 = $urandom_range(0, 4 - w);   // first macroblock only
    by0 = $urandom_range(0, 4 - h);
    k = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        list[k][0] = by0 + y;
        list[k][1] = bx0 + x;
        k++;
      end
    // blocks to wait for: read j (cycle j after data_ready) needs block b,
    // which arrives 2 * (b - m + 1) cycles after block m - 1
    m = n;
    if (stream) begin
      m = 1;
      j = 0;
      for (int y = y0; y < y0 + nl; y++)
        for (int x = 0; x < w; x++) begin
          int b;
          b = (y / 4) * w + x;
          if (b + 1 - j / 2 > m) m = b + 1 - j / 2;
          j++;
        end
    end
    n_case[n]++;
    @(negedge clk);
    t0 = $time;
    mc_need = 4'(m);
    mc_rel_cnt = 4'(n);
    for (int b = 0; b < n; b++) begin
      mc_req = 1'b1;
      mc_addr = 20'((list[b][0] * 4 + $urandom_range(0, 3)) * 512 + list[b][1]);
      do @(posedge clk); while (!mc_req_ready);
      if (b == 0) t_acc = $time;
      rd_out += 2;
      @(negedge clk);
      mc_req = 1'b0;
    end
    while (!mc_data_ready) begin
      n_wait++;
      @(negedge clk);
    end
    last_wait = int'(($time - t_acc + 5) / 10);
    for (int y = y0; y < y0 + nl; y++)
      for (int x = 0; x < w; x++) begin
        int by, bx, b, r;
        b = (y / 4) * w + x;
        r = y % 4;
        by = list[b][0];
        bx = list[b][1];
        mc_rd = 1'b1;
        mc_rd_blk = 4'(b);
        mc_rd_line = 2'(r);
        #1;
        checks++;
        n_words++;
        if (b >= buf_count) begin
          failures++;
          $display("MC read block %0d of %0d before it was decoded", b, n);
        end
        if (mc_rdata !== {8'(decpix[by][bx][4*r+3]), 8'(decpix[by][bx][4*r+2]),
                          8'(decpix[by][bx][4*r+1]), 8'(decpix[by][bx][4*r])}) begin
          failures++;
          if (failures < 10) $display("MC block (%0d,%0d) row %0d got %h", by, bx, r, mc_rdata);
        end
        @(negedge clk);
      end
    mc_rd = 1'b0;
    mc_release = 1'b1;
    @(negedge clk);
    mc_release = 1'b0;
    mc_need = '0;
    last_total = int'(($time - t0) / 10) - 1;   // request to last read
    n_cyc += last_total + 1;
    n_rd += n;
  endtask

  task automatic mc_fetch_n(int n, bit stream);
    case (n)
      1: mc_fetch(1, 1, 4, stream);
      2: mc_fetch(1, 2, 4, stream);
      3: mc_fetch(1, 3, 4, stream);
      4: mc_fetch(2, 2, 4, stream);
      6: mc_fetch(3, 2, 9, stream);
      default: mc_fetch(3, 3, 9, stream);
    endcase
  endtask

  always @(posedge clk) if (mem_rvalid) rd_out--;

  initial begin
    for (int by = 0; by < 4; by++)
      for (int bx = 0; bx < 8; bx++) begin
        blk_t p, c, d, q;
        int code, s, e;
        p = rand_block(by * 8 + bx);
        if (by == 1 && bx == 1) for (int i = 0; i < 16; i++) p[i] = 255 * ((i + i / 4) % 2);
        c = fdct(p);
        segx[by][bx] = encode(c);
        d = decode(segx[by][bx]);
        q = idct(d);
        for (int i = 0; i < 16; i++) begin
          blkpix[by][bx][i] = p[i];
          decpix[by][bx][i] = q[i];
        end
        code = segx[by][bx][55:50];
        if (code == 63) n_empty++;
        else begin
          s = 0;
          while ((s + 1) * (s + 2) / 2 <= code) s++;
          e = code - s * (s + 1) / 2;
          if (e > 0) n_trunc++;
          if (e > 0 && segx[by][bx][7:0] != 0) n_fill++;
        end
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    write_mb(0);
    repeat (14) @(negedge clk);
    fork
      write_mb(1);
      begin
        for (int t = 0; t < 24; t++) mc_fetch_n(cases[t % 6], 1'b0);
      end
    join
    repeat (20) @(negedge clk);
    // decode wait with the port free: request accepted -> data_ready
    foreach (cases[i]) begin
      mc_fetch_n(cases[i], 1'b0);
      $display("fetch of %0d blocks: %0d cycles from the first request to data_ready", cases[i], last_wait);
      // 1 cycle to the first read, 2 words per block, 2 cycles of memory
      // latency, 3 in the decompressor after the last word, 1 into the buffer
      checks++;
      if (last_wait != 2 * cases[i] + 6) failures++;
    end
    // streaming start, port idle: each motion-vector case, worst first line
    begin
      longint wsum = 0, psum = 0, rd_ec = 0, rd_ori = 0;
      foreach (t9[i]) begin
        int m0;
        m0 = n_memrd;
        mc_fetch(t9[i][0], t9[i][1], t9[i][2], 1'b1, (t9[i][0] == 1) ? 0 : 3);
        $display("%0dx%0d blocks, %0d lines: %0d cycles to data_ready, %0d to the last read",
                 t9[i][0], t9[i][1], t9[i][2], last_wait, last_total);
        wsum += longint'(last_total) * t9[i][3];
        psum += t9[i][3];
        // memory words read: segments here, 1x4 rows without the codec
        rd_ec  += longint'(n_memrd - m0) * t9[i][3];
        rd_ori += longint'(t9[i][1] * t9[i][2]) * t9[i][3];
      end
      $display("memory reads with/without the codec: %0d/1000",
               rd_ec * 1000 / rd_ori);
      checks++;
      if (rd_ec * 1000 > rd_ori * 650) failures++;
      $display("weighted average, request to last read: %0d.%0d cycles (budget 25)",
               wsum / psum, (wsum * 10 / psum) % 10);
      checks++;
      if (wsum > 25 * psum) failures++;
    end
    checks += 3;
    if (n_wr != 32) failures++;
    if (buf_overflow) failures++;
    if (buf_count != 0) failures++;
    $display("segments written=%0d blocks read=%0d reads held by writes=%0d MC waits=%0d",
             n_wr, n_rd, n_stall, n_wait);
    $display("blocks: no AC=%0d truncated=%0d filled=%0d", n_empty, n_trunc, n_fill);
    $display("fetch sizes 1/2/3/4/6/9: %0d %0d %0d %0d %0d %0d",
             n_case[1], n_case[2], n_case[3], n_case[4], n_case[6], n_case[9]);
    foreach (n_case[i]) if (i inside {1, 2, 3, 4, 6, 9}) begin
      checks++;
      if (n_case[i] == 0) failures++;
    end
    $display("MC words read=%0d (expected 487), average cycles per fetch from request to release=%0d",
             n_words, n_cyc / 39);
    checks += 7;
    if (n_words != 385 + 102) failures++;
    if (n_rd == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_wait == 0) failures++;
    if (n_empty == 0) failures++;
    if (n_trunc == 0) failures++;
    if (n_fill == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
