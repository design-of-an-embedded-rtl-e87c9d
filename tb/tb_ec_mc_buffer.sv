// tb_ec_mc_buffer: writes decoded blocks and reads them back as motion
// compensation would: after data_ready, a random number of reads of random
// (block, row) pairs inside the group, then a release.  It checks the row
// data, that data_ready rises only once the requested number of blocks is
// present (the whole group, or for every third group a random part of it,
// as for a streaming start) and falls after the release, that groups are freed whole (also
// while later blocks keep arriving), that the buffer holds nine blocks, and
// that a write into a full buffer sets the overflow flag.
module tb_ec_mc_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_valid = 1'b0;
  logic [7:0] wr_pix [16];
  logic [3:0] need = '0;
  logic data_ready, rd_en = 1'b0, overflow;
  logic [3:0] rd_blk = '0;
  logic [1:0] rd_line = '0;
  logic [31:0] rd_row;
  logic release_grp = 1'b0;
  logic [3:0] rel_cnt = '0;
  logic [3:0] count;
  int checks = 0, failures = 0;
  int wr_n = 0, grp0 = 0;
  int n_wait = 0, n_ready = 0, n_reads = 0, n_early = 0;

  ec_mc_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pix(int blk, int i);
    return 8'(blk * 16 + i + 3);
  endfunction

  task automatic write_blk();
    @(negedge clk);
    wr_valid = 1'b1;
    for (int i = 0; i < 16; i++) wr_pix[i] = pix(wr_n, i);
    wr_n++;
    @(negedge clk);
    wr_valid = 1'b0;
  endtask

  // reads inside the current group (first block number grp0), then release
  task automatic read_group(int n);
    int nr;
    nr = $urandom_range(1, 4 * n);
    for (int t = 0; t < nr; t++) begin
      int b, l;
      b = $urandom_range(0, n - 1);
      l = $urandom_range(0, 3);
      @(negedge clk);
      rd_en = 1'b1;
      rd_blk = 4'(b);
      rd_line = 2'(l);
      #1;
      checks++;
      n_reads++;
      if (rd_row !== {pix(grp0 + b, 4*l+3), pix(grp0 + b, 4*l+2),
                      pix(grp0 + b, 4*l+1), pix(grp0 + b, 4*l)}) failures++;
    end
    @(negedge clk);
    rd_en = 1'b0;
    release_grp = 1'b1;
    rel_cnt = 4'(n);
    @(negedge clk);
    release_grp = 1'b0;
    grp0 += n;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int n, nt, extra;
      n = $urandom_range(1, 9);
      // every third group MC waits for only part of it (streaming start)
      nt = (t % 3 == 0) ? $urandom_range(1, n) : n;
      extra = int'(count);       // blocks of the next group already present
      need = 4'(nt);
      #1;
      for (int b = extra; b < n; b++) begin
        checks++;
        if (data_ready !== (b >= nt)) failures++; else if (!data_ready) n_wait++;
        write_blk();
      end
      checks += 2;
      if (!data_ready) failures++; else n_ready++;
      if (int'(count) < n) failures++;
      // sometimes a block of the next group arrives during the reads
      if (n < 9 && $urandom_range(0, 2) == 0) begin
        write_blk();
        n_early++;
      end
      extra = int'(count) - n;
      read_group(n);
      checks++;
      if (int'(count) != extra) failures++;
      need = '0;
      @(negedge clk);
      checks++;
      if (data_ready) failures++;
    end
    // drain, fill completely, then one more: overflow
    if (count != 0) begin
      need = count;
      @(negedge clk);
      read_group(int'(count));
    end
    need = 4'd9;
    for (int b = 0; b < 9; b++) write_blk();
    checks += 2;
    if (count != 9 || overflow) failures++;
    @(negedge clk);
    wr_valid = 1'b1;
    @(negedge clk);
    wr_valid = 1'b0;
    wr_n++;                      // the dropped block
    if (!overflow || count != 9) failures++;
    read_group(9);
    checks++;
    if (count != 0) failures++;
    $display("waits=%0d ready=%0d reads=%0d early blocks=%0d", n_wait, n_ready, n_reads, n_early);
    checks++;
    if (n_early == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
