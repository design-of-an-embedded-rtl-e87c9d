// tb_ec_decompressor: feeds the two 32-bit words of each segment and checks
// every decoded block against the reference model (CGBPZ decoding with
// compensation, then inverse 2-D DCT).  It checks the document's timing:
// 4 cycles from the first word to the block and 34 cycles for a macroblock
// of sixteen segments arriving back to back.  A second macroblock arrives
// with gaps.  As an end-to-end sanity check the mean absolute error against
// the original pixels of smooth blocks must stay small.
module tb_ec_decompressor;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [31:0] in_word = '0;
  logic out_valid;
  logic [7:0] out_pix [16];
  int checks = 0, failures = 0;
  int cyc = 0, first_in = -1, first_out = -1, last_out = -1, nout = 0;
  int exp_pix [64][16];
  int org_pix [64][16];
  int nin = 0;
  int err_sum = 0, err_n = 0;

  ec_decompressor dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      for (int i = 0; i < 16; i++) begin
        int x, o;
        x = exp_pix[nout][i];
        o = org_pix[nout][i];
        checks++;
        if (int'(out_pix[i]) != x) begin failures++; if (failures < 6) $display("blk %0d pix %0d got %0d exp %0d", nout, i, out_pix[i], x); end
        if (org_pix[nout][0] >= 0) begin
          err_sum += (int'(out_pix[i]) > o) ? int'(out_pix[i]) - o : o - int'(out_pix[i]);
          err_n++;
        end
      end
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      nout++;
    end
  end

  task automatic send_mb(bit gaps);
    for (int b = 0; b < 16; b++) begin
      blk_t p, c, d, q;
      bit [63:0] s;
      p = rand_block(b);
      c = fdct(p);
      s = encode(c);
      d = decode(s);
      q = idct(d);
      for (int i = 0; i < 16; i++) begin
        exp_pix[nin][i] = q[i];
        org_pix[nin][i] = (b % 4 == 0 || b % 4 == 2) ? p[i] : -1;
      end
      nin++;
      for (int w = 0; w < 2; w++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_word = (w == 0) ? s[63:32] : s[31:0];
        if (first_in < 0) first_in = cyc;
        if (gaps && $urandom_range(0, 1) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send_mb(1'b0);
    repeat (10) @(negedge clk);
    $display("first block after %0d cycles, macroblock in %0d cycles",
             first_out - first_in, last_out - first_in);
    checks += 3;
    if (first_out - first_in != 4) failures++;
    if (last_out - first_in != 34) failures++;
    if (nout != 16) failures++;
    send_mb(1'b1);
    repeat (10) @(negedge clk);
    checks += 3;
    if (nout != 32) failures++;
    if (nin != nout) failures++;
    $display("mean abs error on smooth blocks: %0d/%0d", err_sum, err_n);
    checks++;
    if (err_sum > 4 * err_n) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
