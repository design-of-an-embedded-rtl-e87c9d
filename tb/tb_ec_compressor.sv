// tb_ec_compressor: drives macroblocks of sixteen 4x4 blocks into the
// compressor one row per cycle and checks every segment and tag against the
// reference model (2-D DCT then CGBPZ encoding).  It checks the document's
// timing: 12 cycles from the first row to the first segment and 72 cycles
// for a whole macroblock with rows arriving back to back.  A second
// macroblock arrives with random gaps between rows.
module tb_ec_compressor;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [31:0] in_pix = '0;
  logic [19:0] in_tag = '0;
  logic out_valid;
  logic [63:0] out_seg;
  logic [19:0] out_tag;
  int checks = 0, failures = 0;
  int cyc = 0, first_in = -1, first_out = -1, last_out = -1, nout = 0;
  bit [63:0] expq [$];
  int tagq [$];

  ec_compressor dut (.*);

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
      checks += 2;
      if (out_seg !== expq.pop_front()) failures++;
      if (int'(out_tag) != tagq.pop_front()) failures++;
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      nout++;
    end
  end

  task automatic send_mb(bit gaps);
    for (int b = 0; b < 16; b++) begin
      blk_t p, c;
      p = rand_block(b);
      c = fdct(p);
      expq.push_back(encode(c));
      tagq.push_back(b * 37 + (gaps ? 1000 : 0));
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_pix = {8'(p[4*r+3]), 8'(p[4*r+2]), 8'(p[4*r+1]), 8'(p[4*r])};
        in_tag = (r == 0) ? 20'(b * 37 + (gaps ? 1000 : 0)) : 20'hfffff;
        if (first_in < 0) first_in = cyc;
        if (gaps && $urandom_range(0, 2) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          repeat ($urandom_range(0, 3)) @(negedge clk);
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
    repeat (20) @(negedge clk);
    $display("first segment after %0d cycles, macroblock in %0d cycles",
             first_out - first_in, last_out - first_in);
    checks += 3;
    if (first_out - first_in != 12) failures++;
    if (last_out - first_in != 72) failures++;
    if (nout != 16) failures++;
    send_mb(1'b1);
    repeat (30) @(negedge clk);
    checks += 2;
    if (nout != 32) failures++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
