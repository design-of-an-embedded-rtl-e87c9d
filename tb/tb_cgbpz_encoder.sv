// tb_cgbpz_encoder: checks the CGBPZ encoder segment by segment against the
// bit-serial reference encoder, with a new block entering every cycle.
// Inputs are DCT coefficients of random smooth, textured, flat and noisy
// blocks plus random sparse and full-range coefficient sets; the test counts
// blocks with no AC data, truncated blocks (end plane above 0) and blocks
// whose left-over budget was filled, and checks the two-cycle latency.
module tb_cgbpz_encoder;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  localparam int N = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [COEF_W-1:0] coef [16];
  logic out_valid;
  logic [SEG_W-1:0] seg;
  int checks = 0, failures = 0;
  int n_empty = 0, n_trunc = 0, n_fill = 0;
  bit [63:0] expq [$];

  cgbpz_encoder dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .coef(coef),
                     .out_valid(out_valid), .seg(seg));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic blk_t stimulus(int n);
    blk_t c;
    if (n % 5 == 4) begin
      for (int i = 0; i < 16; i++) c[i] = 0;
      c[0] = $urandom_range(0, 1020);
      for (int i = 1; i < 16; i++)
        if ($urandom_range(0, 3) == 0) c[i] = int'($urandom_range(0, 1022)) - 511;
      if (n % 25 == 4) for (int i = 1; i < 16; i++) c[i] = 0;
    end else begin
      c = fdct(rand_block(n));
    end
    return c;
  endfunction

  // output checker: a segment must arrive exactly two cycles after its block
  int sent = 0;
  logic [1:0] vpipe;
  always_ff @(posedge clk) begin
    vpipe <= {vpipe[0], in_valid};
    if (rst_n && out_valid) begin
      bit [63:0] x;
      x = expq.pop_front();
      checks++;
      if (seg !== x) begin
        failures++;
        if (failures < 10) $display("mismatch: got %h exp %h", seg, x);
      end
      if (x[55:50] == 6'd63) n_empty++;
      else begin
        int code, s, e;
        code = x[55:50];
        s = 0;
        while ((s + 1) * (s + 2) / 2 <= code) s++;
        e = code - s * (s + 1) / 2;
        if (e > 0) n_trunc++;
        if (e > 0 && x[0 +: 8] != 0) n_fill++;
      end
    end
    if (rst_n) begin
      checks++;
      if (out_valid !== vpipe[1]) failures++;
    end
  end

  initial begin
    vpipe = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      blk_t c;
      c = stimulus(n);
      @(negedge clk);
      in_valid = 1'b1;
      for (int i = 0; i < 16; i++) coef[i] = COEF_W'(c[i]);
      expq.push_back(encode(c));
      if (n % 7 == 6) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("empty=%0d truncated=%0d filled=%0d", n_empty, n_trunc, n_fill);
    checks++;
    if (n_empty == 0 || n_trunc == 0 || n_fill == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
