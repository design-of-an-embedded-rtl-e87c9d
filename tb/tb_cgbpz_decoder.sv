// tb_cgbpz_decoder: checks the combinational CGBPZ decoder.
// Segments come from the reference encoder (DCT blocks and random
// coefficient sets) and from random bits with a random start/end code; the
// decoded coefficients must equal the bit-serial reference decoder.  Blocks
// that needed no truncation must come back exactly as they went in, and
// blocks with one coefficient above 3 in a truncated block must show the
// compensation bit.
module tb_cgbpz_decoder;
  import ec_pkg::*;
  import ec_ref_pkg::*;

  logic [SEG_W-1:0] seg;
  logic signed [COEF_W-1:0] coef [16];
  int checks = 0, failures = 0;
  int n_exact = 0, n_comp = 0, n_rand = 0;

  cgbpz_decoder dut (.seg(seg), .coef(coef));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit [63:0] sgm);
    blk_t r;
    seg = sgm;
    #1;
    r = decode(sgm);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (int'(coef[i]) != r[i]) begin
        failures++;
        if (failures < 10) $display("seg %h coef %0d got %0d exp %0d", sgm, i, coef[i], r[i]);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      blk_t c;
      bit [63:0] sgm;
      if (n % 3 == 2) begin
        do begin
          sgm = {$urandom, $urandom};
          sgm[55:50] = 6'($urandom_range(0, 44));
          if (n % 30 == 2) sgm[55:50] = 6'd63;
        end while (seg_used(sgm) > 50);
        n_rand++;
        check(sgm);
      end else begin
        c = (n % 3 == 0) ? fdct(rand_block(n)) : '{default: 0};
        if (n % 3 == 1) begin
          c[0] = 4 * $urandom_range(0, 255);
          for (int i = 1; i < 16; i++)
            if ($urandom_range(0, 4) == 0) c[i] = int'($urandom_range(0, 40)) - 20;
        end
        sgm = encode(c);
        check(sgm);
        // lossless case: whole planes fit, values must come back unchanged
        if (sgm[55:50] != 6'd63) begin
          int code, s, e;
          code = sgm[55:50];
          s = 0;
          while ((s + 1) * (s + 2) / 2 <= code) s++;
          e = code - s * (s + 1) / 2;
          if (e == 0 && (c[0] % 4 == 0)) begin
            n_exact++;
            for (int i = 0; i < 16; i++) begin
              checks++;
              if (int'(coef[i]) != c[i]) failures++;
            end
          end
          if (e >= 2) begin
            // the largest coefficient is coded down to plane e at least:
            // its compensation bit sits one plane below its lowest coded bit
            for (int i = 1; i < 16; i++) begin
              int m;
              m = (coef[i] < 0) ? -int'(coef[i]) : int'(coef[i]);
              if (m >= (1 << e)) begin
                checks++;
                if (!(m[e-1] || m[e-2])) failures++;
                else n_comp++;
              end
            end
          end
        end
      end
    end
    $display("random=%0d exact=%0d compensated=%0d", n_rand, n_exact, n_comp);
    checks++;
    if (n_exact == 0 || n_comp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
