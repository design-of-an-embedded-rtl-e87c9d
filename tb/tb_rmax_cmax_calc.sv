// tb_rmax_cmax_calc: checks the bit-plane analysis against a per-bit loop:
// every plane, the sign plane, each plane's zone (largest row and column of
// its ones, 1x1 when empty), the raster-ordered content and the start plane.
module tb_rmax_cmax_calc;
  import ec_pkg::*;

  logic signed [COEF_W-1:0] coef [16];
  plane_t plane [NPLANES];
  plane_t sign_pl;
  zone_t zone [NPLANES];
  logic [14:0] content [NPLANES];
  pidx_t start;
  logic any_ac;
  int checks = 0, failures = 0;

  rmax_cmax_calc dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int m [16];
      int s, any;
      for (int i = 0; i < 16; i++) begin
        int v;
        v = ($urandom_range(0, 2) == 0) ? int'($urandom_range(0, 1400)) - 700 : 0;
        if (t % 50 == 0) v = 0;
        coef[i] = COEF_W'(v);
        m[i] = (v < 0) ? -v : v;
        if (m[i] > 511) m[i] = 511;
      end
      #1;
      s = 0; any = 0;
      for (int p = 0; p < 9; p++) begin
        int r, c, k;
        r = 0; c = 0;
        for (int i = 1; i < 16; i++) begin
          expect_eq(plane[p][i], m[i][p], "plane bit");
          if (m[i][p]) begin
            if (i / 4 > r) r = i / 4;
            if (i % 4 > c) c = i % 4;
            s = p; any = 1;
          end
        end
        expect_eq(zone[p].r, r, "rmax");
        expect_eq(zone[p].c, c, "cmax");
        k = 14;
        for (int i = 1; i < 16; i++)
          if (i / 4 <= r && i % 4 <= c) begin
            expect_eq(content[p][k], m[i][p], "content");
            k--;
          end
        for (int j = 0; j <= k; j++) expect_eq(content[p][j], 0, "content pad");
      end
      for (int i = 1; i < 16; i++) expect_eq(sign_pl[i], coef[i] < 0, "sign");
      expect_eq(any_ac, any, "any");
      if (any) expect_eq(start, s, "start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
