// tb_end_plane_decision: checks the end plane, sign zone and bit usage for
// random zone sets against an iterative search that tries every candidate
// end plane and keeps the lowest one within the 50-bit budget.
module tb_end_plane_decision;
  import ec_pkg::*;

  zone_t zone [NPLANES];
  pidx_t start;
  logic any_ac;
  pidx_t end_pl;
  zone_t sign_zone;
  logic [7:0] used;
  int checks = 0, failures = 0;
  int n_full = 0, n_cut = 0;

  end_plane_decision dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cost(int s, int n, output int sr, output int sc);
    int a;
    a = 0; sr = 1; sc = 1;
    for (int p = s; p >= n; p--) begin
      a += 4 + (zone[p].r + 1) * (zone[p].c + 1) - 1;
      if (zone[p].r + 1 > sr) sr = zone[p].r + 1;
      if (zone[p].c + 1 > sc) sc = zone[p].c + 1;
    end
    return a + sr * sc - 1;
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int s, e, u, er, ec;
      s = $urandom_range(0, 8);
      for (int p = 0; p < 9; p++) zone[p] = zone_t'($urandom_range(0, (t % 3 == 0) ? 5 : 15));
      start = pidx_t'(s);
      any_ac = (t % 40 != 0);
      #1;
      e = s;
      for (int n = s; n >= 0; n--) begin
        int sr, sc;
        if (cost(s, n, sr, sc) <= 50) e = n;
        else break;
      end
      u = cost(s, e, er, ec);
      checks += 4;
      if (!any_ac) begin
        if (end_pl != 0 || used != 0) failures++;
      end else begin
        if (int'(end_pl) != e) failures++;
        if (int'(used) != u) failures++;
        if (sign_zone.r + 1 != er) failures++;
        if (sign_zone.c + 1 != ec) failures++;
        if (e == 0) n_full++; else n_cut++;
      end
    end
    checks++;
    if (n_full == 0 || n_cut == 0) failures++;
    $display("whole=%0d cut=%0d", n_full, n_cut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
