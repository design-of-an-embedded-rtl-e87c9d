// tb_se_plane_mux: checks the 6-bit start/end code for all 45 plane pairs
// (each code distinct, decodable back to its pair) and the empty code.
module tb_se_plane_mux;
  import ec_pkg::*;

  pidx_t start, end_pl;
  logic any_ac;
  logic [SE_W-1:0] code;
  int checks = 0, failures = 0;
  bit seen [64];

  se_plane_mux dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    pidx_t ds, de;
    for (int s = 0; s < 9; s++)
      for (int e = 0; e <= s; e++) begin
        start = pidx_t'(s);
        end_pl = pidx_t'(e);
        any_ac = 1'b1;
        #1;
        checks += 3;
        if (code > 44 || seen[code]) failures++;
        seen[code] = 1;
        if (int'(code) != s * (s + 1) / 2 + e) failures++;
        se_decode(code, ok, ds, de);
        if (!ok || int'(ds) != s || int'(de) != e) failures++;
        any_ac = 1'b0;
        #1;
        checks++;
        if (code != 6'd63) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
