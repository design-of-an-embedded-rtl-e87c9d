// tb_ripple_connector: checks one connector link for all sixteen zones with
// random contents and previous words: the top k bits must be the first k
// content bits and the rest the previous word moved down by k, k being
// RMAX*CMAX - 1.  A second part chains three links and checks that the first
// link's content is the part truncated at the bottom.
module tb_ripple_connector;
  import ec_pkg::*;

  logic [14:0] content, c2, c3;
  zone_t zone, z2, z3;
  logic [49:0] prev, result, r2, r3;
  int checks = 0, failures = 0;

  ripple_connector u0 (.content(content), .zone(zone), .prev(prev), .result(result));
  ripple_connector u1 (.content(c2), .zone(z2), .prev(result), .result(r2));
  ripple_connector u2 (.content(c3), .zone(z3), .prev(r2), .result(r3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int k, k2, k3;
      bit [49:0] exp;
      bit [99:0] cat;
      content = 15'($urandom);
      c2 = 15'($urandom);
      c3 = 15'($urandom);
      zone = zone_t'(t % 16);
      z2 = zone_t'($urandom_range(0, 15));
      z3 = zone_t'($urandom_range(0, 15));
      prev = {$urandom, $urandom};
      if (t % 2) prev = '0;
      #1;
      k = (zone.r + 1) * (zone.c + 1) - 1;
      exp = prev >> k;
      for (int j = 0; j < k; j++) exp[49 - j] = content[14 - j];
      checks++;
      if (result !== exp) begin
        failures++;
        if (failures < 10) $display("zone %0d got %h exp %h", zone, result, exp);
      end
      // chained: {c3 bits, c2 bits, content bits, prev} truncated to 50 bits
      k2 = (z2.r + 1) * (z2.c + 1) - 1;
      k3 = (z3.r + 1) * (z3.c + 1) - 1;
      cat = {prev, 50'b0};
      cat = cat >> k;  for (int j = 0; j < k;  j++) cat[99 - j] = content[14 - j];
      cat = cat >> k2; for (int j = 0; j < k2; j++) cat[99 - j] = c2[14 - j];
      cat = cat >> k3; for (int j = 0; j < k3; j++) cat[99 - j] = c3[14 - j];
      checks++;
      if (r3 !== cat[99:50]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
