// tb_ec_addr_map: checks the address mux and mapping.  The four rows of a
// 4x4 block must map to the same two words, different blocks to different
// words, and the result must equal the block index times two plus the word
// number (block index = (y/4) * 512 + x4).
module tb_ec_addr_map;
  logic sel_df, word;
  logic [19:0] df_addr, mc_addr, mem_addr;
  int checks = 0, failures = 0;

  ec_addr_map dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int y, x4, exp_a;
      y = $urandom_range(0, 2047);
      x4 = $urandom_range(0, 479);
      sel_df = t[0];
      word = t[1];
      df_addr = sel_df ? 20'(y * 512 + x4) : 20'($urandom);
      mc_addr = sel_df ? 20'($urandom) : 20'(y * 512 + x4);
      #1;
      exp_a = ((y / 4) * 512 + x4) * 2 + int'(word);
      checks++;
      if (int'(mem_addr) != exp_a) begin
        failures++;
        if (failures < 10) $display("y %0d x4 %0d got %0d exp %0d", y, x4, mem_addr, exp_a);
      end
      // another row of the same block maps to the same word
      if (sel_df) df_addr = 20'(((y & ~3) + (t % 4)) * 512 + x4);
      else        mc_addr = 20'(((y & ~3) + (t % 4)) * 512 + x4);
      #1;
      checks++;
      if (int'(mem_addr) != exp_a) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
