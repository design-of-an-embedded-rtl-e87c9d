// tb_dct4_1d: checks the 4-point DCT unit in both configurations the codec
// uses, the forward row pass (pixels in, 2 fraction bits out) and the inverse
// pass (integers in, 2 fraction bits out).  Each output is compared with the
// real-valued orthonormal DCT (within the error the 8-bit constants allow)
// and with the exact fixed-point matrix product of the reference model.
module tb_dct4_1d;
  import ec_ref_pkg::*;

  logic signed [8:0]  fx [4];
  logic signed [12:0] fy [4];
  logic signed [13:0] ix [4];
  logic signed [15:0] iy [4];
  int checks = 0, failures = 0;

  dct4_1d #(.IN_W(9),  .OUT_W(13), .SHIFT(6), .INVERSE(1'b0)) u_f (.x(fx), .y(fy));
  dct4_1d #(.IN_W(14), .OUT_W(16), .SHIFT(6), .INVERSE(1'b1)) u_i (.x(ix), .y(iy));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real tr(int k, int n);
    real pi = 3.14159265358979;
    return (k == 0) ? 0.5 : 0.70710678 * $cos(pi * (2 * n + 1) * k / 8.0);
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int xs [4];
      real sabs;
      // forward
      sabs = 0;
      for (int n = 0; n < 4; n++) begin
        xs[n] = (t < 16) ? ((t >> n) & 1) * 255 : int'($urandom_range(0, 255));
        fx[n] = 9'(xs[n]);
        sabs += xs[n];
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        real yr;
        int  ye;
        yr = 0;
        ye = 0;
        for (int n = 0; n < 4; n++) begin
          yr += tr(k, n) * xs[n] * 4.0;
          ye += t8(k, n) * xs[n];
        end
        ye = rshift_round(ye, 6);
        checks += 2;
        if (int'(fy[k]) != ye) failures++;
        if ((real'(fy[k]) - yr) > 1.0 + 0.005 * sabs || (yr - real'(fy[k])) > 1.0 + 0.005 * sabs) begin
          failures++;
          if (failures < 10) $display("fwd k=%0d got %0d real %f", k, fy[k], yr);
        end
      end
      // inverse
      sabs = 0;
      for (int n = 0; n < 4; n++) begin
        xs[n] = (n == 0) ? int'($urandom_range(0, 1020)) : int'($urandom_range(0, 1022)) - 511;
        ix[n] = 14'(xs[n]);
        sabs += (xs[n] < 0) ? -xs[n] : xs[n];
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        real yr;
        int  ye;
        yr = 0;
        ye = 0;
        for (int n = 0; n < 4; n++) begin
          yr += tr(n, k) * xs[n] * 4.0;
          ye += t8(n, k) * xs[n];
        end
        ye = rshift_round(ye, 6);
        checks += 2;
        if (int'(iy[k]) != ye) failures++;
        if ((real'(iy[k]) - yr) > 1.0 + 0.005 * sabs || (yr - real'(iy[k])) > 1.0 + 0.005 * sabs) begin
          failures++;
          if (failures < 10) $display("inv k=%0d got %0d real %f", k, iy[k], yr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
