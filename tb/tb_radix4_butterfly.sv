// tb_radix4_butterfly: self-checking test of the radix-4 butterfly.
//
// Drives a forward and an inverse instance with random inputs and random
// unit-magnitude twiddles and compares with a real-valued model:
//   y_m = w_m * (1/4) * sum_i x_i * (-+j)^(m*i),   w_0 = 1,
// with -j for the forward and +j for the inverse transform. The fixed-point
// result may differ from the model by rounding only (at most 2 LSB). Inputs
// are kept to magnitudes below 2^23, the butterfly's stated input range.
module tb_radix4_butterfly;

  localparam int DW = 24, TWW = 16, TWF = 14;

  logic signed [DW-1:0]  x_re [4], x_im [4];
  logic signed [TWW-1:0] w_re [3], w_im [3];
  logic signed [DW-1:0]  yf_re [4], yf_im [4], yi_re [4], yi_im [4];

  int checks = 0, failures = 0;

  radix4_butterfly #(.DW(DW), .TWW(TWW), .TWF(TWF), .INVERSE(1'b0)) dut_f (
    .x_re(x_re), .x_im(x_im), .w_re(w_re), .w_im(w_im), .y_re(yf_re), .y_im(yf_im));
  radix4_butterfly #(.DW(DW), .TWW(TWW), .TWF(TWF), .INVERSE(1'b1)) dut_i (
    .x_re(x_re), .x_im(x_im), .w_re(w_re), .w_im(w_im), .y_re(yi_re), .y_im(yi_im));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare one output with the model.
  task automatic check(bit inv, int m, real er, real ei);
    real gr, gi;
    gr = inv ? real'(yi_re[m]) : real'(yf_re[m]);
    gi = inv ? real'(yi_im[m]) : real'(yf_im[m]);
    checks++;
    if ((gr - er) > 2.0 || (er - gr) > 2.0 || (gi - ei) > 2.0 || (ei - gi) > 2.0) begin
      failures++;
      if (failures < 10)
        $display("inv %0d out %0d: got %f,%f want %f,%f", inv, m, gr, gi, er, ei);
    end
  endtask

  initial begin
    real ph, wr [4], wi [4], sr, si, cr, ci, tr, ti;
    int  amp;
    for (int t = 0; t < 2000; t++) begin
      amp = (t < 1000) ? 2**21 : 5900000;  // up to |x| = 0.995 * 2^23
      for (int i = 0; i < 4; i++) begin
        x_re[i] = DW'($signed($urandom_range(0, 2 * amp)) - amp);
        x_im[i] = DW'($signed($urandom_range(0, 2 * amp)) - amp);
      end
      wr[0] = 1.0; wi[0] = 0.0;
      for (int m = 0; m < 3; m++) begin
        ph = 6.283185307179586 * real'($urandom_range(0, 1023)) / 1024.0;
        w_re[m] = TWW'($rtoi($cos(ph) * 16384.0 + ($cos(ph) >= 0.0 ? 0.5 : -0.5)));
        w_im[m] = TWW'($rtoi($sin(ph) * 16384.0 + ($sin(ph) >= 0.0 ? 0.5 : -0.5)));
        wr[m+1] = real'(w_re[m]) / 16384.0;
        wi[m+1] = real'(w_im[m]) / 16384.0;
      end
      #1;
      for (int inv = 0; inv < 2; inv++) begin
        for (int m = 0; m < 4; m++) begin
          sr = 0.0; si = 0.0;
          for (int i = 0; i < 4; i++) begin
            // (-+j)^(m*i): cycle through 1, -+j, -1, +-j
            case ((m * i) % 4)
              0: begin cr = 1.0; ci = 0.0; end
              1: begin cr = 0.0; ci = inv ? 1.0 : -1.0; end
              2: begin cr = -1.0; ci = 0.0; end
              default: begin cr = 0.0; ci = inv ? -1.0 : 1.0; end
            endcase
            sr += real'(x_re[i]) * cr - real'(x_im[i]) * ci;
            si += real'(x_re[i]) * ci + real'(x_im[i]) * cr;
          end
          sr /= 4.0; si /= 4.0;
          tr = sr * wr[m] - si * wi[m];
          ti = sr * wi[m] + si * wr[m];
          check(inv[0], m, tr, ti);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
