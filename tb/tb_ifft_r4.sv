// tb_ifft_r4: self-checking test of the 1024-point radix-4 IFFT.
//
// Sends eight symbols: a single tone on subcarrier 1, a DC value, 600 random
// 16QAM-like values on the localized subcarriers, random values on all 1024
// subcarriers, a near-full-scale 64QAM-like symbol and three more random
// ones. Each output sample is compared with the inverse DFT computed here in
// floating point,
//   x(n) = (1/1024) sum_k X(k) exp(+j 2 pi k n / 1024),
// to within 2 LSB. The first six symbols run with source and sink always
// ready: the first must take N + 5N/4 + N + 1 = 3329 cycles from its first
// input to its last output, and later ones must follow every 5N/4 = 1280
// cycles, the pace of the butterfly engine with the three banks overlapped.
// The last two use random gaps and stalls.
module tb_ifft_r4;
  import ue_pkg::*;

  localparam int N = 1024, NSYM = 8, NFAST = 6;
  localparam int T_LAT = N + 5 * N / 4 + N + 1;   // first input to last output
  localparam int T_PER = 5 * N / 4;               // symbol period, compute bound

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b0;
  cplx_t in_data = '0;
  logic in_ready, out_valid, out_last;
  cplx_t out_data;

  int checks = 0, failures = 0;

  ifft_r4 dut (.*);

  always #5 clk = ~clk;

  cplx_t sc [NSYM][N];
  real   xr [NSYM][N], xi [NSYM][N];
  real   ct [N], st [N];
  int    in_cnt = 0, out_cnt = 0;
  longint cyc = 0, t_first_in [NSYM], t_last_out [NSYM];
  real   max_err = 0.0;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lv [4] = '{-3, -1, 1, 3};
    int a;
    for (int k = 0; k < N; k++) begin
      ct[k] = $cos(6.283185307179586 * real'(k) / real'(N));
      st[k] = $sin(6.283185307179586 * real'(k) / real'(N));
    end
    for (int s = 0; s < NSYM; s++) begin
      for (int k = 0; k < N; k++) begin
        sc[s][k] = '0;
        case (s)
          0: if (k == 1) sc[s][k] = '{sample_t'(16384), sample_t'(0)};
          1: if (k == 0) sc[s][k] = '{sample_t'(-9000), sample_t'(5000)};
          2: if ((k >= 1 && k <= 300) || k >= 724)
               sc[s][k] = '{sample_t'(5181 * lv[$urandom_range(0, 3)]),
                            sample_t'(5181 * lv[$urandom_range(0, 3)])};
          3: sc[s][k] = '{sample_t'($urandom_range(0, 32768) - 16384),
                          sample_t'($urandom_range(0, 32768) - 16384)};
          4: if ((k >= 1 && k <= 300) || k >= 724)
               sc[s][k] = '{sample_t'(2528 * 7 * ($urandom_range(0, 1) ? 1 : -1)),
                            sample_t'(2528 * 7 * ($urandom_range(0, 1) ? 1 : -1))};
          default: sc[s][k] = '{sample_t'($urandom_range(0, 20000) - 10000),
                                sample_t'($urandom_range(0, 20000) - 10000)};
        endcase
      end
      for (int n = 0; n < N; n++) begin
        xr[s][n] = 0.0;
        xi[s][n] = 0.0;
        for (int k = 0; k < N; k++) begin
          if (sc[s][k] != '0) begin
            a = (k * n) % N;
            xr[s][n] += real'(sc[s][k].re) * ct[a] - real'(sc[s][k].im) * st[a];
            xi[s][n] += real'(sc[s][k].re) * st[a] + real'(sc[s][k].im) * ct[a];
          end
        end
        xr[s][n] /= real'(N);
        xi[s][n] /= real'(N);
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      logic fast_in, fast_out;
      if (in_valid && in_ready) begin
        if (in_cnt % N == 0) t_first_in[in_cnt / N] = cyc;
        in_cnt++;
      end
      fast_in  = (in_cnt < NFAST * N);
      fast_out = (out_cnt < NFAST * N);
      if (!in_valid || in_ready) begin
        if (in_cnt + ((in_valid && in_ready) ? 0 : 0) < NSYM * N &&
            (fast_in || $urandom_range(0, 2) != 0)) begin
          in_valid <= 1'b1;
          in_data  <= sc[in_cnt / N][in_cnt % N];
        end else begin
          in_valid <= 1'b0;
        end
      end
      out_ready <= fast_out || ($urandom_range(0, 3) != 0);
      if (out_valid && out_ready) begin
        int s, n;
        real er, ei;
        s = out_cnt / N;
        n = out_cnt % N;
        er = real'(out_data.re) - xr[s][n];
        ei = real'(out_data.im) - xi[s][n];
        if (er < 0.0) er = -er;
        if (ei < 0.0) ei = -ei;
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        checks++;
        if (er > 2.0 || ei > 2.0 || out_last !== (n == N - 1)) begin
          failures++;
          if (failures < 10)
            $display("sym %0d n %0d: got %0d,%0d want %f,%f", s, n,
                     out_data.re, out_data.im, xr[s][n], xi[s][n]);
        end
        if (n == N - 1) t_last_out[s] = cyc;
        out_cnt++;
        if (out_cnt == NSYM * N) begin
          checks++;
          if (t_last_out[0] - t_first_in[0] + 1 != longint'(T_LAT)) begin
            failures++;
            $display("first symbol took %0d cycles, want %0d",
                     t_last_out[0] - t_first_in[0] + 1, T_LAT);
          end
          for (int q = 1; q < NFAST; q++) begin
            checks++;
            if (t_last_out[q] - t_last_out[q-1] != longint'(T_PER)) begin
              failures++;
              $display("symbol %0d period %0d, want %0d", q,
                       t_last_out[q] - t_last_out[q-1], T_PER);
            end
          end
          $display("largest error %f LSB", max_err);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

endmodule
