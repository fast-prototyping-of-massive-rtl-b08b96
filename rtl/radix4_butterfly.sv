// radix4_butterfly: one radix-4 decimation-in-frequency butterfly.
//
// Computes the 4-point transform of x0..x3 with the matrix
//   [1  1  1  1; 1 -j -1  j; 1 -1  1 -1; 1  j -1 -j]   (forward)
// or its conjugate (j replaced by -j) when INVERSE is set, divides every
// result by 4 with rounding (so an N-point transform built from these is
// scaled by 1/N and cannot grow in magnitude), and multiplies outputs 1, 2
// and 3 by the twiddle factors w1, w2, w3 (output 0 is not rotated). The
// 4-point matrix is the standard radix-4 kernel the transmitter's IFFT is
// built from; the per-butterfly scaling by 1/4, the round-half-up rounding
// and the fixed-point formats (data DW bits, twiddles Q1.TWF in TWW bits)
// are this design's choices. The magnitude of every input must stay below
// 2^(DW-1): then no output part can overflow, whatever the twiddle angle.
// Purely combinational.
module radix4_butterfly #(
  parameter int DW      = 24,
  parameter int TWW     = 16,
  parameter int TWF     = 14,
  parameter bit INVERSE = 1'b0
) (
  input  logic signed [DW-1:0]  x_re [4],
  input  logic signed [DW-1:0]  x_im [4],
  input  logic signed [TWW-1:0] w_re [3],   // twiddles of outputs 1, 2, 3
  input  logic signed [TWW-1:0] w_im [3],
  output logic signed [DW-1:0]  y_re [4],
  output logic signed [DW-1:0]  y_im [4]
);

  localparam int SW = DW + 2;        // width of the 4-input sums
  localparam int PW = DW + TWW + 1;  // width of a twiddle product sum

  logic signed [SW-1:0] t0r, t0i, t1r, t1i, t2r, t2i, t3r, t3i;
  logic signed [SW-1:0] s_re [4];
  logic signed [SW-1:0] s_im [4];
  logic signed [DW-1:0] q_re [4];
  logic signed [DW-1:0] q_im [4];
  logic signed [PW-1:0] p_re [3];
  logic signed [PW-1:0] p_im [3];

  always_comb begin
    t0r = SW'(x_re[0]) + SW'(x_re[2]);  t0i = SW'(x_im[0]) + SW'(x_im[2]);
    t1r = SW'(x_re[0]) - SW'(x_re[2]);  t1i = SW'(x_im[0]) - SW'(x_im[2]);
    t2r = SW'(x_re[1]) + SW'(x_re[3]);  t2i = SW'(x_im[1]) + SW'(x_im[3]);
    t3r = SW'(x_re[1]) - SW'(x_re[3]);  t3i = SW'(x_im[1]) - SW'(x_im[3]);

    s_re[0] = t0r + t2r;  s_im[0] = t0i + t2i;
    s_re[2] = t0r - t2r;  s_im[2] = t0i - t2i;
    if (INVERSE) begin
      // t1 + j t3 and t1 - j t3
      s_re[1] = t1r - t3i;  s_im[1] = t1i + t3r;
      s_re[3] = t1r + t3i;  s_im[3] = t1i - t3r;
    end else begin
      // t1 - j t3 and t1 + j t3
      s_re[1] = t1r + t3i;  s_im[1] = t1i - t3r;
      s_re[3] = t1r - t3i;  s_im[3] = t1i + t3r;
    end

    for (int i = 0; i < 4; i++) begin
      q_re[i] = DW'((s_re[i] + SW'(2)) >>> 2);
      q_im[i] = DW'((s_im[i] + SW'(2)) >>> 2);
    end

    y_re[0] = q_re[0];
    y_im[0] = q_im[0];
    for (int i = 0; i < 3; i++) begin
      p_re[i] = PW'(q_re[i+1]) * PW'(w_re[i]) - PW'(q_im[i+1]) * PW'(w_im[i])
              + PW'(1 <<< (TWF - 1));
      p_im[i] = PW'(q_re[i+1]) * PW'(w_im[i]) + PW'(q_im[i+1]) * PW'(w_re[i])
              + PW'(1 <<< (TWF - 1));
      y_re[i+1] = DW'(p_re[i] >>> TWF);
      y_im[i+1] = DW'(p_im[i] >>> TWF);
    end
  end

endmodule
