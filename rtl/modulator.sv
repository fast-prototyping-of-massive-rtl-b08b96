// modulator: reconfigurable constellation mapper (QPSK, 16QAM, 64QAM).
//
// Takes the six parallel bits of the serial-to-parallel converter, left
// aligned, and maps them to one complex point in Q2.14. The first half of
// the used bits selects the in-phase level and the second half the
// quadrature level, each through a Gray code: the k-bit Gray word g is
// turned into its binary value b and the level is 2b - (2^k - 1), giving
// -1/+1 (QPSK), -3..+3 (16QAM) or -7..+7 (64QAM), so neighbouring points
// differ in one bit. This reproduces the bit labels of the constellation
// diagrams the transmitter uses. Levels are scaled to unit average power
// (1/sqrt(2), 1/sqrt(10), 1/sqrt(42)), so QPSK points have amplitude 1.0;
// the scaling and the Q2.14 format are this design's choices.
//
// One registered pipeline stage with valid/ready: a point appears the cycle
// after its bits are accepted; in_ready = !out_valid || out_ready.
module modulator
  import ue_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [5:0] in_bits,
  input  mod_t       in_mod,
  output logic       out_valid,
  input  logic       out_ready,
  output cplx_t      out_sym
);

  // Gray word of k bits (right aligned in g) to signed odd level.
  function automatic int gray_level(logic [2:0] g, int k);
    logic [2:0] b;
    b[2] = g[2];
    b[1] = g[1] ^ b[2];
    b[0] = g[0] ^ b[1];
    if (k == 1) b = {2'b00, g[0]};
    else if (k == 2) b = {1'b0, g[1], g[1] ^ g[0]};
    return 2 * int'(b) - ((1 << k) - 1);
  endfunction

  cplx_t sym;

  always_comb begin
    int li, lq, step;
    case (in_mod)
      MOD_16QAM: begin
        li = gray_level({1'b0, in_bits[5:4]}, 2);
        lq = gray_level({1'b0, in_bits[3:2]}, 2);
        step = STEP_16QAM;
      end
      MOD_64QAM: begin
        li = gray_level(in_bits[5:3], 3);
        lq = gray_level(in_bits[2:0], 3);
        step = STEP_64QAM;
      end
      default: begin
        li = gray_level({2'b00, in_bits[5]}, 1);
        lq = gray_level({2'b00, in_bits[4]}, 1);
        step = STEP_QPSK;
      end
    endcase
    sym.re = sample_t'(li * step);
    sym.im = sample_t'(lq * step);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_sym <= sym;
    end
  end

endmodule
