// ifft_r4: N-point radix-4 inverse FFT, memory based (N = 4^S, 1024 by
// default).
//
// Turns one OFDM symbol of N subcarrier values into N time samples,
//   x(n) = (1/N) * sum_k X(k) e^{+j 2 pi k n / N}.
// The transform is split into S = log4(N) radix-4 stages (for 1024 points:
// 256 four-point butterflies per stage, then again 256 on the next level of
// the split, five stages in all), the decomposition the transmitter uses;
// the twiddle factors e^{+j 2 pi e / N} come from a ROM that is computed at
// elaboration (Q1.14, 16 bits).
//
// Three working memories (banks) rotate through three engines that run at
// the same time, so one symbol is loaded while the previous one is
// transformed and the one before that is sent:
//   load     N cycles: accepts X(0..N-1) in natural order into the next
//            free bank. Samples are widened to DW bits, GUARD of them extra
//            fraction bits.
//   compute  S*N/4 cycles: one decimation-in-frequency butterfly per cycle,
//            in place. Stage s works on blocks of L = N/4^s points;
//            butterfly n of a block reads points n, n+L/4, n+L/2, n+3L/4 and
//            writes the results back to the same places, outputs 1..3
//            rotated by twiddle exponents e, 2e, 3e with e = n*4^s. Each
//            butterfly scales by 1/4.
//   unload   N beats: emits x(0..N-1) in natural order by reading the bank at
//            the base-4 digit-reversed address, rounded back to 16 bits and
//            saturated.
// Each engine takes the banks in the order 0, 1, 2, 0, ...; a bank is
// free, loaded or transformed, and an engine waits until its next bank is
// in the state it needs.
// Rate and latency: one symbol every max(N, S*N/4) cycles when source and
// sink keep up (1280 for 1024 points, 80 samples per 100 cycles); a symbol
// takes N + S*N/4 + N + 1 cycles from its first input to its last output
// (3329). The bank structure, the four read and four write ports of the
// bank being transformed, and the fixed-point formats are this design's
// choices. out_last marks x(N-1). The output is a registered valid/ready
// stage.
module ifft_r4
  import ue_pkg::*;
#(
  parameter int N     = N_IFFT,
  parameter int GUARD = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  out_last
);

  localparam int LOGN = $clog2(N);
  localparam int S    = LOGN / 2;          // radix-4 stages
  localparam int DW   = SW + GUARD;
  localparam int TWW  = 16;
  localparam int TWF  = 14;
  localparam int BW   = LOGN - 2;          // butterfly index width

  typedef logic signed [TWW-1:0] tw_tab_t [N];

  function automatic tw_tab_t make_tw(bit imag);
    tw_tab_t t;
    real     ph;
    for (int e = 0; e < N; e++) begin
      ph   = 2.0 * 3.14159265358979323846 * real'(e) / real'(N);
      t[e] = TWW'($rtoi((imag ? $sin(ph) : $cos(ph)) * real'(1 << TWF)
                        + ((imag ? $sin(ph) : $cos(ph)) >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam tw_tab_t TW_RE = make_tw(1'b0);
  localparam tw_tab_t TW_IM = make_tw(1'b1);

  // Base-4 digit reversal of an index over S digits.
  function automatic logic [LOGN-1:0] digit_rev(logic [LOGN-1:0] a);
    logic [LOGN-1:0] r;
    for (int d = 0; d < S; d++) r[2*d +: 2] = a[2*(S-1-d) +: 2];
    return r;
  endfunction

  typedef enum logic [1:0] {FREE, LOADED, DONE} bank_t;

  logic signed [DW-1:0] mem_re [3][N];
  logic signed [DW-1:0] mem_im [3][N];
  bank_t                bank [3];

  logic [1:0]             lb, cb, ub;   // bank of the load, compute, unload engine
  logic [LOGN-1:0]        lcnt, ucnt;   // load / unload index
  logic [$clog2(S+1)-1:0] stage;
  logic [BW-1:0]          bfly;         // butterfly within stage
  logic                   computing;

  function automatic logic [1:0] next_bank(logic [1:0] b);
    return (b == 2'd2) ? 2'd0 : b + 2'd1;
  endfunction

  // Butterfly addressing for the current stage.
  logic [LOGN-1:0]       idx [4];
  logic [LOGN-1:0]       e;
  logic signed [DW-1:0]  bx_re [4], bx_im [4], by_re [4], by_im [4];
  logic signed [TWW-1:0] bw_re [3], bw_im [3];

  always_comb begin
    int qlog;     // log2 of L/4
    logic [LOGN-1:0] n, g;
    qlog = LOGN - 2 - 2 * int'(stage);
    n    = LOGN'(bfly) & ((LOGN'(1) << qlog) - 1'b1);
    g    = LOGN'(bfly) >> qlog;
    idx[0] = (g << (qlog + 2)) | n;
    for (int i = 1; i < 4; i++) idx[i] = idx[0] + (LOGN'(i) << qlog);
    e = n << (2 * int'(stage));
    for (int i = 0; i < 4; i++) begin
      bx_re[i] = mem_re[cb][idx[i]];
      bx_im[i] = mem_im[cb][idx[i]];
    end
    for (int i = 0; i < 3; i++) begin
      bw_re[i] = TW_RE[LOGN'(e * LOGN'(i + 1))];
      bw_im[i] = TW_IM[LOGN'(e * LOGN'(i + 1))];
    end
  end

  radix4_butterfly #(.DW(DW), .TWW(TWW), .TWF(TWF), .INVERSE(1'b1)) u_bfly (
    .x_re (bx_re),
    .x_im (bx_im),
    .w_re (bw_re),
    .w_im (bw_im),
    .y_re (by_re),
    .y_im (by_im)
  );

  logic            load_en, unload_en;
  logic [LOGN-1:0] raddr;

  assign in_ready  = (bank[lb] == FREE);
  assign load_en   = in_valid && in_ready;
  assign computing = (bank[cb] == LOADED);
  assign unload_en = (bank[ub] == DONE) && (!out_valid || out_ready);
  assign raddr     = digit_rev(ucnt);

  // Working memories. The load and compute engines never share a bank.
  always_ff @(posedge clk) begin
    if (load_en) begin
      mem_re[lb][lcnt] <= DW'(in_data.re) <<< GUARD;
      mem_im[lb][lcnt] <= DW'(in_data.im) <<< GUARD;
    end
    if (computing) begin
      for (int i = 0; i < 4; i++) begin
        mem_re[cb][idx[i]] <= by_re[i];
        mem_im[cb][idx[i]] <= by_im[i];
      end
    end
  end

  // Rounding of a working value back to a 16-bit sample part, saturating.
  function automatic sample_t to_sample(logic signed [DW-1:0] v);
    logic signed [DW:0] r;
    r = ((DW+1)'(v) + (DW+1)'(1 <<< (GUARD - 1))) >>> GUARD;
    if (r > (DW+1)'(2**(SW-1) - 1))  return sample_t'(2**(SW-1) - 1);
    if (r < -(DW+1)'(2**(SW-1)))     return sample_t'(-(2**(SW-1)));
    return sample_t'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank      <= '{FREE, FREE, FREE};
      lb        <= 2'd0;
      cb        <= 2'd0;
      ub        <= 2'd0;
      lcnt      <= '0;
      ucnt      <= '0;
      stage     <= '0;
      bfly      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      // load engine
      if (load_en) begin
        lcnt <= lcnt + 1'b1;
        if (lcnt == LOGN'(N - 1)) begin
          bank[lb] <= LOADED;
          lb       <= next_bank(lb);
        end
      end
      // compute engine
      if (computing) begin
        bfly <= bfly + 1'b1;
        if (bfly == BW'(N / 4 - 1)) begin
          if (32'(stage) == S - 1) begin
            stage    <= '0;
            bank[cb] <= DONE;
            cb       <= next_bank(cb);
          end else begin
            stage <= stage + 1'b1;
          end
        end
      end
      // unload engine
      if (unload_en) begin
        ucnt        <= ucnt + 1'b1;
        out_valid   <= 1'b1;
        out_data.re <= to_sample(mem_re[ub][raddr]);
        out_data.im <= to_sample(mem_im[ub][raddr]);
        out_last    <= (ucnt == LOGN'(N - 1));
        if (ucnt == LOGN'(N - 1)) begin
          bank[ub] <= FREE;
          ub       <= next_bank(ub);
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // Each engine only ever finds its bank in the state it expects or waits.
  a_load_bank: assert property (@(posedge clk) disable iff (!rst_n)
    load_en |-> bank[lb] == FREE);
  a_banks_apart: assert property (@(posedge clk) disable iff (!rst_n)
    (computing && load_en) |-> lb != cb);

endmodule
