// subcarrier_mapper: localized mapping of the data points of one OFDM
// symbol onto the IFFT input.
//
// N_DATA points X0..X(N_DATA-1) arrive in order and leave as N_FFT
// subcarrier values in natural order 0..N_FFT-1:
//   subcarrier 0                          : 0 (DC subcarrier)
//   subcarriers 1 .. N_DATA/2             : X(N_DATA/2) .. X(N_DATA-1)
//   subcarriers N_DATA/2+1 .. N_FFT-N_DATA/2-1 : 0 (guard band)
//   subcarriers N_FFT-N_DATA/2 .. N_FFT-1 : X0 .. X(N_DATA/2-1)
// With the defaults 600 points fill subcarriers 1-300 and 724-1023 and 424
// zeros are inserted, as the frame structure prescribes; the swap of the two
// halves places the first half of the data at negative frequencies.
//
// Because X(N_DATA/2) leaves before X0, a whole symbol is buffered. Two
// buffers of N_DATA points alternate (ping-pong, a choice of this design):
// one fills from the input while the other is read out, so a symbol of
// N_DATA input beats and N_FFT output beats can overlap with the next.
// out_last marks subcarrier N_FFT-1. The output is a registered stage: one
// cycle from a read to out_valid.
module subcarrier_mapper
  import ue_pkg::*;
#(
  parameter int N_FFT  = N_IFFT,
  parameter int N_DATA = N_DATA_SC
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

  localparam int HALF = N_DATA / 2;
  localparam int DW   = $clog2(N_DATA);
  localparam int KW   = $clog2(N_FFT);

  cplx_t mem [2][N_DATA];
  logic [1:0]    full;        // buffer holds a complete symbol
  logic          wsel, rsel;  // buffer being written / read
  logic [DW-1:0] wcnt;
  logic [KW-1:0] k;           // next subcarrier to emit
  logic          adv;         // emit subcarrier k this cycle
  logic          k_data;
  logic [DW-1:0] raddr;

  assign in_ready = !full[wsel];
  assign adv      = full[rsel] && (!out_valid || out_ready);

  // Data index held by subcarrier k, if any.
  always_comb begin
    k_data = 1'b0;
    raddr  = '0;
    if (32'(k) >= 1 && 32'(k) <= HALF) begin
      k_data = 1'b1;
      raddr  = DW'(32'(k) - 1 + HALF);
    end else if (32'(k) >= N_FFT - HALF) begin
      k_data = 1'b1;
      raddr  = DW'(32'(k) - (N_FFT - HALF));
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wsel][wcnt] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      wsel      <= 1'b0;
      rsel      <= 1'b0;
      wcnt      <= '0;
      k         <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        if (32'(wcnt) == N_DATA - 1) begin
          wcnt       <= '0;
          full[wsel] <= 1'b1;
          wsel       <= !wsel;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (adv) begin
        out_valid <= 1'b1;
        out_data  <= k_data ? mem[rsel][raddr] : '0;
        out_last  <= (32'(k) == N_FFT - 1);
        if (32'(k) == N_FFT - 1) begin
          k          <= '0;
          full[rsel] <= 1'b0;
          rsel       <= !rsel;
        end else begin
          k <= k + 1'b1;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
