// add_cp: cyclic prefix insertion.
//
// Receives the N time samples x(0..N-1) of an OFDM symbol and sends
// N_CPL + N samples: x(N-N_CPL .. N-1) followed by x(0 .. N-1), i.e. a copy
// of the symbol's tail in front of it. With the defaults the last 144 of
// 1024 samples are copied (x880..x1023), giving 1168 samples per symbol, the
// prefix length of the 60 kHz numerology. The prefix length and its content
// follow the transmitter description.
//
// The tail is only known once the whole symbol has arrived, so a symbol is
// buffered. Two buffers of N samples alternate (ping-pong, this design's
// choice): one fills while the other is sent, so input and output can both
// run at one sample per cycle. out_last marks the last sample of a symbol.
// The output is a registered valid/ready stage.
module add_cp
  import ue_pkg::*;
#(
  parameter int N     = N_IFFT,
  parameter int N_CPL = N_CP
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

  localparam int AW   = $clog2(N);
  localparam int OUTN = N_CPL + N;
  localparam int OW   = $clog2(OUTN);

  cplx_t         mem [2][N];
  logic [1:0]    full;
  logic          wsel, rsel;
  logic [AW-1:0] wcnt;
  logic [OW-1:0] ocnt;
  logic [AW-1:0] raddr;
  logic          adv;

  assign in_ready = !full[wsel];
  assign adv      = full[rsel] && (!out_valid || out_ready);
  // Output beat j reads x(N-N_CPL+j) for j < N_CPL, then x(j-N_CPL).
  assign raddr    = (32'(ocnt) < N_CPL) ? AW'(32'(ocnt) + N - N_CPL)
                                        : AW'(32'(ocnt) - N_CPL);

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wsel][wcnt] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      wsel      <= 1'b0;
      rsel      <= 1'b0;
      wcnt      <= '0;
      ocnt      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        wcnt <= wcnt + 1'b1;
        if (32'(wcnt) == N - 1) begin
          wcnt       <= '0;
          full[wsel] <= 1'b1;
          wsel       <= !wsel;
        end
      end
      if (adv) begin
        out_valid <= 1'b1;
        out_data  <= mem[rsel][raddr];
        out_last  <= (32'(ocnt) == OUTN - 1);
        if (32'(ocnt) == OUTN - 1) begin
          ocnt       <= '0;
          full[rsel] <= 1'b0;
          rsel       <= !rsel;
        end else begin
          ocnt <= ocnt + 1'b1;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
