// uplink_pilot: generator of the reconfigurable uplink pilot symbol.
//
// Emits the N_FFT subcarrier values of one pilot symbol in natural order,
// for the user chosen by user_id. The occupied subcarriers are the same
// N_DATA ones the data use (localized mapping: 1..N_DATA/2 and
// N_FFT-N_DATA/2..N_FFT-1); numbering them in data order m = 0..N_DATA-1
// (m = 0 at subcarrier N_FFT-N_DATA/2), user u owns every STRIDE-th one,
// m = u, u+STRIDE, ..., and places pilot j = m/STRIDE of its table there.
// All other subcarriers, the DC one included, are zero. With the defaults
// user 0 sits on subcarriers 724, 728, ..., 1020, 1, 5, ..., 297, user 3 on
// 727, ..., 1023, 4, ..., 300: 150 pilots each, spacing 4. The spacing, the
// user count and these positions follow the transmitter description; the
// pilot values come from pilot_rom.
//
// user_id is sampled when subcarrier 0 is taken and held for the rest of
// the symbol, so a new user takes effect with the next pilot symbol sent.
// The output is a valid/ready stream, always valid after reset, driven
// combinationally from the subcarrier counter through the pilot table (no
// output register, so nothing is fetched ahead of the handshake); out_last
// marks subcarrier N_FFT-1.
module uplink_pilot
  import ue_pkg::*;
#(
  parameter int N_FFT  = N_IFFT,
  parameter int N_DATA = N_DATA_SC,
  parameter int STRIDE = PILOT_STRIDE,
  parameter int USERS  = N_USERS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(USERS)-1:0] user_id,
  output logic                     out_valid,
  input  logic                     out_ready,
  output cplx_t                    out_data,
  output logic                     out_last
);

  localparam int HALF   = N_DATA / 2;
  localparam int PER_U  = N_DATA / STRIDE;
  localparam int KW     = $clog2(N_FFT);
  localparam int RAW    = $clog2(PER_U * USERS);

  logic [KW-1:0]            k;
  logic [$clog2(USERS)-1:0] uid_q, uid;
  logic                     adv;
  int                       m;
  logic                     occupied;
  logic [RAW-1:0]           raddr;
  cplx_t                    rom_data;

  assign adv = out_valid && out_ready;
  assign uid = (k == '0) ? user_id : uid_q;

  always_comb begin
    m = -1;
    if (32'(k) >= 1 && 32'(k) <= HALF)  m = int'(k) - 1 + HALF;
    else if (32'(k) >= N_FFT - HALF)    m = int'(k) - (N_FFT - HALF);
    occupied = (m >= 0) && ((m % STRIDE) == int'(uid));
    raddr    = RAW'(int'(uid) * PER_U + ((m < 0) ? 0 : m / STRIDE));
  end

  pilot_rom #(.N_PER_USER(PER_U), .USERS(USERS)) u_rom (
    .addr (raddr),
    .data (rom_data)
  );

  assign out_data = occupied ? rom_data : '0;
  assign out_last = (32'(k) == N_FFT - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k         <= '0;
      uid_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b1;
      if (adv) begin
        uid_q <= uid;
        k     <= (32'(k) == N_FFT - 1) ? '0 : k + 1'b1;
      end
    end
  end

endmodule
