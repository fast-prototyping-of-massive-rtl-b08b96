// pilot_rom: read-only table of the uplink pilot values of all users.
//
// Holds N_USERS x N_PER_USER QPSK pilots (4 x 150 = 600 by default), user u
// at addresses u*N_PER_USER .. u*N_PER_USER+N_PER_USER-1. The table size and
// its QPSK nature follow the transmitter description; the pilot values
// themselves are not published for it, so this design fills the table from
// a PN9 sequence (x^9 + x^5 + 1, all-ones seed, first output bit = state bit
// 8): entry a takes output bits 2a and 2a+1, the first for the in-phase
// sign and the second for the quadrature sign (1 = positive), at the QPSK
// amplitude 1/sqrt(2) per part, so every pilot has magnitude 1.0.
// The table is computed at elaboration. The read is asynchronous
// (combinational, a distributed ROM); addresses past the end return 0.
module pilot_rom
  import ue_pkg::*;
#(
  parameter int N_PER_USER = N_PILOT_USER,
  parameter int USERS      = N_USERS,
  localparam int DEPTH     = N_PER_USER * USERS,
  localparam int AW        = $clog2(DEPTH)
) (
  input  logic [AW-1:0] addr,
  output cplx_t         data
);

  typedef logic [1:0] code_tab_t [DEPTH];

  function automatic code_tab_t make_table();
    code_tab_t  t;
    logic [8:0] s = 9'h1FF;
    logic       b0, b1;
    for (int a = 0; a < DEPTH; a++) begin
      b0 = s[8];
      s  = {s[7:0], s[8] ^ s[4]};
      b1 = s[8];
      s  = {s[7:0], s[8] ^ s[4]};
      t[a] = {b0, b1};
    end
    return t;
  endfunction

  localparam code_tab_t CODES = make_table();

  logic [1:0] code;

  always_comb begin
    code = (32'(addr) < DEPTH) ? CODES[addr] : 2'b00;
    data.re = code[1] ? sample_t'(STEP_QPSK) : sample_t'(-STEP_QPSK);
    data.im = code[0] ? sample_t'(STEP_QPSK) : sample_t'(-STEP_QPSK);
    if (32'(addr) >= DEPTH) data = '0;
  end

endmodule
