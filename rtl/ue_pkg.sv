// ue_pkg: types and constants shared by the UE OFDM transmitter.
//
// A complex baseband sample is a packed struct of two signed 16-bit parts in
// Q2.14 (1.0 = 16384), wide enough for the largest normalised 64QAM point
// (7/sqrt(42) = 1.08). The frame numbers (1024-point IFFT, 600 data
// subcarriers, 144-sample cyclic prefix, 14 symbols per slot of which one
// pilot and six data symbols, pilot spacing 4, four users, 150 pilots per
// user) are the ones of the 60 kHz numerology the transmitter is built for.
// The sample format and the constellation scaling to unit average power are
// choices of this design.
package ue_pkg;

  localparam int SW   = 16;  // sample part width
  localparam int FRAC = 14;  // fractional bits of a sample part

  localparam int N_IFFT       = 1024;
  localparam int N_DATA_SC    = 600;
  localparam int N_CP         = 144;
  localparam int N_SYM_SLOT   = 14;
  localparam int N_PILOT_SYM  = 1;
  localparam int N_DATA_SYM   = 6;
  localparam int N_USERS      = 4;
  localparam int PILOT_STRIDE = 4;
  localparam int N_PILOT_USER = N_DATA_SC / PILOT_STRIDE;  // 150

  typedef logic signed [SW-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Modulation select, as driven by the mod_select control input.
  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,
    MOD_16QAM = 2'd1,
    MOD_64QAM = 2'd2
  } mod_t;

  // Constellation unit steps in Q2.14, normalised to unit average power:
  // 1/sqrt(2), 1/sqrt(10), 1/sqrt(42).
  localparam int STEP_QPSK  = 11585;
  localparam int STEP_16QAM = 5181;
  localparam int STEP_64QAM = 2528;

  // Bits carried by one constellation point.
  function automatic int unsigned bits_per_symbol(mod_t m);
    case (m)
      MOD_16QAM: return 4;
      MOD_64QAM: return 6;
      default:   return 2;
    endcase
  endfunction

endpackage
