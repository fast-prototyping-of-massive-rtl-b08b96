// frame_formatter: builds the symbol sequence of one slot in the frequency
// domain.
//
// A slot has N_SYM symbols of N_FFT subcarriers each. Symbol 0 carries the
// uplink pilot, symbols 1..N_DATA_SYMS carry mapped data and the remaining
// ones are zero (left free for the downlink). With the defaults that is
// 1 pilot + 6 data + 7 zero symbols = 14, the slot structure of the
// transmitter. The formatter routes one source at a time to its output,
// counting subcarriers itself: the pilot stream during symbol 0, the data
// stream during data symbols, and a constant zero during the others. It is
// combinational from source to output (no added latency); only the
// selected source sees out_ready. out_last marks the last subcarrier of a
// symbol, out_slot_last the last one of the slot, and out_sym tells which
// symbol a value belongs to.
module frame_formatter
  import ue_pkg::*;
#(
  parameter int N_FFT       = N_IFFT,
  parameter int N_SYM       = N_SYM_SLOT,
  parameter int N_DATA_SYMS = N_DATA_SYM
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // uplink pilot symbol source
  input  logic                     pilot_valid,
  output logic                     pilot_ready,
  input  cplx_t                    pilot_data,
  // mapped data symbol source
  input  logic                     data_valid,
  output logic                     data_ready,
  input  cplx_t                    data_data,
  // slot stream
  output logic                     out_valid,
  input  logic                     out_ready,
  output cplx_t                    out_data,
  output logic                     out_last,
  output logic                     out_slot_last,
  output logic [$clog2(N_SYM)-1:0] out_sym
);

  typedef enum logic [1:0] {SRC_PILOT, SRC_DATA, SRC_ZERO} src_t;

  logic [$clog2(N_FFT)-1:0] k;
  logic [$clog2(N_SYM)-1:0] sym;
  src_t                     src;

  always_comb begin
    if (sym == '0)                      src = SRC_PILOT;
    else if (32'(sym) <= N_DATA_SYMS)   src = SRC_DATA;
    else                                src = SRC_ZERO;
  end

  always_comb begin
    pilot_ready = 1'b0;
    data_ready  = 1'b0;
    case (src)
      SRC_PILOT: begin
        out_valid   = pilot_valid;
        out_data    = pilot_data;
        pilot_ready = out_ready;
      end
      SRC_DATA: begin
        out_valid  = data_valid;
        out_data   = data_data;
        data_ready = out_ready;
      end
      default: begin
        out_valid = 1'b1;
        out_data  = '0;
      end
    endcase
  end

  assign out_last      = (32'(k) == N_FFT - 1);
  assign out_slot_last = out_last && (32'(sym) == N_SYM - 1);
  assign out_sym       = sym;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k   <= '0;
      sym <= '0;
    end else if (out_valid && out_ready) begin
      if (out_last) begin
        k   <= '0;
        sym <= out_slot_last ? '0 : sym + 1'b1;
      end else begin
        k <= k + 1'b1;
      end
    end
  end

endmodule
