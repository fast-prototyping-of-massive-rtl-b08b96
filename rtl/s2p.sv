// s2p: serial-to-parallel converter in front of the constellation mapper.
//
// Bits arrive one per accepted beat on a valid/ready stream. A 6-bit shift
// register gathers as many bits as the selected modulation carries per point
// (2 for QPSK, 4 for 16QAM, 6 for 64QAM) and presents them on the six
// parallel outputs, left aligned: out_bits[5] is the first bit received
// (the figure's input1), so QPSK uses outputs 5..4, 16QAM 5..2, 64QAM 5..0;
// unused low bits are zero. The shift-register structure and the 2/4/6-input
// use follow the transmitter description.
//
// Design choices: the modulation select is sampled with the first bit of a
// slot (every GROUPS_PER_SLOT points, 6 data symbols x 600 subcarriers) and
// held for the rest of the slot, so a change of mod_sel never splits a
// point; the mode a word was grouped with travels with it on out_mod.
// The output is one registered word; a word completes in the cycle its last
// bit is accepted and is visible the next cycle. in_ready is low only while
// a finished word waits for out_ready. Select value 3 is treated as QPSK.
module s2p
  import ue_pkg::*;
#(
  parameter int GROUPS_PER_SLOT = N_DATA_SYM * N_DATA_SC
) (
  input  logic       clk,
  input  logic       rst_n,
  input  mod_t       mod_sel,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [5:0] out_bits,
  output mod_t       out_mod
);

  logic [4:0] sr;          // bits of the point being gathered
  logic [2:0] cnt;         // bits gathered so far
  logic [$clog2(GROUPS_PER_SLOT+1)-1:0] grp;  // points completed in this slot
  mod_t       cur_mod;
  mod_t       eff_mod;
  int unsigned bps;
  logic [5:0] word;
  logic       take;

  assign in_ready = !(out_valid && !out_ready);
  assign take     = in_valid && in_ready;
  assign eff_mod  = (cnt == 3'd0 && grp == '0) ? mod_sel : cur_mod;
  assign bps      = bits_per_symbol(eff_mod);
  assign word     = {sr, in_bit} << (6 - bps);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      cnt       <= '0;
      grp       <= '0;
      cur_mod   <= MOD_QPSK;
      out_valid <= 1'b0;
      out_bits  <= '0;
      out_mod   <= MOD_QPSK;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        cur_mod <= eff_mod;
        if (32'(cnt) + 1 == bps) begin
          out_bits  <= word;
          out_mod   <= eff_mod;
          out_valid <= 1'b1;
          cnt       <= '0;
          sr        <= '0;
          grp       <= (32'(grp) + 1 == GROUPS_PER_SLOT) ? '0 : grp + 1'b1;
        end else begin
          sr  <= {sr[3:0], in_bit};
          cnt <= cnt + 3'd1;
        end
      end
    end
  end

endmodule
