// ue_tx_top: reconfigurable uplink OFDM transmitter of a massive-MIMO user
// equipment.
//
// Turns a serial bit stream into time-domain OFDM slots:
//
//   bits -> s2p -> modulator -> FIFO (3600) -> subcarrier_mapper
//        -> frame_formatter (+ uplink_pilot) -> ifft_r4 -> add_cp -> samples
//
// mod_select picks QPSK, 16QAM or 64QAM for the data (0, 1, 2), user_id picks
// which of four users' pilot patterns is sent. A slot is 14 symbols: the
// pilot symbol, six data symbols of 600 points each (3600 points, 7200 to
// 21600 bits depending on the modulation) and seven zero symbols; each leaves
// as 144 + 1024 = 1168 samples, 16352 per slot. This chain, its sizes and the
// two control inputs are the ones of the transmitter description; the
// valid/ready handshakes, the fixed-point formats and the buffering inside
// each stage are this design's.
//
// Interface: AXI4-Stream-like. s_axis carries one bit per beat. m_axis_tdata
// is one complex sample, {re, im}, each signed Q2.14 (IFFT output scaled by
// 1/1024); m_axis_tuser marks the last sample of every OFDM symbol and
// m_axis_tlast the last sample of a slot. mod_select is taken with the first
// bit of each slot, user_id at the start of each pilot symbol. fifo_level
// reports how many points wait between the modulator and the mapper.
// Timing: the IFFT's butterfly engine is the slowest stage, 1280 cycles per
// symbol, so with the output never stalled a slot of 16352 samples leaves
// every 14 x 1280 = 17920 cycles (91 samples per 100 cycles; at a 100 MHz
// clock 80 MS/s of useful samples against the 61.32 MS/s required). The
// one-bit input must then deliver 1.2 bits per cycle for 64QAM, which it
// cannot: 64QAM slots are paced by the input at one per 21600 cycles.
// The first sample leaves about 3500 cycles after the first bit.
module ue_tx_top
  import ue_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  user_id,
  input  logic [1:0]  mod_select,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tuser,
  output logic        m_axis_tlast,
  output logic [11:0] fifo_level
);

  // serial to parallel -> modulator
  logic       sp_valid, sp_ready;
  logic [5:0] sp_bits;
  mod_t       sp_mod;

  // modulator -> FIFO -> mapper
  logic  md_valid, md_ready;
  cplx_t md_sym;
  logic  fq_valid, fq_ready;
  logic [31:0] fq_data;

  // mapper / pilot -> formatter -> IFFT -> CP
  logic  mp_valid, mp_ready, mp_last;
  cplx_t mp_data;
  logic  pl_valid, pl_ready, pl_last;
  cplx_t pl_data;
  logic  ff_valid, ff_ready, ff_last;
  cplx_t ff_data;
  logic [$clog2(N_SYM_SLOT)-1:0] ff_sym;
  logic  if_valid, if_ready;
  cplx_t if_data;
  logic  cp_valid, cp_last;
  cplx_t cp_data;

  logic [$clog2(N_SYM_SLOT)-1:0] out_sym;

  s2p u_s2p (
    .clk       (clk),
    .rst_n     (rst_n),
    .mod_sel   (mod_t'(mod_select)),
    .in_valid  (s_axis_tvalid),
    .in_ready  (s_axis_tready),
    .in_bit    (s_axis_tdata),
    .out_valid (sp_valid),
    .out_ready (sp_ready),
    .out_bits  (sp_bits),
    .out_mod   (sp_mod)
  );

  modulator u_mod (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sp_valid),
    .in_ready  (sp_ready),
    .in_bits   (sp_bits),
    .in_mod    (sp_mod),
    .out_valid (md_valid),
    .out_ready (md_ready),
    .out_sym   (md_sym)
  );

  stream_fifo #(.WIDTH(32), .DEPTH(N_DATA_SYM * N_DATA_SC)) u_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (md_valid),
    .in_ready  (md_ready),
    .in_data   (md_sym),
    .out_valid (fq_valid),
    .out_ready (fq_ready),
    .out_data  (fq_data),
    .level     (fifo_level)
  );

  subcarrier_mapper u_map (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (fq_valid),
    .in_ready  (fq_ready),
    .in_data   (cplx_t'(fq_data)),
    .out_valid (mp_valid),
    .out_ready (mp_ready),
    .out_data  (mp_data),
    .out_last  (mp_last)
  );

  uplink_pilot u_pilot (
    .clk       (clk),
    .rst_n     (rst_n),
    .user_id   (user_id),
    .out_valid (pl_valid),
    .out_ready (pl_ready),
    .out_data  (pl_data),
    .out_last  (pl_last)
  );

  frame_formatter u_frame (
    .clk           (clk),
    .rst_n         (rst_n),
    .pilot_valid   (pl_valid),
    .pilot_ready   (pl_ready),
    .pilot_data    (pl_data),
    .data_valid    (mp_valid),
    .data_ready    (mp_ready),
    .data_data     (mp_data),
    .out_valid     (ff_valid),
    .out_ready     (ff_ready),
    .out_data      (ff_data),
    .out_last      (ff_last),
    .out_slot_last (),
    .out_sym       (ff_sym)
  );

  ifft_r4 u_ifft (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ff_valid),
    .in_ready  (ff_ready),
    .in_data   (ff_data),
    .out_valid (if_valid),
    .out_ready (if_ready),
    .out_data  (if_data),
    .out_last  ()
  );

  add_cp u_cp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (if_valid),
    .in_ready  (if_ready),
    .in_data   (if_data),
    .out_valid (cp_valid),
    .out_ready (m_axis_tready),
    .out_data  (cp_data),
    .out_last  (cp_last)
  );

  // Symbol count at the output, for the end-of-slot marker.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_sym <= '0;
    else if (cp_valid && m_axis_tready && cp_last)
      out_sym <= (32'(out_sym) == N_SYM_SLOT - 1) ? '0 : out_sym + 1'b1;
  end

  assign m_axis_tvalid = cp_valid;
  assign m_axis_tdata  = cp_data;
  assign m_axis_tuser  = cp_last;
  assign m_axis_tlast  = cp_last && (32'(out_sym) == N_SYM_SLOT - 1);

  // The symbol markers of the mapper, pilot generator and formatter must agree.
  a_pilot_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (ff_valid && ff_ready && ff_sym == '0) |-> (pl_last == ff_last));
  a_data_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (mp_valid && mp_ready) |-> (mp_last == ff_last));

endmodule
