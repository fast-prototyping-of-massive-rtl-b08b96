// tb_ue_tx_top: end-to-end test of the UE transmitter at its full size.
//
// Sends five slots of random bits, slot 0 in QPSK for user 0, slot 1 in
// 16QAM for user 2, slot 2 in 64QAM for user 3, slot 3 in QPSK for user 1
// and slot 4 in 16QAM for user 0 (7200, 14400, 21600, 7200 and 14400 bits),
// and checks every one of the 5 x 14 x 1168 output samples against a
// reference computed here from scratch: Gray-labelled constellation points,
// localized mapping (points 0..299 on subcarriers 724..1023, 300..599 on
// 1..300), the user's pilots every fourth occupied subcarrier (values from
// the PN9 recurrence), a floating-point inverse DFT scaled by 1/1024 and a
// 144-sample cyclic prefix; samples may differ by 2 LSB. The markers must
// match (m_axis_tuser every 1168 samples, m_axis_tlast every 16352).
//
// Slots 0 and 1 run with the output always ready: slot 1 must follow slot 0
// after exactly 14 x 1280 cycles, the pace of the IFFT's butterfly engine;
// at a 10 ns clock that must give at least the 61.32 MS/s of useful samples
// (1024 every 16.7 us) the transmitter is specified for.
// Slot 2 begins with a 40000-cycle output stall, long enough for the bits
// of slots 3 and 4 to fill the 3600-point FIFO and stall the input; after
// it, and in the later slots, the output stalls at random. The test counts
// how often each mechanism happened and fails if one never did: modulation switch, user switch, input stall
// (FIFO full), output stall, pilot, data and zero symbols, prefix insertion.
module tb_ue_tx_top;
  import ue_pkg::*;

  localparam int NSLOT = 5;
  localparam int NFFT = 1024, NCP = 144, SYMLEN = NFFT + NCP;
  localparam int T_SLOT = 14 * (5 * NFFT / 4);   // IFFT butterfly pace

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  user_id = 2'd0, mod_select = 2'd0;
  logic        s_axis_tvalid = 1'b0, s_axis_tdata = 1'b0, m_axis_tready = 1'b0;
  logic        s_axis_tready, m_axis_tvalid, m_axis_tuser, m_axis_tlast;
  logic [31:0] m_axis_tdata;
  logic [11:0] fifo_level;

  int checks = 0, failures = 0;

  ue_tx_top dut (.*);

  always #5 clk = ~clk;

  // slot configuration
  int slot_mod  [NSLOT] = '{0, 1, 2, 0, 1};
  int slot_user [NSLOT] = '{0, 2, 3, 1, 0};

  typedef struct { logic b; logic [1:0] sel; } beat_t;
  beat_t beats [$];

  real   ct [NFFT], st [NFFT];
  cplx_t rom [600];
  real   ref_re [NSLOT][14][SYMLEN];
  real   ref_im [NSLOT][14][SYMLEN];

  // mechanism counters
  int n_mod_switch = 0, n_user_switch = 0, n_in_stall = 0, n_out_stall = 0;
  int n_pilot_sym = 0, n_data_sym = 0, n_zero_sym = 0, n_cp = 0, n_slots = 0;
  int max_fifo = 0;

  int out_cnt = 0, in_cnt = 0;
  longint cyc = 0, t_stall = 0, t_slot_end [NSLOT];
  real max_err = 0.0;

  initial begin
    #10000000;  // 1 M cycles
    failures++;
    $display("watchdog: %0d samples out", out_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gray-labelled level of a k-bit label (tables of the constellations).
  function automatic int level(int k, int lab);
    int l16 [4] = '{-3, -1, 3, 1};
    int l64 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};
    if (k == 1) return lab ? 1 : -1;
    if (k == 2) return l16[lab];
    return l64[lab];
  endfunction

  // Reference model of one slot.
  task automatic build_slot(int s);
    int bps, half, step, a, m;
    int bits [6];
    cplx_t pts [600];
    cplx_t sc [NFFT];
    real   xr [NFFT], xi [NFFT];
    bps  = 2 * (slot_mod[s] + 1);
    half = bps / 2;
    step = (slot_mod[s] == 0) ? 11585 : (slot_mod[s] == 1) ? 5181 : 2528;
    for (int sym = 0; sym < 14; sym++) begin
      for (int k = 0; k < NFFT; k++) sc[k] = '0;
      if (sym == 0) begin
        for (int j = 0; j < 150; j++) begin
          m = 4 * j + slot_user[s];
          sc[(m < 300) ? 724 + m : m - 299] = rom[slot_user[s] * 150 + j];
        end
      end else if (sym <= 6) begin
        for (int p = 0; p < 600; p++) begin
          int li, lq;
          li = 0; lq = 0;
          for (int b = 0; b < bps; b++) begin
            bits[b] = $urandom_range(0, 1);
            beats.push_back('{bits[b][0], (p == 0 && sym == 1 && b == 0)
                                            ? 2'(slot_mod[s]) : 2'((slot_mod[s] + 1) % 3)});
          end
          for (int b = 0; b < half; b++) begin
            li = 2 * li + bits[b];
            lq = 2 * lq + bits[half + b];
          end
          pts[p].re = sample_t'(step * level(half, li));
          pts[p].im = sample_t'(step * level(half, lq));
        end
        for (int i = 0; i < 600; i++) sc[(i < 300) ? 724 + i : i - 299] = pts[i];
      end
      for (int n = 0; n < NFFT; n++) begin
        xr[n] = 0.0;
        xi[n] = 0.0;
      end
      if (sym <= 6) begin
        for (int k = 0; k < NFFT; k++) begin
          if (sc[k] != '0) begin
            for (int n = 0; n < NFFT; n++) begin
              a = (k * n) % NFFT;
              xr[n] += real'(sc[k].re) * ct[a] - real'(sc[k].im) * st[a];
              xi[n] += real'(sc[k].re) * st[a] + real'(sc[k].im) * ct[a];
            end
          end
        end
      end
      for (int j = 0; j < SYMLEN; j++) begin
        int n;
        n = (j < NCP) ? NFFT - NCP + j : j - NCP;
        ref_re[s][sym][j] = xr[n] / real'(NFFT);
        ref_im[s][sym][j] = xi[n] / real'(NFFT);
      end
    end
  endtask

  initial begin
    bit o [1200];
    int amp;
    for (int k = 0; k < NFFT; k++) begin
      ct[k] = $cos(6.283185307179586 * real'(k) / real'(NFFT));
      st[k] = $sin(6.283185307179586 * real'(k) / real'(NFFT));
    end
    for (int n = 0; n < 9; n++) o[n] = 1'b1;
    for (int n = 9; n < 1200; n++) o[n] = o[n-9] ^ o[n-5];
    amp = $rtoi(16384.0 / $sqrt(2.0) + 0.5);
    for (int e = 0; e < 600; e++) begin
      rom[e].re = sample_t'(o[2*e] ? amp : -amp);
      rom[e].im = sample_t'(o[2*e+1] ? amp : -amp);
    end
    for (int s = 0; s < NSLOT; s++) build_slot(s);
    user_id = 2'(slot_user[0]);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  // Bit source, always valid while bits remain; the select input carries
  // the slot's modulation with the slot's first bit only.
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (s_axis_tvalid && !s_axis_tready) n_in_stall++;
      if (s_axis_tvalid && s_axis_tready) in_cnt++;
      if (!s_axis_tvalid || s_axis_tready) begin
        if (beats.size() > 0) begin
          s_axis_tvalid <= 1'b1;
          s_axis_tdata  <= beats[0].b;
          mod_select    <= beats[0].sel;
          void'(beats.pop_front());
        end else begin
          s_axis_tvalid <= 1'b0;
        end
      end
      if (int'(fifo_level) > max_fifo) max_fifo = int'(fifo_level);
    end
  end

  // Output sink and checker.
  always @(posedge clk) begin
    if (rst_n) begin
      int s, sym, j;
      s   = out_cnt / (14 * SYMLEN);
      if (s == 2 && t_stall == 0) t_stall = cyc;
      // slots 0, 1 never stalled; slot 2 starts with a long stall that backs
      // the pipeline up into the FIFO; then random stalls
      m_axis_tready <= (s < 2) || (!(s == 2 && cyc - t_stall < 40000)
                                   && $urandom_range(0, 3) != 0);
      if (m_axis_tvalid && !m_axis_tready) n_out_stall++;
      if (m_axis_tvalid && m_axis_tready) begin
        real er, ei;
        sym = (out_cnt / SYMLEN) % 14;
        j   = out_cnt % SYMLEN;
        er = real'($signed(m_axis_tdata[31:16])) - ref_re[s][sym][j];
        ei = real'($signed(m_axis_tdata[15:0])) - ref_im[s][sym][j];
        if (er < 0.0) er = -er;
        if (ei < 0.0) ei = -ei;
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        checks++;
        if (er > 2.0 || ei > 2.0 || m_axis_tuser !== (j == SYMLEN - 1) ||
            m_axis_tlast !== (j == SYMLEN - 1 && sym == 13)) begin
          failures++;
          if (failures < 10)
            $display("slot %0d sym %0d sample %0d: got %0d,%0d want %f,%f",
                     s, sym, j, $signed(m_axis_tdata[31:16]),
                     $signed(m_axis_tdata[15:0]), ref_re[s][sym][j], ref_im[s][sym][j]);
        end
        // first sample of a slot: its pilot is loaded, set the next user
        if (j == 0 && sym == 0 && s + 1 < NSLOT) begin
          user_id <= 2'(slot_user[s + 1]);
          if (slot_user[s + 1] != slot_user[s]) n_user_switch++;
        end
        if (j == 0 && sym == 0 && s > 0 && slot_mod[s] != slot_mod[s - 1]) n_mod_switch++;
        if (j == SYMLEN - 1) begin
          n_cp++;
          if (sym == 0) n_pilot_sym++;
          else if (sym <= 6) n_data_sym++;
          else n_zero_sym++;
        end
        if (m_axis_tlast) begin
          t_slot_end[n_slots] = cyc;
          n_slots++;
        end
        out_cnt++;
        if (out_cnt == NSLOT * 14 * SYMLEN) finish_test();
      end
    end
  end

  task automatic expect_count(string what, int n, int want_min);
    checks++;
    $display("%-28s %0d", what, n);
    if (n < want_min) begin
      failures++;
      $display("  never happened enough (want at least %0d)", want_min);
    end
  endtask

  task automatic finish_test();
    real rate;
    $display("largest sample error %f LSB, fifo peak %0d", max_err, max_fifo);
    expect_count("modulation switches", n_mod_switch, 4);
    expect_count("user switches", n_user_switch, 4);
    expect_count("input stalls (FIFO full)", n_in_stall, 1);
    expect_count("output stalls", n_out_stall, 1);
    expect_count("pilot symbols", n_pilot_sym, NSLOT);
    expect_count("data symbols", n_data_sym, 6 * NSLOT);
    expect_count("zero symbols", n_zero_sym, 7 * NSLOT);
    expect_count("cyclic prefixes inserted", n_cp, 14 * NSLOT);
    expect_count("slots", n_slots, NSLOT);
    checks++;
    $display("slot period %0d cycles (IFFT pace %0d)", t_slot_end[1] - t_slot_end[0], T_SLOT);
    if (t_slot_end[1] - t_slot_end[0] != longint'(T_SLOT)) failures++;
    // useful IFFT output at a 10 ns clock against the 61.32 MS/s required
    // for 1024 samples every 16.7 us
    checks++;
    rate = 14.0 * NFFT * 100.0 / real'(t_slot_end[1] - t_slot_end[0]);
    $display("output rate %f MS/s at 100 MHz (required 61.32)", rate);
    if (rate < 61.32) failures++;
    checks++;
    if (max_fifo < 3000) begin
      failures++;
      $display("FIFO never came close to full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

endmodule
