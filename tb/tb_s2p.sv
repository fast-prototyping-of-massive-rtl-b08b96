// tb_s2p: self-checking test of the serial-to-parallel converter.
//
// Sends random bits with random gaps and random output back-pressure over
// several short slots (GROUPS_PER_SLOT = 5), each in its own modulation.
// The select input carries the slot's modulation only while the slot's first
// bit is offered and a different value afterwards, which must not take
// effect before the next slot. The expected words are built in the testbench
// from the bit sequence: the first bit of a point lands on out_bits[5],
// unused low bits are zero. Drivers and monitors act on the clock edge with
// nonblocking assignments.
module tb_s2p;
  import ue_pkg::*;

  localparam int GPS   = 5;
  localparam int SLOTS = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  mod_t mod_sel = MOD_QPSK;
  logic in_valid = 1'b0, in_bit = 1'b0, out_ready = 1'b0;
  logic in_ready, out_valid;
  logic [5:0] out_bits;
  mod_t out_mod;

  int checks = 0, failures = 0;

  s2p #(.GROUPS_PER_SLOT(GPS)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { logic b; mod_t sel; } beat_t;
  beat_t      beats    [$];
  logic [5:0] exp_bits [$];
  mod_t       exp_mod  [$];
  int         n_words = 0;
  int         stalls = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: whole bit sequence and expected words, built up front.
  initial begin
    mod_t m;
    int   bps;
    logic [5:0] w;
    for (int s = 0; s < SLOTS; s++) begin
      m = (s < 3) ? mod_t'(s) : mod_t'($urandom_range(0, 2));
      bps = (m == MOD_QPSK) ? 2 : (m == MOD_16QAM) ? 4 : 6;
      for (int g = 0; g < GPS; g++) begin
        w = '0;
        for (int b = 0; b < bps; b++) begin
          w[5-b] = 1'($urandom);
          beats.push_back('{w[5-b], (g == 0 && b == 0) ? m
                                      : mod_t'((int'(m) + 1) % 3)});
        end
        exp_bits.push_back(w);
        exp_mod.push_back(m);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // Input driver.
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) stalls++;
      if (!in_valid || in_ready) begin
        if (beats.size() > 0 && $urandom_range(0, 3) != 0) begin
          in_valid <= 1'b1;
          in_bit   <= beats[0].b;
          mod_sel  <= beats[0].sel;
          void'(beats.pop_front());
        end else begin
          in_valid <= 1'b0;
        end
      end
      out_ready <= ($urandom_range(0, 2) != 0);
    end
  end

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_bits.size() == 0) begin
        failures++;
        $display("unexpected word %b", out_bits);
      end else begin
        if (out_bits !== exp_bits[0] || out_mod !== exp_mod[0]) begin
          failures++;
          $display("word %0d: got %b/%0d want %b/%0d", n_words, out_bits,
                   out_mod, exp_bits[0], exp_mod[0]);
        end
        void'(exp_bits.pop_front());
        void'(exp_mod.pop_front());
      end
      n_words++;
      if (n_words == SLOTS * GPS) begin
        checks++;
        if (stalls == 0) begin
          failures++;
          $display("input was never stalled");
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

endmodule
