// tb_modulator: self-checking test of the QPSK/16QAM/64QAM mapper.
//
// Applies every 6-bit input in every mode and compares the output point with
// levels read from the Gray-labelled constellations, written out here as
// tables (QPSK: 0 -> -1, 1 -> +1; 16QAM per axis: 00 -3, 01 -1, 11 +1,
// 10 +3; 64QAM per axis: 000 -7, 001 -5, 011 -3, 010 -1, 110 +1, 111 +3,
// 101 +5, 100 +7), scaled by round(2^14 / sqrt(2, 10, 42)). It also checks
// that each constellation has unit average power, the one-cycle latency,
// and that a stalled output holds its value.
module tb_modulator;
  import ue_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b1;
  logic in_ready, out_valid;
  logic [5:0] in_bits = '0;
  mod_t in_mod = MOD_QPSK;
  cplx_t out_sym;

  int checks = 0, failures = 0;

  modulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lvl16 [4] = '{-3, -1, 3, 1};            // index = 2-bit label
  int lvl64 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3}; // index = 3-bit label

  function automatic void expect_point(mod_t m, logic [5:0] b,
                                       output int er, output int ei);
    real st;
    case (m)
      MOD_QPSK: begin
        st = 16384.0 / $sqrt(2.0);
        er = $rtoi(st + 0.5) * (b[5] ? 1 : -1);
        ei = $rtoi(st + 0.5) * (b[4] ? 1 : -1);
      end
      MOD_16QAM: begin
        st = 16384.0 / $sqrt(10.0);
        er = $rtoi(st + 0.5) * lvl16[b[5:4]];
        ei = $rtoi(st + 0.5) * lvl16[b[3:2]];
      end
      default: begin
        st = 16384.0 / $sqrt(42.0);
        er = $rtoi(st + 0.5) * lvl64[b[5:3]];
        ei = $rtoi(st + 0.5) * lvl64[b[2:0]];
      end
    endcase
  endfunction

  initial begin
    int er, ei;
    real pw;
    int npts;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int mi = 0; mi < 3; mi++) begin
      pw = 0.0;
      npts = (mi == 0) ? 4 : (mi == 1) ? 16 : 64;
      for (int v = 0; v < 64; v++) begin
        in_valid <= 1'b1;
        in_bits  <= 6'(v);
        in_mod   <= mod_t'(mi);
        @(posedge clk);
        in_valid <= 1'b0;
        #1;
        // registered: valid exactly one cycle after the accepting edge
        checks++;
        if (!out_valid) begin
          failures++;
          $display("no output one cycle after input");
        end
        expect_point(mod_t'(mi), 6'(v), er, ei);
        checks++;
        if (int'(out_sym.re) != er || int'(out_sym.im) != ei) begin
          failures++;
          $display("mode %0d bits %b: got %0d,%0d want %0d,%0d", mi, 6'(v),
                   out_sym.re, out_sym.im, er, ei);
        end
        // the unused low bits must not matter, so only distinct points count
        if ((mi == 0 && v[3:0] == 0) || (mi == 1 && v[1:0] == 0) || mi == 2)
          pw += (real'(er) * real'(er) + real'(ei) * real'(ei)) / (16384.0 * 16384.0);
      end
      checks++;
      pw = pw / npts;
      if (pw < 0.995 || pw > 1.005) begin
        failures++;
        $display("mode %0d average power %f", mi, pw);
      end
    end
    // back-pressure: output holds while out_ready is low
    @(posedge clk);
    out_ready <= 1'b0;
    in_valid  <= 1'b1;
    in_bits   <= 6'b110000;
    in_mod    <= MOD_QPSK;
    @(posedge clk);
    in_bits   <= 6'b000000;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (in_ready || !out_valid || out_sym.re <= 0 || out_sym.im <= 0) begin
      failures++;
      $display("stall not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
