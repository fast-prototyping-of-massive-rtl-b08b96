// tb_add_cp: self-checking test of cyclic prefix insertion.
//
// Sends six symbols of 1024 random samples. Each must come out as 1168
// samples: samples 880..1023 of the symbol, then samples 0..1023, with
// out_last on the 1168th. The first symbols run with random gaps and
// back-pressure; the last three at full speed, where the ping-pong buffers
// must sustain one output sample per cycle (1168 cycles per symbol).
module tb_add_cp;
  import ue_pkg::*;

  localparam int N = 1024, CP = 144, NS = 6, NRAND = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b0;
  cplx_t in_data = '0;
  logic in_ready, out_valid, out_last;
  cplx_t out_data;

  int checks = 0, failures = 0;

  add_cp dut (.*);

  always #5 clk = ~clk;

  cplx_t sym [NS][N];
  int    in_cnt = 0, out_cnt = 0;
  longint cyc = 0, t_a = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NS; s++)
      for (int n = 0; n < N; n++) sym[s][n] = cplx_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (in_valid && in_ready) in_cnt++;
      if (!in_valid || in_ready) begin
        if (in_cnt < NS * N && (in_cnt >= NRAND * N || $urandom_range(0, 2) != 0)) begin
          in_valid <= 1'b1;
          in_data  <= sym[in_cnt / N][in_cnt % N];
        end else begin
          in_valid <= 1'b0;
        end
      end
      out_ready <= (out_cnt >= NRAND * (N + CP)) || ($urandom_range(0, 3) != 0);
      if (out_valid && out_ready) begin
        int s, j;
        cplx_t want;
        s = out_cnt / (N + CP);
        j = out_cnt % (N + CP);
        want = (j < CP) ? sym[s][N - CP + j] : sym[s][j - CP];
        checks++;
        if (out_data !== want || out_last !== (j == N + CP - 1)) begin
          failures++;
          if (failures < 10) $display("sym %0d beat %0d: got %h want %h", s, j, out_data, want);
        end
        if (out_cnt == (NRAND + 1) * (N + CP)) t_a = cyc;
        out_cnt++;
        if (out_cnt == NS * (N + CP)) begin
          checks++;
          if (cyc - t_a + 1 != longint'((NS - NRAND - 1) * (N + CP))) begin
            failures++;
            $display("full-speed symbols took %0d cycles", cyc - t_a + 1);
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

endmodule
