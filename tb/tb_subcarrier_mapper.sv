// tb_subcarrier_mapper: self-checking test of the localized subcarrier mapping.
//
// Feeds random points, 600 per symbol, and checks every one of the 1024
// output subcarriers against a reference built by scattering the points:
// point i < 300 goes to subcarrier 724 + i, point i >= 300 to subcarrier
// i - 299, all other subcarriers (DC and the 423-wide guard band) are zero.
// The first symbols run with random gaps and back-pressure; the last ones
// run at full speed on both sides, where the ping-pong buffers must deliver
// one subcarrier per cycle (1024 cycles per symbol).
module tb_subcarrier_mapper;
  import ue_pkg::*;

  localparam int NS_RANDOM = 3, NS_FAST = 3, NS = NS_RANDOM + NS_FAST;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b0;
  cplx_t in_data = '0;
  logic in_ready, out_valid, out_last;
  cplx_t out_data;

  int checks = 0, failures = 0;

  subcarrier_mapper dut (.*);

  always #5 clk = ~clk;

  cplx_t pts [$];
  cplx_t exp_sc [NS][1024];
  int    in_cnt = 0, out_cnt = 0;
  int    zeros = 0;
  longint t_fast_start = -1, t_end = 0, cyc = 0;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t p;
    for (int s = 0; s < NS; s++) begin
      for (int k = 0; k < 1024; k++) exp_sc[s][k] = '0;
      for (int i = 0; i < 600; i++) begin
        p.re = sample_t'($urandom_range(1, 30000));
        p.im = sample_t'($urandom);
        pts.push_back(p);
        if (i < 300) exp_sc[s][724 + i] = p;
        else         exp_sc[s][i - 299] = p;
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      logic fast;
      fast = (in_cnt >= NS_RANDOM * 600);
      if (in_valid && in_ready) in_cnt++;
      if (!in_valid || in_ready) begin
        if (pts.size() > 0 && (fast || $urandom_range(0, 2) != 0)) begin
          in_valid <= 1'b1;
          in_data  <= pts.pop_front();
        end else begin
          in_valid <= 1'b0;
        end
      end
      out_ready <= (out_cnt >= NS_RANDOM * 1024) || ($urandom_range(0, 3) != 0);
      if (out_valid && out_ready) begin
        int s, k;
        s = out_cnt / 1024;
        k = out_cnt % 1024;
        checks++;
        if (out_data !== exp_sc[s][k] || out_last !== (k == 1023)) begin
          failures++;
          if (failures < 10)
            $display("sym %0d sc %0d: got %h last %b want %h", s, k, out_data,
                     out_last, exp_sc[s][k]);
        end
        if (s == 0 && out_data == '0) zeros++;
        if (out_cnt == (NS_RANDOM + 1) * 1024) t_fast_start = cyc;
        out_cnt++;
        if (out_cnt == NS * 1024) begin
          t_end = cyc;
          checks++;
          if (zeros != 424) begin
            failures++;
            $display("zero subcarriers %0d, want 424", zeros);
          end
          // symbols after the first fast one stream back to back
          checks++;
          if (t_end - t_fast_start + 1 > (NS_FAST - 1) * 1024 + 4) begin
            failures++;
            $display("fast symbols took %0d cycles", t_end - t_fast_start + 1);
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

endmodule
