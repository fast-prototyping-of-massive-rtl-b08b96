// tb_stream_fifo: self-checking test of the 3600-deep stream FIFO.
//
// Phase 1 fills the FIFO with the output blocked and checks that exactly
// DEPTH words (plus the output register) are taken before in_ready drops.
// Phase 2 drains it. Phase 3 runs random traffic on both sides. Every word
// read is compared in order with a reference queue.
module tb_stream_fifo;

  localparam int W = 32, D = 3600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b0;
  logic [W-1:0] in_data = '0;
  logic in_ready, out_valid;
  logic [W-1:0] out_data;
  logic [$clog2(D+2)-1:0] level;

  int checks = 0, failures = 0;

  stream_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] ref_q [$];
  int  accepted = 0, popped = 0;
  int  phase = 0;
  int  max_level = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        ref_q.push_back(in_data);
        accepted++;
      end
      if (out_valid && out_ready) begin
        checks++;
        if (ref_q.size() == 0 || out_data !== ref_q[0]) begin
          failures++;
          $display("read %0d: got %h", popped, out_data);
        end
        if (ref_q.size() > 0) void'(ref_q.pop_front());
        popped++;
      end
      if (int'(level) > max_level) max_level = int'(level);
      case (phase)
        1: begin in_valid <= 1'b1; in_data <= $urandom; out_ready <= 1'b0; end
        2: begin in_valid <= 1'b0; out_ready <= 1'b1; end
        3: begin
          if (!in_valid || in_ready) begin
            in_valid <= ($urandom_range(0, 1) == 1);
            in_data  <= $urandom;
          end
          out_ready <= ($urandom_range(0, 2) != 0);
        end
        default: begin in_valid <= 1'b0; out_ready <= 1'b0; end
      endcase
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    phase = 1;
    repeat (D + 50) @(posedge clk);
    #1;
    checks++;
    if (accepted != D + 1 || in_ready || level != ($clog2(D+2))'(D + 1)) begin
      failures++;
      $display("full: accepted %0d level %0d in_ready %0b", accepted, level, in_ready);
    end
    phase = 2;
    repeat (D + 50) @(posedge clk);
    #1;
    checks++;
    if (popped != D + 1 || out_valid || level != 0) begin
      failures++;
      $display("drain: popped %0d", popped);
    end
    phase = 3;
    repeat (20000) @(posedge clk);
    phase = 2;
    repeat (D + 50) @(posedge clk);
    #1;
    checks++;
    if (popped != accepted || popped < D + 5000) begin
      failures++;
      $display("random: accepted %0d popped %0d", accepted, popped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
