// stream_fifo: synchronous first-in first-out buffer on valid/ready streams.
//
// Decouples the constellation mapper from the subcarrier mapper. Its depth
// of 3600 entries (six data symbols of 600 points, one slot's worth) is the
// stream depth the transmitter uses between those two stages, so the mapper
// can run ahead by a whole slot without a deadlock. The storage is a
// single-port-write, single-port-read array with a registered read
// (first-word fall-through is not used): out_valid/out_data are registers
// refilled from the array whenever the output word is taken or empty.
// Latency from an accepted input to out_valid is two cycles when the FIFO
// is empty. in_ready is low when DEPTH words are stored.
module stream_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 3600
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+2)-1:0] level
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [$clog2(DEPTH+1)-1:0] count;   // words in the array
  logic             push, pop;

  assign in_ready = (32'(count) < DEPTH);
  assign push     = in_valid && in_ready;
  assign pop      = (count != '0) && (!out_valid || out_ready);
  assign level    = ($clog2(DEPTH+2))'(count) + ($clog2(DEPTH+2))'(out_valid);

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (push) wptr <= (32'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      if (pop) begin
        rptr     <= (32'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
        out_data <= mem[rptr];
      end
      if (pop) out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
      if (push && !pop) count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

endmodule
