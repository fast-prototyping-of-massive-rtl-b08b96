// tb_frame_formatter: self-checking test of the slot assembly.
//
// A pilot source and a data source, both with random gaps, carry tagged
// values (the pilot source counts from 0x10000, the data source from
// 0x20000). Over two slots with random back-pressure the output must be:
// symbol 0 = the next 1024 pilot values, symbols 1..6 = the next 6 x 1024
// data values, symbols 7..13 = zeros; out_last on every 1024th value,
// out_slot_last on the last value of each slot, out_sym the symbol number.
module tb_frame_formatter;
  import ue_pkg::*;

  localparam int SLOTS = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pilot_valid = 1'b0, data_valid = 1'b0, out_ready = 1'b0;
  cplx_t pilot_data = '0, data_data = '0;
  logic pilot_ready, data_ready, out_valid, out_last, out_slot_last;
  cplx_t out_data;
  logic [3:0] out_sym;

  int checks = 0, failures = 0;

  frame_formatter dut (.*);

  always #5 clk = ~clk;

  int pcnt = 0, dcnt = 0;     // values taken from each source
  int exp_p = 0, exp_d = 0;   // next value expected from each source
  int n = 0;
  int n_pilot = 0, n_data = 0, n_zero = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (pilot_valid && pilot_ready) pcnt++;
      if (data_valid && data_ready) dcnt++;
      if (!pilot_valid || pilot_ready) begin
        pilot_valid <= ($urandom_range(0, 2) != 0);
        pilot_data  <= cplx_t'(32'h10000 + pcnt);
      end
      if (!data_valid || data_ready) begin
        data_valid <= ($urandom_range(0, 2) != 0);
        data_data  <= cplx_t'(32'h20000 + dcnt);
      end
      out_ready <= ($urandom_range(0, 3) != 0);
      if (out_valid && out_ready) begin
        int s, k;
        cplx_t want;
        s = (n / 1024) % 14;
        k = n % 1024;
        if (s == 0) begin
          want = cplx_t'(32'h10000 + exp_p);
          exp_p++;
          n_pilot++;
        end else if (s <= 6) begin
          want = cplx_t'(32'h20000 + exp_d);
          exp_d++;
          n_data++;
        end else begin
          want = '0;
          n_zero++;
        end
        checks++;
        if (out_data !== want || out_last !== (k == 1023) || int'(out_sym) != s
            || out_slot_last !== (k == 1023 && s == 13)) begin
          failures++;
          if (failures < 10)
            $display("value %0d (sym %0d): got %h sym %0d last %b/%b want %h",
                     n, s, out_data, out_sym, out_last, out_slot_last, want);
        end
        n++;
        if (n == SLOTS * 14 * 1024) begin
          checks++;
          if (n_pilot != SLOTS * 1024 || n_data != SLOTS * 6 * 1024 ||
              n_zero != SLOTS * 7 * 1024) begin
            failures++;
            $display("counts %0d %0d %0d", n_pilot, n_data, n_zero);
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

endmodule
