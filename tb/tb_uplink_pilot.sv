// tb_uplink_pilot: self-checking test of the pilot symbol generator.
//
// Collects pilot symbols for users 0, 1, 2, 3 and then random users, with
// random back-pressure, and with user_id changed in the middle of each
// symbol (the change must wait for the next symbol). The next symbol's user
// is set together with the handshake of the current symbol's last value. The reference scatters
// the user's 150 table entries: pilot j of user u sits at data position
// m = 4j + u, i.e. subcarrier 724 + m for m < 300 and m - 299 otherwise; the
// table values are regenerated from the PN9 recurrence. It also checks the
// corner positions of the pilot pattern (user 0 on 724, 1020, 1, 297; user 3
// on 727, 1023, 4, 300), 150 pilots per symbol and out_last.
module tb_uplink_pilot;
  import ue_pkg::*;

  localparam int NSYM = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] user_id = 2'd0;
  logic out_ready = 1'b0;
  logic out_valid, out_last;
  cplx_t out_data;

  int checks = 0, failures = 0;

  uplink_pilot dut (.*);

  always #5 clk = ~clk;

  cplx_t rom [600];
  cplx_t exp_sc [1024];
  int    users [NSYM];
  int    k = 0, sym = 0, nz = 0;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void build(int u);
    int m;
    for (int i = 0; i < 1024; i++) exp_sc[i] = '0;
    for (int j = 0; j < 150; j++) begin
      m = 4 * j + u;
      exp_sc[(m < 300) ? 724 + m : m - 299] = rom[u * 150 + j];
    end
  endfunction

  initial begin
    bit o [1200];
    int a;
    for (int n = 0; n < 9; n++) o[n] = 1'b1;
    for (int n = 9; n < 1200; n++) o[n] = o[n-9] ^ o[n-5];
    a = $rtoi(16384.0 / $sqrt(2.0) + 0.5);
    for (int e = 0; e < 600; e++) begin
      rom[e].re = sample_t'(o[2*e] ? a : -a);
      rom[e].im = sample_t'(o[2*e+1] ? a : -a);
    end
    for (int s = 0; s < NSYM; s++) users[s] = (s < 4) ? s : $urandom_range(0, 3);
    build(users[0]);
    user_id = 2'(users[0]);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      out_ready <= ($urandom_range(0, 3) != 0);
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== exp_sc[k] || out_last !== (k == 1023)) begin
          failures++;
          if (failures < 10)
            $display("sym %0d user %0d sc %0d: got %h want %h", sym, users[sym],
                     k, out_data, exp_sc[k]);
        end
        if (out_data != '0) nz++;
        // printed corner positions of the pattern
        if (users[sym] == 0 && (k == 724 || k == 1020 || k == 1 || k == 297)) begin
          checks++;
          if (out_data == '0) failures++;
        end
        if (users[sym] == 3 && (k == 727 || k == 1023 || k == 4 || k == 300)) begin
          checks++;
          if (out_data == '0) failures++;
        end
        if (k == 100) user_id <= 2'(users[sym] + 1);  // must not take effect
        if (k == 1023) begin
          checks++;
          if (nz != 150) begin
            failures++;
            $display("sym %0d: %0d pilots, want 150", sym, nz);
          end
          nz = 0;
          k = 0;
          sym++;
          if (sym == NSYM) begin
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
          build(users[sym]);
          user_id <= 2'(users[sym]);
        end else begin
          k++;
        end
      end
    end
  end

endmodule
