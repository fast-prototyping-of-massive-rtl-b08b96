// tb_pilot_rom: self-checking test of the 600-entry pilot table.
//
// Regenerates the PN9 bit sequence in recurrence form, o(n+9) = o(n) xor
// o(n+4) with o(0..8) = 1, and checks all 600 entries: entry a has in-phase
// sign o(2a) and quadrature sign o(2a+1) (1 = positive) at amplitude
// round(2^14/sqrt(2)). Also checks that every pilot has unit magnitude, that
// both signs occur for each part, and that addresses past the end read 0.
module tb_pilot_rom;
  import ue_pkg::*;

  logic [9:0] addr = '0;
  cplx_t      data;

  int checks = 0, failures = 0;

  pilot_rom dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit o [1200];
    int a_val, npos;
    real mag;
    for (int n = 0; n < 9; n++) o[n] = 1'b1;
    for (int n = 9; n < 1200; n++) o[n] = o[n-9] ^ o[n-5];
    a_val = $rtoi(16384.0 / $sqrt(2.0) + 0.5);
    npos = 0;
    for (int a = 0; a < 600; a++) begin
      addr = 10'(a);
      #1;
      checks++;
      if (int'(data.re) != (o[2*a] ? a_val : -a_val) ||
          int'(data.im) != (o[2*a+1] ? a_val : -a_val)) begin
        failures++;
        if (failures < 10) $display("entry %0d: got %0d,%0d", a, data.re, data.im);
      end
      mag = $sqrt(real'(data.re) ** 2 + real'(data.im) ** 2) / 16384.0;
      checks++;
      if (mag < 0.999 || mag > 1.001) failures++;
      if (data.re > 0) npos++;
    end
    checks++;
    if (npos < 200 || npos > 400) begin
      failures++;
      $display("unbalanced signs: %0d positive", npos);
    end
    for (int a = 600; a < 1024; a += 17) begin
      addr = 10'(a);
      #1;
      checks++;
      if (data != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
