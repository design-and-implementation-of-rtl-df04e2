// tb_tone_select: self-checking test of the tone selector. Each preset must
// give f * 2^24 / 2 MHz for 50, 100 and 102 kHz (rounded to the nearest
// integer, computed here), and the external setting must pass random codes.
module tb_tone_select;
  import fir_pkg::*;
  tone_sel_e sel;
  logic [23:0] ext_code, code;
  int checks = 0, failures = 0;

  tone_select dut (.*);

  function automatic int code_of(real f);
    return int'($floor(f * 16777216.0 / 2.0e6 + 0.5));
  endfunction

  task automatic check(int exp, string what);
    #1;
    checks++;
    if (int'(code) != exp) begin
      failures++;
      $display("%s: code %0d expected %0d", what, code, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      ext_code = 24'($urandom);
      sel = TONE_50K;  check(code_of(50.0e3),  "50 kHz");
      sel = TONE_100K; check(code_of(100.0e3), "100 kHz");
      sel = TONE_102K; check(code_of(102.0e3), "102 kHz");
      sel = TONE_EXT;  check(int'(ext_code),   "external");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
