// tb_phase_accumulator: self-checking test of the DDFS phase accumulator.
// Phase 1 drives random codes and a random enable and compares phase and
// carry with a reference model every cycle. Phase 2 runs the 2 MHz sampling
// code 671089 with the enable high for 25,000 clocks (0.5 ms at 50 MHz) and
// checks that it gives 1000 +/- 1 strobes spaced 24 or 25 clocks apart.
module tb_phase_accumulator;
  localparam int W = 24;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] code = '0, phase;
  logic carry;
  int checks = 0, failures = 0;

  phase_accumulator #(.W(W)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] ref_phase;
    logic       ref_carry;
    int n_strobe, last, gap;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    ref_phase = '0;
    ref_carry = 1'b0;
    // Phase 1: random codes and enable.
    for (int i = 0; i < 3000; i++) begin
      en   <= ($urandom_range(0, 3) != 0);
      code <= W'($urandom);
      @(posedge clk);
      ref_carry = en && ((ref_phase[W-1:0] + {1'b0, code}) >= (1 << W));
      if (en) ref_phase = {1'b0, ref_phase[W-1:0] + code};
      #1;
      checks++;
      if (phase !== ref_phase[W-1:0] || carry !== ref_carry) begin
        failures++;
        if (failures < 10)
          $display("mismatch %0d: phase %h exp %h carry %b exp %b",
                   i, phase, ref_phase[W-1:0], carry, ref_carry);
      end
    end
    // Phase 2: sampling strobe at 2 MHz from 50 MHz.
    en <= 1'b1;
    code <= 24'd671089;
    @(posedge clk);
    n_strobe = 0; last = -1;
    for (int c = 0; c < 25000; c++) begin
      @(posedge clk); #1;
      if (carry) begin
        if (last >= 0) begin
          gap = c - last;
          checks++;
          if (gap != 25 && gap != 24) begin
            failures++;
            $display("strobe gap %0d", gap);
          end
        end
        last = c;
        n_strobe++;
      end
    end
    checks++;
    if (n_strobe < 999 || n_strobe > 1001) begin
      failures++;
      $display("strobe count %0d, expected 1000", n_strobe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
