// tb_sine_rom: self-checking test of the 8192 x 8 sine table. Every address
// is read and compared with round(127.5 * (1 + sin(2*pi*i/8192))) computed
// here; the quarter-period points (0 -> 128, 2048 -> 255, 6144 -> 0) are also
// checked as literals, and the read latency of one clock is checked.
module tb_sine_rom;
  localparam int AW = 13, DW = 8, DEPTH = 1 << AW;
  logic clk = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] data;
  int checks = 0, failures = 0;

  sine_rom #(.AW(AW), .DW(DW)) dut (.*);

  always #10 clk = ~clk;

  function automatic int expected(int i);
    real s;
    s = 127.5 + 127.5 * $sin(6.283185307179586 * i / DEPTH);
    return int'($floor(s + 0.5));
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      addr <= AW'(i);
      @(posedge clk); #1;
      check(int'(data), expected(i), $sformatf("addr %0d", i));
    end
    // Literal anchors.
    addr <= 13'd2048; @(posedge clk); #1; check(int'(data), 255, "peak");
    addr <= 13'd6144; @(posedge clk); #1; check(int'(data), 0, "trough");
    addr <= 13'd0;    @(posedge clk); #1; check(int'(data), 128, "zero");
    // Latency: data must not change before the clock edge.
    addr <= 13'd2048; @(posedge clk); #1;
    addr <= 13'd6144; #5;
    check(int'(data), 255, "read latency");
    @(posedge clk); #1;
    check(int'(data), 0, "read after edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
