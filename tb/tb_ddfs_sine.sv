// tb_ddfs_sine: self-checking test of the sine DDFS. Strobes arrive every 25
// clocks (a 2 MHz rate at 50 MHz) with the 50 kHz code and then random codes.
// A reference accumulator and sine formula predict every sample; the test
// also checks that sample_valid comes exactly two clocks after each strobe
// and never otherwise, and that a 50 kHz tone repeats every 40 samples.
module tb_ddfs_sine;
  localparam int PW = 24, AW = 13, DW = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [PW-1:0] code = '0;
  logic [DW-1:0] sample;
  logic sample_valid;
  int checks = 0, failures = 0;

  ddfs_sine #(.PHASE_W(PW), .AW(AW), .DW(DW)) dut (.*);

  always #10 clk = ~clk;

  function automatic int sine_of(logic [PW-1:0] ph);
    real s;
    s = 127.5 + 127.5 * $sin(6.283185307179586 * real'(ph[PW-1 -: AW]) / 8192.0);
    return int'($floor(s + 0.5));
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("%s", msg);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Valid must follow each strobe by exactly two clocks.
  logic [1:0] en_hist = '0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (sample_valid !== en_hist[1]) fail($sformatf("valid %b expected %b", sample_valid, en_hist[1]));
    end
    en_hist <= {en_hist[0], en};
  end

  initial begin
    logic [PW-1:0] ref_phase;
    int first [40];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    ref_phase = '0;
    for (int n = 0; n < 1500; n++) begin
      code <= (n < 200) ? 24'd419430 : 24'($urandom);
      repeat (24) @(posedge clk);
      en <= 1'b1;
      @(posedge clk);
      en <= 1'b0;
      ref_phase = ref_phase + code;
      @(posedge clk); #1;
      checks++;
      if (!sample_valid) fail("no sample_valid two clocks after strobe");
      checks++;
      if (int'(sample) != sine_of(ref_phase))
        fail($sformatf("sample %0d: got %0d expected %0d", n, sample, sine_of(ref_phase)));
      if (n < 40) first[n] = int'(sample);
      else if (n < 80) begin
        checks++;
        if (int'(sample) - first[n-40] > 1 || first[n-40] - int'(sample) > 1)
          fail($sformatf("50 kHz tone not periodic at sample %0d", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
