// tb_fir_lpf: self-checking test of the 201-tap FIR low-pass filter.
// The coefficients are worked out here from the low-pass formula and checked
// against eighteen values listed for this filter (taps 0..8 and 92..100).
// Then (1) a unit impulse must reproduce the coefficients one per sample,
// (2) random offset-binary samples must give the direct convolution, and
// (3) full-scale DC input must give -128 * 1255 or 127 * 1255 (DC gain 1255).
// Samples arrive every 4 clocks; y_valid must follow x_valid by two clocks.
module tb_fir_lpf;
  localparam int N = 201, DW = 8, CW = 8, AW = 24;
  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic [DW-1:0] x_in = 8'd128;
  logic signed [AW-1:0] y_out;
  logic y_valid;
  int checks = 0, failures = 0;

  fir_lpf #(.NTAPS(N)) dut (.*);

  always #10 clk = ~clk;

  int c [N];
  int hist [$];                       // signed samples, newest first

  // Reference coefficient: round(127 * h(k) / 0.1), k = n - 100.
  function automatic int coef(int n);
    int k;
    real h;
    k = n - 100;
    h = (k == 0) ? 0.1 : $sin(0.1 * 3.141592653589793 * k) / (3.141592653589793 * k);
    return int'($floor(1270.0 * h + 0.5));
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

  // y_valid exactly two clocks after x_valid.
  logic [1:0] xv_q = '0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (y_valid !== xv_q[1]) fail("y_valid timing");
    end
    xv_q <= {xv_q[0], x_valid};
  end

  // Push one sample and check the output against the convolution.
  task automatic push(int xs);        // xs: signed sample -128..127
    longint acc;
    repeat (2) @(posedge clk);
    x_in <= DW'(xs + 128);
    x_valid <= 1'b1;
    @(posedge clk);
    x_valid <= 1'b0;
    hist.push_front(xs);
    if (hist.size() > N) void'(hist.pop_back());
    acc = 0;
    for (int j = 0; j < hist.size(); j++) acc += longint'(c[j]) * hist[j];
    @(posedge clk); #1;
    checks++;
    if (!y_valid) fail("no y_valid two clocks after x_valid");
    checks++;
    if (longint'(y_out) != acc) fail($sformatf("y %0d expected %0d", y_out, acc));
  endtask

  initial begin
    int listed [18] = '{0, -1, -2, -3, -4, -4, -4, -4, -3,
                        30, 47, 64, 81, 96, 109, 119, 125, 127};
    int sum;
    sum = 0;
    for (int n = 0; n < N; n++) begin c[n] = coef(n); sum += c[n]; end
    for (int i = 0; i < 9; i++) begin
      checks += 2;
      if (c[i] != listed[i])     fail($sformatf("coef %0d = %0d, listed %0d", i, c[i], listed[i]));
      if (c[92+i] != listed[9+i]) fail($sformatf("coef %0d = %0d, listed %0d", 92+i, c[92+i], listed[9+i]));
    end
    checks++;
    if (sum != 1255) fail($sformatf("coefficient sum %0d", sum));

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // (1) unit impulse
    push(1);
    for (int i = 1; i < N + 5; i++) push(0);
    // (2) random
    for (int i = 0; i < 600; i++) push($urandom_range(0, 255) - 128);
    // (3) full-scale DC
    for (int i = 0; i < N; i++) push(127);
    checks++;
    if (y_out != 127 * 1255) fail("positive DC gain");
    for (int i = 0; i < N; i++) push(-128);
    checks++;
    if (y_out != -128 * 1255) fail("negative DC gain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
