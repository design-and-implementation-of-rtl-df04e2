// tb_fir_lpf_system: end-to-end test of the FIR low-pass filter system at its
// default size (201 taps, 24-bit DDFS, 8192 x 8 sine table, 50 MHz clock).
//
// The system runs four tones in turn, switching on the fly: 50 kHz (pass
// band), 100 kHz (cut-off), 102 kHz (just above cut-off) and an external
// code for 10 kHz. Independent reference models follow it sample by sample:
//   - the 2 MHz strobe: gaps of 24 or 25 clocks;
//   - the tone: a reference phase accumulator and sine formula predict each
//     input sample, which must appear two clocks after its strobe;
//   - the filter: the direct convolution with coefficients computed here
//     predicts each output, which must appear two clocks after its input.
// Once the filter has settled on a tone, the output amplitude is measured and
// compared with 127.5 * |H(f)| (within 3 %), and the attenuation of 102 kHz
// against 50 kHz must be 10.6 +/- 1 dB. Each mechanism (strobe, tone switch,
// external code, pass-band tone, stop-band attenuation) is counted; one that
// never happens counts as a failure.
module tb_fir_lpf_system;
  import fir_pkg::*;
  localparam int N = 201;
  localparam int SAMPLES_PER_TONE = 700;
  localparam int SETTLE = 260;
  localparam real PI2 = 6.283185307179586;

  logic clk = 1'b0, rst_n = 1'b0;
  tone_sel_e tone_sel = TONE_50K;
  logic [23:0] ext_code = 24'd83886;          // 10 kHz at 2 MHz
  logic sample_strobe, x_valid, y_valid;
  logic [7:0] x_sample;
  logic signed [23:0] y_out;
  int checks = 0, failures = 0;

  fir_lpf_system dut (.*);

  always #10 clk = ~clk;                       // 50 MHz with 1 ps units: 20 ps

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("%s", msg);
  endtask

  initial begin
    repeat (90000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference models ---------------------------------------------------
  int c [N];
  function automatic int coef(int n);
    int k;
    real h;
    k = n - 100;
    h = (k == 0) ? 0.1 : $sin(0.1 * 3.141592653589793 * k) / (3.141592653589793 * k);
    return int'($floor(1270.0 * h + 0.5));
  endfunction

  function automatic int code_of(tone_sel_e s, logic [23:0] ext);
    case (s)
      TONE_50K:  return 419430;
      TONE_100K: return 838861;
      TONE_102K: return 855638;
      default:   return int'(ext);
    endcase
  endfunction

  function automatic real gain_at(real f);
    real re, im;
    re = 0.0; im = 0.0;
    for (int n = 0; n < N; n++) begin
      re += c[n] * $cos(PI2 * f / 2.0e6 * n);
      im -= c[n] * $sin(PI2 * f / 2.0e6 * n);
    end
    return $sqrt(re * re + im * im);
  endfunction

  logic [23:0] ref_phase = '0;
  int  exp_x [$];
  longint exp_y [$];
  int  hist [$];
  int  n_strobe = 0, n_x = 0, n_y = 0, last_strobe = -1, cyc = 0;
  int  n_switch = 0, n_ext = 0, n_pass = 0, n_stop = 0;
  logic [4:0] strobe_hist = '0, xv_hist = '0;
  int  seg_samples = 0;
  longint ymax, ymin;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      // strobe spacing
      if (sample_strobe) begin
        if (last_strobe >= 0) begin
          checks++;
          if (cyc - last_strobe != 25 && cyc - last_strobe != 24)
            fail($sformatf("strobe gap %0d", cyc - last_strobe));
        end
        last_strobe = cyc;
        n_strobe++;
        ref_phase = ref_phase + 24'(code_of(tone_sel, ext_code));
        exp_x.push_back(int'($floor(127.5 + 127.5 *
                        $sin(PI2 * real'(ref_phase[23:11]) / 8192.0) + 0.5)));
        if (tone_sel == TONE_EXT) n_ext++;
      end
      // latencies
      checks += 2;
      if (x_valid !== strobe_hist[1]) fail("x_valid not two clocks after strobe");
      if (y_valid !== xv_hist[1])     fail("y_valid not two clocks after x_valid");
      // input samples
      if (x_valid) begin
        longint acc;
        n_x++;
        checks++;
        if (exp_x.size() == 0) fail("unexpected x_valid");
        else begin
          int e;
          e = exp_x.pop_front();
          if (int'(x_sample) != e) fail($sformatf("x sample %0d: got %0d exp %0d", n_x, x_sample, e));
        end
        hist.push_front(int'(x_sample) - 128);
        if (hist.size() > N) void'(hist.pop_back());
        acc = 0;
        for (int j = 0; j < hist.size(); j++) acc += longint'(c[j]) * hist[j];
        exp_y.push_back(acc);
      end
      // output samples
      if (y_valid) begin
        longint e;
        n_y++;
        checks++;
        if (exp_y.size() == 0) fail("unexpected y_valid");
        else begin
          e = exp_y.pop_front();
          if (longint'(y_out) != e) fail($sformatf("y sample %0d: got %0d exp %0d", n_y, y_out, e));
        end
        seg_samples++;
        if (seg_samples > SETTLE) begin
          if (longint'(y_out) > ymax) ymax = longint'(y_out);
          if (longint'(y_out) < ymin) ymin = longint'(y_out);
        end
      end
    end
    strobe_hist <= {strobe_hist[3:0], sample_strobe};
    xv_hist     <= {xv_hist[3:0], x_valid};
  end

  // Run one tone until SAMPLES_PER_TONE outputs were seen; return amplitude.
  task automatic run_tone(tone_sel_e s, real f, output real amp);
    real expect_amp;
    if (s != tone_sel) n_switch++;
    tone_sel = s;
    seg_samples = 0;
    ymax = -(64'sd1 <<< 40);
    ymin =  (64'sd1 <<< 40);
    while (seg_samples < SAMPLES_PER_TONE) @(posedge clk);
    amp = real'(ymax - ymin) / 2.0;
    expect_amp = 127.5 * gain_at(f);
    checks++;
    if (amp < 0.97 * expect_amp || amp > 1.03 * expect_amp)
      fail($sformatf("%0.0f Hz: amplitude %0.1f expected %0.1f", f, amp, expect_amp));
    $display("tone %0.0f Hz: output amplitude %0.1f (expected %0.1f, %0.2f dB re DC gain)",
             f, amp, expect_amp, 20.0 * $log10(amp / (127.5 * 1255.0)));
  endtask

  initial begin
    real a50, a100, a102, a10;
    for (int n = 0; n < N; n++) c[n] = coef(n);
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    run_tone(TONE_50K,  50.0e3,  a50);
    run_tone(TONE_100K, 100.0e3, a100);
    run_tone(TONE_102K, 102.0e3, a102);
    run_tone(TONE_EXT,  10.0e3,  a10);
    if (a50 > 0.9 * 127.5 * 1255.0) n_pass++;
    if (a102 < a50 / 2.0 && a100 < a50 / 1.5) n_stop++;
    checks++;
    if (20.0 * $log10(a102 / a50) > -9.6 || 20.0 * $log10(a102 / a50) < -11.6)
      fail($sformatf("102 kHz vs 50 kHz: %0.2f dB", 20.0 * $log10(a102 / a50)));
    $display("102 kHz relative to 50 kHz: %0.2f dB", 20.0 * $log10(a102 / a50));
    $display("mechanisms: strobes=%0d tone_switches=%0d ext_code_samples=%0d pass_band=%0d stop_band=%0d",
             n_strobe, n_switch, n_ext, n_pass, n_stop);
    checks += 5;
    if (n_strobe == 0) fail("no sampling strobe");
    if (n_switch < 3)  fail("tone switches missing");
    if (n_ext == 0)    fail("external code never used");
    if (n_pass == 0)   fail("pass-band tone not passed");
    if (n_stop == 0)   fail("stop-band tone not attenuated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
