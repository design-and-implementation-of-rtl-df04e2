// fir_lpf_system: complete FIR low-pass filter test system - a sampling
// strobe generator, a DDFS test-tone source and a 201-tap FIR low-pass filter,
// all running from one 50 MHz clock.
//
//   clk (50 MHz)
//     -> phase_accumulator, code CODE_FSAM = 671089, en tied high:
//        its wrap-around is a one-cycle strobe at 2 MHz (every 25 clocks)
//     -> ddfs_sine, stepped once per strobe with the code chosen by
//        tone_select (50 / 100 / 102 kHz presets or an external code):
//        8-bit unsigned sine samples 0..255 from an 8192 x 8 ROM
//     -> fir_lpf: 201 taps, cut-off 100 kHz, 8-bit coefficients:
//        signed full-precision output y_out, one value per sample.
//
// The input tone's code is referred to the sampling rate
// (code = f * 2^24 / 2 MHz), so the tone frequency does not depend on the
// exact strobe spacing. A tone at 50 kHz is passed with a gain of about
// 1307 (0.35 dB above the DC gain of 1255); 100 kHz, the cut-off, is
// attenuated by 6 dB and 102 kHz by 10.3 dB relative to DC.
//
// Interface: clk, active-low synchronous reset rst_n, tone_sel
// (fir_pkg::tone_sel_e: 0 = 50 kHz, 1 = 100 kHz, 2 = 102 kHz, 3 = ext_code),
// ext_code[23:0]. Outputs: sample_strobe (2 MHz strobe), x_sample/x_valid
// (the tone fed to the filter, offset binary) and y_out/y_valid (the filter
// output, two's complement, ACC_W bits). y_valid follows x_valid by two clocks
// and sample_strobe by five. The conversion of y_out to an analogue signal
// is left to the board (a DAC is not part of this RTL).
// Frequencies, codes and sizes follow the design description; the port list,
// the external-code setting and the strobe derivation from the accumulator
// carry are this design's own choices.
module fir_lpf_system
  import fir_pkg::*;
#(
  parameter int unsigned          NTAPS     = FIR_TAPS,
  parameter int unsigned          FCUT_HZ   = 100_000,
  parameter int unsigned          FSAM_HZ   = 2_000_000,
  parameter logic [PHASE_W-1:0]   FSAM_CODE = CODE_FSAM,
  parameter int unsigned          Y_W       = DATA_W + COEF_W + $clog2(NTAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  tone_sel_e            tone_sel,
  input  logic [PHASE_W-1:0]   ext_code,
  output logic                 sample_strobe,
  output logic [DATA_W-1:0]    x_sample,
  output logic                 x_valid,
  output logic signed [Y_W-1:0] y_out,
  output logic                 y_valid
);

  logic [PHASE_W-1:0] fsam_phase;
  logic [PHASE_W-1:0] tone_code;

  // 2 MHz sampling strobe: a DDFS whose carry out is the strobe.
  phase_accumulator #(.W(PHASE_W)) u_fsam (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (1'b1),
    .code  (FSAM_CODE),
    .phase (fsam_phase),
    .carry (sample_strobe)
  );

  tone_select u_sel (
    .sel      (tone_sel),
    .ext_code (ext_code),
    .code     (tone_code)
  );

  ddfs_sine #(.PHASE_W(PHASE_W), .AW(ROM_AW), .DW(DATA_W)) u_tone (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (sample_strobe),
    .code         (tone_code),
    .sample       (x_sample),
    .sample_valid (x_valid)
  );

  fir_lpf #(
    .NTAPS   (NTAPS),
    .DW      (DATA_W),
    .CW      (COEF_W),
    .ACC_W   (Y_W),
    .FCUT_HZ (FCUT_HZ),
    .FSAM_HZ (FSAM_HZ)
  ) u_fir (
    .clk     (clk),
    .rst_n   (rst_n),
    .x_valid (x_valid),
    .x_in    (x_sample),
    .y_out   (y_out),
    .y_valid (y_valid)
  );

endmodule
