// fir_lpf: direct-form FIR low-pass filter, NTAPS taps with integer
// coefficients, computing y(n) = sum_{j=0}^{NTAPS-1} c(j) * x(n-j).
//
// Structure: a delay line of NTAPS registers of DW bits, shifted once per
// input sample (the z^-1 elements, one sampling period each), one constant
// multiplier per tap and an adder over all products. All taps are multiplied
// in parallel; the sum is registered on the clock edge after the shift, so
// the adder has the whole sampling period (25 clocks at 50 MHz / 2 MHz) to
// settle and must be constrained as a multicycle path when run at full rate.
//
// Coefficients: c(j) = round(CMAX * h(j-(NTAPS-1)/2) / h(0)) with h the ideal
// low-pass response of cut-off FCUT_HZ at sampling rate FSAM_HZ
// (fir_pkg::lpf_coeff), rectangular window. With the defaults (201 taps,
// 100 kHz at 2 MHz, CMAX = 127) the centre tap is 127, the outer taps 0 and
// the sum of all coefficients (the DC gain) 1255.
//
// Samples arrive offset binary (0..2^DW-1, mid-scale 2^(DW-1)); inverting the
// MSB turns them into two's complement (-2^(DW-1)..2^(DW-1)-1) before they
// enter the delay line, so the output carries no DC offset.
//
// Interface: clk, active-low synchronous reset rst_n (clears the delay line
// and the output), x_valid (one-cycle strobe), x_in[DW-1:0]; outputs
// y_out (signed, ACC_W bits, full precision, no rounding) and y_valid, a
// one-cycle pulse two clocks after x_valid (one to shift, one to add). y_out holds until the next pulse.
// Filter length, coefficient formula and widths follow the design
// description; the offset-binary conversion, the output width and the
// register placement are this design's own choices.
module fir_lpf
  import fir_pkg::lpf_coeff;
#(
  parameter int unsigned NTAPS   = 201,
  parameter int unsigned DW      = 8,
  parameter int unsigned CW      = 8,
  parameter int unsigned ACC_W   = DW + CW + $clog2(NTAPS),
  parameter int unsigned FCUT_HZ = 100_000,
  parameter int unsigned FSAM_HZ = 2_000_000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    x_valid,
  input  logic [DW-1:0]           x_in,
  output logic signed [ACC_W-1:0] y_out,
  output logic                    y_valid
);

  localparam real FC_OVER_FS = real'(FCUT_HZ) / real'(FSAM_HZ);
  localparam int  CMAX       = (1 << (CW - 1)) - 1;

  logic signed [DW-1:0]    taps [NTAPS];   // taps[j] = x(n-j)
  logic signed [ACC_W-1:0] prod [NTAPS];
  logic signed [ACC_W-1:0] sum;
  logic                    shifted;

  // Delay line.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < NTAPS; j++) taps[j] <= '0;
    end else if (x_valid) begin
      taps[0] <= {~x_in[DW-1], x_in[DW-2:0]};
      for (int j = 1; j < NTAPS; j++) taps[j] <= taps[j-1];
    end
  end

  // One constant multiplier per tap.
  for (genvar j = 0; j < NTAPS; j++) begin : g_tap
    localparam int C = lpf_coeff(j, NTAPS, FC_OVER_FS, CMAX);
    localparam logic signed [CW-1:0] COEF = CW'(C);
    assign prod[j] = ACC_W'(taps[j]) * ACC_W'(COEF);
  end

  // Adder over all products.
  always_comb begin
    sum = '0;
    for (int j = 0; j < NTAPS; j++) sum += prod[j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shifted <= 1'b0;
      y_valid <= 1'b0;
      y_out   <= '0;
    end else begin
      shifted <= x_valid;
      y_valid <= shifted;
      if (shifted) y_out <= sum;
    end
  end

endmodule
