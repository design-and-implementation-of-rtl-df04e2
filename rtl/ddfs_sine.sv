// ddfs_sine: direct digital frequency synthesiser for the filter's test
// signal.
//
// A PHASE_W-bit phase accumulator advances by the frequency code on every
// sampling strobe `en`; its top AW bits address a one-period sine table whose
// unsigned DW-bit word is the new input sample. The tone frequency is
// f = code * f_en / 2^PHASE_W, where f_en is the strobe rate (2 MHz in this
// system, so code 419430 gives 50 kHz).
//
// Interface: clk, active-low synchronous reset rst_n, en (one-cycle strobe),
// code[PHASE_W-1:0]; outputs sample[DW-1:0] (offset binary, 0..2^DW-1) and
// sample_valid, a one-cycle pulse two clocks after `en` (one clock for the
// accumulator, one for the synchronous ROM read). `sample` holds its value
// until the next sample_valid.
// Accumulator width, ROM size and word width follow the design description;
// truncating the phase to its top bits (no dithering, no interpolation) and
// the two-cycle latency are this design's own choices.
module ddfs_sine #(
  parameter int unsigned PHASE_W = 24,
  parameter int unsigned AW      = 13,
  parameter int unsigned DW      = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [PHASE_W-1:0] code,
  output logic [DW-1:0]      sample,
  output logic               sample_valid
);

  logic [PHASE_W-1:0] phase;
  logic               en_q;

  phase_accumulator #(.W(PHASE_W)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .code  (code),
    .phase (phase),
    .carry ()
  );

  sine_rom #(.AW(AW), .DW(DW)) u_rom (
    .clk  (clk),
    .addr (phase[PHASE_W-1 -: AW]),
    .data (sample)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      en_q         <= 1'b0;
      sample_valid <= 1'b0;
    end else begin
      en_q         <= en;
      sample_valid <= en_q;
    end
  end

endmodule
