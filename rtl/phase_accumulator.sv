// phase_accumulator: the accumulator of a direct digital frequency
// synthesiser (DDFS).
//
// On every clock edge with `en` high the W-bit phase register advances by the
// frequency code: phase <= phase + code (mod 2^W). The output frequency is
// f = code * f_en / 2^W, where f_en is the rate at which `en` is high, so the
// frequency step is f_en / 2^W (about 3 Hz for W = 24 at 50 MHz).
//
// `carry` is a one-cycle pulse, registered together with the phase, that is
// high in the cycle after an update that wrapped the phase through zero. With
// en tied high and code = f_out * 2^W / f_clk it is a strobe at f_out, which
// is how the 2 MHz sampling strobe is made from the 50 MHz clock.
//
// Interface: clk, active-low synchronous reset rst_n (clears the phase),
// en, code[W-1:0]; outputs phase[W-1:0] and carry. One cycle latency.
// The accumulator itself follows the design description; using the wrap-around
// as the strobe and the reset behaviour are this design's own choices.
module phase_accumulator #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] code,
  output logic [W-1:0] phase,
  output logic         carry
);

  logic [W:0] sum;

  always_comb sum = {1'b0, phase} + {1'b0, code};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      carry <= 1'b0;
    end else begin
      carry <= en & sum[W];
      if (en) phase <= sum[W-1:0];
    end
  end

endmodule
