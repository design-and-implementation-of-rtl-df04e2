// tone_select: chooses the frequency code of the input DDFS.
//
// Three preset codes give the test tones of the design, 50, 100 and 102 kHz at
// a 2 MHz sampling rate (code = f * 2^24 / 2 MHz). The fourth setting passes
// an external 24-bit code through, so any tone from 0 to 1 MHz in steps of
// 2 MHz / 2^24 can be produced.
//
// Interface: sel (fir_pkg::tone_sel_e), ext_code; code is combinational.
// The preset codes follow the design description; the selector and the
// external-code setting are this design's own way of changing the tone.
module tone_select
  import fir_pkg::*;
(
  input  tone_sel_e            sel,
  input  logic [PHASE_W-1:0]   ext_code,
  output logic [PHASE_W-1:0]   code
);

  always_comb begin
    unique case (sel)
      TONE_50K:  code = CODE_50K;
      TONE_100K: code = CODE_100K;
      TONE_102K: code = CODE_102K;
      default:   code = ext_code;
    endcase
  end

endmodule
