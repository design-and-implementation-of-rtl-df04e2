// sine_rom: 2^AW x DW look-up table holding one period of a sinusoid as
// unsigned (offset-binary) samples, the waveform memory of the input DDFS.
//
// Entry i holds round((2^DW - 1)/2 * (1 + sin(2*pi*i / 2^AW))), so for the
// default 8192 x 8 table the values span 0..255 with the mid-scale at 127.5.
// The table is computed when the memory is initialised, from the formula
// above; it maps onto a block-RAM ROM.
//
// Interface: clk, addr[AW-1:0]; data[DW-1:0] is registered, valid one clock
// after the address (synchronous read, as FPGA block RAM requires).
// Size and value range follow the design description; the exact offset and
// rounding of the stored samples are this design's own choice.
module sine_rom #(
  parameter int unsigned AW = 13,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);

  localparam int unsigned DEPTH = 1 << AW;
  localparam real         PI    = 3.14159265358979323846;
  localparam real         HALF  = ((2.0 ** DW) - 1.0) / 2.0;

  logic [DW-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++)
      rom[i] = DW'($rtoi(HALF * (1.0 + $sin(2.0 * PI * i / DEPTH)) + 0.5));
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
