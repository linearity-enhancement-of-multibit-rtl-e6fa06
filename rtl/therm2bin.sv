// therm2bin: thermometer-to-binary encoder.
//
// Turns the M-digit thermometer code of the flash quantizer into the CODE_W-bit
// binary code y(n) = number of digits that are 1. It is built as a ones
// counter rather than a transition detector, so a bubble in the thermometer
// code still yields the number of DAC elements actually switched on; the
// pointer then moves by exactly the number of elements used. That choice of
// circuit is this design's; only the encoder's function is fixed.
//
// Ports: therm (M digits, digit 0 = lowest level), bin (CODE_W bits).
// Purely combinational.
module therm2bin #(
  parameter int unsigned CODE_W = pdwa_pkg::CODE_W,
  parameter int unsigned M      = (1 << CODE_W) - 1
) (
  input  logic [M-1:0]      therm,
  output logic [CODE_W-1:0] bin
);
  always_comb begin
    bin = '0;
    for (int i = 0; i < M; i++)
      bin = bin + CODE_W'(therm[i]);
  end
endmodule
