// lsb_inv_mux: inverter and 2:1 multiplexer on the code's LSB.
//
// Input in0 of the mux is the LSB (BIT1) of the quantizer code, input in1 is
// its inverse; select s0 comes from the inversion timer. Only the LSB of the
// code that updates the index pointer passes through here; the upper bits go
// straight to the adder, and the thermometer code driving the DAC is never
// altered. Combinational.
//
// Ports: lsb (BIT1), s0 (1 = invert), out (to the adder's LSB input).
module lsb_inv_mux (
  input  logic lsb,
  input  logic s0,
  output logic out
);
  logic in0, in1;
  assign in0 = lsb;
  assign in1 = ~lsb;
  always_comb out = s0 ? in1 : in0;
endmodule
