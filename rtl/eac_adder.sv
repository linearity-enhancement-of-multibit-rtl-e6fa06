// eac_adder: CODE_W-bit adder with end-around carry (modulo 2**CODE_W - 1).
//
// Computes next_ptr = (ptr + y) mod M with M = 2**CODE_W - 1 by adding the
// two CODE_W-bit words and feeding the carry out back into the LSB, as in a
// ones'-complement adder. The result is always < 2**CODE_W: it may be the
// all-ones word, which stands for zero mod M. The rotator downstream rotates
// an M-digit word, where a rotation by M is the identity, so that second
// zero needs no correction. Both inputs may take any CODE_W-bit value,
// including all ones. The end-around-carry adder is the source circuit's;
// keeping the all-ones result uncorrected is this design's choice.
// Combinational.
//
// Ports: ptr (current index pointer), y (code after the LSB mux),
// next_ptr (pointer for the next cycle), cout (carry out of the first add).
module eac_adder #(
  parameter int unsigned CODE_W = pdwa_pkg::CODE_W
) (
  input  logic [CODE_W-1:0] ptr,
  input  logic [CODE_W-1:0] y,
  output logic [CODE_W-1:0] next_ptr,
  output logic              cout
);
  logic [CODE_W:0] sum;
  always_comb begin
    sum      = {1'b0, ptr} + {1'b0, y};
    cout     = sum[CODE_W];
    // The carry re-enters at the LSB; this second add cannot carry again.
    next_ptr = sum[CODE_W-1:0] + CODE_W'(cout);
  end
endmodule
