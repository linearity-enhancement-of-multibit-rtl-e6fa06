// log_shifter: CODE_W-stage logarithmic rotator for the M-digit thermometer code.
//
// Stage k (k = 0..CODE_W-1) rotates its M-digit input towards higher element
// numbers by 2**k positions when bit k of the pointer is 1, and passes it
// straight through otherwise: digit i goes to output i or i + 2**k (mod M).
// Together the stages rotate by ptr, so thermometer digit j drives DAC element
// (ptr + j) mod M and the elements ptr .. ptr+y-1 (mod M) are switched on.
// A rotation by M (pointer all ones) is the identity, as the pointer
// arithmetic expects. The number of ones is preserved: sum(D) = sum(d).
// In the circuit each stage is a pair of pass transistors per digit with
// level restorers after stages 3 and 5; here each stage is a multiplexer.
// Combinational; ptr must be stable while the code passes through.
//
// Ports: d (thermometer code), ptr (rotation amount), dout (element enables).
module log_shifter #(
  parameter int unsigned CODE_W = pdwa_pkg::CODE_W,
  parameter int unsigned M      = (1 << CODE_W) - 1
) (
  input  logic [M-1:0]      d,
  input  logic [CODE_W-1:0] ptr,
  output logic [M-1:0]      dout
);
  logic [M-1:0] stage [CODE_W+1];

  assign stage[0] = d;

  for (genvar k = 0; k < CODE_W; k++) begin : g_stage
    localparam int unsigned SH = (1 << k) % M;
    logic [M-1:0] rot;
    // Rotate towards higher indices by SH: output i takes input i - SH mod M.
    for (genvar i = 0; i < M; i++) begin : g_digit
      assign rot[i] = stage[k][(i + M - SH) % M];
    end
    assign stage[k+1] = ptr[k] ? rot : stage[k];
  end

  assign dout = stage[CODE_W];
endmodule
