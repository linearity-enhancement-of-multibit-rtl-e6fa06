// unit_dac: behavioural model (not synthesizable) of the M-element
// unit-element feedback DAC, with static element mismatch.
//
// Element i has the value U_i = ULSB * (1 + eps_i). The mismatch errors eps_i
// are drawn once, at time zero, from a normal distribution of standard
// deviation SIGMA (0.5 % by default) with a fixed SEED, and are then shifted
// so that they average to zero, which makes ULSB the mean element value. The
// output is the sum of the values of the elements whose enable is 1:
// vout = sum_i en[i] * U_i. SIGMA = 0 gives an ideal DAC. The Gaussian
// generator (a linear congruential sequence and the Box-Muller transform) is
// this model's choice.
//
// Ports: en (M element enables from the element selection logic),
// vout (real, analog output). No clock: the output follows en.
module unit_dac #(
  parameter int unsigned M     = pdwa_pkg::M,
  parameter real         ULSB  = 1.0,
  parameter real         SIGMA = 0.005,
  parameter int unsigned SEED  = 1
) (
  input  logic [M-1:0] en,
  output real          vout
);
  real eps [M];
  bit  eps_ready = 1'b0;

  int unsigned lcg_state;

  function automatic real lcg_uniform();
    lcg_state = lcg_state * 32'd1664525 + 32'd1013904223;
    return (real'(lcg_state >> 8) + 1.0) / 16777217.0;   // in (0, 1)
  endfunction

  initial begin
    real u1, u2, mean;
    lcg_state = SEED;
    mean      = 0.0;
    for (int i = 0; i < M; i++) begin
      u1     = lcg_uniform();
      u2     = lcg_uniform();
      eps[i] = SIGMA * $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
      mean   = mean + eps[i];
    end
    mean = mean / real'(M);
    for (int i = 0; i < M; i++) eps[i] = eps[i] - mean;
    eps_ready = 1'b1;
  end

  always_comb begin
    vout = 0.0;
    if (eps_ready)
      for (int i = 0; i < M; i++)
        if (en[i]) vout = vout + ULSB * (1.0 + eps[i]);
  end
endmodule
