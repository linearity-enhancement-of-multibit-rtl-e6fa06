// flash_quantizer: behavioural model (not synthesizable) of the flash ADC
// that serves as the modulator's multibit quantizer.
//
// M comparators compare the analog loop-filter output vin against evenly
// spaced thresholds th_k = VREF * (2k - (M-1)) / (M+1), k = 0 .. M-1, and
// digit k of the thermometer code is 1 when vin > th_k. The output has
// M + 1 levels (0 .. M ones) across -VREF .. +VREF. The comparator timing of
// the real circuit (code generated on phi1, reset on phi2) is not modelled:
// the code follows vin at once and is sampled by the code latch. The full
// scale and threshold placement are this model's choices.
//
// Ports: vin (real, analog input), therm (M-digit thermometer code).
module flash_quantizer #(
  parameter int unsigned M    = pdwa_pkg::M,
  parameter real         VREF = 1.0
) (
  input  real          vin,
  output logic [M-1:0] therm
);
  always_comb begin
    for (int k = 0; k < M; k++)
      therm[k] = vin > VREF * real'(2 * k - (int'(M) - 1)) / real'(M + 1);
  end
endmodule
