// pdwa_top: quantizer-to-DAC feedback path of a multibit delta-sigma
// modulator with Pseudo-DWA dynamic element matching.
//
// The analog loop-filter output vin is digitised by a 5-bit flash quantizer
// (behavioural model) into a 31-digit thermometer code. The Pseudo-DWA
// element selection logic (pdwa_dem, synthesizable) latches that code,
// rotates it by the index pointer and advances the pointer modulo 31, with
// the code's LSB inverted in the pointer update every N_INV = 128 cycles.
// The rotated code switches the 31 unit elements of the feedback DAC
// (behavioural model with random element mismatch), whose output dac_out is
// what the modulator subtracts from its input. The loop filter, the
// decimation filter and the two-phase clock generator lie outside this block.
//
// Ports: clk (one modulator sample period), rst_n (active-low, asynchronous),
// vin (real), code (digital modulator output y(n)), dac_sel (element
// enables), dac_out (real DAC output), ptr (index pointer used this cycle),
// inv (1 in the cycles whose pointer update has the LSB inverted), wrap
// (1 when the pointer update wraps past element 30).
// Timing: code, dac_sel and dac_out belong to the vin sampled at the previous
// clock edge.
module pdwa_top #(
  parameter int unsigned CODE_W = pdwa_pkg::CODE_W,
  parameter int unsigned N_INV  = pdwa_pkg::N_INV,
  parameter int unsigned M      = (1 << CODE_W) - 1,
  parameter real         VREF   = 1.0,
  parameter real         SIGMA  = 0.005,
  parameter int unsigned SEED   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  real               vin,
  output logic [CODE_W-1:0] code,
  output logic [M-1:0]      dac_sel,
  output real               dac_out,
  output logic [CODE_W-1:0] ptr,
  output logic              inv,
  output logic              wrap
);
  logic [M-1:0] therm;

  flash_quantizer #(.M(M), .VREF(VREF)) u_adc (
    .vin, .therm
  );

  pdwa_dem #(.CODE_W(CODE_W), .N_INV(N_INV), .M(M)) u_dem (
    .clk, .rst_n, .d(therm), .dout(dac_sel), .y(code), .ptr, .inv, .wrap
  );

  unit_dac #(.M(M), .ULSB(VREF * 2.0 / real'(M)), .SIGMA(SIGMA), .SEED(SEED)) u_dac (
    .en(dac_sel), .vout(dac_out)
  );
endmodule
