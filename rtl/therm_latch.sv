// therm_latch: holds the quantizer's thermometer code for one clock cycle.
//
// In the switched-capacitor modulator the flash quantizer produces its code
// during phase phi1 and a latch holds it while it is encoded and rippled
// through the rotator. This RTL uses one clock whose period covers phi1 and
// phi2, so the latch becomes an edge-triggered register: d_q shows d one
// cycle after it is sampled. Reset clears the code (no element selected),
// which is a choice of this design; no reset is described for the source
// circuit.
//
// Ports: clk, rst_n (active-low, asynchronous), d (M-digit thermometer code
// from the quantizer), d_q (registered code). Latency: one clock cycle.
module therm_latch #(
  parameter int unsigned M = pdwa_pkg::M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] d,
  output logic [M-1:0] d_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_q <= '0;
    else        d_q <= d;
  end
endmodule
