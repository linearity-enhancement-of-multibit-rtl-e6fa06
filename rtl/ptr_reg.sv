// ptr_reg: the index pointer register.
//
// Holds ptr(n), the address of the first DAC element to be used in the
// current cycle. In the switched-capacitor circuit it is a master latch open
// on phi2 followed by a slave latch open on phi1, so the new pointer computed
// during a cycle is stable for the whole next phi1. With one clock per
// phi1+phi2 period that pair is an edge-triggered register. Reset sets the
// pointer to element 0, a choice of this design.
//
// Ports: clk, rst_n (active-low, asynchronous), next_ptr, ptr.
// Latency: one clock cycle.
module ptr_reg #(
  parameter int unsigned CODE_W = pdwa_pkg::CODE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CODE_W-1:0] next_ptr,
  output logic [CODE_W-1:0] ptr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else        ptr <= next_ptr;
  end
endmodule
