// lsb_inv_timer: times the LSB inversions of Pseudo DWA.
//
// Asserts inv (the select S0 of the 2:1 mux) during one clock cycle out of
// every N_INV, so that the pointer update inverts the LSB of the quantizer
// code every N_INV cycles. With the default N_INV = 128 this is a 7-bit
// counter that wraps every 128 cycles; inv is high in the cycle where the
// count is N_INV-1, so the first inversion comes N_INV cycles after reset.
// The source circuit names a 7-bit Johnson counter for this job, but a 7-bit
// Johnson (twisted-ring) counter repeats every 14 cycles, not 128; the
// 128-cycle interval is what the inversion scheme needs, so a plain binary
// counter of clog2(N_INV) bits is used. N_INV may be any value >= 2.
//
// Ports: clk, rst_n (active-low, asynchronous), inv (one-cycle pulse).
module lsb_inv_timer #(
  parameter int unsigned N_INV = pdwa_pkg::N_INV
) (
  input  logic clk,
  input  logic rst_n,
  output logic inv
);
  localparam int unsigned CW = (N_INV > 2) ? $clog2(N_INV) : 1;
  localparam logic [CW-1:0] LAST = CW'(N_INV - 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (cnt == LAST) cnt <= '0;
    else                 cnt <= cnt + 1'b1;
  end

  assign inv = (cnt == LAST);
endmodule
