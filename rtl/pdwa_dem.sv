// pdwa_dem: Pseudo data-weighted-averaging element selection logic.
//
// Sits in the feedback loop of a multibit delta-sigma modulator between the
// flash quantizer and the unit-element DAC. Plain data-weighted averaging
// (DWA) switches on the y(n) elements ptr(n) .. ptr(n)+y(n)-1 (mod M) and then
// advances the pointer, ptr(n+1) = (ptr(n) + y(n)) mod M, so every element is
// used equally often and element mismatch is first-order shaped. For a
// periodic code pattern the pointer also cycles periodically, which turns the
// mismatch into tones. Pseudo DWA breaks that cycle: once every N_INV cycles
// the LSB of y(n) is inverted in the pointer update only, so the pointer
// lands one element further (y even: an element is skipped) or one element
// short (y odd: an element is used again). The DAC itself always receives
// exactly y(n) ones.
//
// Datapath (per cycle n):
//   d_q      = thermometer code latched from the quantizer
//   dout     = d_q rotated up by ptr(n)          (log_shifter)
//   y        = number of ones in d_q             (therm2bin)
//   y_upd    = y with its LSB inverted when inv  (lsb_inv_mux, lsb_inv_timer)
//   ptr(n+1) = (ptr(n) + y_upd) mod M            (eac_adder, ptr_reg)
// The pointer is kept as a CODE_W-bit word where all ones also means zero.
//
// Interface: clk (one period = phi1 + phi2 of the modulator clock), rst_n
// (active-low, asynchronous; clears code, pointer and inversion timer), d
// (M-digit thermometer code), dout (M element enables, valid one cycle after
// d is sampled), and the observation outputs of the same cycle: y, ptr, inv
// (this cycle's pointer update inverts the LSB) and wrap (the pointer update
// passes element M-1, i.e. the adder's end-around carry).
// The split into latch, encoder, timer, mux, adder, pointer register and
// rotator follows the source circuit; the single clock and the reset are
// this design's choices.
module pdwa_dem #(
  parameter int unsigned CODE_W = pdwa_pkg::CODE_W,
  parameter int unsigned N_INV  = pdwa_pkg::N_INV,
  parameter int unsigned M      = (1 << CODE_W) - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [M-1:0]      d,
  output logic [M-1:0]      dout,
  output logic [CODE_W-1:0] y,
  output logic [CODE_W-1:0] ptr,
  output logic              inv,
  output logic              wrap
);
  logic [M-1:0]      d_q;
  logic [CODE_W-1:0] y_upd;
  logic [CODE_W-1:0] next_ptr;

  therm_latch #(.M(M)) u_latch (
    .clk, .rst_n, .d, .d_q
  );

  therm2bin #(.CODE_W(CODE_W), .M(M)) u_enc (
    .therm(d_q), .bin(y)
  );

  lsb_inv_timer #(.N_INV(N_INV)) u_timer (
    .clk, .rst_n, .inv
  );

  lsb_inv_mux u_mux (
    .lsb(y[0]), .s0(inv), .out(y_upd[0])
  );
  assign y_upd[CODE_W-1:1] = y[CODE_W-1:1];

  eac_adder #(.CODE_W(CODE_W)) u_add (
    .ptr, .y(y_upd), .next_ptr, .cout(wrap)
  );

  ptr_reg #(.CODE_W(CODE_W)) u_ptr (
    .clk, .rst_n, .next_ptr, .ptr
  );

  log_shifter #(.CODE_W(CODE_W), .M(M)) u_rot (
    .d(d_q), .ptr, .dout
  );

  // The encoder output is the number of ones, so the rotator keeps that count.
  assert property (@(posedge clk) $countones(dout) == int'(y))
    else $error("pdwa_dem: DAC element count differs from quantizer code");
endmodule
