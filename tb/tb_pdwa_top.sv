// tb_pdwa_top: end-to-end test of the quantizer / Pseudo-DWA / DAC feedback
// path with every parameter at its default (31 elements, N_INV = 128, 0.5 %
// element mismatch).
//
// Phase 0 (64 cycles) holds the input at level 1, so that the pointer steps
// through every element one at a time; the DAC output of each of those
// cycles is recorded as that element's value.
// Phase 1 then drives a sine wave of period 2048 samples (f_s / 2048) and 0.9 of
// full scale. Phases 2 and 3 hold the input at a constant level, Y = 8 and
// then Y = 9, which under plain DWA makes the pointer repeat every 31 cycles.
// Every cycle an independent reference (quantizer thresholds, integer
// pointer mod 31, inversion schedule) predicts the code, the pointer, the
// inversion flag and the enabled elements; the DAC output must equal the sum
// of the recorded values of those elements. During the
// constant phases the testbench also checks that the pointer 31 cycles later
// has moved by +1 per intervening inversion for even Y (an element skipped)
// and by -1 for odd Y (an element re-used), i.e. that the 31-cycle DWA period
// is broken exactly where the inversions fall. Skips, re-uses, pointer
// wrap-arounds and broken periods are counted; each must occur.
module tb_pdwa_top;
  localparam int M = 31;
  localparam int N_INV = 128;
  localparam int N_CAL = 64, N_SINE = 4096, N_DC = 1024;
  localparam int S0 = N_CAL + N_SINE, S1 = S0 + N_DC;
  localparam int NCYC = N_CAL + N_SINE + 2 * N_DC;
  localparam real VREF = 1.0, ULSB = 2.0 / 31.0;

  logic clk = 1'b0, rst_n = 1'b0;
  real vin, dac_out;
  logic [4:0] code, ptr;
  logic [M-1:0] dac_sel;
  logic inv, wrap;
  int checks = 0, failures = 0;
  int mismatched = 0, skips = 0, reselects = 0, wraps = 0, breaks = 0, period_checks = 0;
  int ref_hist [NCYC + 1];
  int inv_hist [NCYC + 1];
  int uses [M];
  real unit_val [M];

  pdwa_top dut (.clk, .rst_n, .vin, .code, .dac_sel, .dac_out, .ptr, .inv, .wrap);

  always #5 clk = ~clk;

  initial begin
    #((NCYC + 200) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int level_of(real v);
    int l;
    l = int'($ceil(16.0 * v / VREF + 15.0));
    if (l < 0) l = 0;
    if (l > M) l = M;
    return l;
  endfunction

  function automatic real vin_at(int p);
    if (p <= N_CAL)      return (1.0 - 15.5) / 16.0 * VREF;
    else if (p <= S0)    return 0.9 * VREF * $sin(6.283185307179586 * real'(p) / 2048.0) + 0.0003;
    else if (p <= S1)    return (8.0 - 15.5) / 16.0 * VREF;
    else                          return (9.0 - 15.5) / 16.0 * VREF;
  endfunction

  // Stimulus: the value driven before rising edge p is latched in cycle p.
  initial begin
    vin = 0.0;
    #22 rst_n = 1'b1;
    for (int p = 1; p <= NCYC + 2; p++) begin
      vin = vin_at(p);
      @(negedge clk);
    end
  end

  initial begin
    int ref_ptr;
    ref_ptr = 0;
    foreach (uses[i]) uses[i] = 0;
    wait (rst_n);
    for (int p = 1; p <= NCYC; p++) begin
      int lvl, upd;
      bit exp_inv;
      logic [M-1:0] expd;
      real exp_out;
      @(posedge clk); #1;
      lvl = level_of(vin_at(p));
      exp_inv = (p % N_INV) == N_INV - 1;
      expd = '0;
      exp_out = 0.0;
      for (int j = 0; j < lvl; j++) begin
        expd[(ref_ptr + j) % M] = 1'b1;
      end
      checks += 6;
      if (int'(code) != lvl) begin
        failures++;
        if (failures < 10) $display("cycle %0d: code %0d expected %0d", p, code, lvl);
      end
      if (int'(ptr) % M != ref_ptr) begin
        failures++;
        if (failures < 10) $display("cycle %0d: ptr %0d expected %0d", p, ptr, ref_ptr);
      end
      if (inv !== exp_inv) failures++;
      if (dac_sel !== expd) begin
        failures++;
        if (failures < 10) $display("cycle %0d: elements %h expected %h", p, dac_sel, expd);
      end
      // DAC output: during calibration one element is on per cycle and its
      // value is recorded; afterwards the output must equal the sum of the
      // recorded values of the expected elements. It must also stay within
      // 3 % of lvl * ULSB, and be exact for all 31 elements (the errors
      // average to zero).
      if (p <= N_CAL) begin
        if (lvl == 1) for (int i = 0; i < M; i++) if (expd[i]) unit_val[i] = dac_out;
      end else begin
        real learned;
        learned = 0.0;
        for (int i = 0; i < M; i++) if (expd[i]) learned += unit_val[i];
        checks++;
        if ((dac_out - learned > 1e-9) || (learned - dac_out > 1e-9)) begin
          failures++;
          if (failures < 10) $display("cycle %0d: DAC output %f expected %f", p, dac_out, learned);
        end
      end
      exp_out = real'(lvl) * ULSB;
      if (lvl == M) begin
        if ((dac_out - exp_out > 1e-9) || (exp_out - dac_out > 1e-9)) failures++;
      end else if ((dac_out - exp_out > 0.03 * exp_out + 1e-12) ||
                   (exp_out - dac_out > 0.03 * exp_out + 1e-12)) failures++;
      if (lvl > 0 && lvl < M && ((dac_out - exp_out > 1e-9) || (exp_out - dac_out > 1e-9))) mismatched++;
      upd = exp_inv ? (lvl ^ 1) : lvl;
      if (wrap !== (int'(ptr) + upd >= 32)) failures++;
      for (int i = 0; i < M; i++) uses[i] += int'(dac_sel[i]);
      if (exp_inv && lvl % 2 == 0) skips++;
      if (exp_inv && lvl % 2 == 1) reselects++;
      wraps += int'(wrap);
      ref_hist[p] = int'(ptr) % M;
      inv_hist[p] = int'(exp_inv);
      // Broken DWA period under a constant input.
      if (p > S0 + 31 && !(p > S1 && p <= S1 + 31)) begin
        int ninv, step, shift;
        ninv = 0;
        for (int q = p - 31; q < p; q++) ninv += inv_hist[q];
        step = (lvl % 2 == 0) ? 1 : M - 1;
        shift = (ref_hist[p] - ref_hist[p - 31] + M) % M;
        period_checks++;
        checks++;
        if (shift != (ninv * step) % M) begin
          failures++;
          $display("cycle %0d: pointer moved %0d over 31 cycles, %0d inversions", p, shift, ninv);
        end
        if (shift != 0) breaks++;
      end
      ref_ptr = (ref_ptr + upd) % M;
    end
    begin
      int umin, umax;
      umin = uses[0]; umax = uses[0];
      foreach (uses[i]) begin
        if (uses[i] < umin) umin = uses[i];
        if (uses[i] > umax) umax = uses[i];
      end
      $display("element use per element: min %0d max %0d over %0d cycles", umin, umax, NCYC);
      // Each element is used within a few times of every other one.
      checks++;
      if (umax - umin > 2 + (NCYC / N_INV)) failures++;
    end
    $display("skips=%0d reselects=%0d wraps=%0d broken_periods=%0d (of %0d)",
             skips, reselects, wraps, breaks, period_checks);
    $display("cycles with a visible element mismatch: %0d", mismatched);
    checks += 5;
    if (mismatched == 0) failures++;
    if (skips == 0) failures++;
    if (reselects == 0) failures++;
    if (wraps == 0) failures++;
    if (breaks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
