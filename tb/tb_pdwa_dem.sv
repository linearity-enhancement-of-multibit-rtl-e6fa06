// tb_pdwa_dem: end-to-end check of the Pseudo-DWA element selection logic
// against a cycle-level reference model, for the default N_INV = 128 and for
// N_INV = 64.
//
// The reference keeps the pointer as an integer 0..30 and applies
// ptr(n+1) = (ptr(n) + y'(n)) mod 31, where y'(n) is y(n) with its LSB
// inverted in cycles N_INV-1, 2*N_INV-1, ... (cycle 0 is the reset cycle).
// In each cycle it checks the latched level, the pointer (mod 31), the
// inversion flag, the wrap flag and that exactly elements ptr .. ptr+y-1
// (mod 31) are enabled. Input codes are random levels, with stretches of a
// constant level. It also counts the two Pseudo-DWA cases (inversion of an
// even code: one element skipped; of an odd code: one element re-used) and
// pointer wrap-arounds, and fails if any of them never happened.
module tb_pdwa_dem;
  localparam int unsigned CODE_W = 5, M = 31;
  localparam int NCYC = 6000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #((NCYC + 100) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int unsigned NI = (c == 0) ? 128 : 64;
    logic [M-1:0] dout;
    logic [CODE_W-1:0] y, ptr;
    logic inv, wrap;
    int ref_ptr, skips, reselects, wraps;

    if (c == 0) begin : g_default
      pdwa_dem dut (.clk, .rst_n, .d, .dout, .y, .ptr, .inv, .wrap);
    end else begin : g_n64
      pdwa_dem #(.N_INV(64)) dut (.clk, .rst_n, .d, .dout, .y, .ptr, .inv, .wrap);
    end

    // Latched code of the current cycle, as the testbench drove it.
    int lvl_q;

    initial begin
      ref_ptr = 0; skips = 0; reselects = 0; wraps = 0; lvl_q = 0;
      wait (rst_n);
      for (int p = 1; p <= NCYC; p++) begin
        logic [M-1:0] expd;
        int upd;
        bit exp_inv;
        @(posedge clk); #1;
        lvl_q = tb_pdwa_dem.lvl_drv_q;
        exp_inv = (p % int'(NI)) == int'(NI) - 1;
        expd = '0;
        for (int j = 0; j < lvl_q; j++) expd[(ref_ptr + j) % int'(M)] = 1'b1;
        checks += 5;
        if (int'(y) != lvl_q) failures++;
        if (int'(ptr) % int'(M) != ref_ptr) begin
          failures++;
          if (failures < 10) $display("N_INV=%0d cycle %0d: ptr=%0d expected %0d", NI, p, ptr, ref_ptr);
        end
        if (inv !== exp_inv) failures++;
        if (dout !== expd) begin
          failures++;
          if (failures < 10) $display("N_INV=%0d cycle %0d: dout=%h expected %h", NI, p, dout, expd);
        end
        upd = exp_inv ? (lvl_q ^ 1) : lvl_q;
        if (wrap !== (int'(ptr) + upd >= 32)) failures++;
        if (exp_inv && (lvl_q % 2 == 0)) skips++;
        if (exp_inv && (lvl_q % 2 == 1)) reselects++;
        wraps += int'(wrap);
        ref_ptr = (ref_ptr + upd) % int'(M);
      end
      $display("N_INV=%0d: skips=%0d reselects=%0d wraps=%0d", NI, skips, reselects, wraps);
      checks += 3;
      if (skips == 0) failures++;
      if (reselects == 0) failures++;
      if (wraps == 0) failures++;
    end
  end

  // Stimulus: the level driven before edge p is latched in cycle p.
  int lvl_drv, lvl_drv_q;
  always @(posedge clk) lvl_drv_q <= lvl_drv;

  initial begin
    lvl_drv = 0;
    d = '0;
    #22 rst_n = 1'b1;
    for (int p = 1; p <= NCYC + 2; p++) begin
      if ((p / 500) % 2 == 1) lvl_drv = 5 + (p / 1000) % 2;   // constant stretches, even and odd
      else                    lvl_drv = int'($urandom_range(31, 0));
      d = M'((64'd1 << lvl_drv) - 1);
      @(negedge clk);
    end
  end

  initial begin
    wait (rst_n);
    repeat (NCYC + 5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
