// tb_pdwa_use_rate: how evenly the DAC elements are used, as a function of
// the inversion interval N_INV.
//
// The same code stream, a sine of period 2048 samples at 0.9 of full scale
// followed by random levels, is applied to four copies of the element
// selection logic: N_INV = 4, 64, 128 and 2**30. The last never inverts
// within the run and so behaves as plain DWA. For each copy the testbench
// keeps the running number of times each element has been switched on and
// records the largest max-min spread between elements over the run.
// Expected:
//   - plain DWA keeps every element within one use of every other (spread <= 1);
//   - every copy switches on, in total, exactly the sum of the codes;
//   - the spread grows as N_INV shrinks (4 worse than 128), because each
//     inversion leaves one element used once more or once less than the rest.
module tb_pdwa_use_rate;
  localparam int M = 31;
  localparam int NCYC = 16384;
  localparam int NCFG = 4;
  localparam int NI [NCFG] = '{4, 64, 128, 1 << 30};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] d;
  logic [M-1:0] dout [NCFG];
  int checks = 0, failures = 0;
  longint total_code = 0;
  longint uses [NCFG][M];
  longint spread [NCFG];

  always #5 clk = ~clk;

  initial begin
    #((NCYC + 200) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic [4:0] y, ptr;
    logic inv, wrap;
    pdwa_dem #(.N_INV(NI[c])) dut (.clk, .rst_n, .d, .dout(dout[c]), .y, .ptr, .inv, .wrap);
  end

  function automatic int level_at(int p);
    real v;
    int l;
    if (p <= NCYC / 2) begin
      v = 0.9 * $sin(6.283185307179586 * real'(p) / 2048.0) + 0.0003;
      l = int'($ceil(16.0 * v + 15.0));
      if (l < 0) l = 0;
      if (l > M) l = M;
      return l;
    end
    return int'($urandom_range(31, 0));
  endfunction

  initial begin
    d = '0;
    #22 rst_n = 1'b1;
    for (int p = 1; p <= NCYC + 2; p++) begin
      d = M'((64'd1 << level_at(p)) - 1);
      @(negedge clk);
    end
  end

  initial begin
    for (int c = 0; c < NCFG; c++) begin
      spread[c] = 0;
      for (int i = 0; i < M; i++) uses[c][i] = 0;
    end
    wait (rst_n);
    for (int p = 1; p <= NCYC; p++) begin
      @(posedge clk); #1;
      total_code += longint'(g_cfg[0].y);
      for (int c = 0; c < NCFG; c++) begin
        longint umin, umax;
        for (int i = 0; i < M; i++) uses[c][i] += longint'(dout[c][i]);
        umin = uses[c][0]; umax = uses[c][0];
        for (int i = 1; i < M; i++) begin
          if (uses[c][i] < umin) umin = uses[c][i];
          if (uses[c][i] > umax) umax = uses[c][i];
        end
        if (umax - umin > spread[c]) spread[c] = umax - umin;
      end
    end
    for (int c = 0; c < NCFG; c++) begin
      longint tot;
      tot = 0;
      for (int i = 0; i < M; i++) tot += uses[c][i];
      $display("N_INV=%0d: largest spread of element use %0d over %0d cycles", NI[c], spread[c], NCYC);
      checks++;
      if (tot != total_code) begin
        failures++;
        $display("N_INV=%0d: %0d element uses, codes add up to %0d", NI[c], tot, total_code);
      end
    end
    checks += 3;
    if (spread[3] > 1) failures++;
    if (spread[0] <= spread[2]) failures++;
    if (spread[2] <= spread[3]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
