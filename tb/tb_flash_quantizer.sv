// tb_flash_quantizer: sweeps the analog input over and beyond full scale and
// checks that the output is a thermometer code whose level is
// clamp(ceil(16 * vin / VREF + 15), 0, 31), i.e. the number of thresholds
// VREF * (2k - 30) / 32 that lie below vin. Sweep points avoid the thresholds.
module tb_flash_quantizer;
  localparam int unsigned M = 31;
  real vin;
  logic [M-1:0] therm;
  int checks = 0, failures = 0;

  flash_quantizer #(.M(M), .VREF(1.0)) dut (.vin, .therm);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = -700; s <= 700; s++) begin
      int lvl, exp_lvl;
      bit mono;
      real x;
      vin = real'(s) / 512.0 + 0.0007;
      #1;
      x = 16.0 * vin + 15.0;
      exp_lvl = int'($ceil(x));
      if (exp_lvl < 0) exp_lvl = 0;
      if (exp_lvl > 31) exp_lvl = 31;
      lvl = 0; mono = 1'b1;
      for (int k = 0; k < int'(M); k++) begin
        if (therm[k]) lvl++;
        if (k > 0 && therm[k] && !therm[k-1]) mono = 1'b0;
      end
      checks += 2;
      if (!mono) failures++;
      if (lvl != exp_lvl) begin
        failures++;
        $display("vin=%f level %0d expected %0d", vin, lvl, exp_lvl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
