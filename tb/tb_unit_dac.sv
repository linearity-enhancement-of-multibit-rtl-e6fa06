// tb_unit_dac: checks the unit-element DAC model.
// An ideal instance (SIGMA = 0) must output exactly ULSB times the number of
// enabled elements. For the default 0.5 % mismatch: all elements on must give
// M * ULSB (the errors average to zero), each single element must lie within
// 5 sigma of ULSB, the sample spread of the element values must be between
// 0.25 % and 1 %, and the output must be additive over disjoint element sets.
module tb_unit_dac;
  localparam int unsigned M = 31;
  logic [M-1:0] en, en_a, en_b;
  real v_ideal, v_mm, v_a, v_b;
  real single [M];
  int checks = 0, failures = 0;

  unit_dac #(.M(M), .ULSB(1.0), .SIGMA(0.0))  dut_ideal (.en, .vout(v_ideal));
  unit_dac #(.M(M), .ULSB(1.0))               dut_mm    (.en, .vout(v_mm));
  unit_dac #(.M(M), .ULSB(1.0))               dut_a     (.en(en_a), .vout(v_a));
  unit_dac #(.M(M), .ULSB(1.0))               dut_b     (.en(en_b), .vout(v_b));

  function automatic bit close(real a, real b, real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sum, sq, sd;
    en = '0; en_a = '0; en_b = '0;
    #1;
    for (int n = 0; n < 500; n++) begin
      int ones;
      en = M'($urandom);
      ones = 0;
      for (int i = 0; i < int'(M); i++) if (en[i]) ones++;
      #1;
      checks++;
      if (!close(v_ideal, real'(ones), 1e-9)) begin
        failures++;
        $display("ideal DAC: %f for %0d elements", v_ideal, ones);
      end
    end
    en = '1; #1;
    checks++;
    if (!close(v_mm, real'(M), 1e-9)) begin
      failures++;
      $display("all elements: %f", v_mm);
    end
    sum = 0.0; sq = 0.0;
    for (int i = 0; i < int'(M); i++) begin
      en = M'(1) << i; #1;
      single[i] = v_mm;
      checks++;
      if (!close(v_mm, 1.0, 0.025)) failures++;
      sum += v_mm - 1.0;
      sq  += (v_mm - 1.0) * (v_mm - 1.0);
    end
    sd = $sqrt(sq / real'(M));
    checks++;
    if (sd < 0.0025 || sd > 0.01) failures++;
    $display("element spread %f %%", 100.0 * sd);
    for (int n = 0; n < 200; n++) begin
      real exp_v;
      en_a = M'($urandom);
      en_b = ~en_a & M'($urandom);
      #1;
      exp_v = 0.0;
      for (int i = 0; i < int'(M); i++) if (en_a[i]) exp_v += single[i];
      checks++;
      if (!close(v_a, exp_v, 1e-9)) failures++;
      en = en_a | en_b; #1;
      checks++;
      if (!close(v_mm, v_a + v_b, 1e-9)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
