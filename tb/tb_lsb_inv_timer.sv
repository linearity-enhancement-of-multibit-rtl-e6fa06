// tb_lsb_inv_timer: the inversion pulse must be high in exactly one cycle out
// of every N_INV, the first time N_INV cycles after reset. Checked for the
// default N_INV = 128 and for N_INV = 64. Cycle n is the clock period that
// follows the n-th rising edge after reset is released; the reset period
// itself is cycle 0, so the pulse is due in cycles N_INV-1, 2*N_INV-1, ...
module tb_lsb_inv_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic inv128, inv64;
  int checks = 0, failures = 0, pulses128 = 0, pulses64 = 0;

  lsb_inv_timer                dut128 (.clk, .rst_n, .inv(inv128));
  lsb_inv_timer #(.N_INV(64))  dut64  (.clk, .rst_n, .inv(inv64));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #22 rst_n = 1'b1;
    for (int n = 1; n <= 1000; n++) begin
      @(negedge clk);
      checks += 2;
      if (inv128 !== ((n % 128) == 127)) begin
        failures++;
        $display("N_INV=128 cycle %0d: inv=%b", n, inv128);
      end
      if (inv64 !== ((n % 64) == 63)) begin
        failures++;
        $display("N_INV=64 cycle %0d: inv=%b", n, inv64);
      end
      pulses128 += int'(inv128);
      pulses64  += int'(inv64);
    end
    checks += 2;
    if (pulses128 != 1000 / 128) failures++;
    if (pulses64  != 1000 / 64)  failures++;
    $display("pulses: %0d (N_INV=128), %0d (N_INV=64)", pulses128, pulses64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
