// tb_eac_adder: exhaustive check of the modulo-31 end-around-carry adder over
// all 32 x 32 input pairs (the all-ones pointer included). The expected sum
// is a + b when that is below 32 and a + b - 31 otherwise, which is
// congruent to a + b modulo 31.
module tb_eac_adder;
  localparam int unsigned CODE_W = 5;
  logic [CODE_W-1:0] ptr, y, next_ptr;
  logic cout;
  int checks = 0, failures = 0, carries = 0;

  eac_adder #(.CODE_W(CODE_W)) dut (.ptr, .y, .next_ptr, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        int exp_sum;
        ptr = 5'(a);
        y   = 5'(b);
        #1;
        exp_sum = (a + b < 32) ? a + b : a + b - 31;
        checks += 3;
        if (int'(next_ptr) != exp_sum) begin
          failures++;
          $display("%0d + %0d -> %0d, expected %0d", a, b, next_ptr, exp_sum);
        end
        if ((int'(next_ptr) % 31) != ((a + b) % 31)) failures++;
        if (cout !== (a + b >= 32)) failures++;
        carries += int'(cout);
      end
    $display("carries: %0d", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
