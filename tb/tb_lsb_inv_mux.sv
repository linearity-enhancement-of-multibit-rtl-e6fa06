// tb_lsb_inv_mux: exhaustive check of the conditional LSB inverter.
module tb_lsb_inv_mux;
  logic lsb, s0, out;
  int checks = 0, failures = 0;

  lsb_inv_mux dut (.lsb, .s0, .out);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++)
      for (int v = 0; v < 4; v++) begin
        {s0, lsb} = 2'(v);
        #1;
        checks++;
        if (out !== (s0 ? !lsb : lsb)) begin
          failures++;
          $display("s0=%b lsb=%b out=%b", s0, lsb, out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
