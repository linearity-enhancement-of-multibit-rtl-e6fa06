// tb_therm2bin: every valid thermometer code 0..31 must encode to its level,
// and random codes (with bubbles) to their number of ones.
module tb_therm2bin;
  localparam int unsigned CODE_W = 5, M = 31;
  logic [M-1:0] therm;
  logic [CODE_W-1:0] bin;
  int checks = 0, failures = 0;

  therm2bin #(.CODE_W(CODE_W), .M(M)) dut (.therm, .bin);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y <= int'(M); y++) begin
      therm = M'((64'd1 << y) - 1);
      #1;
      checks++;
      if (int'(bin) != y) begin
        failures++;
        $display("level %0d encoded as %0d", y, bin);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      int ones;
      therm = M'($urandom);
      ones = 0;
      for (int i = 0; i < int'(M); i++) if (therm[i]) ones++;
      #1;
      checks++;
      if (int'(bin) != ones) begin
        failures++;
        $display("code %h: %0d ones encoded as %0d", therm, ones, bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
