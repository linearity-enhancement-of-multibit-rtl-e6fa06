// tb_therm_latch: checks that the code register clears on reset and then
// shows, after each rising clock edge, the code that was on its input.
module tb_therm_latch;
  localparam int unsigned M = 31;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] d, d_q, prev;
  int checks = 0, failures = 0;

  therm_latch #(.M(M)) dut (.clk, .rst_n, .d, .d_q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    #12;
    checks++; if (d_q !== '0) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      prev = M'({$urandom, $urandom});
      d = prev;
      @(posedge clk); #1;
      checks++;
      if (d_q !== prev) begin
        failures++;
        $display("cycle %0d: d_q=%h expected %h", n, d_q, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
