// tb_ptr_reg: the pointer register resets to 0 and then holds the value on
// next_ptr at each rising clock edge.
module tb_ptr_reg;
  localparam int unsigned CODE_W = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [CODE_W-1:0] next_ptr, ptr, prev;
  int checks = 0, failures = 0;

  ptr_reg #(.CODE_W(CODE_W)) dut (.clk, .rst_n, .next_ptr, .ptr);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    next_ptr = 5'd17;
    #12;
    checks++; if (ptr !== '0) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      prev = CODE_W'($urandom);
      next_ptr = prev;
      @(posedge clk); #1;
      checks++;
      if (ptr !== prev) begin
        failures++;
        $display("cycle %0d: ptr=%0d expected %0d", n, ptr, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
