// tb_log_shifter: for every pointer value 0..31 and every thermometer level
// 0..31, and for random digit patterns, input digit j must appear on output
// (ptr + j) mod 31. For a thermometer code of level y this means outputs
// ptr .. ptr+y-1 (mod 31) are 1 and all others 0.
module tb_log_shifter;
  localparam int unsigned CODE_W = 5, M = 31;
  logic [M-1:0] d, dout, expd;
  logic [CODE_W-1:0] ptr;
  int checks = 0, failures = 0;

  log_shifter #(.CODE_W(CODE_W), .M(M)) dut (.d, .ptr, .dout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    expd = '0;
    for (int j = 0; j < int'(M); j++)
      expd[(int'(ptr) + j) % int'(M)] = d[j];
    checks++;
    if (dout !== expd) begin
      failures++;
      $display("ptr=%0d d=%h dout=%h expected %h", ptr, d, dout, expd);
    end
  endtask

  initial begin
    for (int p = 0; p < 32; p++)
      for (int y = 0; y <= int'(M); y++) begin
        ptr = CODE_W'(p);
        d   = M'((64'd1 << y) - 1);
        check();
      end
    for (int n = 0; n < 2000; n++) begin
      ptr = CODE_W'($urandom);
      d   = M'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
