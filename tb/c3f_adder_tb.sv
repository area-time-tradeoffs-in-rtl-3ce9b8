// c3f_adder_tb -- random check of the final adder: y = s + c modulo 2^YW.
module c3f_adder_tb;
  localparam int YW = dbf_pkg::YW;
  logic [YW-1:0] s, c, y;
  int checks = 0, failures = 0;

  c3f_adder dut (.*);

  initial begin
    for (int i = 0; i < 500; i++) begin
      s = YW'($urandom);
      c = YW'($urandom);
      #1;
      checks++;
      if (y != YW'((int'(s) + int'(c)) % (1 << YW))) begin
        failures++;
        $display("FAIL s=%0d c=%0d y=%0d", s, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
