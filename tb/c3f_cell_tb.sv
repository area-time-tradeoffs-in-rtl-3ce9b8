// c3f_cell_tb -- exhaustive check of the bit-plane basic cell: for all 16
// input combinations, 2*c_out + s_out must equal s_in + c_in + (x & cb).
module c3f_cell_tb;
  logic s_in, c_in, x, cb, s_out, c_out;
  int checks = 0, failures = 0;

  c3f_cell dut (.*);

  initial begin
    for (int v = 0; v < 16; v++) begin
      {s_in, c_in, x, cb} = 4'(v);
      #1;
      checks++;
      if (2 * int'(c_out) + int'(s_out) != int'(s_in) + int'(c_in) + int'(x & cb)) begin
        failures++;
        $display("FAIL in=%b s=%b c=%b", 4'(v), s_out, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
