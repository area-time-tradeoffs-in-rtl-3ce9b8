// dbf_mux2_tb -- random check of the p/q pixel multiplexer.
module dbf_mux2_tb;
  localparam int W = dbf_pkg::PIX_W;
  logic [W-1:0] p, q, x;
  logic         sel;
  int checks = 0, failures = 0;

  dbf_mux2 dut (.*);

  initial begin
    for (int i = 0; i < 200; i++) begin
      p   = W'($urandom);
      q   = W'($urandom);
      sel = 1'($urandom);
      #1;
      checks++;
      if (x !== (sel ? q : p)) begin
        failures++;
        $display("FAIL p=%0d q=%0d sel=%b x=%0d", p, q, sel, x);
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
