// c3f_fu_tb -- one folding set with and without the S0 input multiplexers.
// Random sum/carry/word inputs; after each clock the registered carry-save
// pair must hold (incoming sum + carry + cb*word) mod 2^YW, where the
// incoming sum/carry are zero under `clear` and the word is the parallel
// word under `load` (S0 only), and the word output must be that word
// shifted left by one.
module c3f_fu_tb;
  localparam int YW = dbf_pkg::YW;
  localparam int PW = dbf_pkg::PIX_W;
  localparam int M  = 1 << YW;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic [YW-1:0] s_in, c_in, x_in;
  logic [PW-1:0] x_par;
  logic          clear, load, cb;
  logic [YW-1:0] s0, c0, x0, s1, c1, x1;
  int checks = 0, failures = 0;
  int e_sum0, e_x0, e_sum1, e_x1, sv, cv, xv;

  c3f_fu #(.HAS_MUX(1'b1)) dut0 (
    .clk, .rst_n, .s_in, .c_in, .x_in, .x_par, .clear, .load, .cb,
    .s_out(s0), .c_out(c0), .x_out(x0));
  c3f_fu #(.HAS_MUX(1'b0)) dut1 (
    .clk, .rst_n, .s_in, .c_in, .x_in, .x_par, .clear, .load, .cb,
    .s_out(s1), .c_out(c1), .x_out(x1));

  always #5 clk = ~clk;

  initial begin
    s_in = '0; c_in = '0; x_in = '0; x_par = '0; clear = 0; load = 0; cb = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      s_in = YW'($urandom); c_in = YW'($urandom); x_in = YW'($urandom);
      x_par = PW'($urandom);
      clear = ($urandom % 4) == 0; load = ($urandom % 3) == 0; cb = 1'($urandom);
      sv = clear ? 0 : int'(s_in);
      cv = clear ? 0 : int'(c_in);
      xv = load ? int'(x_par) : int'(x_in);
      e_sum0 = (sv + cv + (cb ? xv : 0)) % M;
      e_x0   = (xv * 2) % M;
      e_sum1 = (int'(s_in) + int'(c_in) + (cb ? int'(x_in) : 0)) % M;
      e_x1   = (int'(x_in) * 2) % M;
      @(posedge clk);
      #1;
      checks += 4;
      if ((int'(s0) + int'(c0)) % M != e_sum0) begin
        failures++; $display("FAIL S0 sum %0d exp %0d", (int'(s0) + int'(c0)) % M, e_sum0);
      end
      if (int'(x0) != e_x0) begin failures++; $display("FAIL S0 word"); end
      if ((int'(s1) + int'(c1)) % M != e_sum1) begin
        failures++; $display("FAIL S1 sum %0d exp %0d", (int'(s1) + int'(c1)) % M, e_sum1);
      end
      if (int'(x1) != e_x1) begin failures++; $display("FAIL S1 word"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
