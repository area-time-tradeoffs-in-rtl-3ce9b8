// dbf_ram_tb -- pixel block RAM: random writes and reads against a shadow
// array, checking the one-clock read latency and read-before-write on an
// address collision.
module dbf_ram_tb;
  localparam int W = dbf_pkg::PIX_W;
  localparam int D = dbf_pkg::BLK * dbf_pkg::BLK;
  logic                 clk = 1'b0;
  logic                 we;
  logic [$clog2(D)-1:0] waddr, raddr;
  logic [W-1:0]         wdata, rdata;
  logic [W-1:0]         shadow [D];
  logic [W-1:0]         expect_q;
  int checks = 0, failures = 0;

  dbf_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    // fill every word
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(a); wdata = W'($urandom); shadow[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 400; i++) begin
      we       = 1'($urandom);
      waddr    = 4'($urandom);
      wdata    = W'($urandom);
      raddr    = (i % 5 == 0) ? waddr : 4'($urandom);
      expect_q = shadow[raddr];          // old word on a collision
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL raddr=%0d got %0d expected %0d", raddr, rdata, expect_q);
      end
      @(negedge clk);
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
