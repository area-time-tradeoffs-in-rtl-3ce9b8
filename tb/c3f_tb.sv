// c3f_tb -- the folded array driven by the CBSM, against direct FIR sums.
//
// A stream of random input words x_m is filtered with random coefficients.
// Word m computes y_m = sum_{t<k_c} c_t * x_{m-t} (x before the stream
// start taken as 0); the testbench plays the part of the pixel fetch: when
// the CBSM announces that S0 will start a tap of word m in the next clock,
// it presents x_{m-t} there. Every result is compared with the direct sum
// modulo 2^YW. Checked for the k_c=2, m_c=6, N=4 example and the three
// deblocking configurations (N = 7, 5, 4), with the cycle counts: a word
// accepted in clock A is on y in clock A+L+1, and back-to-back words come
// out every N clocks.
module c3f_tb;
  localparam int K = dbf_pkg::K, KCM = dbf_pkg::KC_MAX, MCM = dbf_pkg::MC_MAX;
  localparam int IDW = dbf_pkg::ID_W, YW = dbf_pkg::YW, PW = dbf_pkg::PIX_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [3:0] cfg_n, cfg_kc, cfg_mc;
  logic [KCM-1:0][MCM-1:0] cfg_coef;
  logic start_req = 1'b0, start_ack;
  logic [IDW-1:0] start_id;
  logic [K-1:0] cb;
  logic clear, load, nxt_load, done, busy;
  logic [$clog2(KCM)-1:0] nxt_tp;
  logic [IDW-1:0] nxt_id, done_id;
  logic [PW-1:0] x_par;
  logic [YW-1:0] y;

  int checks = 0, failures = 0;
  int cyc = 0;
  int xs[int];          // input stream by word number
  int ack_cyc[int];     // accept clock by word number
  int kc, n, l, words_out, last_done;
  int m_of_id[32];

  cbsm dut_cbsm (.*);
  c3f  dut_c3f (.clk, .rst_n, .x_par, .cb, .clear, .load, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cyc=%0d %s", cyc, what);
    end
  endtask

  function automatic int xval(int m);
    return (m < 0) ? 0 : xs[m];
  endfunction

  // pixel fetch: word for the tap S0 starts in the next clock
  always @(posedge clk) begin
    if (nxt_load) x_par <= PW'(xval(m_of_id[nxt_id] - (kc - 1 - int'(nxt_tp))));
  end

  task automatic run_cfg(int nn, int kk, int mm, int words, bit gaps);
    int m;
    wait (!busy);
    @(negedge clk);
    n = nn; kc = kk; l = K * nn;
    cfg_n = 4'(nn); cfg_kc = 4'(kk); cfg_mc = 4'(mm);
    cfg_coef = '0;
    for (int t = 0; t < kk; t++) cfg_coef[t] = MCM'($urandom % (1 << mm));
    cfg_we = 1'b1;
    xs.delete(); ack_cyc.delete();
    for (int i = 0; i < words; i++) xs[i] = int'($urandom % (1 << PW));
    @(negedge clk);
    cfg_we = 1'b0;
    m = 0;
    words_out = 0;
    last_done = -1;
    fork
      begin
        while (m < words) begin
          start_req = gaps ? (($urandom % 4) != 0) : 1'b1;
          start_id  = IDW'(m % 32);
          #1;
          if (start_ack) begin
            m_of_id[m % 32] = m;
            ack_cyc[m] = cyc;
            m++;
          end
          @(negedge clk);
        end
        start_req = 1'b0;
      end
      begin
        while (words_out < words) begin
          @(negedge clk);
          if (done) begin
            int mm2, e;
            mm2 = m_of_id[done_id];
            e = 0;
            for (int t = 0; t < kk; t++) e += int'(cfg_coef[t]) * xval(mm2 - t);
            chk(int'(y) == e % (1 << YW), $sformatf("y_%0d = %0d exp %0d", mm2, y, e % (1 << YW)));
            chk(cyc - ack_cyc[mm2] == l + 1, $sformatf("latency %0d", cyc - ack_cyc[mm2]));
            if (!gaps && last_done >= 0) chk(cyc - last_done == nn, "output spacing");
            last_done = cyc;
            words_out++;
          end
        end
      end
    join
  endtask

  initial begin
    cfg_n = 4'd7; cfg_kc = 4'd7; cfg_mc = 4'd3; cfg_coef = '0; start_id = '0; x_par = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_cfg(4, 2, 6, 30, 1'b0);
    run_cfg(4, 2, 6, 30, 1'b1);
    run_cfg(7, 7, 3, 40, 1'b0);
    run_cfg(7, 7, 3, 30, 1'b1);
    run_cfg(5, 5, 3, 40, 1'b0);
    run_cfg(5, 5, 3, 30, 1'b1);
    run_cfg(4, 4, 3, 40, 1'b0);
    run_cfg(4, 4, 3, 30, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
