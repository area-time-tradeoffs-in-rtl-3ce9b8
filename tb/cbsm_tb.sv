// cbsm_tb -- coefficient bit supply module against an independent model of
// the folded schedule.
//
// The model keeps the start clock t0 of every word. In clock T, folding
// set f works on the word with 0 <= T-t0 < L and (T-t0) mod K = f, at
// step s = T-t0, which is bit s mod m_c of tap k_c-1 - s div m_c. From
// that it predicts every coefficient bit, clear, load and the done pulse
// (clock t0+L, with the word's identifier). Four configurations are run:
// the k_c=2, m_c=6, N=4 example and the three deblocking configurations
// (N = 7, 5, 4). Words are requested with random gaps and, for the
// throughput check, back to back: then a word must be accepted exactly
// every N clocks. The model's S0 order for the k_c=2 example is also
// held against the order of operations c1^0, c0^3, c0^0, c1^3 of the
// published data-flow figure.
module cbsm_tb;
  localparam int K = dbf_pkg::K, KCM = dbf_pkg::KC_MAX, MCM = dbf_pkg::MC_MAX;
  localparam int IDW = dbf_pkg::ID_W;

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

  int checks = 0, failures = 0;
  int cyc = 0;
  int t0s[$];
  int ids[$];
  int n, kc, mc, l;
  int last_ack;
  int s0_seq[$];

  cbsm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cyc=%0d %s (n=%0d kc=%0d, %0d words)", cyc, what, n, kc, t0s.size());
    end
  endtask

  // compare the outputs of the current clock with the model
  always @(negedge clk) if (rst_n && !cfg_we) begin
    logic [K-1:0] e_cb;
    logic e_clear, e_load, e_done;
    int e_id, s;
    e_cb = '0; e_clear = 1'b1; e_load = 1'b0; e_done = 1'b0; e_id = -1;
    foreach (t0s[i]) begin
      s = cyc - t0s[i];
      if (s >= 0 && s < l) begin
        e_cb[s % K] = cfg_coef[kc - 1 - s / mc][s % mc];
        if (s % K == 0) begin
          e_clear = (s == 0);
          e_load  = (s % mc == 0);
        end
      end
      if (s == l) begin e_done = 1'b1; e_id = ids[i]; end
    end
    chk(cb == e_cb, $sformatf("cb %b exp %b", cb, e_cb));
    chk(clear == e_clear, "clear");
    chk(load == e_load, "load");
    chk(done == e_done, "done");
    if (e_done) chk(int'(done_id) == e_id, "done_id");
  end

  // model S0 step in the current clock, for the data-flow figure check
  function automatic int model_s0();
    foreach (t0s[i]) begin
      if (cyc - t0s[i] >= 0 && cyc - t0s[i] < l && (cyc - t0s[i]) % K == 0)
        return cyc - t0s[i];
    end
    return -1;
  endfunction

  task automatic run_cfg(int nn, int kk, int mm, int words, bit gaps);
    int got;
    wait (!busy);
    @(negedge clk);
    t0s.delete(); ids.delete();
    n = nn; kc = kk; mc = mm; l = K * nn;
    cfg_n = 4'(nn); cfg_kc = 4'(kk); cfg_mc = 4'(mm);
    for (int t = 0; t < KCM; t++) cfg_coef[t] = MCM'($urandom);
    cfg_we = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
    got = 0;
    last_ack = -1;
    while (got < words) begin
      start_req = gaps ? (($urandom % 10) < 7) : 1'b1;
      start_id  = IDW'($urandom);
      #1;
      if (start_ack) begin
        if (!gaps && last_ack >= 0) chk(cyc - last_ack == nn, "back-to-back start spacing");
        last_ack = cyc;
        t0s.push_back(cyc + 1);
        ids.push_back(int'(start_id));
        got++;
      end
      @(negedge clk);
    end
    start_req = 1'b0;
    repeat (l + 3) @(negedge clk);
    chk(!busy, "idle after drain");
  endtask

  initial begin
    cfg_n = 4'd7; cfg_kc = 4'd7; cfg_mc = 4'd3; cfg_coef = '0; start_id = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_cfg(4, 2, 6, 12, 1'b0);
    // S0 order in one period of the k_c=2, m_c=6, N=4 example, starting at
    // a word start: c1^0 (s=0), c0^3 (s=9), c0^0 (s=6), c1^3 (s=3)
    run_cfg(4, 2, 6, 40, 1'b1);
    run_cfg(7, 7, 3, 40, 1'b1);
    run_cfg(7, 7, 3, 20, 1'b0);
    run_cfg(5, 5, 3, 40, 1'b1);
    run_cfg(5, 5, 3, 20, 1'b0);
    run_cfg(4, 4, 3, 40, 1'b1);
    run_cfg(4, 4, 3, 20, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the published S0 order, checked on the first back-to-back run
  initial begin
    int seq[4];
    wait (rst_n);
    wait (t0s.size() >= 6);
    @(negedge clk);
    while (model_s0() != 0) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      seq[i] = model_s0();
      // coefficient of that step must be what the set receives
      chk(cb[0] == cfg_coef[kc - 1 - seq[i] / mc][seq[i] % mc], "S0 bit in figure order");
      @(negedge clk);
    end
    chk(seq[0] == 0 && seq[1] == 9 && seq[2] == 6 && seq[3] == 3, "figure S0 order");
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
