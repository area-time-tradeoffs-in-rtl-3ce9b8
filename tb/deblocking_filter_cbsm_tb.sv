// deblocking_filter_cbsm_tb -- end-to-end test of the deblocking filter
// with the plain CBSM (REDUCIBLE = 0): the folding factor stays at
// N = NMAX = 7 for every mode, the 5-tap and 3-tap filters running as
// zero-padded 7-tap filters. Same jobs and checks as the default test,
// except that results come 7 clocks apart and a job takes
// 4*cnt*7 + 21 + 4 clocks whatever its mode. The filtered values must be
// the same as with the reducible folding factor.
module deblocking_filter_cbsm_tb;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic p_we = 1'b0, q_we = 1'b0;
  logic [3:0] p_waddr = '0, q_waddr = '0;
  logic [PIX_W-1:0] p_wdata = '0, q_wdata = '0;
  logic cmd_valid = 1'b0, cmd_ready, cmd_dir = 1'b0, job_done;
  dbf_mode_e cmd_mode = MODE4;
  logic out_valid, out_q;
  logic [3:0] out_addr;
  logic [PIX_W-1:0] out_pix;

  logic [PIX_W-1:0] pblk [16];
  logic [PIX_W-1:0] qblk [16];
  int checks = 0, failures = 0;
  int cyc = 0;
  int mode_seen[6];
  int dir_seen[2];
  int replicated = 0, queued = 0;

  deblocking_filter #(.REDUCIBLE(1'b0)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cyc=%0d %s", cyc, what);
    end
  endtask

  function automatic void get_line(logic dir, int ln, output int px[LINE]);
    for (int i = 0; i < 4; i++) begin
      px[i]     = dir ? int'(pblk[i * 4 + ln]) : int'(pblk[ln * 4 + i]);
      px[i + 4] = dir ? int'(qblk[i * 4 + ln]) : int'(qblk[ln * 4 + i]);
    end
  endfunction

  task automatic write_blocks();
    for (int a = 0; a < 16; a++) begin
      pblk[a] = PIX_W'($urandom);
      qblk[a] = PIX_W'($urandom);
      @(negedge clk);
      p_we = 1'b1; p_waddr = 4'(a); p_wdata = pblk[a];
      q_we = 1'b1; q_waddr = 4'(a); q_wdata = qblk[a];
    end
    @(negedge clk);
    p_we = 1'b0; q_we = 1'b0;
  endtask

  // present a job and wait until it is accepted; returns the accept clock
  task automatic issue(dbf_mode_e mode, logic dir, output int t_acc);
    cmd_valid = 1'b1; cmd_mode = mode; cmd_dir = dir;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    t_acc = cyc;
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  // collect and check the results of an accepted job; returns at job_done.
  // With `queue` set, the next job (qmode, qdir) is presented right away,
  // so it waits behind this one, and its accept clock is returned in q_acc.
  task automatic collect(dbf_mode_e mode, logic dir, int t_acc,
                         bit queue, dbf_mode_e qmode, logic qdir, output int q_acc);
    ref_mode_t r;
    int px[LINE];
    int seen[int];
    int outs, last_out;
    r = ref_mode(mode);
    q_acc = -1;
    if (queue) begin
      cmd_valid = 1'b1; cmd_mode = qmode; cmd_dir = qdir;
    end
    outs = 0;
    last_out = -1;
    mode_seen[int'(mode)]++;
    dir_seen[int'(dir)]++;
    while (!job_done) begin
      if (out_valid) begin
        int ln, pos, e;
        ln  = dir ? int'(out_addr[1:0]) : int'(out_addr[3:2]);
        pos = (out_q ? 4 : 0) + (dir ? int'(out_addr[3:2]) : int'(out_addr[1:0]));
        get_line(dir, ln, px);
        e = ref_pixel(mode, px, pos);
        chk(int'(out_pix) == e, $sformatf("%s dir=%0d line %0d pos %0d: %0d exp %0d",
                                          mode.name(), dir, ln, pos, out_pix, e));
        chk(pos >= r.lo && pos < r.lo + r.cnt && !seen.exists(ln * 8 + pos),
            $sformatf("position %0d/%0d", ln, pos));
        seen[ln * 8 + pos] = 1;
        if (last_out >= 0)
          chk(cyc - last_out == 7, $sformatf("result spacing %0d", cyc - last_out));
        last_out = cyc;
        if (ref_replicates(mode, pos)) replicated++;
        outs++;
      end
      chk(!(queue && cmd_ready), "queued job accepted before job_done");
      @(negedge clk);
    end
    chk(outs == 4 * r.cnt, $sformatf("results %0d exp %0d", outs, 4 * r.cnt));
    chk(cyc - t_acc == 4 * r.cnt * 7 + 21 + 4,
        $sformatf("%s job took %0d clocks, exp %0d", mode.name(), cyc - t_acc,
                  4 * r.cnt * 7 + 21 + 4));
    if (queue) begin
      #1;
      while (!cmd_ready) begin @(negedge clk); #1; end
      q_acc = cyc;
      queued++;
      @(negedge clk);
      cmd_valid = 1'b0;
    end
  endtask

  task automatic job(dbf_mode_e mode, logic dir);
    int t_acc, dummy;
    write_blocks();
    issue(mode, dir, t_acc);
    collect(mode, dir, t_acc, 1'b0, MODE4, 1'b0, dummy);
  endtask

  initial begin
    int a0, a1, a2, dummy;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    job(MODE4, 1'b0);
    job(MODE2, 1'b1);
    job(MODE0_3TAP, 1'b0);
    job(MODE3, 1'b1);
    for (int i = 0; i < 24; i++) job(dbf_mode_e'($urandom % 6), 1'($urandom));
    for (int md = 0; md < 6; md++) job(dbf_mode_e'(md), 1'(md));
    // the next job is presented while the previous one still runs; both
    // filter the same blocks
    write_blocks();
    issue(MODE1, 1'b0, a0);
    collect(MODE1, 1'b0, a0, 1'b1, MODE0_5TAP, 1'b1, a1);
    collect(MODE0_5TAP, 1'b1, a1, 1'b1, MODE4, 1'b1, a2);
    collect(MODE4, 1'b1, a2, 1'b0, MODE4, 1'b0, dummy);
    // every mechanism must have happened
    foreach (mode_seen[i]) chk(mode_seen[i] > 0, $sformatf("mode %0d never ran", i));
    chk(dir_seen[0] > 0 && dir_seen[1] > 0, "both edge directions");
    chk(replicated > 0, "edge replication");
    chk(queued > 0, "job queued behind a running job");
    $display("modes %p, dirs %p, replicated %0d, queued %0d",
             mode_seen, dir_seen, replicated, queued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
