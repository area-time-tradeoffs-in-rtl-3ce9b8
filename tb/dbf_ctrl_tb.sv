// dbf_ctrl_tb -- control unit with the CBSM and the C3F, the two pixel
// RAMs and the multiplexer modelled here (synchronous read, one clock).
//
// Random blocks P and Q, every filtering mode and both edge directions.
// Every filtered pixel is compared with the value computed directly from
// the mode's coefficient table (taps beyond the line replicate the edge
// pixel), and so is where it goes (block and address). Each job must put
// out exactly 4 lines x (pixels per mode) results and then pulse
// job_done; the CBSM's own assertions check that reconfiguration happens
// only when the array is empty.
module dbf_ctrl_tb;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;
  localparam int TW = $clog2(KC_MAX);

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, cmd_dir = 1'b0, job_done;
  dbf_mode_e cmd_mode = MODE4;
  logic cfg_we;
  logic [3:0] cfg_n, cfg_kc, cfg_mc;
  logic [KC_MAX-1:0][MC_MAX-1:0] cfg_coef;
  logic start_req, start_ack;
  logic [ID_W-1:0] start_id, nxt_id, done_id;
  logic nxt_load, done, busy;
  logic [TW-1:0] nxt_tp;
  logic [K-1:0] cb;
  logic clear, load;
  logic [3:0] addr_p, addr_q;
  logic sel;
  logic [PIX_W-1:0] rd_p, rd_q, x;
  logic [YW-1:0] y;
  logic out_valid, out_q;
  logic [3:0] out_addr;
  logic [PIX_W-1:0] out_pix;

  logic [PIX_W-1:0] pblk [16];
  logic [PIX_W-1:0] qblk [16];
  int checks = 0, failures = 0;
  int outs;

  dbf_ctrl dut (.*);
  cbsm u_cbsm (.*);
  c3f u_c3f (.clk, .rst_n, .x_par(x), .cb, .clear, .load, .y);

  always @(posedge clk) begin
    rd_p <= pblk[addr_p];
    rd_q <= qblk[addr_q];
  end
  assign x = sel ? rd_q : rd_p;

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // line `ln` of the edge as p3 p2 p1 p0 q0 q1 q2 q3
  function automatic void get_line(logic dir, int ln, output int px[LINE]);
    for (int i = 0; i < 4; i++) begin
      px[i]     = dir ? int'(pblk[i * 4 + ln]) : int'(pblk[ln * 4 + i]);
      px[i + 4] = dir ? int'(qblk[i * 4 + ln]) : int'(qblk[ln * 4 + i]);
    end
  endfunction

  task automatic job(dbf_mode_e mode, logic dir);
    ref_mode_t c;
    int px[LINE];
    int seen[int];
    for (int a = 0; a < 16; a++) begin
      pblk[a] = PIX_W'($urandom);
      qblk[a] = PIX_W'($urandom);
    end
    c = ref_mode(mode);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1'b1; cmd_mode = mode; cmd_dir = dir;
    @(negedge clk);
    cmd_valid = 1'b0;
    outs = 0;
    while (!job_done) begin
      if (out_valid) begin
        int ln, pos, e;
        ln  = dir ? int'(out_addr[1:0]) : int'(out_addr[3:2]);
        pos = (out_q ? 4 : 0) + (dir ? int'(out_addr[3:2]) : int'(out_addr[1:0]));
        get_line(dir, ln, px);
        e = ref_pixel(mode, px, pos);
        chk(int'(out_pix) == e, $sformatf("mode %s dir %0d line %0d pos %0d: %0d exp %0d",
                                          mode.name(), dir, ln, pos, out_pix, e));
        chk(pos >= c.lo && pos < c.lo + c.cnt, "position inside window");
        chk(!seen.exists(ln * 8 + pos), "pixel put out once");
        seen[ln * 8 + pos] = 1;
        outs++;
      end
      @(negedge clk);
    end
    chk(outs == 4 * c.cnt, $sformatf("outputs %0d exp %0d", outs, 4 * c.cnt));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 3; r++)
      for (int md = 0; md < 6; md++)
        for (int d = 0; d < 2; d++)
          job(dbf_mode_e'(md), 1'(d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
