// deblocking_filter_mb_tb -- one macroblock filtered in the standard edge
// order, with the default (CBSM+) deblocking filter.
//
// The testbench holds a luma area of 20x20 pixels (the 16x16 macroblock
// plus the 4 pixel columns and rows of its left and upper neighbours) and
// two 12x12 chroma areas (8x8 plus neighbours). It filters every 4x4 block
// edge of the macroblock: in each plane the vertical edges from left to
// right, then the horizontal edges from top to bottom; each edge is
// filtered in 4-line segments (one job each: 16+16 luma, 4+4 per chroma,
// 48 jobs). For each job it writes blocks P and Q from the picture into
// the filter, runs the job and writes the filtered pixels back, so later
// edges see the results of earlier ones. A software model does the same
// and the final pictures must agree pixel for pixel.
//
// Three macroblocks are run: every edge with the 3-tap mode-0 filter
// (fastest), every edge with the mode-4 7-tap filter (slowest), and a
// random mode per edge. The filter clocks spent per macroblock (job
// acceptance to job_done, block transfers not counted) are printed and
// checked against the per-job cost 4*cnt*N + 3*N + 4.
module deblocking_filter_mb_tb;
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

  int checks = 0, failures = 0;
  int cyc = 0;
  int pic [3][20][20];   // plane 0 luma, 1 Cb, 2 Cr (chroma uses 12x12)
  int model [3][20][20];
  int mb_cycles, exp_cycles, jobs;

  deblocking_filter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // pixel (r, c) of a block: block P sits before the edge, Q after it
  function automatic void blk_rc(bit dir, bit q, int a, int r0, int c0,
                                 output int r, output int c);
    int i, j;
    i = a / 4; j = a % 4;         // row, column inside the block
    if (!dir) begin r = r0 + i; c = c0 + (q ? j : j - 4); end
    else      begin r = r0 + (q ? i : i - 4); c = c0 + j; end
  endfunction

  // one 4-line job on the edge at (r0, c0): vertical edge between columns
  // c0-1 and c0 for rows r0..r0+3, horizontal edge between rows r0-1 and r0
  // for columns c0..c0+3
  task automatic edge_job(int pl, bit dir, int r0, int c0, dbf_mode_e mode);
    int r, c, t_acc, px[LINE];
    ref_mode_t rm;
    int upd [20][20];
    rm = ref_mode(mode);
    // software model of the job, from the pixels before it
    upd = model[pl];
    for (int ln = 0; ln < 4; ln++) begin
      for (int k = 0; k < LINE; k++)
        px[k] = dir ? model[pl][r0 - 4 + k][c0 + ln] : model[pl][r0 + ln][c0 - 4 + k];
      for (int k = rm.lo; k < rm.lo + rm.cnt; k++) begin
        if (dir) upd[r0 - 4 + k][c0 + ln] = ref_pixel(mode, px, k);
        else     upd[r0 + ln][c0 - 4 + k] = ref_pixel(mode, px, k);
      end
    end
    model[pl] = upd;
    // hardware
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      blk_rc(dir, 1'b0, a, r0, c0, r, c);
      p_we = 1'b1; p_waddr = 4'(a); p_wdata = PIX_W'(pic[pl][r][c]);
      blk_rc(dir, 1'b1, a, r0, c0, r, c);
      q_we = 1'b1; q_waddr = 4'(a); q_wdata = PIX_W'(pic[pl][r][c]);
    end
    @(negedge clk);
    p_we = 1'b0; q_we = 1'b0;
    cmd_valid = 1'b1; cmd_mode = mode; cmd_dir = dir;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    t_acc = cyc;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!job_done) begin
      if (out_valid) begin
        blk_rc(dir, out_q, int'(out_addr), r0, c0, r, c);
        pic[pl][r][c] = int'(out_pix);
      end
      @(negedge clk);
    end
    mb_cycles  += cyc - t_acc;
    exp_cycles += 4 * rm.cnt * rm.n_fold + 3 * rm.n_fold + 4;
    jobs++;
  endtask

  // scenario 0: all 3-tap, 1: all 7-tap mode 4, 2: random modes
  task automatic run_mb(int scenario);
    dbf_mode_e mode;
    mb_cycles = 0; exp_cycles = 0; jobs = 0;
    for (int pl = 0; pl < 3; pl++)
      for (int r = 0; r < 20; r++)
        for (int c = 0; c < 20; c++) begin
          pic[pl][r][c]   = int'($urandom % 256);
          model[pl][r][c] = pic[pl][r][c];
        end
    for (int pl = 0; pl < 3; pl++) begin
      int sz;
      sz = (pl == 0) ? 16 : 8;
      for (int dir = 0; dir < 2; dir++)          // vertical edges first
        for (int e = 0; e < sz; e += 4)          // left to right / top to bottom
          for (int s = 0; s < sz; s += 4) begin  // 4-line segments
            mode = (scenario == 0) ? MODE0_3TAP :
                   (scenario == 1) ? MODE4 : dbf_mode_e'($urandom % 6);
            if (dir == 0) edge_job(pl, 1'b0, 4 + s, 4 + e, mode);
            else          edge_job(pl, 1'b1, 4 + e, 4 + s, mode);
          end
    end
    for (int pl = 0; pl < 3; pl++)
      for (int r = 0; r < 20; r++)
        for (int c = 0; c < 20; c++)
          chk(pic[pl][r][c] == model[pl][r][c],
              $sformatf("scenario %0d plane %0d pixel (%0d,%0d): %0d exp %0d",
                        scenario, pl, r, c, pic[pl][r][c], model[pl][r][c]));
    chk(jobs == 48, "48 jobs per macroblock");
    chk(mb_cycles == exp_cycles, $sformatf("clocks %0d exp %0d", mb_cycles, exp_cycles));
    $display("macroblock scenario %0d: %0d jobs, %0d filter clocks", scenario, jobs, mb_cycles);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_mb(0);
    run_mb(1);
    run_mb(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
