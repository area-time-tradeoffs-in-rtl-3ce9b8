// dbf_ctrl -- control unit of the deblocking filter.
//
// Runs one filtering job: the four lines of pixels p3 p2 p1 p0 | q0 q1 q2 q3
// across the edge between block P (in RAM_P) and block Q (in RAM_Q). The
// edge is vertical (P left of Q, lines are rows) or horizontal (P above Q,
// lines are columns).
//
// From the filtering mode it takes the coefficient set, the tap count, the
// coefficient length and the folding factor (see dbf_pkg::mode_cfg),
// waits until the CBSM has no word in flight, reconfigures it, and then
// asks the CBSM for one output word per rewritten pixel, line by line.
// The identifier of each word is {line, position}. One clock before S0
// of the C3F starts a tap, the CBSM says which word and which tap it will
// be; the control unit then addresses RAM_P or RAM_Q for the pixel that
// tap multiplies (position + centre - tap, clamped to the line, so edge
// pixels are replicated) and sets the multiplexer select for the next
// clock, when the RAM word appears. Every finished word is rounded
// ((y + 2^(shift-1)) >> shift), and is put out with the block and address
// of the pixel it replaces, one clock after the CBSM's `done`.
//
// Job handshake: a job is accepted when cmd_valid and cmd_ready are both
// high; job_done pulses once, after the last pixel of the job has been
// put out. Reconfiguring before every job costs at most L clocks of
// draining. Feeding the pixel stream to the C3F in the order its folded
// schedule needs is the published role of this unit; the job interface,
// the line addressing and the rounding are this design's choices.
module dbf_ctrl
#(
  parameter int unsigned KC_MAX    = dbf_pkg::KC_MAX,
  parameter int unsigned MC_MAX    = dbf_pkg::MC_MAX,
  parameter int unsigned PIX_W     = dbf_pkg::PIX_W,
  parameter int unsigned YW        = dbf_pkg::YW,
  parameter int unsigned ID_W      = dbf_pkg::ID_W,
  parameter bit          REDUCIBLE = 1'b1   // 1: CBSM+ (reducible N), 0: plain CBSM
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // job interface
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  logic                          cmd_dir,   // 0: vertical edge, 1: horizontal edge
  input  dbf_pkg::dbf_mode_e                     cmd_mode,
  output logic                          job_done,
  // CBSM configuration and word starts
  output logic                          cfg_we,
  output logic [3:0]                    cfg_n,
  output logic [3:0]                    cfg_kc,
  output logic [3:0]                    cfg_mc,
  output logic [KC_MAX-1:0][MC_MAX-1:0] cfg_coef,
  output logic                          start_req,
  output logic [ID_W-1:0]               start_id,
  input  logic                          start_ack,
  input  logic                          nxt_load,
  input  logic [$clog2(KC_MAX)-1:0]     nxt_tp,
  input  logic [ID_W-1:0]               nxt_id,
  input  logic                          done,
  input  logic [ID_W-1:0]               done_id,
  input  logic                          busy,
  // pixel fetch
  output logic [3:0]                    addr_p,
  output logic [3:0]                    addr_q,
  output logic                          sel,
  // C3F result and filtered pixels
  input  logic [YW-1:0]                 y,
  output logic                          out_valid,
  output logic                          out_q,     // 0: pixel of block P, 1: of block Q
  output logic [3:0]                    out_addr,
  output logic [PIX_W-1:0]              out_pix
);
  typedef enum logic [1:0] {S_IDLE, S_CFG, S_RUN, S_DRAIN} state_e;

  state_e     state;
  dbf_pkg::mode_cfg_t  mcfg;
  logic       dir_q;
  logic [1:0] line_q;
  logic [2:0] pos_q;

  // ---------------- job sequencing ----------------
  always_comb begin
    cmd_ready = state == S_IDLE;
    cfg_we    = state == S_CFG && !busy;
    cfg_n     = mcfg.n_fold;
    cfg_kc    = mcfg.kc;
    cfg_mc    = mcfg.mc;
    cfg_coef  = mcfg.coef;
    start_req = state == S_RUN;
    start_id  = {line_q, pos_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      mcfg     <= '0;
      dir_q    <= 1'b0;
      line_q   <= '0;
      pos_q    <= '0;
      job_done <= 1'b0;
    end else begin
      job_done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          mcfg   <= dbf_pkg::mode_cfg(cmd_mode, REDUCIBLE);
          dir_q  <= cmd_dir;
          line_q <= '0;
          pos_q  <= dbf_pkg::mode_cfg(cmd_mode, REDUCIBLE).lo;
          state  <= S_CFG;
        end
        S_CFG: if (!busy) state <= S_RUN;
        S_RUN: if (start_ack) begin
          if (4'(pos_q) == 4'(mcfg.lo) + mcfg.cnt - 1'b1) begin
            pos_q <= mcfg.lo;
            if (line_q == 2'd3) state <= S_DRAIN;
            line_q <= line_q + 1'b1;
          end else begin
            pos_q <= pos_q + 1'b1;
          end
        end
        S_DRAIN: if (!busy) begin
          state    <= S_IDLE;
          job_done <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- pixel fetch, one clock ahead of S0 ----------------
  // line position (0 = p3 ... 7 = q3) of the pixel the next tap multiplies
  function automatic logic [2:0] tap_pos(logic [2:0] pos, logic [3:0] center,
                                         logic [3:0] kc, logic [3:0] tp);
    int q;
    q = int'(pos) + int'(center) - (int'(kc) - 1 - int'(tp));
    if (q < 0) q = 0;
    if (q > dbf_pkg::LINE - 1) q = dbf_pkg::LINE - 1;
    return 3'(q);
  endfunction

  // block address of line position `pos` on line `line`
  function automatic logic [3:0] blk_addr(logic dir, logic [1:0] line, logic [1:0] idx);
    // idx is the position inside block P (p3..p0) or block Q (q0..q3),
    // i.e. the column (vertical edge) or row (horizontal edge) in the block
    return dir ? {idx, line} : {line, idx};
  endfunction

  logic [2:0] fetch_pos;

  always_comb begin
    fetch_pos = tap_pos(nxt_id[2:0], 4'(mcfg.center), mcfg.kc, 4'(nxt_tp));
    addr_p    = blk_addr(dir_q, nxt_id[4:3], fetch_pos[1:0]);
    addr_q    = blk_addr(dir_q, nxt_id[4:3], fetch_pos[1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sel <= 1'b0;
    else if (nxt_load) sel <= fetch_pos[2];
  end

  // ---------------- rounding and write-back address ----------------
  logic [YW:0] rounded;

  always_comb rounded = ({1'b0, y} + ((YW+1)'(1) << (mcfg.shift - 1'b1))) >> mcfg.shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_q     <= 1'b0;
      out_addr  <= '0;
      out_pix   <= '0;
    end else begin
      out_valid <= done;
      out_q     <= done_id[2];
      out_addr  <= blk_addr(dir_q, done_id[4:3], done_id[1:0]);
      out_pix   <= PIX_W'(rounded);  // coefficients sum to 2^shift: never above 2^PIX_W-1
    end
  end
endmodule
