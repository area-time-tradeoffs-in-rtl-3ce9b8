// deblocking_filter -- area-efficient H.264/AVC deblocking filter built
// around a configurable folded bit-plane FIR filter (C3F).
//
// Structure: the host writes the two 4x4 pixel blocks on either side of
// an edge into RAM_P and RAM_Q and issues a job (edge direction and
// filtering mode). The control unit reconfigures the coefficient bit
// supply module (CBSM+) for the mode's filter and then streams, in the
// order the folded array needs, the p and q pixels through the 2:1
// multiplexer into the C3F. The C3F computes one filtered pixel every N
// clocks (N = 7, 5 or 4 depending on the filter), and the control unit
// puts each one out with the block and address of the pixel it replaces.
//
// Interface: pixel block writes (p_*/q_*), the job handshake
// (cmd_valid/cmd_ready, cmd_dir, cmd_mode, job_done) and the filtered
// pixel stream (out_valid, out_q, out_addr, out_pix). A job filters all
// four lines across the edge; results come out, 4*cnt of them, no
// faster than one every N clocks.
// The block structure (C3F, RAM_P, RAM_Q, MUX 2in1, control unit,
// CBSM/CBSM+) follows the published architecture; the host interface is
// this design's choice, since the system bus is not specified.
module deblocking_filter
#(
  parameter int unsigned K         = dbf_pkg::K,
  parameter int unsigned NMAX      = dbf_pkg::NMAX,
  parameter int unsigned YW        = dbf_pkg::YW,
  parameter int unsigned PIX_W     = dbf_pkg::PIX_W,
  parameter bit          REDUCIBLE = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  // block P and block Q writes from the system bus
  input  logic             p_we,
  input  logic [3:0]       p_waddr,
  input  logic [PIX_W-1:0] p_wdata,
  input  logic             q_we,
  input  logic [3:0]       q_waddr,
  input  logic [PIX_W-1:0] q_wdata,
  // jobs
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  logic             cmd_dir,
  input  dbf_pkg::dbf_mode_e        cmd_mode,
  output logic             job_done,
  // filtered pixels
  output logic             out_valid,
  output logic             out_q,
  output logic [3:0]       out_addr,
  output logic [PIX_W-1:0] out_pix
);
  localparam int unsigned TW = $clog2(dbf_pkg::KC_MAX);

  logic                          cfg_we;
  logic [3:0]                    cfg_n, cfg_kc, cfg_mc;
  logic [dbf_pkg::KC_MAX-1:0][dbf_pkg::MC_MAX-1:0] cfg_coef;
  logic                          start_req, start_ack;
  logic [dbf_pkg::ID_W-1:0]      start_id, nxt_id, done_id;
  logic                          nxt_load, done, busy;
  logic [TW-1:0]                 nxt_tp;
  logic [K-1:0]                  cb;
  logic                          clear, load;
  logic [3:0]                    addr_p, addr_q;
  logic                          sel;
  logic [PIX_W-1:0]              pix_p, pix_q, x;
  logic [YW-1:0]                 y;

  dbf_ram #(.W(PIX_W), .DEPTH(dbf_pkg::BLK * dbf_pkg::BLK)) u_ram_p (
    .clk(clk), .we(p_we), .waddr(p_waddr), .wdata(p_wdata),
    .raddr(addr_p), .rdata(pix_p)
  );

  dbf_ram #(.W(PIX_W), .DEPTH(dbf_pkg::BLK * dbf_pkg::BLK)) u_ram_q (
    .clk(clk), .we(q_we), .waddr(q_waddr), .wdata(q_wdata),
    .raddr(addr_q), .rdata(pix_q)
  );

  dbf_mux2 #(.W(PIX_W)) u_mux (.p(pix_p), .q(pix_q), .sel(sel), .x(x));

  dbf_ctrl #(
    .KC_MAX(dbf_pkg::KC_MAX), .MC_MAX(dbf_pkg::MC_MAX), .PIX_W(PIX_W), .YW(YW),
    .ID_W(dbf_pkg::ID_W),
    .REDUCIBLE(REDUCIBLE)
  ) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .cmd_valid(cmd_valid), .cmd_ready(cmd_ready), .cmd_dir(cmd_dir),
    .cmd_mode(cmd_mode), .job_done(job_done),
    .cfg_we(cfg_we), .cfg_n(cfg_n), .cfg_kc(cfg_kc), .cfg_mc(cfg_mc),
    .cfg_coef(cfg_coef),
    .start_req(start_req), .start_id(start_id), .start_ack(start_ack),
    .nxt_load(nxt_load), .nxt_tp(nxt_tp), .nxt_id(nxt_id),
    .done(done), .done_id(done_id), .busy(busy),
    .addr_p(addr_p), .addr_q(addr_q), .sel(sel),
    .y(y),
    .out_valid(out_valid), .out_q(out_q), .out_addr(out_addr), .out_pix(out_pix)
  );

  cbsm #(
    .K(K), .NMAX(NMAX), .KC_MAX(dbf_pkg::KC_MAX), .MC_MAX(dbf_pkg::MC_MAX),
    .ID_W(dbf_pkg::ID_W)
  ) u_cbsm (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we), .cfg_n(cfg_n), .cfg_kc(cfg_kc), .cfg_mc(cfg_mc),
    .cfg_coef(cfg_coef),
    .start_req(start_req), .start_id(start_id), .start_ack(start_ack),
    .cb(cb), .clear(clear), .load(load),
    .nxt_load(nxt_load), .nxt_tp(nxt_tp), .nxt_id(nxt_id),
    .done(done), .done_id(done_id), .busy(busy)
  );

  c3f #(.K(K), .YW(YW), .PIX_W(PIX_W)) u_c3f (
    .clk(clk), .rst_n(rst_n),
    .x_par(x), .cb(cb), .clear(clear), .load(load),
    .y(y)
  );
endmodule
