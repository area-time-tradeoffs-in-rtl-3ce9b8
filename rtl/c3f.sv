// c3f -- Configurable Folded bit-plane FIR Filter (C3F).
//
// K folding sets S0..S_{K-1} form a ring: each clock every folding set
// adds one partial product c_t^j * 2^j * x to an output word in flight
// and hands the carry-save sum, together with the input word shifted one
// position left, to the next set; S_{K-1} hands back to S0. One output
// word y_m = sum_t c_t * x_{m-t} takes L = k_c * m_c = K * N operations:
// for each tap, from c_{k_c-1} down to c_0, the m_c coefficient bits from
// weight 2^0 up. A new word starts in S0 every N clocks, so K words are
// in flight and each set is busy every clock. S0 zeroes the sum at the
// start of a word (`clear`) and takes the next tap's input word from the
// parallel input `x_par` at the start of each tap (`load`); a tap always
// starts in S0 because m_c is a multiple of K.
//
// The coefficient bits cb[i], `clear` and `load` come from the CBSM, which
// also says when a word is finished. The array itself holds no schedule.
//
// Timing: an operation executed by S_{K-1} in clock T appears on y in
// clock T+1 (y is the final adder on the S_{K-1} registers).
// The ring of folding sets, the shifted input word, the parallel input
// into S0 and the final adder follow the published array; the carry-save
// form of the running sum is this design's choice.
module c3f #(
  parameter int unsigned K     = dbf_pkg::K,
  parameter int unsigned YW    = dbf_pkg::YW,
  parameter int unsigned PIX_W = dbf_pkg::PIX_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] x_par,  // input word for S0
  input  logic [K-1:0]     cb,     // coefficient bit of each folding set
  input  logic             clear,  // S0 starts a new output word
  input  logic             load,   // S0 starts a new tap
  output logic [YW-1:0]    y       // S_{K-1} result, binary
);
  logic [YW-1:0] s_q [K];
  logic [YW-1:0] c_q [K];
  logic [YW-1:0] x_q [K];

  for (genvar i = 0; i < K; i++) begin : g_fu
    localparam int unsigned PREV = (i == 0) ? K - 1 : i - 1;
    c3f_fu #(
      .YW     (YW),
      .PIX_W  (PIX_W),
      .HAS_MUX(i == 0)
    ) u_fu (
      .clk  (clk),
      .rst_n(rst_n),
      .s_in (s_q[PREV]),
      .c_in (c_q[PREV]),
      .x_in (x_q[PREV]),
      .x_par(x_par),
      .clear(i == 0 ? clear : 1'b0),
      .load (i == 0 ? load : 1'b0),
      .cb   (cb[i]),
      .s_out(s_q[i]),
      .c_out(c_q[i]),
      .x_out(x_q[i])
    );
  end

  c3f_adder #(.YW(YW)) u_adder (
    .s(s_q[K-1]),
    .c(c_q[K-1]),
    .y(y)
  );
endmodule
