// cbsm -- Coefficient Bit Supply Module with reducible folding factor (CBSM+).
//
// The CBSM feeds every folding set of the C3F with the coefficient bit of
// the operation it executes in the current clock, in the reordered
// sequence the folded array needs. It keeps one tag per folding set that
// describes the output word in flight there: step s (0..L-1), tap index
// tp (taps are visited from c_{k_c-1} down to c_0), coefficient bit j
// (0..m_c-1) and an opaque identifier supplied with the start request.
// Each clock the tags rotate with the data: set i+1 receives the tag of
// set i advanced by one step, and S0 receives the tag of S_{K-1} advanced
// by one step, or a fresh tag when a new word starts. Words may start only
// once every N clocks, in the clock after `phase` reaches N-1; because
// gcd(K, N) = 1 and L = K*N, a fresh word never meets a word still in
// flight in S0.
//
// Configuration (`cfg_we`): folding factor N, tap count k_c, coefficient
// length m_c and the coefficients. It must satisfy k_c*m_c = K*N,
// m_c mod K = 0, gcd(K, N) = 1 and k_c != K; this is asserted. It may be
// changed only while the module is idle (`busy` low), which takes at most
// L clocks after the last start. With N fixed at NMAX and all filters
// padded to k_c = 7 the same module behaves as the plain CBSM.
//
// Interface and timing:
//   start_req/start_id : ask for a new word; start_ack pulses in the clock
//                        the request is taken, and the word occupies S0
//                        from the next clock on.
//   cb, clear, load    : controls for the C3F in the current clock.
//   nxt_load, nxt_tp,  : what S0 will do in the next clock, so that the
//   nxt_id               pixel for a tap start can be read from RAM one
//                        clock ahead.
//   done/done_id       : the word `done_id` is on the C3F output y now.
// The rotating order of operations follows the published data flow; the
// tag ring that produces it is this design's own construction.
module cbsm #(
  parameter int unsigned K      = dbf_pkg::K,
  parameter int unsigned NMAX   = dbf_pkg::NMAX,
  parameter int unsigned KC_MAX = dbf_pkg::KC_MAX,
  parameter int unsigned MC_MAX = dbf_pkg::MC_MAX,
  parameter int unsigned ID_W   = dbf_pkg::ID_W
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // configuration
  input  logic                             cfg_we,
  input  logic [3:0]                       cfg_n,
  input  logic [3:0]                       cfg_kc,
  input  logic [3:0]                       cfg_mc,
  input  logic [KC_MAX-1:0][MC_MAX-1:0]    cfg_coef,
  // word starts
  input  logic                             start_req,
  input  logic [ID_W-1:0]                  start_id,
  output logic                             start_ack,
  // to the C3F
  output logic [K-1:0]                     cb,
  output logic                             clear,
  output logic                             load,
  // look-ahead for the pixel fetch
  output logic                             nxt_load,
  output logic [$clog2(KC_MAX)-1:0]        nxt_tp,
  output logic [ID_W-1:0]                  nxt_id,
  // results
  output logic                             done,
  output logic [ID_W-1:0]                  done_id,
  output logic                             busy
);
  localparam int unsigned LMAX = K * NMAX;
  localparam int unsigned SW   = $clog2(LMAX);
  localparam int unsigned TW   = $clog2(KC_MAX);
  localparam int unsigned JW   = $clog2(MC_MAX);

  typedef struct packed {
    logic            valid;
    logic [SW-1:0]   s;
    logic [TW-1:0]   tp;
    logic [JW-1:0]   j;
    logic [ID_W-1:0] id;
  } tag_t;

  logic [3:0]                    n_q, kc_q, mc_q;
  logic [KC_MAX-1:0][MC_MAX-1:0] coef_q;
  logic [SW:0]                   l_q;       // L = K*N of the current configuration
  logic [3:0]                    phase;
  tag_t                          tag [K];
  tag_t                          tag_nx [K];
  tag_t                          fresh;

  // advance a tag by one step; a word that finished leaves the ring
  function automatic tag_t advance(tag_t t, logic [SW:0] l, logic [3:0] mc);
    tag_t r;
    r = t;
    if (t.valid) begin
      if ({1'b0, t.s} == l - 1'b1) begin
        r.valid = 1'b0;
      end else begin
        r.s = t.s + 1'b1;
        if (t.j == JW'(mc - 1'b1)) begin
          r.j  = '0;
          r.tp = t.tp + 1'b1;
        end else begin
          r.j = t.j + 1'b1;
        end
      end
    end
    return r;
  endfunction

  always_comb begin
    start_ack = start_req && (phase == n_q - 1'b1) && !cfg_we;
    fresh       = '0;
    fresh.valid = 1'b1;
    fresh.id    = start_id;
    tag_nx[0] = start_ack ? fresh : advance(tag[K-1], l_q, mc_q);
    for (int i = 1; i < K; i++) tag_nx[i] = advance(tag[i-1], l_q, mc_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q    <= 4'(NMAX);
      kc_q   <= 4'(KC_MAX);
      mc_q   <= 4'(K);
      l_q    <= (SW+1)'(LMAX);
      coef_q <= '0;
      phase  <= '0;
      for (int i = 0; i < K; i++) tag[i] <= '0;
      done    <= 1'b0;
      done_id <= '0;
    end else begin
      if (cfg_we) begin
        n_q    <= cfg_n;
        kc_q   <= cfg_kc;
        mc_q   <= cfg_mc;
        l_q    <= (SW+1)'(K * cfg_n);
        coef_q <= cfg_coef;
        phase  <= '0;
      end else begin
        phase <= (phase == n_q - 1'b1) ? '0 : phase + 1'b1;
      end
      for (int i = 0; i < K; i++) tag[i] <= tag_nx[i];
      done    <= tag[K-1].valid && ({1'b0, tag[K-1].s} == l_q - 1'b1);
      done_id <= tag[K-1].id;
    end
  end

  // controls of the current clock
  always_comb begin
    for (int i = 0; i < K; i++)
      cb[i] = tag[i].valid && coef_q[kc_q - 1'b1 - 4'(tag[i].tp)][tag[i].j];
    clear = !tag[0].valid || tag[0].s == '0;
    load  = tag[0].valid && tag[0].j == '0;
    nxt_load = tag_nx[0].valid && tag_nx[0].j == '0;
    nxt_tp   = tag_nx[0].tp;
    nxt_id   = tag_nx[0].id;
    busy = done;
    for (int i = 0; i < K; i++) busy |= tag[i].valid;
  end

  // rules of the configuration and of the schedule
  a_idle_cfg: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> !busy)
    else $error("cbsm: reconfigured while words are in flight");
  a_l: assert property (@(posedge clk) disable iff (!rst_n)
                        cfg_we |-> 32'(cfg_kc) * 32'(cfg_mc) == K * 32'(cfg_n))
    else $error("cbsm: k_c*m_c must equal K*N");
  a_mc: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> 32'(cfg_mc) % K == 0)
    else $error("cbsm: m_c must be a multiple of K");
  a_n: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> 32'(cfg_n) % K != 0)
    else $error("cbsm: N must be coprime with K (K prime)");
  a_kc: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> 32'(cfg_kc) != K)
    else $error("cbsm: k_c must differ from K");
  a_range: assert property (@(posedge clk) disable iff (!rst_n)
                            cfg_we |-> cfg_n != 0 && 32'(cfg_n) <= NMAX &&
                                       32'(cfg_kc) <= KC_MAX && 32'(cfg_mc) <= MC_MAX)
    else $error("cbsm: configuration out of range");
  a_slot: assert property (@(posedge clk) disable iff (!rst_n)
                           start_ack |-> !advance(tag[K-1], l_q, mc_q).valid)
    else $error("cbsm: new word collides with a word in flight");
endmodule
