// c3f_fu -- one folding set (FU row S_i) of the folded bit-plane array.
//
// A row of YW basic cells adds the partial product cb * x to the
// carry-save pair (s_in, c_in) coming from the previous folding set and
// registers the result. The input word travels with the sum: the row
// registers x shifted one position to the left, so the next folding set
// multiplies by the next power of two.
//
// With HAS_MUX = 1 (folding set S0) the row also has the input
// multiplexers: `clear` replaces the incoming sum and carry with zeros
// (start of a new output word), `load` takes the parallel input word
// x_par instead of the shifted word (start of a new tap). Other rows have
// no multiplexers and ignore those inputs.
//
// Timing: one operation per clock; outputs are valid one clock after the
// inputs. The carry vector is kept one position up (weight doubled) in
// s/c form, so s_out + c_out is the running sum modulo 2^YW.
module c3f_fu #(
  parameter int unsigned YW      = dbf_pkg::YW,
  parameter int unsigned PIX_W   = dbf_pkg::PIX_W,
  parameter bit          HAS_MUX = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [YW-1:0]    s_in,   // sum vector from the previous folding set
  input  logic [YW-1:0]    c_in,   // carry vector from the previous folding set
  input  logic [YW-1:0]    x_in,   // shifted input word from the previous folding set
  input  logic [PIX_W-1:0] x_par,  // parallel input word (S0 only)
  input  logic             clear,  // start of an output word (S0 only)
  input  logic             load,   // start of a tap (S0 only)
  input  logic             cb,     // coefficient bit for this clock
  output logic [YW-1:0]    s_out,
  output logic [YW-1:0]    c_out,
  output logic [YW-1:0]    x_out   // word used this clock, shifted left by one
);
  logic [YW-1:0] s_op, c_op, x_op;
  // cc_nx[YW-1] (the carry out of the top bit) is dropped: the sum is
  // kept modulo 2^YW, and YW is wide enough for every coefficient set used.
  logic [YW-1:0] s_nx, cc_nx;

  always_comb begin
    s_op = s_in;
    c_op = c_in;
    x_op = x_in;
    if (HAS_MUX) begin
      if (clear) begin
        s_op = '0;
        c_op = '0;
      end
      if (load) x_op = YW'(x_par);
    end
  end

  for (genvar b = 0; b < YW; b++) begin : g_cell
    c3f_cell u_cell (
      .s_in (s_op[b]),
      .c_in (c_op[b]),
      .x    (x_op[b]),
      .cb   (cb),
      .s_out(s_nx[b]),
      .c_out(cc_nx[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_out <= '0;
      c_out <= '0;
      x_out <= '0;
    end else begin
      s_out <= s_nx;
      c_out <= {cc_nx[YW-2:0], 1'b0};
      x_out <= {x_op[YW-2:0], 1'b0};
    end
  end
endmodule
