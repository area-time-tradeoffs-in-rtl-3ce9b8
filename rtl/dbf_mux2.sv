// dbf_mux2 -- the 2-to-1 pixel multiplexer in front of the C3F.
//
// Passes the p pixel (from RAM_P) when sel = 0 and the q pixel (from
// RAM_Q) when sel = 1 to the C3F input word x. Combinational. The
// multiplexer and its select from the control unit follow the published
// architecture.
module dbf_mux2 #(
  parameter int unsigned W = dbf_pkg::PIX_W
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] q,
  input  logic         sel,
  output logic [W-1:0] x
);
  always_comb x = sel ? q : p;
endmodule
