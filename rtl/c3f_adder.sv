// c3f_adder -- final adder of the folded array.
//
// The folding sets keep the accumulated sum in carry-save form (a sum
// vector and a carry vector). This adder merges the two vectors held by
// the last folding set into the binary output word y = s + c (mod 2^YW).
// Combinational; a plain ripple-free `+` left to synthesis. The adder's
// position under the last folding set follows the published array; its
// carry-save input format is this design's choice.
module c3f_adder #(
  parameter int unsigned YW = dbf_pkg::YW
) (
  input  logic [YW-1:0] s,
  input  logic [YW-1:0] c,
  output logic [YW-1:0] y
);
  always_comb y = s + c;
endmodule
