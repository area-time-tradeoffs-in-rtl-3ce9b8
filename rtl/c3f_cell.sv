// c3f_cell -- basic cell of the bit-plane array.
//
// One bit position of a folding set: it forms the partial-product bit
// x AND cb (input-word bit times the coefficient bit c_i^j) and adds it,
// as a full adder, to the incoming sum bit and carry bit of the
// carry-save accumulator. The sum bit stays in this bit position, the
// carry bit moves one position up in the next folding set.
// Purely combinational. The cell's role (multiply the input word by one
// coefficient bit and add the product to the running sum) follows the
// published array; realising it as an AND gate feeding a full adder is
// this design's choice.
module c3f_cell (
  input  logic s_in,   // incoming sum bit
  input  logic c_in,   // incoming carry bit
  input  logic x,      // input-word bit at this position
  input  logic cb,     // coefficient bit c_i^j of this folding set
  output logic s_out,  // sum bit
  output logic c_out   // carry bit (weight of the next position)
);
  logic pp;

  always_comb begin
    pp    = x & cb;
    s_out = s_in ^ c_in ^ pp;
    c_out = (s_in & c_in) | (s_in & pp) | (c_in & pp);
  end
endmodule
