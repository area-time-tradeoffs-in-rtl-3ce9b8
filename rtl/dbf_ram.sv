// dbf_ram -- on-chip pixel block RAM (used as RAM_P and as RAM_Q).
//
// Holds one BLK x BLK pixel block, row-major (address = row*BLK + column).
// Simple dual port: the system bus writes through the write port, the
// control unit reads through the read port. The read is synchronous:
// rdata shows the word at raddr one clock after raddr is presented.
// A write and a read of the same address in one clock return the old
// word. The RAMs' place and purpose follow the published architecture;
// their size (one 4x4 block) and port arrangement are this design's
// choices.
module dbf_ram #(
  parameter int unsigned W     = dbf_pkg::PIX_W,
  parameter int unsigned DEPTH = dbf_pkg::BLK * dbf_pkg::BLK
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
