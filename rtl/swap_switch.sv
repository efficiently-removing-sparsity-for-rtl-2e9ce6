// swap_switch: the 2x2 switch of the reverse butterfly network.
//
// Each input carries a valid bit, a destination index (modulo P) and a data
// word. The switch either forwards (A to the upper output, B to the lower
// output) or swaps, and decides for itself from the bit BIT of the
// destination indices:
//
//   C = (a.valid & a.index[BIT]) | (b.valid & ~b.index[BIT])
//
// The upper output lies at the lane whose position bit BIT is 0, so a valid A
// that needs bit BIT = 1, or a valid B that needs bit BIT = 0, forces a swap.
// An invalid input never forces anything. The condition and the LSB-first
// steering follow the published architecture; a variant without the negation
// on B could not route B to the upper output.
// `conflict` flags two valid inputs that want the same output, which the
// network's routing guarantees never happens; the network asserts on it.
// Purely combinational.
module swap_switch #(
  parameter int unsigned IDX_W  = 3,   // width of the destination index, log2(P)
  parameter int unsigned DATA_W = 64,  // element data width
  parameter int unsigned BIT    = 0    // index bit that steers this stage
) (
  input  logic              a_valid,
  input  logic [IDX_W-1:0]  a_index,
  input  logic [DATA_W-1:0] a_data,
  input  logic              b_valid,
  input  logic [IDX_W-1:0]  b_index,
  input  logic [DATA_W-1:0] b_data,
  output logic              u_valid,   // upper output (position bit BIT = 0)
  output logic [IDX_W-1:0]  u_index,
  output logic [DATA_W-1:0] u_data,
  output logic              l_valid,   // lower output (position bit BIT = 1)
  output logic [IDX_W-1:0]  l_index,
  output logic [DATA_W-1:0] l_data,
  output logic              conflict
);

  logic swap;

  always_comb begin
    swap     = (a_valid & a_index[BIT]) | (b_valid & ~b_index[BIT]);
    conflict = a_valid & b_valid & (a_index[BIT] == b_index[BIT]);
    if (swap) begin
      {u_valid, u_index, u_data} = {b_valid, b_index, b_data};
      {l_valid, l_index, l_data} = {a_valid, a_index, a_data};
    end else begin
      {u_valid, u_index, u_data} = {a_valid, a_index, a_data};
      {l_valid, l_index, l_data} = {b_valid, b_index, b_data};
    end
  end

endmodule
