// prra: parallel round-robin arbiter built from a rolling prefix scan and a
// reverse butterfly network.
//
// Every cycle the arbiter takes a batch of P lanes, each a valid bit and a
// DATA_W-bit word, and packs the valid words, in their input order, into
// consecutive output lanes starting where the previous batch stopped,
// wrapping round modulo P. Over a stream this removes the gaps (sparsity)
// without ever stalling the producer: there is no backpressure. Behaviourally,
// with a running offset o:
//   j = 0; for i in 0..P-1: if in_valid[i] { out[(o+j)%P] = in[i]; j++ }
//   o = (o + j) % P
// and every other output lane is invalid.
//
// The rolling prefix scan gives each element its destination index, and the
// reverse butterfly routes it there with one 2x2 switch per lane pair and
// stage: P/2*log2(P) switches in log2(P) stages.
//
// Timing: 2*log2(P)+1 stages; S picks which are registered (S = 1: all,
// LATENCY = 2*log2(P)+1 cycles; large S: only the stateful scan stage,
// LATENCY = 1). A batch entering with in_stb leaves LATENCY cycles later with
// out_stb; one batch per cycle can enter. Cycles without in_stb carry no data
// and do not move the offset. Reset: rst_n, active low, synchronous.
module prra #(
  parameter int unsigned P      = 8,   // lanes per batch, a power of two >= 2
  parameter int unsigned DATA_W = 64,  // element data width
  parameter int unsigned S      = 1,   // register placement (1, 2, 4, 8, 16)
  localparam int unsigned L       = $clog2(P),
  localparam int unsigned LATENCY = prra_pkg::prra_latency($clog2(P), S)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_stb,
  input  logic [P-1:0]             in_valid,
  input  logic [P-1:0][DATA_W-1:0] in_data,
  output logic                     out_stb,
  output logic [P-1:0]             out_valid,
  output logic [P-1:0][DATA_W-1:0] out_data
);

  logic                     mid_stb;
  logic [P-1:0]             mid_valid;
  logic [P-1:0][L-1:0]      mid_index;
  logic [P-1:0][DATA_W-1:0] mid_data;

  rolling_prefix_scan #(.P(P), .DATA_W(DATA_W), .S(S)) u_scan (
    .clk, .rst_n,
    .in_stb, .in_valid, .in_data,
    .out_stb  (mid_stb),
    .out_valid(mid_valid),
    .out_index(mid_index),
    .out_data (mid_data)
  );

  reverse_butterfly #(.P(P), .DATA_W(DATA_W), .S(S), .FIRST_STAGE(L + 1)) u_net (
    .clk, .rst_n,
    .in_stb   (mid_stb),
    .in_valid (mid_valid),
    .in_index (mid_index),
    .in_data  (mid_data),
    .out_stb, .out_valid, .out_data
  );

endmodule
