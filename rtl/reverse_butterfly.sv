// reverse_butterfly: the permutation network of the parallel round-robin
// arbiter.
//
// log2(P) stages of P/2 swap switches. Stage l pairs lanes that differ only in
// bit l of their position (stride 2^l: neighbours first, halves last), and
// every switch is steered by bit l of its inputs' destination indices, so the
// index is consumed from the LSB in the first stage to the MSB in the last.
// After stage l a valid element sits at a lane whose low l+1 position bits
// equal those of its destination; after the last stage it has arrived. For the
// index pattern produced by the rolling prefix scan (a rotated, order-keeping
// compaction) no switch ever sees two valid inputs that want the same output;
// an assertion checks that at every clock edge.
//
// Timing: stage l is the global PRRA stage FIRST_STAGE+l; its output is
// registered when prra_pkg::stage_reg(FIRST_STAGE+l, log2(P), S) is true, else
// it is combinational. in_stb travels with the batch. The stage wiring and
// the switch rule follow the published design; the register rule is this design's.
module reverse_butterfly #(
  parameter int unsigned P           = 8,
  parameter int unsigned DATA_W      = 64,
  parameter int unsigned S           = 1,
  parameter int unsigned FIRST_STAGE = $clog2(P) + 1,
  localparam int unsigned L          = $clog2(P)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_stb,
  input  logic [P-1:0]             in_valid,
  input  logic [P-1:0][L-1:0]      in_index,
  input  logic [P-1:0][DATA_W-1:0] in_data,
  output logic                     out_stb,
  output logic [P-1:0]             out_valid,
  output logic [P-1:0][DATA_W-1:0] out_data
);

  // One generate block per stage. Each declares its own outputs (*_o) and
  // reads the outputs of the stage before it.
  for (genvar l = 0; l < L; l++) begin : g_stage
    logic              stb_i, stb_o;
    logic              v_i [P];
    logic [L-1:0]      i_i [P];
    logic [DATA_W-1:0] d_i [P];
    logic              v_w [P];   // switch outputs, by lane
    logic [L-1:0]      i_w [P];
    logic [DATA_W-1:0] d_w [P];
    logic              v_o [P];
    logic [L-1:0]      i_o [P];
    logic [DATA_W-1:0] d_o [P];

    if (l == 0) begin : g_in
      always_comb begin
        stb_i = in_stb;
        for (int n = 0; n < P; n++) begin
          v_i[n] = in_valid[n];
          i_i[n] = in_index[n];
          d_i[n] = in_data[n];
        end
      end
    end else begin : g_chain
      always_comb begin
        stb_i = g_stage[l-1].stb_o;
        v_i   = g_stage[l-1].v_o;
        i_i   = g_stage[l-1].i_o;
        d_i   = g_stage[l-1].d_o;
      end
    end

    for (genvar p = 0; p < P / 2; p++) begin : g_sw
      // Upper lane has bit l clear, lower lane is the same lane with bit l set.
      localparam int unsigned A = ((p >> l) << (l + 1)) | (p & ((1 << l) - 1));
      localparam int unsigned B = A + (1 << l);
      logic conflict;

      swap_switch #(.IDX_W(L), .DATA_W(DATA_W), .BIT(l)) u_sw (
        .a_valid (v_i[A]), .a_index (i_i[A]), .a_data (d_i[A]),
        .b_valid (v_i[B]), .b_index (i_i[B]), .b_data (d_i[B]),
        .u_valid (v_w[A]), .u_index (i_w[A]), .u_data (d_w[A]),
        .l_valid (v_w[B]), .l_index (i_w[B]), .l_data (d_w[B]),
        .conflict(conflict)
      );

      // The prefix scan only ever produces passable index patterns.
      a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n) !conflict)
        else $error("reverse_butterfly: routing conflict at stage %0d, lanes %0d/%0d", l, A, B);
    end

    if (prra_pkg::stage_reg(FIRST_STAGE + l, L, S)) begin : g_reg
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          stb_o <= 1'b0;
          for (int n = 0; n < P; n++) v_o[n] <= 1'b0;
        end else begin
          stb_o <= stb_i;
          v_o   <= v_w;
        end
        i_o <= i_w;
        d_o <= d_w;
      end
    end else begin : g_wire
      always_comb begin
        stb_o = stb_i;
        v_o   = v_w;
        i_o   = i_w;
        d_o   = d_w;
      end
    end
  end

  always_comb begin
    out_stb = g_stage[L-1].stb_o;
    for (int n = 0; n < P; n++) begin
      out_valid[n] = g_stage[L-1].v_o[n];
      out_data[n]  = g_stage[L-1].d_o[n];
    end
  end

endmodule
