// rolling_prefix_scan: destination indices for the parallel round-robin arbiter.
//
// Each cycle a batch of P lanes (valid bit + data) enters. The scan counts the
// valid bits with a Kogge-Stone (Hillis-Steele) prefix sum in log2(P) stages:
// in stage k lane i adds the running count of lane i-2^k. A final stateful
// stage adds the "last offset" register to every lane and loads that register
// with the new value of lane P-1. All arithmetic is modulo P (log2(P) bits),
// since only the low bits of the running count matter. The last offset is the
// count of all valid elements seen before, minus one, and resets to P-1, so a
// valid element's index is exactly its round-robin output position. Lanes are
// not permuted here; data and valid bits travel alongside the counts.
//
// Timing: log2(P)+1 stages. Stage k's output is registered when
// prra_pkg::stage_reg(k, log2(P), S) is true; the stateful last stage is always
// registered. in_stb marks a batch; lanes of a cycle without in_stb count as
// invalid. Reset (rst_n low, synchronous) clears the pipeline's valid bits
// and sets the offset to P-1. The structure follows the published design; the stage
// register rule, the strobe and the reset style are this design's choices.
module rolling_prefix_scan #(
  parameter int unsigned P      = 8,   // lanes per batch, a power of two >= 2
  parameter int unsigned DATA_W = 64,  // element data width
  parameter int unsigned S      = 1,   // register placement: keep every S-th stage register
  localparam int unsigned L     = $clog2(P)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_stb,
  input  logic [P-1:0]                 in_valid,
  input  logic [P-1:0][DATA_W-1:0]     in_data,
  output logic                         out_stb,
  output logic [P-1:0]                 out_valid,
  output logic [P-1:0][L-1:0]          out_index,
  output logic [P-1:0][DATA_W-1:0]     out_data
);

  typedef logic [L-1:0] cnt_t;

  cnt_t last_q;  // count of valid elements so far, minus one, modulo P

  // One generate block per stage. Each declares its own outputs (*_o) and
  // reads the outputs of the stage before it.
  for (genvar k = 0; k <= L; k++) begin : g_stage
    logic                     stb_i, stb_o;
    logic [P-1:0]             v_i, v_o;
    cnt_t [P-1:0]             c_i, c_nxt, c_o;
    logic [P-1:0][DATA_W-1:0] d_i, d_o;

    if (k == 0) begin : g_in
      always_comb begin
        stb_i = in_stb;
        v_i   = in_valid & {P{in_stb}};
        d_i   = in_data;
        for (int i = 0; i < P; i++) c_i[i] = cnt_t'(v_i[i]);
      end
    end else begin : g_chain
      always_comb begin
        stb_i = g_stage[k-1].stb_o;
        v_i   = g_stage[k-1].v_o;
        c_i   = g_stage[k-1].c_o;
        d_i   = g_stage[k-1].d_o;
      end
    end

    if (k < L) begin : g_scan
      // Kogge-Stone step: lane i adds lane i-2^k.
      always_comb begin
        for (int i = 0; i < P; i++) begin
          if (i >= (1 << k)) c_nxt[i] = c_i[i] + c_i[i - (1 << k)];
          else               c_nxt[i] = c_i[i];
        end
      end
    end else begin : g_roll
      // Stateful stage: add the last offset, keep the new last lane.
      always_comb begin
        for (int i = 0; i < P; i++) c_nxt[i] = c_i[i] + last_q;
      end
      always_ff @(posedge clk) begin
        if (!rst_n)     last_q <= cnt_t'(P - 1);
        else if (stb_i) last_q <= c_nxt[P-1];
      end
    end

    if (prra_pkg::stage_reg(k, L, S)) begin : g_reg
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          stb_o <= 1'b0;
          v_o   <= '0;
          c_o   <= '0;
        end else begin
          stb_o <= stb_i;
          v_o   <= v_i;
          c_o   <= c_nxt;
        end
        d_o <= d_i;
      end
    end else begin : g_wire
      always_comb begin
        stb_o = stb_i;
        v_o   = v_i;
        c_o   = c_nxt;
        d_o   = d_i;
      end
    end
  end

  assign out_stb   = g_stage[L].stb_o;
  assign out_valid = g_stage[L].v_o;
  assign out_index = g_stage[L].c_o;
  assign out_data  = g_stage[L].d_o;

endmodule
