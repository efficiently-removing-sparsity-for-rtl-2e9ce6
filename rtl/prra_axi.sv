// prra_axi: memory-mapped AXI4-Lite peripheral around the parallel
// round-robin arbiter, for bring-up and measurement on an FPGA.
//
// A host writes an input batch (P valid bits and P data words) into
// registers, then writes the release bit of the control register. The batch
// enters the arbiter for exactly one cycle; LATENCY cycles later the output
// batch is captured into result registers that the host reads back. The
// arbiter keeps its round-robin offset between releases, so a sequence of
// releases behaves like a (slow) stream. That arrangement is the one the published
// design was evaluated with; the register map, the 32-bit AXI4-Lite
// bus and the handshake details are this design's own.
//
// Register map (byte addresses, 32-bit words):
//   0x0000 CTRL    W: bit0 release the input batch, bit1 clear DONE and BATCHES
//                  R: bit0 BUSY (released, result not yet captured), bit1 DONE
//   0x0004 BATCHES R: number of output batches captured since reset/clear
//   0x0008 INFO    R: {8'b0, LATENCY[7:0], DATA_W[15:0]}
//   0x000C LANES   R: P
//   0x1000 + 4*w   RW: input valid bits, lanes 32w .. 32w+31
//   0x2000 + 4*w   R:  output valid bits, lanes 32w .. 32w+31
//   0x4000 + 4*(n*NDW + w)  RW: input data of lane n, bits 32w .. 32w+31
//   0x8000 + 4*(n*NDW + w)  R:  output data of lane n, bits 32w .. 32w+31
// where NDW = ceil(DATA_W/32). Addresses outside these registers answer
// SLVERR (reads return 0). Writes honour WSTRB.
//
// AXI4-Lite: one write and one read in flight. A write is accepted when AWVALID
// and WVALID are both high and no response is pending (AWREADY = WREADY,
// asserted for that one cycle); the response follows on the next cycle. A read
// is accepted when no read data is pending; data follows on the next cycle.
// Reset: rst_n, active low, synchronous (ARESETn).
module prra_axi #(
  parameter int unsigned P      = 8,   // arbiter lanes
  parameter int unsigned DATA_W = 64,  // element width
  parameter int unsigned S      = 1    // arbiter register placement
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // write address / data / response
  input  logic                          s_axi_awvalid,
  output logic                          s_axi_awready,
  input  logic [prra_pkg::AXI_AW-1:0]   s_axi_awaddr,
  input  logic                          s_axi_wvalid,
  output logic                          s_axi_wready,
  input  logic [prra_pkg::AXI_DW-1:0]   s_axi_wdata,
  input  logic [prra_pkg::AXI_DW/8-1:0] s_axi_wstrb,
  output logic                          s_axi_bvalid,
  input  logic                          s_axi_bready,
  output logic [1:0]                    s_axi_bresp,
  // read address / data
  input  logic                          s_axi_arvalid,
  output logic                          s_axi_arready,
  input  logic [prra_pkg::AXI_AW-1:0]   s_axi_araddr,
  output logic                          s_axi_rvalid,
  input  logic                          s_axi_rready,
  output logic [prra_pkg::AXI_DW-1:0]   s_axi_rdata,
  output logic [1:0]                    s_axi_rresp
);
  import prra_pkg::*;

  localparam int unsigned NVW     = (P + 31) / 32;       // valid words
  localparam int unsigned NDW     = (DATA_W + 31) / 32;  // data words per lane
  localparam int unsigned NDT     = P * NDW;             // data words in all
  localparam int unsigned LATENCY = prra_latency($clog2(P), S);

  typedef logic [31:0] word_t;

  // ---------------------------------------------------------------- storage
  word_t in_vw  [NVW];
  word_t out_vw [NVW];
  word_t in_dw  [NDT];
  word_t out_dw [NDT];
  logic  release_q, busy_q, done_q;
  word_t batches_q;

  // ---------------------------------------------------------------- arbiter
  logic                     a_out_stb;
  logic [P-1:0]             a_in_valid, a_out_valid;
  logic [P-1:0][DATA_W-1:0] a_in_data, a_out_data;

  always_comb begin
    logic [NVW*32-1:0] vflat;
    logic [NDW*32-1:0] lane;
    for (int w = 0; w < NVW; w++) vflat[w*32 +: 32] = in_vw[w];
    a_in_valid = vflat[P-1:0];
    for (int n = 0; n < P; n++) begin
      for (int w = 0; w < NDW; w++) lane[w*32 +: 32] = in_dw[n*NDW + w];
      a_in_data[n] = lane[DATA_W-1:0];
    end
  end

  prra #(.P(P), .DATA_W(DATA_W), .S(S)) u_prra (
    .clk, .rst_n,
    .in_stb   (release_q),
    .in_valid (a_in_valid),
    .in_data  (a_in_data),
    .out_stb  (a_out_stb),
    .out_valid(a_out_valid),
    .out_data (a_out_data)
  );

  // ------------------------------------------------------------ address decode
  typedef enum logic [2:0] {R_CTRL, R_IN_V, R_OUT_V, R_IN_D, R_OUT_D, R_NONE} region_t;

  function automatic region_t region(logic [AXI_AW-1:0] a, output int unsigned idx);
    idx = 0;
    unique casez (a[15:12])
      4'b0000: begin idx = 32'(a[3:2]);  return (a[11:4] == '0) ? R_CTRL : R_NONE; end
      4'b0001: begin idx = 32'(a[11:2]); return (idx < NVW) ? R_IN_V  : R_NONE; end
      4'b0010: begin idx = 32'(a[11:2]); return (idx < NVW) ? R_OUT_V : R_NONE; end
      4'b01??: begin idx = 32'(a[13:2]); return (idx < NDT) ? R_IN_D  : R_NONE; end
      4'b1???: begin idx = 32'(a[14:2]); return (idx < NDT) ? R_OUT_D : R_NONE; end
      default: return R_NONE;
    endcase
  endfunction

  function automatic word_t merge(word_t old, word_t nw, logic [3:0] strb);
    word_t r;
    for (int b = 0; b < 4; b++) r[b*8 +: 8] = strb[b] ? nw[b*8 +: 8] : old[b*8 +: 8];
    return r;
  endfunction

  // ------------------------------------------------------------------ writes
  logic        wr_fire;
  region_t     wr_reg;
  int unsigned wr_idx;

  assign wr_fire       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_fire;
  assign s_axi_wready  = wr_fire;
  always_comb wr_reg   = region(s_axi_awaddr, wr_idx);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= RESP_OKAY;
      release_q    <= 1'b0;
      busy_q       <= 1'b0;
      done_q       <= 1'b0;
      batches_q    <= '0;
      for (int w = 0; w < NVW; w++) begin
        in_vw[w]  <= '0;
        out_vw[w] <= '0;
      end
    end else begin
      release_q <= 1'b0;
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;

      // Capture a finished batch.
      if (a_out_stb) begin
        logic [NVW*32-1:0] vflat;
        vflat = '0;
        vflat[P-1:0] = a_out_valid;
        for (int w = 0; w < NVW; w++) out_vw[w] <= vflat[w*32 +: 32];
        busy_q    <= 1'b0;
        done_q    <= 1'b1;
        batches_q <= batches_q + 1;
      end

      if (wr_fire) begin
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= (wr_reg == R_NONE || wr_reg == R_OUT_V || wr_reg == R_OUT_D ||
                         (wr_reg == R_CTRL && wr_idx != 0)) ? RESP_SLVERR : RESP_OKAY;
        case (wr_reg)
          R_CTRL: if (wr_idx == 0 && s_axi_wstrb[0]) begin
            if (s_axi_wdata[1]) begin
              done_q    <= 1'b0;
              batches_q <= '0;
            end
            if (s_axi_wdata[0]) begin
              release_q <= 1'b1;
              busy_q    <= 1'b1;
              done_q    <= 1'b0;
            end
          end
          R_IN_V:  in_vw[wr_idx] <= merge(in_vw[wr_idx], s_axi_wdata, s_axi_wstrb);
          default: ;
        endcase
      end
    end
  end

  // Data registers carry no reset.
  always_ff @(posedge clk) begin
    if (a_out_stb) begin
      for (int n = 0; n < P; n++) begin
        logic [NDW*32-1:0] lane;
        lane = '0;
        lane[DATA_W-1:0] = a_out_data[n];
        for (int w = 0; w < NDW; w++) out_dw[n*NDW + w] <= lane[w*32 +: 32];
      end
    end
    if (rst_n && wr_fire && wr_reg == R_IN_D)
      in_dw[wr_idx] <= merge(in_dw[wr_idx], s_axi_wdata, s_axi_wstrb);
  end

  // ------------------------------------------------------------------- reads
  region_t     rd_reg;
  int unsigned rd_idx;
  always_comb rd_reg   = region(s_axi_araddr, rd_idx);
  assign s_axi_arready = !s_axi_rvalid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      s_axi_rresp  <= RESP_OKAY;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (s_axi_arvalid && s_axi_arready) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rresp  <= (rd_reg == R_NONE) ? RESP_SLVERR : RESP_OKAY;
        unique case (rd_reg)
          R_CTRL: case (rd_idx)
            0:       s_axi_rdata <= {30'b0, done_q, busy_q};
            1:       s_axi_rdata <= batches_q;
            2:       s_axi_rdata <= {8'b0, 8'(LATENCY), 16'(DATA_W)};
            default: s_axi_rdata <= 32'(P);
          endcase
          R_IN_V:  s_axi_rdata <= in_vw[rd_idx];
          R_OUT_V: s_axi_rdata <= out_vw[rd_idx];
          R_IN_D:  s_axi_rdata <= in_dw[rd_idx];
          R_OUT_D: s_axi_rdata <= out_dw[rd_idx];
          R_NONE:  s_axi_rdata <= '0;
        endcase
      end
    end
  end

  // -------------------------------------------------------- handshake rules
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid && $stable(s_axi_bresp));
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata) && $stable(s_axi_rresp));

endmodule
