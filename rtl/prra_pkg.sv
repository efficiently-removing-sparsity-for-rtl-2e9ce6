// prra_pkg: constants and helper functions shared by the parallel round-robin
// arbiter (PRRA) modules and its AXI evaluation wrapper.
//
// The PRRA is a chain of 2*log2(P)+1 combinational stages: log2(P) prefix-scan
// stages, one stateful accumulate stage and log2(P) reverse-butterfly stages.
// The register placement parameter S selects which stage outputs get a
// pipeline register: with S = 1 every stage is registered, with S = 2 every
// other one, and so on. The accumulate stage holds the running offset and is
// therefore always registered. This counting rule is this design's reading of
// the register-skipping parameter of the published design, which is only
// specified as "S = 2 skips every other pipeline register stage".
package prra_pkg;

  // Total number of combinational stages of a PRRA with L = log2(P).
  function automatic int unsigned prra_stages(int unsigned l);
    return 2 * l + 1;
  endfunction

  // Whether the output of global stage k (0-based) is registered.
  function automatic bit stage_reg(int unsigned k, int unsigned l, int unsigned s);
    return (k == l) || (((k + 1) % s) == 0);
  endfunction

  // Number of registered stages, i.e. the input-to-output latency in cycles.
  function automatic int unsigned prra_latency(int unsigned l, int unsigned s);
    int unsigned n;
    n = 0;
    for (int unsigned k = 0; k < 2 * l + 1; k++) n += stage_reg(k, l, s);
    return n;
  endfunction

  // AXI4-Lite register map of the evaluation wrapper (byte addresses).
  localparam int unsigned AXI_DW          = 32;
  localparam int unsigned AXI_AW          = 16;
  localparam logic [15:0] REG_CTRL        = 16'h0000; // W: bit0 release, bit1 clear; R: status
  localparam logic [15:0] REG_BATCHES     = 16'h0004; // R: batches captured so far
  localparam logic [15:0] REG_INFO        = 16'h0008; // R: {8'b0, LATENCY[7:0], DATA_W[15:0]}
  localparam logic [15:0] REG_LANES       = 16'h000C; // R: P
  localparam logic [15:0] BASE_IN_VALID   = 16'h1000; // RW: input valid bits, 32 lanes per word
  localparam logic [15:0] BASE_OUT_VALID  = 16'h2000; // R: output valid bits, 32 lanes per word
  localparam logic [15:0] BASE_IN_DATA    = 16'h4000; // RW: input data, lane-major, 32 bits per word
  localparam logic [15:0] BASE_OUT_DATA   = 16'h8000; // R: output data, lane-major, 32 bits per word

  // AXI response codes.
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

endpackage
