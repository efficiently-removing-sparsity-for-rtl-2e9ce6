// tb_reverse_butterfly: self-checking test of the reverse butterfly network.
//
// The network is fed the index patterns a round-robin arbiter produces: a
// random offset o and a random valid mask, with the j-th valid lane carrying
// index (o + j) mod P. Every valid element must come out on the lane named by
// its index with its data intact, every other lane must be invalid, and no
// switch may report a conflict (the network's assertion). Pure rotations
// (all lanes valid) are included. Two instances: P = 8 with every stage
// registered (latency 3) and P = 32 whose stages 0..4 are global stages 6..10
// with every other one registered (stages 7 and 9: latency 2).
module tb_reverse_butterfly;
  localparam int DW = 16;
  localparam int NB = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- P = 8
  logic                in8_stb, out8_stb;
  logic [7:0]          in8_v, out8_v;
  logic [7:0][2:0]     in8_i;
  logic [7:0][DW-1:0]  in8_d, out8_d;
  reverse_butterfly #(.P(8), .DATA_W(DW), .S(1)) dut8 (
    .clk, .rst_n, .in_stb(in8_stb), .in_valid(in8_v), .in_index(in8_i), .in_data(in8_d),
    .out_stb(out8_stb), .out_valid(out8_v), .out_data(out8_d));

  // ---- P = 32
  logic                in32_stb, out32_stb;
  logic [31:0]         in32_v, out32_v;
  logic [31:0][4:0]    in32_i;
  logic [31:0][DW-1:0] in32_d, out32_d;
  reverse_butterfly #(.P(32), .DATA_W(DW), .S(2), .FIRST_STAGE(6)) dut32 (
    .clk, .rst_n, .in_stb(in32_stb), .in_valid(in32_v), .in_index(in32_i), .in_data(in32_d),
    .out_stb(out32_stb), .out_valid(out32_v), .out_data(out32_d));

  typedef struct { logic [31:0] v; logic [31:0][DW-1:0] d; int t; } exp_t;
  exp_t q8[$], q32[$];

  // Build one compaction pattern for P lanes: inputs and expected outputs.
  task automatic make(int P, int b, output logic [31:0] v, output logic [31:0][4:0] idx,
                      output logic [31:0][DW-1:0] d, output exp_t e);
    int o, j;
    o = $urandom_range(0, P - 1);
    v = 32'($urandom);
    if (P < 32) v &= (32'(1) << P) - 1;
    if (b % 7 == 0) v = (P < 32) ? (32'(1) << P) - 1 : '1;   // full rotation
    if (b % 11 == 0) v = '0;
    e.v = '0; e.d = '0; j = 0;
    for (int i = 0; i < 32; i++) begin
      d[i]   = DW'($urandom);
      idx[i] = 5'($urandom_range(0, P - 1));   // don't-care for invalid lanes
      if (i < P && v[i]) begin
        idx[i] = 5'((o + j) % P);
        e.v[(o + j) % P] = 1'b1;
        e.d[(o + j) % P] = d[i];
        j++;
      end
    end
  endtask

  initial begin
    in8_stb = 0; in32_stb = 0;
    in8_v = '0; in32_v = '0; in8_i = '0; in32_i = '0; in8_d = '0; in32_d = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < NB; b++) begin
      logic [31:0] v; logic [31:0][4:0] idx; logic [31:0][DW-1:0] d; exp_t e;
      @(posedge clk);
      make(8, b, v, idx, d, e);
      e.t = cyc + 1 + 3;
      q8.push_back(e);
      in8_stb <= 1'b1; in8_v <= v[7:0];
      for (int i = 0; i < 8; i++) begin in8_i[i] <= idx[i][2:0]; in8_d[i] <= d[i]; end
      make(32, b, v, idx, d, e);
      e.t = cyc + 1 + 2;
      q32.push_back(e);
      in32_stb <= 1'b1; in32_v <= v; in32_i <= idx; in32_d <= d;
    end
    @(posedge clk);
    in8_stb <= 1'b0; in32_stb <= 1'b0;
    repeat (8) @(posedge clk);
    checks++;
    if (q8.size() != 0 || q32.size() != 0) begin
      failures++;
      $display("missing batches %0d %0d", q8.size(), q32.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out8_stb) begin
      exp_t e; int bad;
      bad = 0;
      checks++;
      if (q8.size() == 0) bad++;
      else begin
        e = q8.pop_front();
        if (e.t != cyc || out8_v != e.v[7:0]) bad++;
        for (int i = 0; i < 8; i++) if (e.v[i] && out8_d[i] != e.d[i]) bad++;
      end
      if (bad != 0) begin failures++; if (failures < 6) $display("P=8 wrong batch at cycle %0d", cyc); end
    end
    if (rst_n && out32_stb) begin
      exp_t e; int bad;
      bad = 0;
      checks++;
      if (q32.size() == 0) bad++;
      else begin
        e = q32.pop_front();
        if (e.t != cyc || out32_v != e.v) bad++;
        for (int i = 0; i < 32; i++) if (e.v[i] && out32_d[i] != e.d[i]) bad++;
      end
      if (bad != 0) begin failures++; if (failures < 6) $display("P=32 wrong batch at cycle %0d", cyc); end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
