// tb_rolling_prefix_scan: self-checking test of the rolling prefix scan.
//
// Two instances, P = 8 fully registered (latency log2(P)+1 = 4) and P = 8
// with only the stateful stage registered (latency 1), get the same random
// stream of batches with idle cycles. For every valid lane the expected index
// is (number of valid lanes seen in all earlier batches + number of valid
// lanes before it in this batch) mod P; valid bits and data must pass through
// unchanged, and the batch must appear exactly at the expected latency.
module tb_rolling_prefix_scan;
  localparam int P  = 8;
  localparam int L  = 3;
  localparam int DW = 16;
  localparam int NB = 400;
  localparam int LAT [2] = '{4, 1};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_stb;
  logic [P-1:0]         in_valid;
  logic [P-1:0][DW-1:0] in_data;
  logic                 o_stb [2];
  logic [P-1:0]         o_valid [2];
  logic [P-1:0][L-1:0]  o_index [2];
  logic [P-1:0][DW-1:0] o_data [2];

  rolling_prefix_scan #(.P(P), .DATA_W(DW), .S(1)) dut0 (
    .clk, .rst_n, .in_stb, .in_valid, .in_data,
    .out_stb(o_stb[0]), .out_valid(o_valid[0]), .out_index(o_index[0]), .out_data(o_data[0]));
  rolling_prefix_scan #(.P(P), .DATA_W(DW), .S(16)) dut1 (
    .clk, .rst_n, .in_stb, .in_valid, .in_data,
    .out_stb(o_stb[1]), .out_valid(o_valid[1]), .out_index(o_index[1]), .out_data(o_data[1]));

  typedef struct {
    logic [P-1:0]         v;
    logic [P-1:0][L-1:0]  idx;
    logic [P-1:0][DW-1:0] d;
    int                   t;
  } exp_t;

  exp_t q [2][$];
  int   checks = 0, failures = 0, cyc = 0, got [2] = '{0, 0};
  int   total = 0;  // valid elements so far

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    in_stb = 0; in_valid = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < NB; b++) begin
      @(posedge clk);
      if ($urandom_range(0, 9) == 0) begin
        in_stb   <= 1'b0;
        in_valid <= P'($urandom);
      end else begin
        exp_t e;
        logic [P-1:0] v;
        logic [P-1:0][DW-1:0] d;
        int k;
        v = P'($urandom);
        if (b % 17 == 0) v = '1;
        if (b % 19 == 0) v = '0;
        for (int i = 0; i < P; i++) d[i] = DW'($urandom);
        k = 0;
        for (int i = 0; i < P; i++) begin
          e.idx[i] = L'(total + k);
          if (v[i]) k++;
        end
        total += k;
        e.v = v; e.d = d;
        for (int n = 0; n < 2; n++) begin
          e.t = cyc + 1 + LAT[n];
          q[n].push_back(e);
        end
        in_stb <= 1'b1; in_valid <= v; in_data <= d;
      end
    end
    @(posedge clk);
    in_stb <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (q[0].size() != 0 || q[1].size() != 0) begin
      failures++;
      $display("missing output batches: %0d %0d", q[0].size(), q[1].size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar n = 0; n < 2; n++) begin : g_chk
    always @(posedge clk) begin
      if (rst_n && o_stb[n]) begin
        exp_t e;
        int bad;
        bad = 0;
        checks++;
        if (q[n].size() == 0) bad++;
        else begin
          e = q[n].pop_front();
          if (e.t != cyc) bad++;
          if (o_valid[n] != e.v) bad++;
          for (int i = 0; i < P; i++)
            if (e.v[i] && (o_index[n][i] != e.idx[i] || o_data[n][i] != e.d[i])) bad++;
        end
        if (bad != 0) begin
          failures++;
          if (failures < 6) $display("instance %0d batch %0d wrong at cycle %0d", n, got[n], cyc);
        end
        got[n]++;
      end
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
