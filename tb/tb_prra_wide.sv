// tb_prra_wide: the two widest evaluated arbiters, P = 128 and P = 256 lanes
// of 64 bits, each fully pipelined (S = 1) and with only the stateful
// register (S = 16), checked against the behavioural model in prra_harness
// as in tb_prra_workloads: every output batch lane by lane and for its
// arrival cycle, and wrap, full, empty and idle cycles required.
module tb_prra_wide;
  localparam int N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [N];
  int   chk [N], fail [N], wrap [N], full [N], empty [N], idle [N];

  prra_harness #(.P(128), .DATA_W(64), .S(1), .N_BATCHES(150), .SEED(130)) h0 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .n_wrap(wrap[0]), .n_full(full[0]), .n_empty(empty[0]), .n_idle(idle[0]));
  prra_harness #(.P(128), .DATA_W(64), .S(16), .N_BATCHES(150), .SEED(134)) h1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .n_wrap(wrap[1]), .n_full(full[1]), .n_empty(empty[1]), .n_idle(idle[1]));
  prra_harness #(.P(256), .DATA_W(64), .S(1), .N_BATCHES(80), .SEED(135)) h2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .n_wrap(wrap[2]), .n_full(full[2]), .n_empty(empty[2]), .n_idle(idle[2]));
  prra_harness #(.P(256), .DATA_W(64), .S(16), .N_BATCHES(80), .SEED(139)) h3 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]), .n_wrap(wrap[3]), .n_full(full[3]), .n_empty(empty[3]), .n_idle(idle[3]));

  int checks, failures;

  task automatic finish();
    checks = 0;
    failures = 0;
    for (int n = 0; n < N; n++) begin
      checks   += chk[n] + 4;
      failures += fail[n];
      if (wrap[n] == 0 || full[n] == 0 || empty[n] == 0 || idle[n] == 0) begin
        failures++;
        $display("config %0d: a mechanism never happened (wrap %0d full %0d empty %0d idle %0d)",
                 n, wrap[n], full[n], empty[n], idle[n]);
      end
      if (fail[n] != 0) $display("config %0d: %0d failures", n, fail[n]);
    end
    $display("configurations %0d, batches checked %0d", N, checks - 4 * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) wait (done[n]);
    repeat (2) @(posedge clk);
    finish();
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    for (int n = 0; n < N; n++) fail[n] += 1;
    finish();
  end
endmodule
