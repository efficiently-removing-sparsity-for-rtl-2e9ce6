// tb_prra: self-checking testbench of the parallel round-robin arbiter.
//
// Runs four configurations side by side, each against the behavioural model
// in prra_harness: the default (P = 8, fully pipelined, S = 1), P = 8 with
// every other register (S = 2), P = 8 with only the stateful register
// (S = 16, latency 1) and P = 4 with S = 1 (latency 5). Every output batch is
// compared lane by lane and must arrive exactly LATENCY cycles after its
// input. The run also requires wrapping batches, full batches, empty batches
// and idle cycles to have occurred.
module tb_prra;
  localparam int N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [N];
  int   chk [N], fail [N], wrap [N], full [N], empty [N], idle [N];

  prra_harness #(.P(8), .S(1),  .N_BATCHES(600), .SEED(11)) h0 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .n_wrap(wrap[0]), .n_full(full[0]), .n_empty(empty[0]), .n_idle(idle[0]));
  prra_harness #(.P(8), .S(2),  .N_BATCHES(600), .SEED(12)) h1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .n_wrap(wrap[1]), .n_full(full[1]), .n_empty(empty[1]), .n_idle(idle[1]));
  prra_harness #(.P(8), .S(16), .N_BATCHES(600), .SEED(13)) h2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .n_wrap(wrap[2]), .n_full(full[2]), .n_empty(empty[2]), .n_idle(idle[2]));
  prra_harness #(.P(4), .S(1),  .N_BATCHES(600), .SEED(14)) h3 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]), .n_wrap(wrap[3]), .n_full(full[3]), .n_empty(empty[3]), .n_idle(idle[3]));

  int checks, failures;

  task automatic finish();
    checks = 0;
    failures = 0;
    for (int n = 0; n < N; n++) begin
      checks   += chk[n];
      failures += fail[n];
      // Each mechanism must have been exercised in every configuration.
      checks += 4;
      if (wrap[n]  == 0) begin failures++; $display("config %0d: no wrapping batch", n); end
      if (full[n]  == 0) begin failures++; $display("config %0d: no full batch", n); end
      if (empty[n] == 0) begin failures++; $display("config %0d: no empty batch", n); end
      if (idle[n]  == 0) begin failures++; $display("config %0d: no idle cycle", n); end
      $display("config %0d: batches %0d wrap %0d full %0d empty %0d idle %0d failures %0d",
               n, chk[n], wrap[n], full[n], empty[n], idle[n], fail[n]);
    end
    // Fixed latencies of these configurations: 2*log2(P)+1 = 7; stages 1, 3 (stateful) and 5 = 3; 1; 5.
    checks += 4;
    if (h0.LAT != 7) failures++;
    if (h1.LAT != 3) failures++;
    if (h2.LAT != 1) failures++;
    if (h3.LAT != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    repeat (2) @(posedge clk);
    finish();
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    for (int n = 0; n < N; n++) fail[n] += 1;
    finish();
  end
endmodule
