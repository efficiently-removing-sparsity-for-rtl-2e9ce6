// tb_prra_workloads: the arbiter's evaluated design space up to 64 lanes.
//
// Every combination of P = 2, 4, ..., 64 lanes and register placement
// S = 1, 2, 4, 8, 16, with 64-bit elements, runs side by side against the
// behavioural model in prra_harness: random sparse, full and empty batches
// with idle cycles, every output batch checked lane by lane and for its
// arrival cycle. Each configuration must also have wrapped round lane P-1,
// and seen a full batch, an empty batch and an idle cycle. The two widest
// sizes are in tb_prra_wide.
module tb_prra_workloads;
  localparam int N = 30;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [N];
  int   chk [N], fail [N], wrap [N], full [N], empty [N], idle [N];

  prra_harness #(.P(2), .DATA_W(64), .S(1), .N_BATCHES(300), .SEED(100)) h0 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .n_wrap(wrap[0]), .n_full(full[0]), .n_empty(empty[0]), .n_idle(idle[0]));
  prra_harness #(.P(2), .DATA_W(64), .S(2), .N_BATCHES(300), .SEED(101)) h1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .n_wrap(wrap[1]), .n_full(full[1]), .n_empty(empty[1]), .n_idle(idle[1]));
  prra_harness #(.P(2), .DATA_W(64), .S(4), .N_BATCHES(300), .SEED(102)) h2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .n_wrap(wrap[2]), .n_full(full[2]), .n_empty(empty[2]), .n_idle(idle[2]));
  prra_harness #(.P(2), .DATA_W(64), .S(8), .N_BATCHES(300), .SEED(103)) h3 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]), .n_wrap(wrap[3]), .n_full(full[3]), .n_empty(empty[3]), .n_idle(idle[3]));
  prra_harness #(.P(2), .DATA_W(64), .S(16), .N_BATCHES(300), .SEED(104)) h4 (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fail[4]), .n_wrap(wrap[4]), .n_full(full[4]), .n_empty(empty[4]), .n_idle(idle[4]));
  prra_harness #(.P(4), .DATA_W(64), .S(1), .N_BATCHES(300), .SEED(105)) h5 (.clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fail[5]), .n_wrap(wrap[5]), .n_full(full[5]), .n_empty(empty[5]), .n_idle(idle[5]));
  prra_harness #(.P(4), .DATA_W(64), .S(2), .N_BATCHES(300), .SEED(106)) h6 (.clk, .rst_n, .done(done[6]), .checks(chk[6]), .failures(fail[6]), .n_wrap(wrap[6]), .n_full(full[6]), .n_empty(empty[6]), .n_idle(idle[6]));
  prra_harness #(.P(4), .DATA_W(64), .S(4), .N_BATCHES(300), .SEED(107)) h7 (.clk, .rst_n, .done(done[7]), .checks(chk[7]), .failures(fail[7]), .n_wrap(wrap[7]), .n_full(full[7]), .n_empty(empty[7]), .n_idle(idle[7]));
  prra_harness #(.P(4), .DATA_W(64), .S(8), .N_BATCHES(300), .SEED(108)) h8 (.clk, .rst_n, .done(done[8]), .checks(chk[8]), .failures(fail[8]), .n_wrap(wrap[8]), .n_full(full[8]), .n_empty(empty[8]), .n_idle(idle[8]));
  prra_harness #(.P(4), .DATA_W(64), .S(16), .N_BATCHES(300), .SEED(109)) h9 (.clk, .rst_n, .done(done[9]), .checks(chk[9]), .failures(fail[9]), .n_wrap(wrap[9]), .n_full(full[9]), .n_empty(empty[9]), .n_idle(idle[9]));
  prra_harness #(.P(8), .DATA_W(64), .S(1), .N_BATCHES(300), .SEED(110)) h10 (.clk, .rst_n, .done(done[10]), .checks(chk[10]), .failures(fail[10]), .n_wrap(wrap[10]), .n_full(full[10]), .n_empty(empty[10]), .n_idle(idle[10]));
  prra_harness #(.P(8), .DATA_W(64), .S(2), .N_BATCHES(300), .SEED(111)) h11 (.clk, .rst_n, .done(done[11]), .checks(chk[11]), .failures(fail[11]), .n_wrap(wrap[11]), .n_full(full[11]), .n_empty(empty[11]), .n_idle(idle[11]));
  prra_harness #(.P(8), .DATA_W(64), .S(4), .N_BATCHES(300), .SEED(112)) h12 (.clk, .rst_n, .done(done[12]), .checks(chk[12]), .failures(fail[12]), .n_wrap(wrap[12]), .n_full(full[12]), .n_empty(empty[12]), .n_idle(idle[12]));
  prra_harness #(.P(8), .DATA_W(64), .S(8), .N_BATCHES(300), .SEED(113)) h13 (.clk, .rst_n, .done(done[13]), .checks(chk[13]), .failures(fail[13]), .n_wrap(wrap[13]), .n_full(full[13]), .n_empty(empty[13]), .n_idle(idle[13]));
  prra_harness #(.P(8), .DATA_W(64), .S(16), .N_BATCHES(300), .SEED(114)) h14 (.clk, .rst_n, .done(done[14]), .checks(chk[14]), .failures(fail[14]), .n_wrap(wrap[14]), .n_full(full[14]), .n_empty(empty[14]), .n_idle(idle[14]));
  prra_harness #(.P(16), .DATA_W(64), .S(1), .N_BATCHES(300), .SEED(115)) h15 (.clk, .rst_n, .done(done[15]), .checks(chk[15]), .failures(fail[15]), .n_wrap(wrap[15]), .n_full(full[15]), .n_empty(empty[15]), .n_idle(idle[15]));
  prra_harness #(.P(16), .DATA_W(64), .S(2), .N_BATCHES(300), .SEED(116)) h16 (.clk, .rst_n, .done(done[16]), .checks(chk[16]), .failures(fail[16]), .n_wrap(wrap[16]), .n_full(full[16]), .n_empty(empty[16]), .n_idle(idle[16]));
  prra_harness #(.P(16), .DATA_W(64), .S(4), .N_BATCHES(300), .SEED(117)) h17 (.clk, .rst_n, .done(done[17]), .checks(chk[17]), .failures(fail[17]), .n_wrap(wrap[17]), .n_full(full[17]), .n_empty(empty[17]), .n_idle(idle[17]));
  prra_harness #(.P(16), .DATA_W(64), .S(8), .N_BATCHES(300), .SEED(118)) h18 (.clk, .rst_n, .done(done[18]), .checks(chk[18]), .failures(fail[18]), .n_wrap(wrap[18]), .n_full(full[18]), .n_empty(empty[18]), .n_idle(idle[18]));
  prra_harness #(.P(16), .DATA_W(64), .S(16), .N_BATCHES(300), .SEED(119)) h19 (.clk, .rst_n, .done(done[19]), .checks(chk[19]), .failures(fail[19]), .n_wrap(wrap[19]), .n_full(full[19]), .n_empty(empty[19]), .n_idle(idle[19]));
  prra_harness #(.P(32), .DATA_W(64), .S(1), .N_BATCHES(300), .SEED(120)) h20 (.clk, .rst_n, .done(done[20]), .checks(chk[20]), .failures(fail[20]), .n_wrap(wrap[20]), .n_full(full[20]), .n_empty(empty[20]), .n_idle(idle[20]));
  prra_harness #(.P(32), .DATA_W(64), .S(2), .N_BATCHES(300), .SEED(121)) h21 (.clk, .rst_n, .done(done[21]), .checks(chk[21]), .failures(fail[21]), .n_wrap(wrap[21]), .n_full(full[21]), .n_empty(empty[21]), .n_idle(idle[21]));
  prra_harness #(.P(32), .DATA_W(64), .S(4), .N_BATCHES(300), .SEED(122)) h22 (.clk, .rst_n, .done(done[22]), .checks(chk[22]), .failures(fail[22]), .n_wrap(wrap[22]), .n_full(full[22]), .n_empty(empty[22]), .n_idle(idle[22]));
  prra_harness #(.P(32), .DATA_W(64), .S(8), .N_BATCHES(300), .SEED(123)) h23 (.clk, .rst_n, .done(done[23]), .checks(chk[23]), .failures(fail[23]), .n_wrap(wrap[23]), .n_full(full[23]), .n_empty(empty[23]), .n_idle(idle[23]));
  prra_harness #(.P(32), .DATA_W(64), .S(16), .N_BATCHES(300), .SEED(124)) h24 (.clk, .rst_n, .done(done[24]), .checks(chk[24]), .failures(fail[24]), .n_wrap(wrap[24]), .n_full(full[24]), .n_empty(empty[24]), .n_idle(idle[24]));
  prra_harness #(.P(64), .DATA_W(64), .S(1), .N_BATCHES(150), .SEED(125)) h25 (.clk, .rst_n, .done(done[25]), .checks(chk[25]), .failures(fail[25]), .n_wrap(wrap[25]), .n_full(full[25]), .n_empty(empty[25]), .n_idle(idle[25]));
  prra_harness #(.P(64), .DATA_W(64), .S(2), .N_BATCHES(150), .SEED(126)) h26 (.clk, .rst_n, .done(done[26]), .checks(chk[26]), .failures(fail[26]), .n_wrap(wrap[26]), .n_full(full[26]), .n_empty(empty[26]), .n_idle(idle[26]));
  prra_harness #(.P(64), .DATA_W(64), .S(4), .N_BATCHES(150), .SEED(127)) h27 (.clk, .rst_n, .done(done[27]), .checks(chk[27]), .failures(fail[27]), .n_wrap(wrap[27]), .n_full(full[27]), .n_empty(empty[27]), .n_idle(idle[27]));
  prra_harness #(.P(64), .DATA_W(64), .S(8), .N_BATCHES(150), .SEED(128)) h28 (.clk, .rst_n, .done(done[28]), .checks(chk[28]), .failures(fail[28]), .n_wrap(wrap[28]), .n_full(full[28]), .n_empty(empty[28]), .n_idle(idle[28]));
  prra_harness #(.P(64), .DATA_W(64), .S(16), .N_BATCHES(150), .SEED(129)) h29 (.clk, .rst_n, .done(done[29]), .checks(chk[29]), .failures(fail[29]), .n_wrap(wrap[29]), .n_full(full[29]), .n_empty(empty[29]), .n_idle(idle[29]));

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
