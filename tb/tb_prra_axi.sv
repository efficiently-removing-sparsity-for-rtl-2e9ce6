// tb_prra_axi: end-to-end test of the AXI4-Lite arbiter peripheral at its
// default parameters (P = 8 lanes of 64 bits, fully pipelined).
//
// A bus master writes random batches into the input registers, releases each
// with the CTRL register, polls for DONE, reads the output registers and
// compares them with a behavioural model of the round-robin arbiter (running
// offset, j-th valid element to lane (offset+j) mod P). Along the way it
// exercises: batches that wrap past lane P-1, full and empty batches, two
// releases back to back (the second result must follow the first's offset),
// a write with a partial byte strobe, write and read responses held back by
// the master (BREADY/RREADY low), address and data sent in different cycles,
// an access to an unmapped address (SLVERR) and the clear bit. Latency is
// checked from the bus alone: the arbiter takes LATENCY = 2*log2(P)+1 = 7
// cycles, and the release and capture registers add one more, so DONE must
// still read 0 when CTRL is read LATENCY+1 cycles after the release write and
// must read 1 at LATENCY+2 cycles. Each of these must have happened at least
// once.
module tb_prra_axi;
  import prra_pkg::*;

  localparam int P   = 8;
  localparam int DW  = 64;
  localparam int NDW = 2;
  localparam int LAT = 7;
  localparam int NB  = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [15:0] awaddr, araddr;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;

  prra_axi dut (
    .clk, .rst_n,
    .s_axi_awvalid(awvalid), .s_axi_awready(awready), .s_axi_awaddr(awaddr),
    .s_axi_wvalid(wvalid), .s_axi_wready(wready), .s_axi_wdata(wdata), .s_axi_wstrb(wstrb),
    .s_axi_bvalid(bvalid), .s_axi_bready(bready), .s_axi_bresp(bresp),
    .s_axi_arvalid(arvalid), .s_axi_arready(arready), .s_axi_araddr(araddr),
    .s_axi_rvalid(rvalid), .s_axi_rready(rready), .s_axi_rdata(rdata), .s_axi_rresp(rresp)
  );

  int checks = 0, failures = 0, cyc = 0;
  int n_wrap = 0, n_full = 0, n_empty = 0, n_b2b = 0, n_strb = 0;
  int n_bstall = 0, n_rstall = 0, n_split = 0, n_slverr = 0, n_clear = 0, n_lat = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ bus master
  task automatic axi_write(logic [15:0] a, logic [31:0] d, logic [3:0] s, output logic [1:0] resp);
    bit split = ($urandom_range(0, 5) == 0);
    awaddr <= a; wdata <= d; wstrb <= s;
    awvalid <= 1'b1; wvalid <= split ? 1'b0 : 1'b1;
    bready <= 1'b0;
    if (split) begin
      @(posedge clk);
      wvalid <= 1'b1;
      n_split++;
    end
    do @(posedge clk); while (!(awready && wready));
    awvalid <= 1'b0; wvalid <= 1'b0;
    do @(posedge clk); while (!bvalid);
    if ($urandom_range(0, 3) == 0) begin
      repeat (2) @(posedge clk);
      n_bstall++;
    end
    bready <= 1'b1;
    resp = bresp;
    @(posedge clk);
    bready <= 1'b0;
  endtask

  task automatic axi_read(logic [15:0] a, output logic [31:0] d, output logic [1:0] resp);
    araddr <= a; arvalid <= 1'b1; rready <= 1'b0;
    do @(posedge clk); while (!arready);
    arvalid <= 1'b0;
    do @(posedge clk); while (!rvalid);
    if ($urandom_range(0, 3) == 0) begin
      repeat (2) @(posedge clk);
      n_rstall++;
    end
    rready <= 1'b1;
    d = rdata; resp = rresp;
    @(posedge clk);
    rready <= 1'b0;
  endtask

  // Release the loaded batch, then read CTRL with the read handshake exactly
  // k cycles after the release handshake. The result lands in the output
  // registers LATENCY+1 cycles after the release write, so DONE must read 0
  // for k <= LATENCY+1 and 1 from k = LATENCY+2 on.
  task automatic release_probe(int k, output logic [31:0] st);
    awaddr <= REG_CTRL; wdata <= 32'h1; wstrb <= 4'hF;
    awvalid <= 1'b1; wvalid <= 1'b1;
    do @(posedge clk); while (!(awready && wready));
    awvalid <= 1'b0; wvalid <= 1'b0; bready <= 1'b1;
    repeat (k - 1) @(posedge clk);
    araddr <= REG_CTRL; arvalid <= 1'b1;
    @(posedge clk);
    arvalid <= 1'b0; bready <= 1'b0;
    do @(posedge clk); while (!rvalid);
    st = rdata;
    rready <= 1'b1;
    @(posedge clk);
    rready <= 1'b0;
  endtask

  // ------------------------------------------------------------ model
  int unsigned offset = 0;
  logic [P-1:0]         exp_v;
  logic [P-1:0][DW-1:0] exp_d;

  function automatic void model(logic [P-1:0] v, logic [P-1:0][DW-1:0] d);
    int j = 0;
    exp_v = '0;
    exp_d = '0;
    for (int i = 0; i < P; i++)
      if (v[i]) begin
        exp_v[(offset + j) % P] = 1'b1;
        exp_d[(offset + j) % P] = d[i];
        j++;
      end
    if (v == '1) n_full++;
    if (v == '0) n_empty++;
    if (j != 0 && offset + j > P) n_wrap++;
    offset = (offset + j) % P;
  endfunction

  task automatic load(logic [P-1:0] v, logic [P-1:0][DW-1:0] d);
    logic [1:0] r;
    axi_write(BASE_IN_VALID, 32'(v), 4'hF, r);
    for (int n = 0; n < P; n++)
      for (int w = 0; w < NDW; w++)
        axi_write(BASE_IN_DATA + 16'(4 * (n * NDW + w)), d[n][w*32 +: 32], 4'hF, r);
  endtask

  task automatic wait_done();
    logic [31:0] st; logic [1:0] r;
    int tries = 0;
    do begin
      axi_read(REG_CTRL, st, r);
      tries++;
    end while (!st[1] && tries < 50);
    expect_eq("DONE", st[1:0], 2'b10);
  endtask

  task automatic check_result(int b);
    logic [31:0] w0, w1; logic [1:0] r;
    axi_read(BASE_OUT_VALID, w0, r);
    expect_eq($sformatf("batch %0d out valid", b), w0, 32'(exp_v));
    for (int n = 0; n < P; n++)
      if (exp_v[n]) begin
        axi_read(BASE_OUT_DATA + 16'(4 * (n * NDW)), w0, r);
        axi_read(BASE_OUT_DATA + 16'(4 * (n * NDW + 1)), w1, r);
        expect_eq($sformatf("batch %0d lane %0d data", b, n), {w1, w0}, exp_d[n]);
      end
  endtask

  initial begin
    logic [31:0] rd; logic [1:0] r;
    logic [P-1:0] v;
    logic [P-1:0][DW-1:0] d;
    int batches;

    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = '0; araddr = '0; wdata = '0; wstrb = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    axi_read(REG_LANES, rd, r);  expect_eq("LANES", rd, P);
    axi_read(REG_INFO, rd, r);   expect_eq("INFO", rd, {8'b0, 8'(LAT), 16'(DW)});

    batches = 0;
    for (int b = 0; b < NB; b++) begin
      case (b % 10)
        3:       v = '1;
        6:       v = '0;
        default: v = P'($urandom);
      endcase
      for (int n = 0; n < P; n++) d[n] = {$urandom, $urandom};
      load(v, d);
      model(v, d);
      if (b % 25 == 24) begin
        // Release twice back to back: the same batch enters two cycles running.
        logic [P-1:0] v2; logic [P-1:0][DW-1:0] d2;
        v2 = v; d2 = d;
        awaddr <= REG_CTRL; wdata <= 32'h1; wstrb <= 4'hF; awvalid <= 1'b1; wvalid <= 1'b1; bready <= 1'b1;
        do @(posedge clk); while (!(awready && wready));
        awvalid <= 1'b0; wvalid <= 1'b0;
        @(posedge clk);  // response accepted this cycle (BREADY high)
        awvalid <= 1'b1; wvalid <= 1'b1;
        do @(posedge clk); while (!(awready && wready));
        awvalid <= 1'b0; wvalid <= 1'b0;
        @(posedge clk);
        bready <= 1'b0;
        model(v2, d2);
        n_b2b++;
        batches += 2;
      end else if (b % 5 == 1) begin
        // Probe the release-to-result latency just before and just after.
        logic [31:0] st;
        int k;
        k = (b % 10 == 1) ? LAT + 1 : LAT + 2;
        release_probe(k, st);
        expect_eq($sformatf("DONE %0d cycles after release", k), st[1], k >= LAT + 2);
        n_lat++;
        batches++;
      end else begin
        axi_write(REG_CTRL, 32'h1, 4'hF, r);
        batches++;
      end
      wait_done();
      check_result(b);
      axi_read(REG_BATCHES, rd, r);
      expect_eq("BATCHES", rd, batches);
    end

    // Partial byte strobe on an input data word.
    axi_write(BASE_IN_DATA, 32'hAABBCCDD, 4'hF, r);
    axi_write(BASE_IN_DATA, 32'h11223344, 4'b0101, r);
    axi_read(BASE_IN_DATA, rd, r);
    expect_eq("WSTRB merge", rd, 32'hAA22CC44);
    n_strb++;

    // Unmapped address: SLVERR on write and read.
    axi_write(16'h3000, 32'h0, 4'hF, r);
    expect_eq("write SLVERR", r, RESP_SLVERR);
    axi_read(16'h4000 + 16'(4 * P * NDW), rd, r);
    expect_eq("read SLVERR", r, RESP_SLVERR);
    axi_write(BASE_OUT_DATA, 32'h0, 4'hF, r);
    expect_eq("read-only SLVERR", r, RESP_SLVERR);
    n_slverr++;

    // Clear.
    axi_write(REG_CTRL, 32'h2, 4'hF, r);
    axi_read(REG_BATCHES, rd, r);
    expect_eq("BATCHES after clear", rd, 0);
    axi_read(REG_CTRL, rd, r);
    expect_eq("CTRL after clear", rd, 0);
    n_clear++;

    begin
      int cnt [11];
      string nm [11];
      cnt = '{n_wrap, n_full, n_empty, n_b2b, n_strb, n_bstall, n_rstall, n_split, n_slverr, n_clear, n_lat};
      nm  = '{"wrap", "full", "empty", "back-to-back", "wstrb", "bready stall", "rready stall",
              "split aw/w", "slverr", "clear", "latency"};
      for (int i = 0; i < 11; i++) begin
        $display("mechanism %-14s %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin
          failures++;
          $display("mechanism %s never happened", nm[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
