// prra_harness: stimulus and scoreboard for one prra configuration.
//
// Streams N_BATCHES random batches into a prra instance, one per cycle with
// occasional idle cycles (in_stb low), and checks every output batch against
// a behavioural model of the arbiter: keep a running offset o; the j-th valid
// input of a batch goes to output lane (o+j) mod P; every other lane is
// invalid; then o += number of valid inputs. Valid densities are mixed: empty,
// full and random batches. Each expected batch carries the cycle it must
// appear in, so the latency (LATENCY cycles from input to output) is checked
// as well. Counts of wrapping batches, full, empty and idle cycles are
// reported so that a testbench can require each to have happened.
module prra_harness #(
  parameter int unsigned P         = 8,
  parameter int unsigned DATA_W    = 64,
  parameter int unsigned S         = 1,
  parameter int unsigned N_BATCHES = 500,
  parameter int unsigned SEED      = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_wrap,
  output int   n_full,
  output int   n_empty,
  output int   n_idle
);

  localparam int unsigned LAT = prra_pkg::prra_latency($clog2(P), S);

  typedef struct {
    logic [P-1:0]             v;
    logic [P-1:0][DATA_W-1:0] d;
    int                       t;
  } exp_t;

  logic                     in_stb, out_stb;
  logic [P-1:0]             in_valid, out_valid;
  logic [P-1:0][DATA_W-1:0] in_data, out_data;

  prra #(.P(P), .DATA_W(DATA_W), .S(S)) dut (
    .clk, .rst_n,
    .in_stb, .in_valid, .in_data,
    .out_stb, .out_valid, .out_data
  );

  exp_t        q[$];
  int          cyc;
  int unsigned sent;
  int unsigned offset;
  int unsigned received;

  function automatic logic [DATA_W-1:0] rand_word();
    logic [DATA_W-1:0] w;
    for (int b = 0; b < DATA_W; b += 32) w = (w << 32) | DATA_W'($urandom);
    return w;
  endfunction

  initial begin
    void'($urandom(SEED));
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    n_wrap   = 0;
    n_full   = 0;
    n_empty  = 0;
    n_idle   = 0;
    cyc      = 0;
    sent     = 0;
    received = 0;
    offset   = 0;
    in_stb   = 1'b0;
    in_valid = '0;
    in_data  = '0;
  end

  // Drive one batch per cycle (occasionally none) and log what must come out.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      in_stb   <= 1'b0;
      in_valid <= '0;
    end else if (sent < N_BATCHES) begin
      if ($urandom_range(0, 15) == 0) begin
        in_stb   <= 1'b0;
        in_valid <= P'($urandom);   // ignored without in_stb
        n_idle   <= n_idle + 1;
      end else begin
        logic [P-1:0]             v;
        logic [P-1:0][DATA_W-1:0] d;
        exp_t                     e;
        int unsigned              j;
        case ($urandom_range(0, 7))
          0:       v = '0;
          1:       v = '1;
          2:       for (int i = 0; i < P; i++) v[i] = ($urandom_range(0, 7) == 0);
          3:       for (int i = 0; i < P; i++) v[i] = ($urandom_range(0, 7) != 0);
          default: for (int i = 0; i < P; i++) v[i] = $urandom_range(0, 1) == 1;
        endcase
        for (int i = 0; i < P; i++) d[i] = rand_word();
        e.v = '0;
        e.d = '0;
        j   = 0;
        for (int i = 0; i < P; i++) begin
          if (v[i]) begin
            e.v[(offset + j) % P] = 1'b1;
            e.d[(offset + j) % P] = d[i];
            j++;
          end
        end
        if (v == '0) n_empty <= n_empty + 1;
        if (v == '1) n_full  <= n_full + 1;
        if (j != 0 && offset + j > P) n_wrap <= n_wrap + 1;
        offset   = (offset + j) % P;
        e.t      = cyc + 1 + LAT;
        q.push_back(e);
        in_stb   <= 1'b1;
        in_valid <= v;
        in_data  <= d;
        sent     <= sent + 1;
      end
    end else begin
      in_stb   <= 1'b0;
      in_valid <= '0;
    end
  end

  // Compare each output batch with the model, including its arrival cycle.
  always @(posedge clk) begin
    if (rst_n && out_stb) begin
      if (q.size() == 0) begin
        failures <= failures + 1;
        $display("prra_harness P=%0d S=%0d: unexpected output batch at cycle %0d", P, S, cyc);
      end else begin
        exp_t e;
        int   bad;
        e   = q.pop_front();
        bad = 0;
        if (e.t != cyc) bad++;
        if (out_valid != e.v) bad++;
        for (int i = 0; i < P; i++) if (e.v[i] && out_data[i] != e.d[i]) bad++;
        if (bad != 0) begin
          if (failures < 5)
            $display("prra_harness P=%0d S=%0d: batch %0d wrong: cycle %0d (exp %0d) valid %h (exp %h)",
                     P, S, received, cyc, e.t, out_valid, e.v);
          failures <= failures + 1;
        end
        checks   <= checks + 1;
        received <= received + 1;
      end
    end
    if (received == N_BATCHES) done <= 1'b1;
  end

endmodule
