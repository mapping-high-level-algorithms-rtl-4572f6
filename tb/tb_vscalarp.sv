// Self-checking testbench for vscalarp (M = 4).
//
// Phase 1 offers one pair of vectors on all 2M channels at once with the
// output ready and checks that the scalar product appears 2 + 2*log2(M)
// cycles after the operands were taken. Phase 2 streams random vector pairs
// with independent random gaps on every element channel and random
// back-pressure; the k-th result must be sum_j as_j[k] * bs_j[k].
module tb_vscalarp;
  localparam int M      = 4;
  localparam int DATA_W = 16;
  localparam int ACC_W  = 2 * DATA_W + $clog2(M);
  localparam int NUM    = 300;
  localparam int LAT    = 2 + 2 * $clog2(M);

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                     as_valid [M];
  logic                     as_ready [M];
  logic signed [DATA_W-1:0] as_data  [M];
  logic                     bs_valid [M];
  logic                     bs_ready [M];
  logic signed [DATA_W-1:0] bs_data  [M];
  logic                     c_valid, c_ready;
  logic signed [ACC_W-1:0]  c_data;

  vscalarp dut (.*);

  int checks = 0, failures = 0, got = 0, cyc = 0;
  int sa [M], sb [M];
  logic fa_q [M], fb_q [M];
  logic signed [DATA_W-1:0] qa [M][$], qb [M][$];
  bit random_phase = 0;
  int taken_at = -1, first_seen = -1;

  always @(negedge clk) begin
    if (rst_n && random_phase) begin
      for (int j = 0; j < M; j++) begin
        if (as_valid[j] && fa_q[j]) as_valid[j] = 1'b0;
        if (bs_valid[j] && fb_q[j]) bs_valid[j] = 1'b0;
        if (!as_valid[j] && sa[j] < NUM && ($urandom % 3) != 0) begin
          as_data[j] = DATA_W'($urandom); as_valid[j] = 1'b1; sa[j]++;
        end
        if (!bs_valid[j] && sb[j] < NUM && ($urandom % 3) != 0) begin
          bs_data[j] = DATA_W'($urandom); bs_valid[j] = 1'b1; sb[j]++;
        end
      end
      c_ready = ($urandom % 4) != 0;
    end
  end

  always @(posedge clk) begin
    cyc++;
    for (int j = 0; j < M; j++) begin
      fa_q[j] <= as_valid[j] && as_ready[j];
      fb_q[j] <= bs_valid[j] && bs_ready[j];
      if (rst_n && as_valid[j] && as_ready[j]) begin
        qa[j].push_back(as_data[j]);
        if (!random_phase) taken_at = cyc;
      end
      if (rst_n && bs_valid[j] && bs_ready[j]) qb[j].push_back(bs_data[j]);
    end
    if (rst_n && c_valid && first_seen < 0) first_seen = cyc;
    if (rst_n && c_valid && c_ready) begin
      logic signed [ACC_W-1:0] exp;
      exp = '0;
      for (int j = 0; j < M; j++) exp += ACC_W'(qa[j].pop_front()) * ACC_W'(qb[j].pop_front());
      checks++;
      if (c_data !== exp) begin
        failures++;
        $display("mismatch %0d: got %0d expected %0d", got, c_data, exp);
      end
      got++;
    end
  end

  initial begin
    rst_n = 1'b0; c_ready = 1'b0;
    for (int j = 0; j < M; j++) begin
      as_valid[j] = 1'b0; bs_valid[j] = 1'b0; as_data[j] = '0; bs_data[j] = '0; sa[j] = 0; sb[j] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    c_ready = 1'b1;
    for (int j = 0; j < M; j++) begin
      as_valid[j] = 1'b1; as_data[j] = DATA_W'(-1000 * (j + 1));
      bs_valid[j] = 1'b1; bs_data[j] = DATA_W'(300 + j);
    end
    @(negedge clk);
    for (int j = 0; j < M; j++) begin as_valid[j] = 1'b0; bs_valid[j] = 1'b0; end
    wait (got == 1);
    @(negedge clk);
    checks++;
    if (first_seen - taken_at != LAT) begin
      failures++;
      $display("latency %0d cycles, expected %0d", first_seen - taken_at, LAT);
    end
    random_phase = 1;
    wait (got == NUM + 1);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog: only %0d results", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
