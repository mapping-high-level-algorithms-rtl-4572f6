// Self-checking testbench for vfold with N = 8, the tree of eight leaves and
// seven adders (channels c8..c15 in, c1 out).
//
// Phase 1 offers one vector on all leaves at once with the output always
// ready and checks that the sum appears exactly 2*log2(N) cycles after the
// leaves were taken (two cycles per tree level). Phase 2 sends many random
// vectors with random gaps per leaf and random back-pressure, so leaves of
// different vectors are in the tree together; the k-th result must be the
// sum of the k-th values sent on the leaves.
module tb_vfold;
  localparam int N     = 8;
  localparam int IN_W  = 32;
  localparam int OUT_W = 35;
  localparam int NUM   = 300;
  localparam int LAT   = 2 * $clog2(N);

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                    in_valid [N];
  logic                    in_ready [N];
  logic signed [IN_W-1:0]  in_data  [N];
  logic                    out_valid, out_ready;
  logic signed [OUT_W-1:0] out_data;

  vfold #(.N(N), .IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  int checks = 0, failures = 0, got = 0, cyc = 0;
  int sent [N];
  logic fire_q [N];
  logic signed [IN_W-1:0] q [N][$];
  bit random_phase = 0;
  int leaves_taken_at = -1, first_seen = -1;

  always @(negedge clk) begin
    if (rst_n && random_phase) begin
      for (int i = 0; i < N; i++) begin
        if (in_valid[i] && fire_q[i]) in_valid[i] = 1'b0;
        if (!in_valid[i] && sent[i] < NUM && ($urandom % 3) != 0) begin
          in_data[i] = IN_W'(signed'($urandom)) >>> ($urandom % 16); in_valid[i] = 1'b1; sent[i]++;
        end
      end
      out_ready = ($urandom % 4) != 0;
    end
  end

  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < N; i++) begin
      fire_q[i] <= in_valid[i] && in_ready[i];
      if (rst_n && in_valid[i] && in_ready[i]) begin
        q[i].push_back(in_data[i]);
        if (!random_phase) leaves_taken_at = cyc;
      end
    end
    if (rst_n && out_valid && first_seen < 0) first_seen = cyc;
    if (rst_n && out_valid && out_ready) begin
      logic signed [OUT_W-1:0] exp;
      exp = '0;
      for (int i = 0; i < N; i++) exp += OUT_W'(q[i].pop_front());
      checks++;
      if (out_data !== exp) begin
        failures++;
        $display("mismatch %0d: got %0d expected %0d", got, out_data, exp);
      end
      got++;
    end
  end

  initial begin
    rst_n = 1'b0; out_ready = 1'b0;
    for (int i = 0; i < N; i++) begin in_valid[i] = 1'b0; in_data[i] = '0; sent[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Phase 1: one vector, all leaves at once, output always ready.
    out_ready = 1'b1;
    for (int i = 0; i < N; i++) begin in_valid[i] = 1'b1; in_data[i] = IN_W'(i * 1000 - 3000); end
    @(negedge clk);
    for (int i = 0; i < N; i++) in_valid[i] = 1'b0;
    wait (got == 1);
    @(negedge clk);
    checks++;
    if (first_seen - leaves_taken_at != LAT) begin
      failures++;
      $display("latency %0d cycles, expected %0d", first_seen - leaves_taken_at, LAT);
    end
    // Phase 2: random traffic.
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
