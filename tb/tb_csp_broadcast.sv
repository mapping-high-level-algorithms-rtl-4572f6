// Self-checking testbench for csp_broadcast with four consumers.
//
// Phase 1: with every consumer ready, a word must be offered to all of them
// the cycle after it was accepted, and the next word accepted two cycles
// after the first. Phase 2: random words with random gaps, each consumer
// with its own random back-pressure. Every consumer must receive the whole
// sequence in order, and the source may never get more than one word ahead
// of the slowest consumer.
module tb_csp_broadcast;
  localparam int F   = 4;
  localparam int W   = 16;
  localparam int NUM = 300;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic         in_valid, in_ready;
  logic [W-1:0] in_data;
  logic         out_valid [F];
  logic         out_ready [F];
  logic [W-1:0] out_data  [F];

  csp_broadcast #(.FANOUT(F), .W(W)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, sent = 0, accepted = 0;
  int got [F];
  logic [W-1:0] words [$];
  logic fire_q;
  bit random_phase = 0;
  int acc_at [$];
  int seen_at [$];

  always @(negedge clk) begin
    if (rst_n && random_phase) begin
      if (in_valid && fire_q) in_valid = 1'b0;
      if (!in_valid && sent < NUM && ($urandom % 3) != 0) begin
        in_data = W'($urandom); in_valid = 1'b1; sent++;
      end
      for (int j = 0; j < F; j++) out_ready[j] = ($urandom % 3) != 0;
    end
  end

  always @(posedge clk) begin
    cyc++;
    fire_q <= in_valid && in_ready;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        words.push_back(in_data);
        accepted++;
        acc_at.push_back(cyc);
      end
      if (!random_phase && out_valid[0] && seen_at.size() < acc_at.size()) seen_at.push_back(cyc);
      for (int j = 0; j < F; j++) begin
        if (out_valid[j] && out_ready[j]) begin
          checks++;
          if (out_data[j] !== words[got[j]]) begin
            failures++;
            $display("consumer %0d word %0d: got %h expected %h", j, got[j], out_data[j], words[got[j]]);
          end
          got[j]++;
        end
        if (accepted - got[j] > 1) begin
          failures++;
          $display("source ran %0d words ahead of consumer %0d", accepted - got[j], j);
        end
      end
    end
  end

  function automatic int min_got();
    int m = got[0];
    for (int j = 1; j < F; j++) if (got[j] < m) m = got[j];
    return m;
  endfunction

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_data = '0;
    for (int j = 0; j < F; j++) begin out_ready[j] = 1'b0; got[j] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Phase 1: two words back to back, every consumer ready.
    for (int j = 0; j < F; j++) out_ready[j] = 1'b1;
    in_valid = 1'b1; in_data = 16'h1234;
    @(negedge clk);
    while (!fire_q) @(negedge clk);
    in_data = 16'hbeef;
    @(negedge clk);
    while (!fire_q) @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (acc_at.size() != 2 || seen_at.size() != 2 || seen_at[0] != acc_at[0] + 1 ||
        acc_at[1] != acc_at[0] + 2) begin
      failures++;
      $display("phase 1 timing wrong");
    end
    // Phase 2: random traffic.
    random_phase = 1;
    while (min_got() < NUM + 2) @(posedge clk);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
