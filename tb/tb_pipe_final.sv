// Self-checking testbench for pipe_final (N = 4).
//
// Random finished pairs and EOTs enter with random gaps; the output is taken
// with random back-pressure. Each pair must come out as its N column
// elements (element 0 first) tagged TK_VALUE and then one TK_EOS, each EOT
// as one TK_EOT. With the output always ready, a column must take exactly
// N + 1 cycles to leave and the next pair must be taken the cycle after,
// which phase 1 checks.
module tb_pipe_final;
  import csp_pkg::*;
  localparam int N     = 4;
  localparam int ACC_W = 34;
  localparam int NUM   = 200;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                    in_valid, in_ready, in_eot;
  logic signed [ACC_W-1:0] in_c [N];
  logic                    out_valid, out_ready;
  tag_e                    out_tag;
  logic signed [ACC_W-1:0] out_data;

  pipe_final #(.N(N), .ACC_W(ACC_W)) dut (.*);

  typedef struct {
    tag_e                    tag;
    logic signed [ACC_W-1:0] data;
  } msg_t;

  int checks = 0, failures = 0, sent = 0, cyc = 0, expected = 0, got = 0;
  msg_t q [$];
  logic fire_q;
  bit random_phase = 0;
  int acc [$];

  always @(negedge clk) begin
    if (rst_n && random_phase) begin
      if (in_valid && fire_q) in_valid = 1'b0;
      if (!in_valid && sent < NUM && ($urandom % 3) != 0) begin
        in_valid = 1'b1;
        in_eot   = ($urandom % 6) == 0;
        for (int i = 0; i < N; i++) in_c[i] = ACC_W'($urandom);
        sent++;
      end
      out_ready = ($urandom % 3) != 0;
    end
  end

  always @(posedge clk) begin
    cyc++;
    fire_q <= in_valid && in_ready;
    if (rst_n && in_valid && in_ready) begin
      msg_t m;
      acc.push_back(cyc);
      if (in_eot) begin
        m.tag = TK_EOT; m.data = '0; q.push_back(m);
      end else begin
        for (int i = 0; i < N; i++) begin m.tag = TK_VALUE; m.data = in_c[i]; q.push_back(m); end
        m.tag = TK_EOS; m.data = '0; q.push_back(m);
      end
    end
    if (rst_n && out_valid && out_ready) begin
      msg_t m;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("output with nothing expected");
      end else begin
        m = q.pop_front();
        if (out_tag != m.tag || (m.tag == TK_VALUE && out_data !== m.data)) begin
          failures++;
          $display("message %0d: got tag %0d data %0d, expected tag %0d data %0d",
                   got, out_tag, out_data, m.tag, m.data);
        end
      end
      got++;
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_eot = 1'b0; out_ready = 1'b0;
    for (int i = 0; i < N; i++) in_c[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Phase 1: two pairs back to back, output always ready.
    out_ready = 1'b1;
    in_valid = 1'b1;
    for (int i = 0; i < N; i++) in_c[i] = ACC_W'(i + 1);
    @(negedge clk);
    while (!fire_q) @(negedge clk);
    for (int i = 0; i < N; i++) in_c[i] = ACC_W'(-i);
    @(negedge clk);
    while (!fire_q) @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (acc.size() != 2 || acc[1] - acc[0] != N + 2) begin
      failures++;
      $display("second pair not taken N + 2 cycles after the first");
    end
    while (q.size() != 0) @(negedge clk);
    random_phase = 1;
    while (sent < NUM || q.size() != 0 || in_valid) @(negedge clk);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
