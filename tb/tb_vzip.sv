// Self-checking testbench for vzip.
//
// Two instances run side by side: VZIP(MUL) (the default) and VZIP(ADD).
// Each lane of each instance gets its own random operands with random gaps
// and random back-pressure, so the lanes run out of step with one another.
// Lane i's k-th result must be the k-th in1_i value times (or plus) the k-th
// in2_i value.
module tb_vzip;
  import csp_pkg::*;
  localparam int N     = 4;
  localparam int IN_W  = 16;
  localparam int OUT_W = 32;
  localparam int NUM   = 150;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  // Index 0: MUL instance, index 1: ADD instance.
  logic                    in1_valid [2][N];
  logic                    in1_ready [2][N];
  logic signed [IN_W-1:0]  in1_data  [2][N];
  logic                    in2_valid [2][N];
  logic                    in2_ready [2][N];
  logic signed [IN_W-1:0]  in2_data  [2][N];
  logic                    out_valid [2][N];
  logic                    out_ready [2][N];
  logic signed [OUT_W-1:0] out_data  [2][N];

  vzip #(.N(N), .IN_W(IN_W), .OUT_W(OUT_W)) dut_mul (
    .clk, .rst_n,
    .in1_valid(in1_valid[0]), .in1_ready(in1_ready[0]), .in1_data(in1_data[0]),
    .in2_valid(in2_valid[0]), .in2_ready(in2_ready[0]), .in2_data(in2_data[0]),
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_data(out_data[0])
  );
  vzip #(.N(N), .IN_W(IN_W), .OUT_W(OUT_W), .OP(OP_ADD)) dut_add (
    .clk, .rst_n,
    .in1_valid(in1_valid[1]), .in1_ready(in1_ready[1]), .in1_data(in1_data[1]),
    .in2_valid(in2_valid[1]), .in2_ready(in2_ready[1]), .in2_data(in2_data[1]),
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_data(out_data[1])
  );

  int checks = 0, failures = 0, got = 0;
  int sent1 [2][N], sent2 [2][N];
  logic f1_q [2][N], f2_q [2][N];
  logic signed [IN_W-1:0] q1 [2][N][$], q2 [2][N][$];

  always @(negedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < 2; d++) begin
        for (int i = 0; i < N; i++) begin
          if (in1_valid[d][i] && f1_q[d][i]) in1_valid[d][i] = 1'b0;
          if (in2_valid[d][i] && f2_q[d][i]) in2_valid[d][i] = 1'b0;
          if (!in1_valid[d][i] && sent1[d][i] < NUM && ($urandom % 3) != 0) begin
            in1_data[d][i] = IN_W'($urandom); in1_valid[d][i] = 1'b1; sent1[d][i]++;
          end
          if (!in2_valid[d][i] && sent2[d][i] < NUM && ($urandom % 3) != 0) begin
            in2_data[d][i] = IN_W'($urandom); in2_valid[d][i] = 1'b1; sent2[d][i]++;
          end
          out_ready[d][i] = ($urandom % 4) != 0;
        end
      end
    end
  end

  always @(posedge clk) begin
    for (int d = 0; d < 2; d++) begin
      for (int i = 0; i < N; i++) begin
        f1_q[d][i] <= in1_valid[d][i] && in1_ready[d][i];
        f2_q[d][i] <= in2_valid[d][i] && in2_ready[d][i];
        if (rst_n) begin
          if (in1_valid[d][i] && in1_ready[d][i]) q1[d][i].push_back(in1_data[d][i]);
          if (in2_valid[d][i] && in2_ready[d][i]) q2[d][i].push_back(in2_data[d][i]);
          if (out_valid[d][i] && out_ready[d][i]) begin
            logic signed [OUT_W-1:0] a, b, exp;
            a = OUT_W'(q1[d][i].pop_front());
            b = OUT_W'(q2[d][i].pop_front());
            exp = (d == 0) ? a * b : a + b;
            checks++;
            if (out_data[d][i] !== exp) begin
              failures++;
              $display("%s lane %0d: got %0d expected %0d", d == 0 ? "MUL" : "ADD", i, out_data[d][i], exp);
            end
            got++;
          end
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < N; i++) begin
        in1_valid[d][i] = 1'b0; in2_valid[d][i] = 1'b0; out_ready[d][i] = 1'b0;
        in1_data[d][i] = '0; in2_data[d][i] = '0; sent1[d][i] = 0; sent2[d][i] = 0;
      end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (got == 2 * N * NUM);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: only %0d results", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
