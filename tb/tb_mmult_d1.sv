// Self-checking testbench for mmult_d1 (N = M = K = 4).
//
// Phase 1 multiplies one pair of matrices with every operand offered at once
// and every output ready, and checks the product and that all of C appears
// 3 + 2*log2(M) cycles after the operands were taken. Phase 2 multiplies
// ROUNDS random pairs back to back with independent random gaps on every
// element channel and random back-pressure on every output, so the
// broadcasts of A stall on slow columns; every element of C must be
// sum_j A[i][j] * B[j][k] of its own round.
module tb_mmult_d1;
  localparam int N      = 4;
  localparam int M      = 4;
  localparam int K      = 4;
  localparam int DATA_W = 16;
  localparam int ACC_W  = 2 * DATA_W + $clog2(M);
  localparam int ROUNDS = 40;
  localparam int LAT    = 3 + 2 * $clog2(M);

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                     ass_valid [N][M];
  logic                     ass_ready [N][M];
  logic signed [DATA_W-1:0] ass_data  [N][M];
  logic                     bss_valid [K][M];
  logic                     bss_ready [K][M];
  logic signed [DATA_W-1:0] bss_data  [K][M];
  logic                     css_valid [K][N];
  logic                     css_ready [K][N];
  logic signed [ACC_W-1:0]  css_data  [K][N];

  mmult_d1 dut (.*);

  int checks = 0, failures = 0, got = 0, cyc = 0, stalls = 0;
  bit random_phase = 0;
  int taken_at = -1, last_seen = -1;
  int sa [N][M], sb [K][M], cnt [K][N];
  logic fa_q [N][M], fb_q [K][M];
  // Operand values per round, generated up front.
  logic signed [DATA_W-1:0] A [ROUNDS+1][N][M];
  logic signed [DATA_W-1:0] B [ROUNDS+1][K][M];

  always @(negedge clk) begin
    if (rst_n && random_phase) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < M; j++) begin
          if (ass_valid[i][j] && fa_q[i][j]) ass_valid[i][j] = 1'b0;
          if (!ass_valid[i][j] && sa[i][j] <= ROUNDS && ($urandom % 3) != 0) begin
            ass_data[i][j] = A[sa[i][j]][i][j]; ass_valid[i][j] = 1'b1; sa[i][j]++;
          end
        end
      for (int k = 0; k < K; k++)
        for (int j = 0; j < M; j++) begin
          if (bss_valid[k][j] && fb_q[k][j]) bss_valid[k][j] = 1'b0;
          if (!bss_valid[k][j] && sb[k][j] <= ROUNDS && ($urandom % 3) != 0) begin
            bss_data[k][j] = B[sb[k][j]][k][j]; bss_valid[k][j] = 1'b1; sb[k][j]++;
          end
        end
      for (int k = 0; k < K; k++)
        for (int i = 0; i < N; i++) css_ready[k][i] = ($urandom % 3) != 0;
    end
  end

  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < M; j++) begin
        fa_q[i][j] <= ass_valid[i][j] && ass_ready[i][j];
        if (rst_n && ass_valid[i][j] && ass_ready[i][j] && !random_phase) taken_at = cyc;
        if (rst_n && ass_valid[i][j] && !ass_ready[i][j]) stalls++;
      end
    for (int k = 0; k < K; k++)
      for (int j = 0; j < M; j++) begin
        fb_q[k][j] <= bss_valid[k][j] && bss_ready[k][j];
        if (rst_n && bss_valid[k][j] && bss_ready[k][j] && !random_phase) taken_at = cyc;
      end
    for (int k = 0; k < K; k++)
      for (int i = 0; i < N; i++)
        if (rst_n && css_valid[k][i] && css_ready[k][i]) begin
          logic signed [ACC_W-1:0] exp;
          int r;
          r = cnt[k][i];
          exp = '0;
          for (int j = 0; j < M; j++) exp += ACC_W'(A[r][i][j]) * ACC_W'(B[r][k][j]);
          checks++;
          if (css_data[k][i] !== exp) begin
            failures++;
            $display("round %0d C[%0d][%0d]: got %0d expected %0d", r, i, k, css_data[k][i], exp);
          end
          if (!random_phase) last_seen = cyc;
          cnt[k][i]++;
          got++;
        end
  end

  initial begin
    for (int r = 0; r <= ROUNDS; r++) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) A[r][i][j] = DATA_W'($urandom);
      for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) B[r][k][j] = DATA_W'($urandom);
    end
    rst_n = 1'b0;
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin
      ass_valid[i][j] = 1'b0; ass_data[i][j] = '0; sa[i][j] = 1;
    end
    for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) begin
      bss_valid[k][j] = 1'b0; bss_data[k][j] = '0; sb[k][j] = 1;
    end
    for (int k = 0; k < K; k++) for (int i = 0; i < N; i++) begin
      css_ready[k][i] = 1'b0; cnt[k][i] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Phase 1: round 0 offered all at once.
    for (int k = 0; k < K; k++) for (int i = 0; i < N; i++) css_ready[k][i] = 1'b1;
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin
      ass_valid[i][j] = 1'b1; ass_data[i][j] = A[0][i][j];
    end
    for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) begin
      bss_valid[k][j] = 1'b1; bss_data[k][j] = B[0][k][j];
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) ass_valid[i][j] = 1'b0;
    for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) bss_valid[k][j] = 1'b0;
    while (got < N * K) @(negedge clk);
    checks++;
    if (last_seen - taken_at != LAT) begin
      failures++;
      $display("latency %0d cycles, expected %0d", last_seen - taken_at, LAT);
    end
    // Phase 2: random traffic.
    random_phase = 1;
    while (got < N * K * (ROUNDS + 1)) @(negedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("no broadcast of A ever held back its source");
    end
    $display("broadcast stall cycles on A: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: only %0d results", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
