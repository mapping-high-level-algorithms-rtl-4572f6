// End-to-end testbench for mmult_top at its default size (N = M = K = 4).
//
// ROUNDS random pairs of matrices A (N x M) and B (M x K) are multiplied by
// all four networks, each fed in its own form: the first design gets every
// element on its own channel, the second the columns of B as vectors and the
// rows of A as a stream, the third and fourth A on their argument wires and
// the columns of B as a stream. Every source has random gaps and every
// output random back-pressure. All four results are checked against the
// same reference products. The second, third and fourth designs take one
// round at a time: a round ends when each has delivered its whole result,
// and only then is A changed (the pipelines hold A on argument wires). The
// first design has no such wires and is fed all rounds back to back.
//
// Mechanisms counted (each must occur at least once): a broadcast holding
// back its source in the first and in the second design, EOT closing a
// result stream in the second and fourth designs, end-of-column and
// end-of-matrix markers in the third, two or more columns inside the
// pipelines of the third and fourth designs at once, and back-pressure on a
// result.
module tb_mmult_top;
  import csp_pkg::*;
  localparam int N      = 4;
  localparam int M      = 4;
  localparam int K      = 4;
  localparam int DATA_W = 16;
  localparam int ACC_W  = 2 * DATA_W + $clog2(M);
  localparam int ROUNDS = 25;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                     d1_ass_valid [N][M];
  logic                     d1_ass_ready [N][M];
  logic signed [DATA_W-1:0] d1_ass_data  [N][M];
  logic                     d1_bss_valid [K][M];
  logic                     d1_bss_ready [K][M];
  logic signed [DATA_W-1:0] d1_bss_data  [K][M];
  logic                     d1_css_valid [K][N];
  logic                     d1_css_ready [K][N];
  logic signed [ACC_W-1:0]  d1_css_data  [K][N];
  logic                     d2_ass_valid, d2_ass_ready, d2_ass_eot;
  logic signed [DATA_W-1:0] d2_ass_data  [M];
  logic                     d2_bss_valid [K][M];
  logic                     d2_bss_ready [K][M];
  logic signed [DATA_W-1:0] d2_bss_data  [K][M];
  logic                     d2_css_valid [K];
  logic                     d2_css_ready [K];
  logic                     d2_css_eot   [K];
  logic signed [ACC_W-1:0]  d2_css_data  [K];
  logic signed [DATA_W-1:0] d3_ass       [N][M];
  logic                     d3_bss_valid, d3_bss_ready, d3_bss_eot;
  logic signed [DATA_W-1:0] d3_bss_data  [M];
  logic                     d3_css_valid, d3_css_ready;
  tag_e                     d3_css_tag;
  logic signed [ACC_W-1:0]  d3_css_data;
  logic signed [DATA_W-1:0] d4_ass       [N][M];
  logic                     d4_bss_valid, d4_bss_ready, d4_bss_eot;
  logic signed [DATA_W-1:0] d4_bss_data  [M];
  logic                     d4_css_valid [N];
  logic                     d4_css_ready [N];
  logic                     d4_css_eot   [N];
  logic signed [ACC_W-1:0]  d4_css_data  [N];
  logic                     d4_tail_valid, d4_tail_ready, d4_tail_eot;
  logic signed [DATA_W-1:0] d4_tail_data [M];

  mmult_top dut (.*);

  // All rounds' matrices and products, generated up front. The first design
  // needs no stable argument wires, so it runs through the rounds on its own;
  // the other three take one round at a time.
  logic signed [DATA_W-1:0] A_all [ROUNDS][N][M];
  logic signed [DATA_W-1:0] B_all [ROUNDS][K][M];
  logic signed [ACC_W-1:0]  C_all [ROUNDS][N][K];
  int d1_cnt [K][N];
  // Current round's matrices and reference product.
  logic signed [DATA_W-1:0] A [N][M];
  logic signed [DATA_W-1:0] B [K][M];     // B[k] is column k
  logic signed [ACC_W-1:0]  C [N][K];

  int checks = 0, failures = 0;
  bit active = 0;

  // Progress of this round, per source and sink.
  int  d1a_sent [N][M], d1b_sent [K][M], d1_got;
  int  d2b_sent [K][M], d2a_sent, d2_got [K];
  int  d3_sent, d3_got, d4_sent, d4_got [N], d4_tail;
  logic d1a_f [N][M], d1b_f [K][M], d2b_f [K][M], d2a_f, d3_f, d4_f;
  int  d3_in, d3_out, d4_in;

  // Mechanism counters.
  int n_d1_bc_stall = 0, n_d2_bc_stall = 0, n_d2_eot = 0, n_d3_eos = 0, n_d3_eot = 0;
  int n_d4_eot = 0, n_d3_overlap = 0, n_d4_overlap = 0, n_backpressure = 0;

  function automatic bit coin();
    return ($urandom % 3) != 0;
  endfunction

  // ---------------- sources and ready signals, at the falling edge
  always @(negedge clk) begin
    if (rst_n && active) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin
        if (d1_ass_valid[i][j] && d1a_f[i][j]) d1_ass_valid[i][j] = 1'b0;
        if (!d1_ass_valid[i][j] && d1a_sent[i][j] < ROUNDS && coin()) begin
          d1_ass_valid[i][j] = 1'b1; d1_ass_data[i][j] = A_all[d1a_sent[i][j]][i][j]; d1a_sent[i][j]++;
        end
      end
      for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) begin
        if (d1_bss_valid[k][j] && d1b_f[k][j]) d1_bss_valid[k][j] = 1'b0;
        if (!d1_bss_valid[k][j] && d1b_sent[k][j] < ROUNDS && coin()) begin
          d1_bss_valid[k][j] = 1'b1; d1_bss_data[k][j] = B_all[d1b_sent[k][j]][k][j]; d1b_sent[k][j]++;
        end
        if (d2_bss_valid[k][j] && d2b_f[k][j]) d2_bss_valid[k][j] = 1'b0;
        if (!d2_bss_valid[k][j] && d2b_sent[k][j] == 0 && coin()) begin
          d2_bss_valid[k][j] = 1'b1; d2_bss_data[k][j] = B[k][j]; d2b_sent[k][j] = 1;
        end
      end
      if (d2_ass_valid && d2a_f) d2_ass_valid = 1'b0;
      if (!d2_ass_valid && d2a_sent <= N && coin()) begin
        d2_ass_valid = 1'b1;
        d2_ass_eot   = (d2a_sent == N);
        for (int j = 0; j < M; j++) d2_ass_data[j] = (d2a_sent < N) ? A[d2a_sent][j] : '0;
        d2a_sent++;
      end
      if (d3_bss_valid && d3_f) d3_bss_valid = 1'b0;
      if (!d3_bss_valid && d3_sent <= K && coin()) begin
        d3_bss_valid = 1'b1;
        d3_bss_eot   = (d3_sent == K);
        for (int j = 0; j < M; j++) d3_bss_data[j] = (d3_sent < K) ? B[d3_sent][j] : '0;
        d3_sent++;
      end
      if (d4_bss_valid && d4_f) d4_bss_valid = 1'b0;
      if (!d4_bss_valid && d4_sent <= K && coin()) begin
        d4_bss_valid = 1'b1;
        d4_bss_eot   = (d4_sent == K);
        for (int j = 0; j < M; j++) d4_bss_data[j] = (d4_sent < K) ? B[d4_sent][j] : '0;
        d4_sent++;
      end
    end
    for (int k = 0; k < K; k++) begin
      for (int i = 0; i < N; i++) d1_css_ready[k][i] = coin();
      d2_css_ready[k] = coin();
    end
    d3_css_ready = coin();
    for (int i = 0; i < N; i++) d4_css_ready[i] = coin();
    d4_tail_ready = coin();
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- monitors, at the rising edge
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++)
      d1a_f[i][j] <= d1_ass_valid[i][j] && d1_ass_ready[i][j];
    for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) begin
      d1b_f[k][j] <= d1_bss_valid[k][j] && d1_bss_ready[k][j];
      d2b_f[k][j] <= d2_bss_valid[k][j] && d2_bss_ready[k][j];
    end
    d2a_f <= d2_ass_valid && d2_ass_ready;
    d3_f  <= d3_bss_valid && d3_bss_ready;
    d4_f  <= d4_bss_valid && d4_bss_ready;
    if (rst_n && active) begin
      // Mechanisms seen at the inputs.
      for (int i = 0; i < N; i++) for (int j = 0; j < M; j++)
        if (d1_ass_valid[i][j] && !d1_ass_ready[i][j]) n_d1_bc_stall++;
      if (d2_ass_valid && !d2_ass_ready) n_d2_bc_stall++;
      if (d3_bss_valid && d3_bss_ready && !d3_bss_eot) d3_in++;
      if (d4_bss_valid && d4_bss_ready && !d4_bss_eot) d4_in++;
      if (d3_in - d3_out >= 2) n_d3_overlap++;
      if (d4_in - d4_tail >= 2) n_d4_overlap++;
      for (int k = 0; k < K; k++) for (int i = 0; i < N; i++)
        if (d1_css_valid[k][i] && !d1_css_ready[k][i]) n_backpressure++;

      // First design: one element of C per output channel.
      for (int k = 0; k < K; k++) for (int i = 0; i < N; i++)
        if (d1_css_valid[k][i] && d1_css_ready[k][i]) begin
          check(d1_css_data[k][i] === C_all[d1_cnt[k][i]][i][k],
                $sformatf("d1 round %0d C[%0d][%0d]", d1_cnt[k][i], i, k));
          d1_cnt[k][i]++;
          d1_got++;
        end

      // Second design: stream k is column k of C, then EOT.
      for (int k = 0; k < K; k++)
        if (d2_css_valid[k] && d2_css_ready[k]) begin
          if (d2_got[k] == N) begin
            check(d2_css_eot[k], $sformatf("d2 EOT on column %0d", k));
            n_d2_eot++;
          end else begin
            check(!d2_css_eot[k] && d2_css_data[k] === C[d2_got[k]][k],
                  $sformatf("d2 C[%0d][%0d]", d2_got[k], k));
          end
          d2_got[k]++;
        end

      // Third design: per column N values and EOS, then EOT.
      if (d3_css_valid && d3_css_ready) begin
        int col, row;
        col = d3_got / (N + 1);
        row = d3_got % (N + 1);
        if (col == K) begin
          check(d3_css_tag == TK_EOT, "d3 end of matrix");
          n_d3_eot++;
        end else if (row == N) begin
          check(d3_css_tag == TK_EOS, $sformatf("d3 end of column %0d", col));
          n_d3_eos++;
          d3_out++;
        end else begin
          check(d3_css_tag == TK_VALUE && d3_css_data === C[row][col],
                $sformatf("d3 C[%0d][%0d]", row, col));
        end
        d3_got++;
      end

      // Fourth design: stream i is row i of C, then EOT; tail returns B.
      for (int i = 0; i < N; i++)
        if (d4_css_valid[i] && d4_css_ready[i]) begin
          if (d4_got[i] == K) begin
            check(d4_css_eot[i], $sformatf("d4 EOT on row %0d", i));
            n_d4_eot++;
          end else begin
            check(!d4_css_eot[i] && d4_css_data[i] === C[i][d4_got[i]],
                  $sformatf("d4 C[%0d][%0d]", i, d4_got[i]));
          end
          d4_got[i]++;
        end
      if (d4_tail_valid && d4_tail_ready) begin
        bit ok;
        ok = (d4_tail_eot == (d4_tail == K));
        if (d4_tail < K) for (int j = 0; j < M; j++) ok &= (d4_tail_data[j] === B[d4_tail][j]);
        check(ok, $sformatf("d4 tail message %0d", d4_tail));
        d4_tail++;
      end
    end
  end

  function automatic bit round_done();
    bit d = (d3_got == K * (N + 1) + 1) && (d4_tail == K + 1);
    for (int k = 0; k < K; k++) d &= (d2_got[k] == N + 1);
    for (int i = 0; i < N; i++) d &= (d4_got[i] == K + 1);
    return d;
  endfunction

  initial begin
    rst_n = 1'b0;
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin
      d1_ass_valid[i][j] = 1'b0; d1_ass_data[i][j] = '0; d3_ass[i][j] = '0; d4_ass[i][j] = '0;
    end
    for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) begin
      d1_bss_valid[k][j] = 1'b0; d1_bss_data[k][j] = '0;
      d2_bss_valid[k][j] = 1'b0; d2_bss_data[k][j] = '0;
    end
    d2_ass_valid = 1'b0; d2_ass_eot = 1'b0; d3_bss_valid = 1'b0; d3_bss_eot = 1'b0;
    d4_bss_valid = 1'b0; d4_bss_eot = 1'b0;
    for (int j = 0; j < M; j++) begin d2_ass_data[j] = '0; d3_bss_data[j] = '0; d4_bss_data[j] = '0; end
    d3_in = 0; d3_out = 0; d4_in = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < ROUNDS; r++) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) A_all[r][i][j] = DATA_W'($urandom);
      for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) B_all[r][k][j] = DATA_W'($urandom);
      for (int i = 0; i < N; i++) for (int k = 0; k < K; k++) begin
        C_all[r][i][k] = '0;
        for (int j = 0; j < M; j++) C_all[r][i][k] += ACC_W'(A_all[r][i][j]) * ACC_W'(B_all[r][k][j]);
      end
    end
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) d1a_sent[i][j] = 0;
    for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) d1b_sent[k][j] = 0;
    for (int k = 0; k < K; k++) for (int i = 0; i < N; i++) d1_cnt[k][i] = 0;
    d1_got = 0;
    for (int r = 0; r < ROUNDS; r++) begin
      A = A_all[r]; B = B_all[r]; C = C_all[r];
      d3_ass = A; d4_ass = A;
      for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) d2b_sent[k][j] = 0;
      for (int k = 0; k < K; k++) d2_got[k] = 0;
      for (int i = 0; i < N; i++) d4_got[i] = 0;
      d2a_sent = 0; d3_sent = 0; d3_got = 0; d4_sent = 0; d4_tail = 0;
      d3_in = 0; d3_out = 0; d4_in = 0;
      active = 1'b1;
      while (!round_done()) @(negedge clk);
    end
    while (d1_got < N * K * ROUNDS) @(negedge clk);
    active = 1'b0;
    repeat (2) @(posedge clk);
    $display("broadcast stalls d1 %0d d2 %0d; EOT d2 %0d d4 %0d; d3 EOS %0d EOT %0d",
             n_d1_bc_stall, n_d2_bc_stall, n_d2_eot, n_d4_eot, n_d3_eos, n_d3_eot);
    $display("pipeline overlap cycles d3 %0d d4 %0d; back-pressure cycles %0d",
             n_d3_overlap, n_d4_overlap, n_backpressure);
    check(n_d1_bc_stall > 0, "first design: broadcast never held back a source");
    check(n_d2_bc_stall > 0, "second design: broadcast never held back the row stream");
    check(n_d2_eot == K * ROUNDS, "second design: EOT count");
    check(n_d3_eos == K * ROUNDS && n_d3_eot == ROUNDS, "third design: EOS/EOT count");
    check(n_d4_eot == N * ROUNDS, "fourth design: EOT count");
    check(n_d3_overlap > 0, "third design: pipeline never held two columns");
    check(n_d4_overlap > 0, "fourth design: pipeline never held two columns");
    check(n_backpressure > 0, "no back-pressure on a result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
