// Self-checking testbench for mmult_d4 (N = M = 4): the tapped pipeline.
//
// PHASES products run one after another, each with its own matrix A on the
// stage-argument wires (changed only while the chain is empty) and a stream
// of 1 to 12 random columns of B closed by EOT. Columns enter with random
// gaps; every result stream and the tail take with random back-pressure.
// Result stream i must carry A[i] . b for every column b in order, then EOT;
// the tail must give back the column stream unchanged. The testbench counts
// the cycles in which two or more columns were in the chain at once and fails
// if that never happens.
module tb_mmult_d4;
  localparam int N      = 4;
  localparam int M      = 4;
  localparam int DATA_W = 16;
  localparam int ACC_W  = 2 * DATA_W + $clog2(M);
  localparam int PHASES = 6;
  localparam int MAXC   = 12;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic signed [DATA_W-1:0] ass       [N][M];
  logic                     bss_valid, bss_ready, bss_eot;
  logic signed [DATA_W-1:0] bss_data  [M];
  logic                     css_valid [N];
  logic                     css_ready [N];
  logic                     css_eot   [N];
  logic signed [ACC_W-1:0]  css_data  [N];
  logic                     tail_valid, tail_ready, tail_eot;
  logic signed [DATA_W-1:0] tail_data [M];

  mmult_d4 dut (.*);

  int checks = 0, failures = 0, overlap = 0, cols_in = 0, cols_tail = 0;
  int ncols, sent, tail_idx, streams_done;
  int out_idx [N];
  bit sending;
  logic signed [DATA_W-1:0] Bc [MAXC][M];
  logic fire_q;

  always @(negedge clk) begin
    if (rst_n && sending) begin
      if (bss_valid && fire_q) bss_valid = 1'b0;
      if (!bss_valid && sent <= ncols && ($urandom % 3) != 0) begin
        bss_valid = 1'b1;
        bss_eot   = (sent == ncols);
        for (int j = 0; j < M; j++) bss_data[j] = (sent < ncols) ? Bc[sent][j] : '0;
        sent++;
      end
    end
    for (int i = 0; i < N; i++) css_ready[i] = ($urandom % 3) != 0;
    tail_ready = ($urandom % 3) != 0;
  end

  always @(posedge clk) begin
    fire_q <= bss_valid && bss_ready;
    if (rst_n && bss_valid && bss_ready && !bss_eot) cols_in++;
    if (rst_n && cols_in - cols_tail >= 2) overlap++;
    for (int i = 0; i < N; i++)
      if (rst_n && css_valid[i] && css_ready[i]) begin
        checks++;
        if (out_idx[i] == ncols) begin
          if (!css_eot[i]) begin
            failures++;
            $display("row %0d: expected EOT", i);
          end
          streams_done++;
        end else begin
          logic signed [ACC_W-1:0] exp;
          exp = '0;
          for (int j = 0; j < M; j++) exp += ACC_W'(ass[i][j]) * ACC_W'(Bc[out_idx[i]][j]);
          if (css_eot[i] || css_data[i] !== exp) begin
            failures++;
            $display("C[%0d][%0d]: got %0d (eot %0b) expected %0d", i, out_idx[i], css_data[i], css_eot[i], exp);
          end
        end
        out_idx[i]++;
      end
    if (rst_n && tail_valid && tail_ready) begin
      logic ok;
      ok = (tail_eot == (tail_idx == ncols));
      if (tail_idx < ncols) for (int j = 0; j < M; j++) ok &= (tail_data[j] === Bc[tail_idx][j]);
      checks++;
      if (!ok) begin
        failures++;
        $display("tail message %0d wrong", tail_idx);
      end
      if (tail_idx < ncols) cols_tail++;
      else streams_done++;
      tail_idx++;
    end
  end

  initial begin
    rst_n = 1'b0; bss_valid = 1'b0; bss_eot = 1'b0; sending = 1'b0;
    for (int j = 0; j < M; j++) bss_data[j] = '0;
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) ass[i][j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < PHASES; p++) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) ass[i][j] = DATA_W'($urandom);
      ncols = 1 + int'($urandom % MAXC);
      for (int c = 0; c < ncols; c++) for (int j = 0; j < M; j++) Bc[c][j] = DATA_W'($urandom);
      sent = 0; tail_idx = 0; streams_done = 0;
      for (int i = 0; i < N; i++) out_idx[i] = 0;
      sending = 1'b1;
      while (streams_done < N + 1) @(negedge clk);
      sending = 1'b0;
    end
    repeat (2) @(posedge clk);
    checks++;
    if (overlap == 0) begin
      failures++;
      $display("never more than one column in the chain");
    end
    $display("cycles with two or more columns in the chain: %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
