// Self-checking testbench for mmult_d3 (N = M = 4): the row pipeline.
//
// PHASES products run one after another, each with its own matrix A on the
// stage-argument wires (changed only while the pipeline is empty) and a
// stream of 1 to 12 random columns of B closed by EOT. Columns enter with
// random gaps and the result is taken with random back-pressure. For every
// column the output must be the N elements of A * b in row order, then an
// end-of-column marker; each product must end with one end-of-matrix marker.
// The testbench counts the cycles in which two or more columns were inside
// the pipeline at once and fails if that never happens.
module tb_mmult_d3;
  import csp_pkg::*;
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
  logic                     css_valid, css_ready;
  tag_e                     css_tag;
  logic signed [ACC_W-1:0]  css_data;

  mmult_d3 dut (.*);

  int checks = 0, failures = 0, overlap = 0, cols_in = 0, cols_out = 0;
  int ncols, sent, out_col, out_row;
  bit phase_done, sending;
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
    css_ready = ($urandom % 3) != 0;
  end

  always @(posedge clk) begin
    fire_q <= bss_valid && bss_ready;
    if (rst_n && bss_valid && bss_ready && !bss_eot) cols_in++;
    if (rst_n && cols_in - cols_out >= 2) overlap++;
    if (rst_n && css_valid && css_ready) begin
      checks++;
      if (out_col == ncols) begin
        if (css_tag != TK_EOT) begin
          failures++;
          $display("expected end of matrix, got tag %0d", css_tag);
        end
        phase_done = 1'b1;
      end else if (out_row == N) begin
        if (css_tag != TK_EOS) begin
          failures++;
          $display("column %0d: expected end of column, got tag %0d", out_col, css_tag);
        end
        out_row = 0;
        out_col++;
        cols_out++;
      end else begin
        logic signed [ACC_W-1:0] exp;
        exp = '0;
        for (int j = 0; j < M; j++) exp += ACC_W'(ass[out_row][j]) * ACC_W'(Bc[out_col][j]);
        if (css_tag != TK_VALUE || css_data !== exp) begin
          failures++;
          $display("C[%0d][%0d]: got %0d (tag %0d) expected %0d", out_row, out_col, css_data, css_tag, exp);
        end
        out_row++;
      end
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
      sent = 0; out_col = 0; out_row = 0; phase_done = 1'b0;
      sending = 1'b1;
      while (!phase_done) @(negedge clk);
      sending = 1'b0;
    end
    repeat (2) @(posedge clk);
    checks++;
    if (overlap == 0) begin
      failures++;
      $display("never more than one column in the pipeline");
    end
    $display("cycles with two or more columns in the pipeline: %0d", overlap);
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
