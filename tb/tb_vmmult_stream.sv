// Self-checking testbench for vmmult_stream (M = 4).
//
// Written with the bookkeeping of the whole second design reduced to one
// column (K = 1). ROUNDS column products run back to back: in each round a
// column bs is offered on its element channels and the rows follow as a
// stream of random length (0 to 7 rows) closed by EOT, with random gaps and
// random back-pressure on the result stream. The result stream must carry
// as_i . bs for every row in order, then one EOT, after which the next
// column must be taken. The testbench also counts the cycles in which more
// than one row was inside the scalar-product unit, and fails if that never
// happens. The very first row's result must be offered exactly 3 + 2*log2(M)
// cycles after the row was taken.
module tb_vmmult_stream;
  localparam int M      = 4;
  localparam int K      = 1;
  localparam int DATA_W = 16;
  localparam int ACC_W  = 2 * DATA_W + $clog2(M);
  localparam int ROUNDS = 30;
  localparam int MAXR   = 8;
  localparam int LAT    = 3 + 2 * $clog2(M);

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                     ass_valid, ass_ready, ass_eot;
  logic signed [DATA_W-1:0] ass_data  [M];
  logic                     bss_valid [K][M];
  logic                     bss_ready [K][M];
  logic signed [DATA_W-1:0] bss_data  [K][M];
  logic                     css_valid [K];
  logic                     css_ready [K];
  logic                     css_eot   [K];
  logic signed [ACC_W-1:0]  css_data  [K];

  vmmult_stream #(.M(M), .DATA_W(DATA_W)) dut (
    .clk, .rst_n,
    .bs_valid(bss_valid[0]), .bs_ready(bss_ready[0]), .bs_data(bss_data[0]),
    .as_valid(ass_valid), .as_ready(ass_ready), .as_eot(ass_eot), .as_data(ass_data),
    .c_valid(css_valid[0]), .c_ready(css_ready[0]), .c_eot(css_eot[0]), .c_data(css_data[0])
  );

  int checks = 0, failures = 0, cyc = 0, stalls = 0, rows_in = 0, vals_out = 0, eots = 0, done_streams = 0;
  int nrows [ROUNDS];
  logic signed [DATA_W-1:0] A [ROUNDS][MAXR][M];
  logic signed [DATA_W-1:0] B [ROUNDS][K][M];
  int sb [K][M];
  int row_round = 0, row_idx = 0;
  int out_round [K], out_idx [K];
  logic fb_q [K][M], fa_q;
  int row_taken = -1, res_seen = -1;

  always @(negedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < K; k++)
        for (int j = 0; j < M; j++) begin
          if (bss_valid[k][j] && fb_q[k][j]) bss_valid[k][j] = 1'b0;
          if (!bss_valid[k][j] && sb[k][j] < ROUNDS && ($urandom % 3) != 0) begin
            bss_data[k][j] = B[sb[k][j]][k][j]; bss_valid[k][j] = 1'b1; sb[k][j]++;
          end
        end
      if (ass_valid && fa_q) ass_valid = 1'b0;
      if (!ass_valid && row_round < ROUNDS && ($urandom % 4) != 0) begin
        ass_valid = 1'b1;
        if (row_idx == nrows[row_round]) begin
          ass_eot = 1'b1;
          for (int j = 0; j < M; j++) ass_data[j] = '0;
          row_round++;
          row_idx = 0;
        end else begin
          ass_eot = 1'b0;
          for (int j = 0; j < M; j++) ass_data[j] = A[row_round][row_idx][j];
          row_idx++;
        end
      end
      for (int k = 0; k < K; k++) css_ready[k] = ($urandom % 3) != 0;
    end
  end

  always @(posedge clk) begin
    cyc++;
    fa_q <= ass_valid && ass_ready;
    if (rst_n && ass_valid && ass_ready && !ass_eot) rows_in++;
    if (rst_n && ass_valid && ass_ready && !ass_eot && row_taken < 0) row_taken = cyc;
    if (rst_n && css_valid[0] && !css_eot[0] && res_seen < 0) res_seen = cyc;
    if (rst_n && rows_in - vals_out > 1) stalls++;
    for (int k = 0; k < K; k++)
      for (int j = 0; j < M; j++) fb_q[k][j] <= bss_valid[k][j] && bss_ready[k][j];
    for (int k = 0; k < K; k++)
      if (rst_n && css_valid[k] && css_ready[k]) begin
        int r, i;
        r = out_round[k];
        i = out_idx[k];
        checks++;
        if (r >= ROUNDS) begin
          failures++;
          $display("column %0d: output after the last round", k);
        end else if (i == nrows[r]) begin
          if (!css_eot[k]) begin
            failures++;
            $display("column %0d round %0d: expected EOT after %0d values", k, r, i);
          end
          eots++;
          out_round[k]++;
          out_idx[k] = 0;
          if (out_round[k] == ROUNDS) done_streams++;
        end else begin
          logic signed [ACC_W-1:0] exp;
          exp = '0;
          for (int j = 0; j < M; j++) exp += ACC_W'(A[r][i][j]) * ACC_W'(B[r][k][j]);
          if (css_eot[k] || css_data[k] !== exp) begin
            failures++;
            $display("column %0d round %0d row %0d: got %0d (eot %0b) expected %0d",
                     k, r, i, css_data[k], css_eot[k], exp);
          end
          out_idx[k]++;
          vals_out++;
        end
      end
  end

  initial begin
    for (int r = 0; r < ROUNDS; r++) begin
      nrows[r] = (r == 1) ? 0 : int'($urandom % MAXR);
      for (int i = 0; i < MAXR; i++) for (int j = 0; j < M; j++) A[r][i][j] = DATA_W'($urandom);
      for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) B[r][k][j] = DATA_W'($urandom);
    end
    rst_n = 1'b0; ass_valid = 1'b0; ass_eot = 1'b0;
    for (int j = 0; j < M; j++) ass_data[j] = '0;
    for (int k = 0; k < K; k++) begin
      css_ready[k] = 1'b0; out_round[k] = 0; out_idx[k] = 0;
      for (int j = 0; j < M; j++) begin bss_valid[k][j] = 1'b0; bss_data[k][j] = '0; sb[k][j] = 0; end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (done_streams < K) @(negedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (res_seen - row_taken != LAT) begin
      failures++;
      $display("first result after %0d cycles, expected %0d", res_seen - row_taken, LAT);
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("never more than one row in flight");
    end
    checks++;
    if (eots != K * ROUNDS) begin
      failures++;
      $display("%0d EOTs, expected %0d", eots, K * ROUNDS);
    end
    $display("cycles with several rows in flight: %0d, EOTs: %0d", stalls, eots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d streams finished", done_streams, K);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
