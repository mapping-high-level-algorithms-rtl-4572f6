// Self-checking testbench for tap_stage (M = 4).
//
// Uses the bookkeeping of the whole fourth design with a chain of one stage
// (N = 1). PHASES runs, each with its own row argument and a stream of 1 to
// 12 random columns closed by EOT, entering with random gaps; the result
// stream and the forwarded stream are taken with independent random
// back-pressure. The result stream must carry a_row . b for each column b,
// then EOT; the forwarded stream must repeat the input stream unchanged.
// The testbench also counts the cycles in which a column had already been
// forwarded while its result had not yet left, and fails if that never
// happens: forwarding and computing must run in parallel. For the first
// column of each run it checks that the result is offered exactly
// 4 + 2*log2(M) cycles after the column was taken, and that the column is
// offered downstream one cycle after it was taken.
module tb_tap_stage;
  localparam int N      = 1;
  localparam int M      = 4;
  localparam int DATA_W = 16;
  localparam int ACC_W  = 2 * DATA_W + $clog2(M);
  localparam int PHASES = 6;
  localparam int MAXC   = 12;
  localparam int LAT    = 4 + 2 * $clog2(M);

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

  tap_stage #(.M(M), .DATA_W(DATA_W)) dut (
    .clk, .rst_n,
    .a_row(ass[0]),
    .in_valid(bss_valid), .in_ready(bss_ready), .in_eot(bss_eot), .in_bs(bss_data),
    .fwd_valid(tail_valid), .fwd_ready(tail_ready), .fwd_eot(tail_eot), .fwd_bs(tail_data),
    .c_valid(css_valid[0]), .c_ready(css_ready[0]), .c_eot(css_eot[0]), .c_data(css_data[0])
  );

  int checks = 0, failures = 0, overlap = 0, cols_in = 0, cols_tail = 0;
  int ncols, sent, tail_idx, streams_done;
  int out_idx [N];
  bit sending;
  logic signed [DATA_W-1:0] Bc [MAXC][M];
  logic fire_q;
  int cyc = 0, first_take = -1, first_res = -1, first_fwd = -1;
  
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
    cyc++;
    if (rst_n && bss_valid && bss_ready && first_take < 0) first_take = cyc;
    if (rst_n && first_take >= 0 && first_res < 0 && css_valid[0]) first_res = cyc;
    if (rst_n && first_take >= 0 && first_fwd < 0 && tail_valid) first_fwd = cyc;
    if (rst_n && bss_valid && bss_ready && !bss_eot) cols_in++;
    if (rst_n && tail_idx > out_idx[0]) overlap++;
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
      first_take = -1; first_res = -1; first_fwd = -1;
      sending = 1'b1;
      while (streams_done < N + 1) @(negedge clk);
      sending = 1'b0;
      checks++;
      if (first_res - first_take != LAT || first_fwd - first_take != 1) begin
        failures++;
        $display("run %0d: result after %0d cycles (expected %0d), forwarded after %0d (expected 1)",
                 p, first_res - first_take, LAT, first_fwd - first_take);
      end
    end
    repeat (2) @(posedge clk);
    checks++;
    if (overlap == 0) begin
      failures++;
      $display("forwarding never ran ahead of the result");
    end
    $display("cycles with the column forwarded before its result: %0d", overlap);
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
