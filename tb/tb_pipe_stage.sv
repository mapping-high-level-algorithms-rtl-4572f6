// Self-checking testbench for pipe_stage (N = M = 4, the stage for row 2).
//
// Random pairs (column bs, partial column) and occasional EOTs are offered
// with random gaps; the output is taken with random back-pressure. Each
// output must carry the same bs, the same partial column except element ROW,
// which must hold a_row . bs; an EOT must come out as an EOT. With the output
// always ready a value pair must spend exactly 4 + 2*log2(M) cycles in the
// stage, which phase 1 checks.
module tb_pipe_stage;
  localparam int N      = 4;
  localparam int M      = 4;
  localparam int DATA_W = 16;
  localparam int ACC_W  = 2 * DATA_W + $clog2(M);
  localparam int ROW    = 2;
  localparam int NUM    = 200;
  localparam int LAT    = 4 + 2 * $clog2(M);

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic signed [DATA_W-1:0] a_row  [M];
  logic                     in_valid, in_ready, in_eot;
  logic signed [DATA_W-1:0] in_bs  [M];
  logic signed [ACC_W-1:0]  in_c   [N];
  logic                     out_valid, out_ready, out_eot;
  logic signed [DATA_W-1:0] out_bs [M];
  logic signed [ACC_W-1:0]  out_c  [N];

  pipe_stage #(.N(N), .M(M), .DATA_W(DATA_W), .ROW(ROW)) dut (.*);

  typedef struct {
    logic                     eot;
    logic signed [DATA_W-1:0] bs [M];
    logic signed [ACC_W-1:0]  c  [N];
  } pair_t;

  int checks = 0, failures = 0, got = 0, sent = 0, cyc = 0;
  pair_t q [$];
  logic fire_q;
  bit random_phase = 0;
  int taken_at = -1, done_at = -1;

  always @(negedge clk) begin
    if (rst_n && random_phase) begin
      if (in_valid && fire_q) in_valid = 1'b0;
      if (!in_valid && sent < NUM && ($urandom % 3) != 0) begin
        in_valid = 1'b1;
        in_eot   = ($urandom % 8) == 0;
        for (int j = 0; j < M; j++) in_bs[j] = DATA_W'($urandom);
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
      pair_t p;
      p.eot = in_eot; p.bs = in_bs; p.c = in_c;
      q.push_back(p);
      taken_at = cyc;
    end
    if (rst_n && out_valid && out_ready) begin
      pair_t p;
      logic ok;
      p = q.pop_front();
      ok = (out_eot == p.eot);
      if (!p.eot) begin
        logic signed [ACC_W-1:0] dot;
        dot = '0;
        for (int j = 0; j < M; j++) dot += ACC_W'(a_row[j]) * ACC_W'(p.bs[j]);
        for (int j = 0; j < M; j++) ok &= (out_bs[j] === p.bs[j]);
        for (int i = 0; i < N; i++) ok &= (out_c[i] === ((i == ROW) ? dot : p.c[i]));
      end
      checks++;
      if (!ok) begin
        failures++;
        $display("pair %0d wrong (eot %0b/%0b, c[ROW] %0d)", got, out_eot, p.eot, out_c[ROW]);
      end
      got++;
      done_at = cyc;
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_eot = 1'b0; out_ready = 1'b0;
    for (int j = 0; j < M; j++) begin a_row[j] = DATA_W'($urandom); in_bs[j] = '0; end
    for (int i = 0; i < N; i++) in_c[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Phase 1: one value pair with the output always ready.
    out_ready = 1'b1;
    in_valid = 1'b1;
    for (int j = 0; j < M; j++) in_bs[j] = DATA_W'(j - 7);
    for (int i = 0; i < N; i++) in_c[i] = ACC_W'(100 * i);
    @(negedge clk);
    in_valid = 1'b0;
    while (got < 1) @(negedge clk);
    checks++;
    if (done_at - taken_at != LAT) begin
      failures++;
      $display("pair spent %0d cycles in the stage, expected %0d", done_at - taken_at, LAT);
    end
    random_phase = 1;
    while (got < NUM + 1) @(negedge clk);
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
