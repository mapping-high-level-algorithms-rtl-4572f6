// MMULT, first design: C = A * B as a two-dimensional array of VSCALARPs.
//
// B arrives as a vector of K columns and C leaves as a vector of K columns
// (VMAP_K(VMMULT)). A is not copied K times: each of its N*M elements passes
// through one broadcast of fan-out K (BROADCAST_K(ass)), which feeds the
// VMMULT of every column. Inside each VMMULT the column is in turn broadcast
// to N scalar-product processes, giving N*K VSCALARPs in all, each with M
// multipliers and an M-leaf addition tree.
//
// Interface: ass_* are the N x M element channels of A (row i, element j);
// bss_* the K x M element channels of B (column k, element j); css_* the
// K x N element channels of C (column k, row i), css[k][i] = sum_j
// ass[i][j] * bss[k][j]. Timing: with every operand offered at once and every
// output ready, all of C appears 3 + 2*ceil(log2 M) cycles after the operands
// are taken (one cycle in the broadcasts, which work in parallel, then the
// scalar product). The network is the
// document's; handshake, widths and the broadcast buffers are this design's.
module mmult_d1 #(
  parameter int N      = 4,
  parameter int M      = 4,
  parameter int K      = 4,
  parameter int DATA_W = 16,
  parameter int ACC_W  = csp_pkg::acc_width(DATA_W, M)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ass_valid [N][M],
  output logic                     ass_ready [N][M],
  input  logic signed [DATA_W-1:0] ass_data  [N][M],
  input  logic                     bss_valid [K][M],
  output logic                     bss_ready [K][M],
  input  logic signed [DATA_W-1:0] bss_data  [K][M],
  output logic                     css_valid [K][N],
  input  logic                     css_ready [K][N],
  output logic signed [ACC_W-1:0]  css_data  [K][N]
);

  // Broadcast copies of A, indexed [column][row][element].
  logic                     a_valid [K][N][M];
  logic                     a_ready [K][N][M];
  logic signed [DATA_W-1:0] a_data  [K][N][M];

  for (genvar i = 0; i < N; i++) begin : g_arow
    for (genvar j = 0; j < M; j++) begin : g_ael
      logic              o_valid [K];
      logic              o_ready [K];
      logic [DATA_W-1:0] o_data  [K];

      csp_broadcast #(.FANOUT(K), .W(DATA_W)) u_bc (
        .clk, .rst_n,
        .in_valid(ass_valid[i][j]), .in_ready(ass_ready[i][j]), .in_data(ass_data[i][j]),
        .out_valid(o_valid), .out_ready(o_ready), .out_data(o_data)
      );

      for (genvar k = 0; k < K; k++) begin : g_fan
        assign a_valid[k][i][j] = o_valid[k];
        assign a_data[k][i][j]  = signed'(o_data[k]);
        assign o_ready[k]       = a_ready[k][i][j];
      end
    end
  end

  for (genvar k = 0; k < K; k++) begin : g_col
    vmmult_vec #(.N(N), .M(M), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_vmm (
      .clk, .rst_n,
      .as_valid(a_valid[k]),   .as_ready(a_ready[k]),   .as_data(a_data[k]),
      .bs_valid(bss_valid[k]), .bs_ready(bss_ready[k]), .bs_data(bss_data[k]),
      .c_valid(css_valid[k]),  .c_ready(css_ready[k]),  .c_data(css_data[k])
    );
  end

endmodule
