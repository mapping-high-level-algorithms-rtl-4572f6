// MMULT, third design: a pipeline of N row stages.
//
// The columns of B enter as a stream of M-vectors ending in EOT. Where a
// column enters it is paired with an all-zero partial column (MAP(initial)).
// The pair then runs through N stages; the first stage holds row N-1 of A,
// the last row 0, and each fills in its own element of the column. MAP(final)
// at the end sends each finished column as an inner stream of N values closed
// by TK_EOS, and the matrix EOT as TK_EOT: C leaves as a stream of streams,
// column by column in the order B's columns came in.
//
// Interface: ass holds A as plain wires, the stage arguments, and must be
// stable while columns flow; bss_* is the column stream; css_* the tagged
// result stream. Timing: up to N columns are in the pipe at once; a column
// spends 4 + 2*ceil(log2 M) cycles in each stage, and the next one can enter
// a stage the cycle after the previous one has left it. Structure is the document's;
// the encodings are this design's own.
module mmult_d3
  import csp_pkg::*;
#(
  parameter int N      = 4,
  parameter int M      = 4,
  parameter int DATA_W = 16,
  parameter int ACC_W  = csp_pkg::acc_width(DATA_W, M)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] ass       [N][M],
  input  logic                     bss_valid,
  output logic                     bss_ready,
  input  logic                     bss_eot,
  input  logic signed [DATA_W-1:0] bss_data  [M],
  output logic                     css_valid,
  input  logic                     css_ready,
  output tag_e                     css_tag,
  output logic signed [ACC_W-1:0]  css_data
);

  // Channel s feeds stage s; channel N feeds MAP(final).
  logic                     p_valid [N+1];
  logic                     p_ready [N+1];
  logic                     p_eot   [N+1];
  logic signed [DATA_W-1:0] p_bs    [N+1][M];
  logic signed [ACC_W-1:0]  p_c     [N+1][N];

  // MAP(initial): x -> <x, e> with e the empty (zero) column.
  assign p_valid[0] = bss_valid;
  assign bss_ready  = p_ready[0];
  assign p_eot[0]   = bss_eot;
  assign p_bs[0]    = bss_data;
  always_comb for (int i = 0; i < N; i++) p_c[0][i] = '0;

  for (genvar s = 0; s < N; s++) begin : g_stage
    pipe_stage #(.N(N), .M(M), .DATA_W(DATA_W), .ACC_W(ACC_W), .ROW(N - 1 - s)) u_st (
      .clk, .rst_n,
      .a_row(ass[N-1-s]),
      .in_valid(p_valid[s]),    .in_ready(p_ready[s]),    .in_eot(p_eot[s]),
      .in_bs(p_bs[s]),          .in_c(p_c[s]),
      .out_valid(p_valid[s+1]), .out_ready(p_ready[s+1]), .out_eot(p_eot[s+1]),
      .out_bs(p_bs[s+1]),       .out_c(p_c[s+1])
    );
  end

  pipe_final #(.N(N), .ACC_W(ACC_W)) u_final (
    .clk, .rst_n,
    .in_valid(p_valid[N]), .in_ready(p_ready[N]), .in_eot(p_eot[N]), .in_c(p_c[N]),
    .out_valid(css_valid), .out_ready(css_ready), .out_tag(css_tag), .out_data(css_data)
  );

endmodule
