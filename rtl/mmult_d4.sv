// MMULT, fourth design: a chain of N tap stages, C out as a vector of streams.
//
// The columns of B enter as a stream of M-vectors ending in EOT and travel
// down a chain of N stages; the first stage holds row N-1 of A and the last
// row 0. Every stage computes its row's scalar product with the passing
// column and sends it on its own output, so unlike the third design no
// partial column travels along: stream i carries row i of C, one element per
// column of B, then EOT. The column stream leaving the last stage is brought
// out as tail_* and must be consumed.
//
// Interface: ass holds A as plain wires, stable while columns flow. Timing:
// up to N columns are in the chain at once; when nothing stalls, stage s
// takes a column s cycles after stage 0 did, and offers its result
// 4 + 2*ceil(log2 M) cycles after that.
// The structure is the document's; encodings are this design's own.
module mmult_d4 #(
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
  output logic                     css_valid [N],
  input  logic                     css_ready [N],
  output logic                     css_eot   [N],
  output logic signed [ACC_W-1:0]  css_data  [N],
  output logic                     tail_valid,
  input  logic                     tail_ready,
  output logic                     tail_eot,
  output logic signed [DATA_W-1:0] tail_data [M]
);

  // Channel s feeds stage s; channel N is the tail.
  logic                     p_valid [N+1];
  logic                     p_ready [N+1];
  logic                     p_eot   [N+1];
  logic signed [DATA_W-1:0] p_bs    [N+1][M];

  assign p_valid[0] = bss_valid;
  assign bss_ready  = p_ready[0];
  assign p_eot[0]   = bss_eot;
  assign p_bs[0]    = bss_data;

  for (genvar s = 0; s < N; s++) begin : g_stage
    localparam int ROW = N - 1 - s;
    tap_stage #(.M(M), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_st (
      .clk, .rst_n,
      .a_row(ass[ROW]),
      .in_valid(p_valid[s]),    .in_ready(p_ready[s]),    .in_eot(p_eot[s]),    .in_bs(p_bs[s]),
      .fwd_valid(p_valid[s+1]), .fwd_ready(p_ready[s+1]), .fwd_eot(p_eot[s+1]), .fwd_bs(p_bs[s+1]),
      .c_valid(css_valid[ROW]), .c_ready(css_ready[ROW]), .c_eot(css_eot[ROW]), .c_data(css_data[ROW])
    );
  end

  assign tail_valid = p_valid[N];
  assign p_ready[N] = tail_ready;
  assign tail_eot   = p_eot[N];
  assign tail_data  = p_bs[N];

endmodule
