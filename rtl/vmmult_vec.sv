// VMMULT of the first design: one column of C = A * bs, all rows in parallel.
//
// BROADCAST_N(bs) >_N VMAP_N(VSCALARP): each of the M elements of the column
// bs goes through its own broadcast of fan-out N, so that all N scalar-product
// processes receive the whole column; VSCALARP i also receives row as_i of A
// and produces element c_i of the result column. Every element of every
// vector is its own channel.
//
// Timing: with every operand offered at once and the outputs ready, the N
// results appear 3 + 2*ceil(log2 M) cycles after the operands are taken (one
// cycle in the broadcast, then the scalar product); the N outputs are
// independent channels. Structure
// from the document (bs broadcast to n VSCALARP processes, as_i to process i);
// handshake and widths are this design's own.
module vmmult_vec #(
  parameter int N      = 4,
  parameter int M      = 4,
  parameter int DATA_W = 16,
  parameter int ACC_W  = csp_pkg::acc_width(DATA_W, M)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     as_valid [N][M],
  output logic                     as_ready [N][M],
  input  logic signed [DATA_W-1:0] as_data  [N][M],
  input  logic                     bs_valid [M],
  output logic                     bs_ready [M],
  input  logic signed [DATA_W-1:0] bs_data  [M],
  output logic                     c_valid  [N],
  input  logic                     c_ready  [N],
  output logic signed [ACC_W-1:0]  c_data   [N]
);

  // Broadcast copies of bs, indexed [row][element].
  logic              b_valid [N][M];
  logic              b_ready [N][M];
  logic [DATA_W-1:0] b_data  [N][M];

  for (genvar j = 0; j < M; j++) begin : g_bcast
    logic              o_valid [N];
    logic              o_ready [N];
    logic [DATA_W-1:0] o_data  [N];

    csp_broadcast #(.FANOUT(N), .W(DATA_W)) u_bc (
      .clk, .rst_n,
      .in_valid(bs_valid[j]), .in_ready(bs_ready[j]), .in_data(bs_data[j]),
      .out_valid(o_valid), .out_ready(o_ready), .out_data(o_data)
    );

    for (genvar i = 0; i < N; i++) begin : g_fan
      assign b_valid[i][j] = o_valid[i];
      assign b_data[i][j]  = o_data[i];
      assign o_ready[i]    = b_ready[i][j];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    logic signed [DATA_W-1:0] bsd [M];
    for (genvar j = 0; j < M; j++) begin : g_el
      assign bsd[j] = signed'(b_data[i][j]);
    end

    vscalarp #(.M(M), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_sp (
      .clk, .rst_n,
      .as_valid(as_valid[i]), .as_ready(as_ready[i]), .as_data(as_data[i]),
      .bs_valid(b_valid[i]),  .bs_ready(b_ready[i]),  .bs_data(bsd),
      .c_valid(c_valid[i]),   .c_ready(c_ready[i]),   .c_data(c_data[i])
    );
  end

endmodule
