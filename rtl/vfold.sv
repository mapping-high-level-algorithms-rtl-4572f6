// VFOLD_n(ADD): tree reduction of an n-vector by addition.
//
// The channels are numbered as a heap: the N inputs are c(N)..c(2N-1), ADD
// process i (1 <= i < N) reads c(2i) and c(2i+1) and writes c(i), and c(1) is
// the result. For N = 8 this is the three-level tree of seven processes with
// leaves c8..c15. Any N >= 1 works; N = 1 is a plain channel. Inputs are
// sign-extended to OUT_W at the leaves so every process has the same width.
//
// Timing: a full vector is reduced in about 2*ceil(log2 N) cycles when every
// leaf arrives together; since each process is a one-place buffer, successive
// vectors flow through the tree as a pipeline. The numbering and tree shape
// follow the document; widths and handshake are this design's own.
module vfold #(
  parameter int N     = 4,
  parameter int IN_W  = 32,
  parameter int OUT_W = 34
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid [N],
  output logic                    in_ready [N],
  input  logic signed [IN_W-1:0]  in_data  [N],
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_data
);

  // c[0] is unused; c[1] is the result; c[N..2N-1] are the leaves.
  logic                    c_valid [2*N];
  logic                    c_ready [2*N];
  logic signed [OUT_W-1:0] c_data  [2*N];

  assign c_valid[0] = 1'b0;
  assign c_data[0]  = '0;

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign c_valid[N+i] = in_valid[i];
    assign c_data[N+i]  = OUT_W'(in_data[i]);
    assign in_ready[i]  = c_ready[N+i];
  end

  for (genvar i = 1; i < N; i++) begin : g_node
    csp_add #(.IN_W(OUT_W), .OUT_W(OUT_W)) u_add (
      .clk, .rst_n,
      .in1_valid(c_valid[2*i]),   .in1_ready(c_ready[2*i]),   .in1_data(c_data[2*i]),
      .in2_valid(c_valid[2*i+1]), .in2_ready(c_ready[2*i+1]), .in2_data(c_data[2*i+1]),
      .out_valid(c_valid[i]),     .out_ready(c_ready[i]),     .out_data(c_data[i])
    );
  end

  assign c_ready[0] = 1'b0;
  assign out_valid  = c_valid[1];
  assign out_data   = c_data[1];
  assign c_ready[1] = out_ready;

endmodule
