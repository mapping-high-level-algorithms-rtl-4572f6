// VSCALARP: scalar product of two M-vectors, VZIP_M(MUL) >>_M VFOLD_M(ADD).
//
// Element i of as and of bs meet in MUL lane i; the M products travel on M
// channels into an addition tree whose root gives sum_i as_i * bs_i. Every
// element of as and bs is its own channel. Products are 2*DATA_W bits and the
// sum ACC_W bits, so nothing overflows.
//
// Timing: with all 2M operands offered together the result is valid
// 2 + 2*ceil(log2 M) cycles later; a new pair of vectors can follow before the
// previous result has left, since every process is a buffer. The composition
// follows the document; widths and handshake are this design's own.
module vscalarp
  import csp_pkg::*;
#(
  parameter int M      = 4,
  parameter int DATA_W = 16,
  parameter int ACC_W  = csp_pkg::acc_width(DATA_W, M)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     as_valid [M],
  output logic                     as_ready [M],
  input  logic signed [DATA_W-1:0] as_data  [M],
  input  logic                     bs_valid [M],
  output logic                     bs_ready [M],
  input  logic signed [DATA_W-1:0] bs_data  [M],
  output logic                     c_valid,
  input  logic                     c_ready,
  output logic signed [ACC_W-1:0]  c_data
);

  localparam int PROD_W = 2 * DATA_W;

  logic                     p_valid [M];
  logic                     p_ready [M];
  logic signed [PROD_W-1:0] p_data  [M];

  vzip #(.N(M), .IN_W(DATA_W), .OUT_W(PROD_W), .OP(OP_MUL)) u_zip (
    .clk, .rst_n,
    .in1_valid(as_valid), .in1_ready(as_ready), .in1_data(as_data),
    .in2_valid(bs_valid), .in2_ready(bs_ready), .in2_data(bs_data),
    .out_valid(p_valid),  .out_ready(p_ready),  .out_data(p_data)
  );

  vfold #(.N(M), .IN_W(PROD_W), .OUT_W(ACC_W)) u_fold (
    .clk, .rst_n,
    .in_valid(p_valid), .in_ready(p_ready), .in_data(p_data),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data)
  );

endmodule
