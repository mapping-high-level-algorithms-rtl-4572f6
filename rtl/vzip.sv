// VZIP_n(F): data-parallel zipWith of two vectors.
//
// N independent copies of the binary process F run side by side; copy i reads
// element i of both input vectors and writes element i of the output vector
// (out_i = in1_i F in2_i). Every element is its own channel, so the lanes do
// not wait for one another. F is picked by OP: OP_MUL gives the VZIP(MUL) of
// the scalar product, OP_ADD the element-wise addition.
//
// Timing: each lane has the latency of one F process (result valid the cycle
// after both operands are held). The structure follows the document; passing
// F as an enumerated parameter is this design's own way of naming the process.
module vzip
  import csp_pkg::*;
#(
  parameter int  N     = 4,
  parameter int  IN_W  = 16,
  parameter int  OUT_W = 32,
  parameter op_e OP    = OP_MUL
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in1_valid [N],
  output logic                    in1_ready [N],
  input  logic signed [IN_W-1:0]  in1_data  [N],
  input  logic                    in2_valid [N],
  output logic                    in2_ready [N],
  input  logic signed [IN_W-1:0]  in2_data  [N],
  output logic                    out_valid [N],
  input  logic                    out_ready [N],
  output logic signed [OUT_W-1:0] out_data  [N]
);

  for (genvar i = 0; i < N; i++) begin : g_lane
    if (OP == OP_MUL) begin : g_mul
      csp_mul #(.IN_W(IN_W), .OUT_W(OUT_W)) u_f (
        .clk, .rst_n,
        .in1_valid(in1_valid[i]), .in1_ready(in1_ready[i]), .in1_data(in1_data[i]),
        .in2_valid(in2_valid[i]), .in2_ready(in2_ready[i]), .in2_data(in2_data[i]),
        .out_valid(out_valid[i]), .out_ready(out_ready[i]), .out_data(out_data[i])
      );
    end else begin : g_add
      csp_add #(.IN_W(IN_W), .OUT_W(OUT_W)) u_f (
        .clk, .rst_n,
        .in1_valid(in1_valid[i]), .in1_ready(in1_ready[i]), .in1_data(in1_data[i]),
        .in2_valid(in2_valid[i]), .in2_ready(in2_ready[i]), .in2_data(in2_data[i]),
        .out_valid(out_valid[i]), .out_ready(out_ready[i]), .out_data(out_data[i])
      );
    end
  end

endmodule
