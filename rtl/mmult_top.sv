// Four matrix-multiplication networks derived from one specification.
//
// C = A * B, with A an N x M matrix given as rows and B an M x K matrix given
// as columns, is computed by four process networks that differ only in how
// the lists are sent (as vectors, i.e. one channel per element, or as
// streams, i.e. one element after another on one channel ended by EOT) and
// so in how much hardware is replicated:
//   d1  A and B as vectors: N*K scalar-product units, fully parallel.
//   d2  B as a vector of columns, A as a stream of rows: K units.
//   d3  B as a stream of columns through a pipeline of N row stages that
//       build up each result column; C as a stream of streams.
//   d4  like d3, but each stage sends its result on its own stream; C as a
//       vector of N row streams.
// The four stand side by side, each with its own ports (d1_*, d2_*, d3_*,
// d4_*); see the module of each for its interface and timing. They share
// only clock and reset. All channels are valid/ready handshakes.
module mmult_top
  import csp_pkg::*;
#(
  parameter int N      = 4,
  parameter int M      = 4,
  parameter int K      = 4,
  parameter int DATA_W = 16,
  parameter int ACC_W  = csp_pkg::acc_width(DATA_W, M)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // First design
  input  logic                     d1_ass_valid [N][M],
  output logic                     d1_ass_ready [N][M],
  input  logic signed [DATA_W-1:0] d1_ass_data  [N][M],
  input  logic                     d1_bss_valid [K][M],
  output logic                     d1_bss_ready [K][M],
  input  logic signed [DATA_W-1:0] d1_bss_data  [K][M],
  output logic                     d1_css_valid [K][N],
  input  logic                     d1_css_ready [K][N],
  output logic signed [ACC_W-1:0]  d1_css_data  [K][N],
  // Second design
  input  logic                     d2_ass_valid,
  output logic                     d2_ass_ready,
  input  logic                     d2_ass_eot,
  input  logic signed [DATA_W-1:0] d2_ass_data  [M],
  input  logic                     d2_bss_valid [K][M],
  output logic                     d2_bss_ready [K][M],
  input  logic signed [DATA_W-1:0] d2_bss_data  [K][M],
  output logic                     d2_css_valid [K],
  input  logic                     d2_css_ready [K],
  output logic                     d2_css_eot   [K],
  output logic signed [ACC_W-1:0]  d2_css_data  [K],
  // Third design
  input  logic signed [DATA_W-1:0] d3_ass       [N][M],
  input  logic                     d3_bss_valid,
  output logic                     d3_bss_ready,
  input  logic                     d3_bss_eot,
  input  logic signed [DATA_W-1:0] d3_bss_data  [M],
  output logic                     d3_css_valid,
  input  logic                     d3_css_ready,
  output tag_e                     d3_css_tag,
  output logic signed [ACC_W-1:0]  d3_css_data,
  // Fourth design
  input  logic signed [DATA_W-1:0] d4_ass       [N][M],
  input  logic                     d4_bss_valid,
  output logic                     d4_bss_ready,
  input  logic                     d4_bss_eot,
  input  logic signed [DATA_W-1:0] d4_bss_data  [M],
  output logic                     d4_css_valid [N],
  input  logic                     d4_css_ready [N],
  output logic                     d4_css_eot   [N],
  output logic signed [ACC_W-1:0]  d4_css_data  [N],
  output logic                     d4_tail_valid,
  input  logic                     d4_tail_ready,
  output logic                     d4_tail_eot,
  output logic signed [DATA_W-1:0] d4_tail_data [M]
);

  mmult_d1 #(.N(N), .M(M), .K(K), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_d1 (
    .clk, .rst_n,
    .ass_valid(d1_ass_valid), .ass_ready(d1_ass_ready), .ass_data(d1_ass_data),
    .bss_valid(d1_bss_valid), .bss_ready(d1_bss_ready), .bss_data(d1_bss_data),
    .css_valid(d1_css_valid), .css_ready(d1_css_ready), .css_data(d1_css_data)
  );

  mmult_d2 #(.M(M), .K(K), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_d2 (
    .clk, .rst_n,
    .ass_valid(d2_ass_valid), .ass_ready(d2_ass_ready), .ass_eot(d2_ass_eot), .ass_data(d2_ass_data),
    .bss_valid(d2_bss_valid), .bss_ready(d2_bss_ready), .bss_data(d2_bss_data),
    .css_valid(d2_css_valid), .css_ready(d2_css_ready), .css_eot(d2_css_eot), .css_data(d2_css_data)
  );

  mmult_d3 #(.N(N), .M(M), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_d3 (
    .clk, .rst_n,
    .ass(d3_ass),
    .bss_valid(d3_bss_valid), .bss_ready(d3_bss_ready), .bss_eot(d3_bss_eot), .bss_data(d3_bss_data),
    .css_valid(d3_css_valid), .css_ready(d3_css_ready), .css_tag(d3_css_tag), .css_data(d3_css_data)
  );

  mmult_d4 #(.N(N), .M(M), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_d4 (
    .clk, .rst_n,
    .ass(d4_ass),
    .bss_valid(d4_bss_valid), .bss_ready(d4_bss_ready), .bss_eot(d4_bss_eot), .bss_data(d4_bss_data),
    .css_valid(d4_css_valid), .css_ready(d4_css_ready), .css_eot(d4_css_eot), .css_data(d4_css_data),
    .tail_valid(d4_tail_valid), .tail_ready(d4_tail_ready), .tail_eot(d4_tail_eot), .tail_data(d4_tail_data)
  );

endmodule
