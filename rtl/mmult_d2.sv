// MMULT, second design: K stream VMMULTs sharing one stream of rows.
//
// Each of the K column processes holds one column of B and reuses a single
// VSCALARP for all rows, so the design has K scalar-product units instead of
// the N*K of the first design. The rows of A arrive once, as a stream of
// M-vectors ending in EOT, and one broadcast of fan-out K hands every row (and
// the EOT) to all column processes.
//
// Interface: ass_* is the row stream (valid/ready, eot, M elements);
// bss_* the K x M element channels of B (column k, element j); css_* are K
// result streams, stream k giving C[0][k] .. C[N-1][k] then EOT. Timing: rows
// enter every two cycles at best, results follow in row order. The network is
// the document's; the stream encoding and broadcast buffer are this design's.
module mmult_d2 #(
  parameter int M      = 4,
  parameter int K      = 4,
  parameter int DATA_W = 16,
  parameter int ACC_W  = csp_pkg::acc_width(DATA_W, M)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ass_valid,
  output logic                     ass_ready,
  input  logic                     ass_eot,
  input  logic signed [DATA_W-1:0] ass_data  [M],
  input  logic                     bss_valid [K][M],
  output logic                     bss_ready [K][M],
  input  logic signed [DATA_W-1:0] bss_data  [K][M],
  output logic                     css_valid [K],
  input  logic                     css_ready [K],
  output logic                     css_eot   [K],
  output logic signed [ACC_W-1:0]  css_data  [K]
);

  localparam int W = 1 + M * DATA_W;

  logic [W-1:0] in_word;
  logic         r_valid [K];
  logic         r_ready [K];
  logic [W-1:0] r_word  [K];

  always_comb begin
    in_word[W-1] = ass_eot;
    for (int j = 0; j < M; j++) in_word[j*DATA_W +: DATA_W] = ass_data[j];
  end

  csp_broadcast #(.FANOUT(K), .W(W)) u_bc (
    .clk, .rst_n,
    .in_valid(ass_valid), .in_ready(ass_ready), .in_data(in_word),
    .out_valid(r_valid), .out_ready(r_ready), .out_data(r_word)
  );

  for (genvar k = 0; k < K; k++) begin : g_col
    logic signed [DATA_W-1:0] row [M];
    for (genvar j = 0; j < M; j++) begin : g_el
      assign row[j] = signed'(r_word[k][j*DATA_W +: DATA_W]);
    end

    vmmult_stream #(.M(M), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_vmm (
      .clk, .rst_n,
      .bs_valid(bss_valid[k]), .bs_ready(bss_ready[k]), .bs_data(bss_data[k]),
      .as_valid(r_valid[k]),   .as_ready(r_ready[k]),   .as_eot(r_word[k][W-1]), .as_data(row),
      .c_valid(css_valid[k]),  .c_ready(css_ready[k]),  .c_eot(css_eot[k]),      .c_data(css_data[k])
    );
  end

endmodule
