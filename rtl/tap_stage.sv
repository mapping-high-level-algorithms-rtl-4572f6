// One stage of the fourth design's pipeline: map(vScalarP as_i) with a tap.
//
// The stage owns row as_i of A as a fixed argument (a_row). It takes one
// column bs from its input stream, and then, in parallel, forwards bs to the
// next stage and sends as_i . bs on its own result stream. The next column is
// taken once both have been delivered. An EOT is forwarded and also closes the
// result stream, so stage i's output is the stream C[i][0], C[i][1], ..., EOT.
//
// Timing: the scalar product is offered 4 + 2*ceil(log2 M) cycles after the
// column is taken (one cycle to register the column, the scalar product, one
// cycle to register the result), the forwarded column one cycle after. The tap structure is
// the document's; the flags and handshake are this design's own.
module tap_stage #(
  parameter int M      = 4,
  parameter int DATA_W = 16,
  parameter int ACC_W  = csp_pkg::acc_width(DATA_W, M)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] a_row     [M],
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic                     in_eot,
  input  logic signed [DATA_W-1:0] in_bs     [M],
  output logic                     fwd_valid,
  input  logic                     fwd_ready,
  output logic                     fwd_eot,
  output logic signed [DATA_W-1:0] fwd_bs    [M],
  output logic                     c_valid,
  input  logic                     c_ready,
  output logic                     c_eot,
  output logic signed [ACC_W-1:0]  c_data
);

  logic                     full, eot_q, fwd_pend, res_pend, res_have;
  logic [M-1:0]             pend_a, pend_b;
  logic signed [DATA_W-1:0] bs_q [M];
  logic signed [ACC_W-1:0]  res_q;

  logic                     vs_as_valid [M];
  logic                     vs_as_ready [M];
  logic                     vs_bs_valid [M];
  logic                     vs_bs_ready [M];
  logic                     vs_valid, vs_ready;
  logic signed [ACC_W-1:0]  vs_data;

  always_comb begin
    for (int j = 0; j < M; j++) begin
      vs_as_valid[j] = pend_a[j];
      vs_bs_valid[j] = pend_b[j];
    end
  end

  vscalarp #(.M(M), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_sp (
    .clk, .rst_n,
    .as_valid(vs_as_valid), .as_ready(vs_as_ready), .as_data(a_row),
    .bs_valid(vs_bs_valid), .bs_ready(vs_bs_ready), .bs_data(bs_q),
    .c_valid(vs_valid),     .c_ready(vs_ready),     .c_data(vs_data)
  );

  assign in_ready  = !full;
  assign fwd_valid = fwd_pend;
  assign fwd_eot   = eot_q;
  assign fwd_bs    = bs_q;
  assign vs_ready  = res_pend && !res_have;
  assign c_valid   = res_have;
  assign c_eot     = eot_q;
  assign c_data    = res_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full     <= 1'b0;
      eot_q    <= 1'b0;
      fwd_pend <= 1'b0;
      res_pend <= 1'b0;
      res_have <= 1'b0;
      pend_a   <= '0;
      pend_b   <= '0;
      res_q    <= '0;
      for (int j = 0; j < M; j++) bs_q[j] <= '0;
    end else begin
      for (int j = 0; j < M; j++) begin
        if (vs_as_valid[j] && vs_as_ready[j]) pend_a[j] <= 1'b0;
        if (vs_bs_valid[j] && vs_bs_ready[j]) pend_b[j] <= 1'b0;
      end
      if (!full) begin
        if (in_valid) begin
          full     <= 1'b1;
          eot_q    <= in_eot;
          bs_q     <= in_bs;
          fwd_pend <= 1'b1;
          if (in_eot) begin
            res_have <= 1'b1;          // EOT on the result stream
            res_q    <= '0;
          end else begin
            res_pend <= 1'b1;
            pend_a   <= '1;
            pend_b   <= '1;
          end
        end
      end else begin
        if (fwd_valid && fwd_ready) fwd_pend <= 1'b0;
        if (vs_valid && vs_ready) begin
          res_q    <= vs_data;
          res_have <= 1'b1;
          res_pend <= 1'b0;
        end
        if (c_valid && c_ready) res_have <= 1'b0;
        // Free once the column has gone on and the result (or EOT) has left.
        if ((!fwd_pend || fwd_ready) && !res_pend && (!res_have || c_ready)
            && !(vs_valid && vs_ready))
          full <= 1'b0;
      end
    end
  end

endmodule
