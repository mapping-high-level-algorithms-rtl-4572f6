// VMMULT of the second design: MAP(VSCALARP(bs)) over a stream of rows.
//
// One scalar-product process is reused for every row. The column bs (M
// element channels) is taken once and held in a register, which plays the
// part of PRD(bs): it is re-sent to the VSCALARP with every row. The rows of A
// arrive as a stream of M-vectors ending with EOT; each row is issued to the
// VSCALARP as soon as it has taken the previous one, so several rows can be in
// flight. Results leave in row order as a stream of values, and once the last
// one has left an EOT follows. After that EOT the bs register is emptied and
// a new column may be loaded.
//
// Stream channels: valid/ready, data and an eot flag; a message with eot set
// carries no value. Timing: one row enters every two cycles at best; each
// result is offered 3 + 2*ceil(log2 M) cycles after its row was taken. The stream map
// structure is the document's; the bs register, the in-flight count and the
// handshake are this design's own.
module vmmult_stream #(
  parameter int M      = 4,
  parameter int DATA_W = 16,
  parameter int ACC_W  = csp_pkg::acc_width(DATA_W, M)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     bs_valid [M],
  output logic                     bs_ready [M],
  input  logic signed [DATA_W-1:0] bs_data  [M],
  input  logic                     as_valid,
  output logic                     as_ready,
  input  logic                     as_eot,
  input  logic signed [DATA_W-1:0] as_data  [M],
  output logic                     c_valid,
  input  logic                     c_ready,
  output logic                     c_eot,
  output logic signed [ACC_W-1:0]  c_data
);

  localparam int CNT_W = 6;

  logic signed [DATA_W-1:0] bs_reg  [M];
  logic signed [DATA_W-1:0] as_reg  [M];
  logic [M-1:0]             bs_have, pend_a, pend_b;
  logic                     eot_pending;
  logic [CNT_W-1:0]         inflight;

  logic                     vs_as_valid [M];
  logic                     vs_as_ready [M];
  logic                     vs_bs_valid [M];
  logic                     vs_bs_ready [M];
  logic                     vs_valid, vs_ready;
  logic signed [ACC_W-1:0]  vs_data;

  logic issue, retire, eot_out;

  assign as_ready = (&bs_have) && !(|pend_a) && !(|pend_b) && !eot_pending;
  assign issue    = as_valid && as_ready && !as_eot;

  always_comb begin
    for (int j = 0; j < M; j++) begin
      bs_ready[j]    = !bs_have[j];
      vs_as_valid[j] = pend_a[j];
      vs_bs_valid[j] = pend_b[j];
    end
  end

  vscalarp #(.M(M), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_sp (
    .clk, .rst_n,
    .as_valid(vs_as_valid), .as_ready(vs_as_ready), .as_data(as_reg),
    .bs_valid(vs_bs_valid), .bs_ready(vs_bs_ready), .bs_data(bs_reg),
    .c_valid(vs_valid),     .c_ready(vs_ready),     .c_data(vs_data)
  );

  // Results pass straight out; EOT goes once nothing is left in flight.
  assign eot_out  = eot_pending && (inflight == '0);
  assign c_valid  = vs_valid || eot_out;
  assign c_eot    = !vs_valid && eot_out;
  assign c_data   = vs_valid ? vs_data : '0;
  assign vs_ready = c_ready;
  assign retire   = vs_valid && vs_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bs_have     <= '0;
      pend_a      <= '0;
      pend_b      <= '0;
      eot_pending <= 1'b0;
      inflight    <= '0;
      for (int j = 0; j < M; j++) begin
        bs_reg[j] <= '0;
        as_reg[j] <= '0;
      end
    end else begin
      for (int j = 0; j < M; j++) begin
        if (bs_valid[j] && bs_ready[j]) begin
          bs_reg[j]  <= bs_data[j];
          bs_have[j] <= 1'b1;
        end
        if (vs_as_valid[j] && vs_as_ready[j]) pend_a[j] <= 1'b0;
        if (vs_bs_valid[j] && vs_bs_ready[j]) pend_b[j] <= 1'b0;
      end
      if (as_valid && as_ready) begin
        if (as_eot) begin
          eot_pending <= 1'b1;
        end else begin
          as_reg <= as_data;
          pend_a <= '1;
          pend_b <= '1;
        end
      end
      inflight <= inflight + CNT_W'(issue) - CNT_W'(retire);
      if (c_valid && c_ready && c_eot) begin
        eot_pending <= 1'b0;
        bs_have     <= '0;
      end
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                    retire |-> inflight != '0);

endmodule
