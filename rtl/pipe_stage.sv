// One stage f' as_i of the third design's pipeline (map(vScalarP as_i)).
//
// The stage owns row as_i of A as a fixed argument (a_row, held stable while
// the network runs). Its input is a stream of pairs (bs, partial column): it
// takes a pair, sends as_i and bs to its VSCALARP, writes the scalar product
// into element ROW of the partial column, and passes the pair on. EOT passes
// through unchanged. Stages are one-place buffers, so N stages work on N
// different columns at once (pipelined parallelism).
//
// States: EMPTY (ready for a pair), CALC (operands being sent and result
// awaited), SEND (pair offered downstream). Timing: a column spends
// 4 + 2*ceil(log2 M) cycles in a stage. The pair passed between stages and the
// order of stages are the document's; the state machine is this design's own.
module pipe_stage #(
  parameter int N      = 4,
  parameter int M      = 4,
  parameter int DATA_W = 16,
  parameter int ACC_W  = csp_pkg::acc_width(DATA_W, M),
  parameter int ROW    = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] a_row     [M],
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic                     in_eot,
  input  logic signed [DATA_W-1:0] in_bs     [M],
  input  logic signed [ACC_W-1:0]  in_c      [N],
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic                     out_eot,
  output logic signed [DATA_W-1:0] out_bs    [M],
  output logic signed [ACC_W-1:0]  out_c     [N]
);

  typedef enum logic [1:0] {S_EMPTY, S_CALC, S_SEND} state_e;

  state_e                   state;
  logic                     eot_q;
  logic [M-1:0]             pend_a, pend_b;
  logic signed [DATA_W-1:0] bs_q [M];
  logic signed [ACC_W-1:0]  c_q  [N];

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

  assign in_ready  = (state == S_EMPTY);
  assign vs_ready  = (state == S_CALC);
  assign out_valid = (state == S_SEND);
  assign out_eot   = eot_q;
  assign out_bs    = bs_q;
  assign out_c     = c_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_EMPTY;
      eot_q  <= 1'b0;
      pend_a <= '0;
      pend_b <= '0;
      for (int j = 0; j < M; j++) bs_q[j] <= '0;
      for (int i = 0; i < N; i++) c_q[i] <= '0;
    end else begin
      for (int j = 0; j < M; j++) begin
        if (vs_as_valid[j] && vs_as_ready[j]) pend_a[j] <= 1'b0;
        if (vs_bs_valid[j] && vs_bs_ready[j]) pend_b[j] <= 1'b0;
      end
      unique case (state)
        S_EMPTY: if (in_valid) begin
          eot_q <= in_eot;
          bs_q  <= in_bs;
          c_q   <= in_c;
          if (in_eot) begin
            state <= S_SEND;
          end else begin
            pend_a <= '1;
            pend_b <= '1;
            state  <= S_CALC;
          end
        end
        S_CALC: if (vs_valid) begin
          c_q[ROW] <= vs_data;
          state    <= S_SEND;
        end
        S_SEND: if (out_ready) state <= S_EMPTY;
        default: state <= S_EMPTY;
      endcase
    end
  end

  // The result of this row cannot come back before its operands were sent.
  a_order: assert property (@(posedge clk) disable iff (!rst_n)
                            vs_valid && vs_ready |-> pend_a == '0 && pend_b == '0);

endmodule
