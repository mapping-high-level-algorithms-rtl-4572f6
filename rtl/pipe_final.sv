// MAP(final) of the third design: turn finished pairs into a stream of streams.
//
// final <bs, cs> = cs. For each finished pair the column bs is dropped and the
// N elements of the result column are sent one by one (tag TK_VALUE, element 0
// first), followed by a TK_EOS message that closes this column. An incoming
// EOT becomes a TK_EOT message that closes the whole matrix.
//
// Timing: a column of N values leaves in N+1 cycles when the consumer is
// always ready; the next pair is taken the cycle after. The function is the
// document's; the tag encoding of a stream of streams is this design's own.
module pipe_final
  import csp_pkg::*;
#(
  parameter int N     = 4,
  parameter int ACC_W = 34
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic                    in_eot,
  input  logic signed [ACC_W-1:0] in_c     [N],
  output logic                    out_valid,
  input  logic                    out_ready,
  output tag_e                    out_tag,
  output logic signed [ACC_W-1:0] out_data
);

  localparam int IDX_W = $clog2(N + 1);

  logic                    busy, eot_q;
  logic [IDX_W-1:0]        idx;
  logic signed [ACC_W-1:0] c_q [N];

  assign in_ready  = !busy;
  assign out_valid = busy;

  always_comb begin
    out_data = '0;
    if (eot_q) begin
      out_tag = TK_EOT;
    end else if (32'(idx) == N) begin
      out_tag = TK_EOS;
    end else begin
      out_tag = TK_VALUE;
      for (int i = 0; i < N; i++)
        if (32'(idx) == i) out_data = c_q[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      eot_q <= 1'b0;
      idx   <= '0;
      for (int i = 0; i < N; i++) c_q[i] <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        busy  <= 1'b1;
        eot_q <= in_eot;
        idx   <= '0;
        c_q   <= in_c;
      end
    end else if (out_ready) begin
      if (out_tag == TK_VALUE) idx <= idx + 1'b1;
      else                     busy <= 1'b0;
    end
  end

endmodule
