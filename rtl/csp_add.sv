// ADD process: (in1 ? a -> SKIP || in2 ? b -> SKIP); out ! a + b -> SKIP.
//
// The two operands are taken in either order, each on its own channel, and
// held until both are present. The sum is then registered and offered on the
// out channel; the operand registers are free again from that edge on, so a
// new pair may be collected while the sum waits to be taken. Operands are
// signed and sign-extended to OUT_W before adding.
//
// Timing: the sum is valid the cycle after the second operand arrives. A new
// sum is only formed once the previous one has left (or leaves that cycle).
// The operand order and arithmetic follow the process definition; the
// valid/ready handshake, the register and the widths are this design's own.
module csp_add #(
  parameter int IN_W  = 16,
  parameter int OUT_W = 17
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in1_valid,
  output logic                    in1_ready,
  input  logic signed [IN_W-1:0]  in1_data,
  input  logic                    in2_valid,
  output logic                    in2_ready,
  input  logic signed [IN_W-1:0]  in2_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_data
);

  logic                   have_a, have_b;
  logic signed [IN_W-1:0] a, b;
  logic                   fire;

  assign in1_ready = !have_a;
  assign in2_ready = !have_b;
  assign fire      = have_a && have_b && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_a    <= 1'b0;
      have_b    <= 1'b0;
      a         <= '0;
      b         <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (in1_valid && in1_ready) begin
        a      <= in1_data;
        have_a <= 1'b1;
      end
      if (in2_valid && in2_ready) begin
        b      <= in2_data;
        have_b <= 1'b1;
      end
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_data  <= OUT_W'(a) + OUT_W'(b);
        out_valid <= 1'b1;
        have_a    <= 1'b0;
        have_b    <= 1'b0;
      end
    end
  end

  // A message offered on out stays offered, unchanged, until it is taken.
  property p_out_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_data);
  endproperty
  a_out_hold: assert property (p_out_hold);

endmodule
