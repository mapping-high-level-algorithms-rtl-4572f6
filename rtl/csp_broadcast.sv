// BROADCAST: send one message to every one of FANOUT consumers.
//
// A one-word buffer takes a message from the source, then offers it on all
// FANOUT output channels at once. Each consumer takes it in its own time; a
// per-output flag records who has it. When the last consumer has taken it the
// buffer is free, and the next message may enter in the following cycle. A slow consumer therefore holds back the source (and so the others'
// next message), as a CSP broadcast does.
//
// Timing: a message is offered the cycle after it is accepted; with all
// consumers ready, one message passes every two cycles. The document names
// the process and its purpose (factoring k copies of a producer into one);
// the buffer and flags are this design's own.
module csp_broadcast #(
  parameter int FANOUT = 4,
  parameter int W      = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid [FANOUT],
  input  logic         out_ready [FANOUT],
  output logic [W-1:0] out_data  [FANOUT]
);

  logic              full;
  logic [W-1:0]      word;
  logic [FANOUT-1:0] taken, taken_next;

  assign in_ready = !full;

  always_comb begin
    for (int j = 0; j < FANOUT; j++) begin
      out_valid[j]  = full && !taken[j];
      out_data[j]   = word;
      taken_next[j] = taken[j] || (out_valid[j] && out_ready[j]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full  <= 1'b0;
      word  <= '0;
      taken <= '0;
    end else if (!full) begin
      if (in_valid) begin
        full  <= 1'b1;
        word  <= in_data;
        taken <= '0;
      end
    end else if (&taken_next) begin
      full  <= 1'b0;
      taken <= '0;
    end else begin
      taken <= taken_next;
    end
  end

  // No consumer is offered the same message twice.
  for (genvar j = 0; j < FANOUT; j++) begin : g_chk
    a_once: assert property (@(posedge clk) disable iff (!rst_n)
                             out_valid[j] && out_ready[j] |=> !out_valid[j]);
  end

endmodule
