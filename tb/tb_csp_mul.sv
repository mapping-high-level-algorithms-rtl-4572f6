// Self-checking testbench for csp_mul.
//
// Random signed operands are offered on in1 and in2 independently, with
// random gaps, so they arrive in either order; the output is taken with
// random back-pressure. The k-th product must equal the k-th in1 value times the
// k-th in2 value. Timing is checked too: when the output register is free,
// the product must be offered exactly one cycle after the second operand is held.
module tb_csp_mul;
  localparam int IN_W  = 16;
  localparam int OUT_W = 32;
  localparam int NUM   = 400;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                    in1_valid, in1_ready, in2_valid, in2_ready, out_valid, out_ready;
  logic signed [IN_W-1:0]  in1_data, in2_data;
  logic signed [OUT_W-1:0] out_data;

  csp_mul #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  int checks = 0, failures = 0;
  int sent1 = 0, sent2 = 0, got = 0;
  int cyc = 0;
  logic signed [IN_W-1:0] q1 [$], q2 [$];
  int t1 [$], t2 [$];          // edge at which each operand was taken
  int last_taken = -100;       // edge at which the previous result was taken
  logic fire1_q, fire2_q;
  logic prev_pending = 1'b0;   // output was offered but not taken at the last edge

  // Sources: drive at the falling edge, learn at the rising edge what was taken.
  always @(negedge clk) begin
    if (rst_n) begin
      if (in1_valid && fire1_q) in1_valid = 1'b0;
      if (in2_valid && fire2_q) in2_valid = 1'b0;
      if (!in1_valid && sent1 < NUM && ($urandom % 3) != 0) begin
        in1_data = IN_W'($urandom); in1_valid = 1'b1; sent1++;
      end
      if (!in2_valid && sent2 < NUM && ($urandom % 3) != 0) begin
        in2_data = IN_W'($urandom); in2_valid = 1'b1; sent2++;
      end
      out_ready = ($urandom % 4) != 0;
    end
  end

  // Monitor, reference and cycle check, all sampled at the rising edge.
  always @(posedge clk) begin
    cyc++;
    fire1_q <= in1_valid && in1_ready;
    fire2_q <= in2_valid && in2_ready;
    if (rst_n) begin
      if (in1_valid && in1_ready) begin q1.push_back(in1_data); t1.push_back(cyc); end
      if (in2_valid && in2_ready) begin q2.push_back(in2_data); t2.push_back(cyc); end
      if (out_valid && !prev_pending) begin
        // A new result: it must appear one cycle after its operands were both
        // held and the output register was free.
        int tk, due;
        if (t1.size() == 0 || t2.size() == 0) begin
          failures++;
          $display("result offered before its operands arrived");
        end else begin
          tk  = (t1[0] > t2[0]) ? t1[0] : t2[0];
          due = ((tk + 1 > last_taken) ? tk + 1 : last_taken) + 1;
          checks++;
          if (cyc != due) begin
            failures++;
            $display("result %0d offered at edge %0d, expected %0d", got, cyc, due);
          end
          void'(t1.pop_front());
          void'(t2.pop_front());
        end
      end
      prev_pending = out_valid && !out_ready;
      if (out_valid && out_ready) begin
        logic signed [OUT_W-1:0] exp;
        exp = OUT_W'(q1.pop_front()) * OUT_W'(q2.pop_front());
        checks++;
        if (out_data !== exp) begin
          failures++;
          $display("mismatch %0d: got %0d expected %0d", got, out_data, exp);
        end
        got++;
        last_taken = cyc;
      end
    end
  end

  initial begin
    rst_n = 1'b0; in1_valid = 1'b0; in2_valid = 1'b0; out_ready = 1'b0;
    in1_data = '0; in2_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (got == NUM);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: only %0d of %0d results", got, NUM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
