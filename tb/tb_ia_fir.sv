// tb_ia_fir: end-to-end self-check of the input-aware FIR filter at its
// default sizes (9 taps, 8-bit samples, two coefficient rows cut).
//
// The stimulus
// is a quantised two-tone signal with noise, full-scale corner values and
// random samples, offered with random gaps so that the filter is both idle and
// stalled, and a reset is applied mid-stream. A model here keeps its own
// sample history and computes, for every output, the exact sum of
// b_i * x_(n-i) (Q1.7 * Q1.7, integer arithmetic). Checks: the filter output
// equals the exact sum for every sample (the cut multiplier is exact for
// these coefficients); each output arrives exactly NTAPS cycles plus one after
// its sample; no output is missing or extra. It counts that each mechanism
// happened: stall, back-to-back sample, start from idle, mid-stream reset.
`timescale 1ns/1ps
module tb_ia_fir;

  import iaa_pkg::*;

  localparam int NT    = DEFAULT_NTAPS;
  localparam int ACC_W = 2 * DATA_W + $clog2(NT);
  localparam int NSAMP = 3000;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [7:0] in_x;
  logic in_ready;
  logic out_valid;
  logic signed [ACC_W-1:0] out_y;

  ia_fir dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_x,
    .out_valid, .out_y
  );

  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s got=%0d expected=%0d at %0t", what, got, exp, $time);
    end
  endtask

  // reference model state
  int hist [NT];
  longint exp_exact_q [$];
  longint due_q       [$];
  longint cycle = 0;
  longint last_take = -1000;

  int n_stall = 0, n_b2b = 0, n_idle_start = 0, n_reset = 0;
  int n_out = 0, n_taken = 0, n_cancel = 0;

  function automatic int sgn8(input logic [7:0] v);
    return (v >= 8'd128) ? int'(v) - 256 : int'(v);
  endfunction

  // sample source
  int  n_sent = 0;
  int  gap;
  logic [7:0] next_x;

  function automatic logic [7:0] gen_sample(input int n);
    real v;
    int  q;
    case (n % 50)
      7:  return 8'h80;           // -1.0
      19: return 8'h7F;           // +127/128
      33: return 8'($urandom);    // arbitrary code
      default: begin
        v = 0.55 * $sin(2.0 * 3.14159265 * n / 40.0)
          + 0.30 * $sin(2.0 * 3.14159265 * n / 3.3)
          + (($urandom % 21) - 10) / 128.0;
        q = int'(v * 128.0);
        if (q > 127)  q = 127;
        if (q < -128) q = -128;
        return 8'(q);
      end
    endcase
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      n_cancel += due_q.size();  // samples whose output the reset drops
      foreach (hist[i]) hist[i] = 0;
      exp_exact_q.delete();
      due_q.delete();
    end else begin
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        automatic longint e = 0;
        n_taken++;
        if (cycle - last_take == longint'(NT)) n_b2b++;
        if (cycle - last_take > longint'(NT)) n_idle_start++;
        last_take = cycle;
        for (int i = NT - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = sgn8(in_x);
        for (int i = 0; i < NT; i++) begin
          e  += longint'(hist[i]) * longint'(sgn8(DEFAULT_TAPS[i]));
        end
        exp_exact_q.push_back(e);
        due_q.push_back(cycle + longint'(NT) + 1);
      end
      if (out_valid) begin
        n_out++;
        if (due_q.size() == 0) begin
          check("unexpected output", 1, 0);
        end else begin
          automatic longint e;
          e  = exp_exact_q.pop_front();
          check("latency", cycle, due_q.pop_front());
          check("y vs exact", longint'(out_y), e);
        end
      end
    end
  end

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_x     = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (n_sent < NSAMP) begin
      // mid-stream reset once
      if (n_sent == NSAMP / 2 && n_reset == 0) begin
        @(posedge clk);
        rst_n    <= 1'b0;
        in_valid <= 1'b0;
        n_reset++;
        repeat (2) @(posedge clk);
        rst_n <= 1'b1;
        // let the old, cancelled output time out of the model
      end
      gap = (($urandom % 4) == 0) ? int'($urandom % (2 * NT)) : 0;
      repeat (gap) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      next_x   = gen_sample(n_sent);
      in_valid <= 1'b1;
      in_x     <= next_x;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      n_sent++;
    end
    in_valid <= 1'b0;
    repeat (2 * NT + 2) @(posedge clk);

    check("outputs = samples taken", longint'(n_out) + longint'(n_cancel), longint'(n_taken));
    check("all samples taken", longint'(n_taken), longint'(NSAMP));
    $display("mechanisms: stall=%0d back_to_back=%0d idle_start=%0d reset=%0d",
             n_stall, n_b2b, n_idle_start, n_reset);
    check("stall seen",        longint'(n_stall > 0), 1);
    check("back-to-back seen", longint'(n_b2b > 0), 1);
    check("idle start seen",   longint'(n_idle_start > 0), 1);
    check("reset seen",        longint'(n_reset > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NSAMP * (3 * NT + 4) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
