// tb_fir_psnr: application-level comparison of the FIR filter built with the
// two cut configurations of the input-aware multiplier (2 rows cut, the
// default, and 3 rows cut), both fed the same sample stream.
//
// The stimulus is a quantised two-tone signal with noise, full-scale corner
// values and random samples, offered with random gaps, with a reset
// mid-stream. A model here keeps its own sample history and computes, for
// every output, the exact sum of b_i * x_(n-i) (integer arithmetic) and the
// same sum with coefficient bit 5 cleared. Checks: the 2-row filter equals the
// exact filter; the 3-row filter equals its model; both filters keep the same
// handshake and latency (NTAPS+1 cycles). It reports the PSNR of each filter
// against the exact filter (peak 1.0; the 2-row filter is identical, shown as
// 1e9 dB) and requires that the 3-row cut was inexact for some output.
`timescale 1ns/1ps
module tb_fir_psnr;

  import iaa_pkg::*;

  localparam int NT    = DEFAULT_NTAPS;
  localparam int ACC_W = 2 * DATA_W + $clog2(NT);
  localparam int NSAMP = 3000;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [7:0] in_x;
  logic in_ready, in_ready2;
  logic out_valid, out_valid2;
  logic signed [ACC_W-1:0] out_y, out_y2;

  ia_fir dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_x,
    .out_valid, .out_y
  );

  ia_fir #(.CUT_MSB(CUT_AXC2)) dut2 (
    .clk, .rst_n, .in_valid, .in_ready(in_ready2), .in_x,
    .out_valid(out_valid2), .out_y(out_y2)
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
  longint exp_cut3_q  [$];
  longint due_q       [$];
  longint cycle = 0;
  longint last_take = -1000;

  int n_stall = 0, n_b2b = 0, n_idle_start = 0, n_reset = 0, n_cut3_err = 0;
  int n_out = 0, n_taken = 0, n_cancel = 0;
  real se1 = 0.0, se2 = 0.0;

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
      exp_cut3_q.delete();
      due_q.delete();
    end else begin
      check("in_ready equal", longint'(in_ready2), longint'(in_ready));
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        automatic longint e = 0, e3 = 0;
        n_taken++;
        if (cycle - last_take == longint'(NT)) n_b2b++;
        if (cycle - last_take > longint'(NT)) n_idle_start++;
        last_take = cycle;
        for (int i = NT - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = sgn8(in_x);
        for (int i = 0; i < NT; i++) begin
          e  += longint'(hist[i]) * longint'(sgn8(DEFAULT_TAPS[i]));
          e3 += longint'(hist[i]) * longint'(DEFAULT_TAPS[i][4:0]);
        end
        exp_exact_q.push_back(e);
        exp_cut3_q.push_back(e3);
        due_q.push_back(cycle + longint'(NT) + 1);
        if (e != e3) n_cut3_err++;
      end
      check("out_valid equal", longint'(out_valid2), longint'(out_valid));
      if (out_valid) begin
        n_out++;
        if (due_q.size() == 0) begin
          check("unexpected output", 1, 0);
        end else begin
          automatic longint e, e3;
          e  = exp_exact_q.pop_front();
          e3 = exp_cut3_q.pop_front();
          check("latency", cycle, due_q.pop_front());
          check("y cut2 vs exact", longint'(out_y), e);
          check("y cut3 vs model", longint'(out_y2), e3);
          se1 += ((real'(out_y)  - real'(e)) / 16384.0) ** 2;
          se2 += ((real'(out_y2) - real'(e)) / 16384.0) ** 2;
        end
      end
    end
  end

  function automatic real psnr(input real se, input int n);
    if (se == 0.0) return 1.0e9;
    return 10.0 * $log10(1.0 / (se / n));
  endfunction

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
    $display("mechanisms: stall=%0d back_to_back=%0d idle_start=%0d reset=%0d cut3_inexact=%0d",
             n_stall, n_b2b, n_idle_start, n_reset, n_cut3_err);
    $display("PSNR vs exact filter: 2 rows cut %0.1f dB (1e9 = identical), 3 rows cut %0.1f dB",
             psnr(se1, n_out), psnr(se2, n_out));
    check("stall seen",        longint'(n_stall > 0), 1);
    check("back-to-back seen", longint'(n_b2b > 0), 1);
    check("idle start seen",   longint'(n_idle_start > 0), 1);
    check("reset seen",        longint'(n_reset > 0), 1);
    check("cut3 error seen",   longint'(n_cut3_err > 0), 1);
    check("2-row cut exact",   longint'(se1 == 0.0), 1);
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
