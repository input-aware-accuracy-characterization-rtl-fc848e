// ia_fir: low-pass FIR filter y_n = sum_i b_i * x_(n-i) built around one
// input-aware approximate multiplier (the top of the design).
//
// Samples x are signed Q1.7. The filter keeps the last NTAPS samples in a
// delay line and, for each new sample, walks the taps one per clock: the
// single ia_bw_mult multiplies tap i's constant coefficient b_i (TAPS[i]) by
// x_(n-i), and a Q2.14 accumulator with guard bits adds the products. Because
// every coefficient passes through that one multiplier, the multiplier sees
// exactly the coefficient stream of the filter, which is what its cut rows
// were chosen for. The filter equation, the Q1.7/Q2.14 formats and the
// coefficient codes follow the reference filter; the sequential one-multiplier
// organisation, the 9-tap order of the coefficients, the handshake and the
// full-precision output are this design's own choices.
//
// Interface:
//   in_valid/in_ready/in_x  sample input; a sample is taken on a clock edge
//                           where in_valid and in_ready are both high.
//   out_valid/out_y         out_valid is high for one cycle with y_n, signed
//                           Q(2+G).14 where G = $clog2(NTAPS) guard bits; there
//                           is no back-pressure on the output.
// Timing: x_n is taken on clock edge 0, the taps are multiplied and added on
// edges 1..NTAPS, and out_valid is high in the cycle after edge NTAPS, i.e.
// it is seen on edge NTAPS+1 (latency NTAPS+1 cycles). in_ready is high when
// idle and in the last tap cycle, so samples can be taken back to back, one
// every NTAPS cycles; the source is stalled otherwise.
// Reset: rst_n is active low and synchronous; it clears the delay line (all
// earlier samples read as zero), the accumulator and the controller.
module ia_fir #(
  parameter int unsigned NTAPS   = iaa_pkg::DEFAULT_NTAPS,
  parameter int unsigned WIDTH   = iaa_pkg::DATA_W,
  parameter int unsigned CUT_MSB = iaa_pkg::CUT_AXC1,
  parameter logic [NTAPS-1:0][WIDTH-1:0] TAPS = iaa_pkg::DEFAULT_TAPS,
  localparam int unsigned ACC_W  = 2 * WIDTH + $clog2(NTAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [WIDTH-1:0]        in_x,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] out_y
);

  localparam int unsigned KW = (NTAPS > 1) ? $clog2(NTAPS) : 1;
  localparam logic [KW-1:0] LAST_TAP = KW'(NTAPS - 1);

  typedef enum logic {S_IDLE, S_MAC} state_t;

  state_t                      state;
  logic [KW-1:0]               k;        // tap being multiplied
  logic [NTAPS-1:0][WIDTH-1:0] x_hist;   // x_hist[i] = x_(n-i)
  logic signed [ACC_W-1:0]     acc;

  logic                      last_tap;
  logic                      take;
  logic [WIDTH-1:0]          mul_x;
  logic [WIDTH-1:0]          mul_b;
  logic signed [2*WIDTH-1:0] prod;
  logic signed [ACC_W-1:0]   acc_next;

  assign last_tap = (state == S_MAC) && (k == LAST_TAP);
  assign in_ready = (state == S_IDLE) || last_tap;
  assign take     = in_valid && in_ready;

  // Coefficient ROM and sample select for the current tap
  always_comb begin
    mul_x = x_hist[0];
    mul_b = TAPS[0];
    for (int unsigned i = 0; i < NTAPS; i++) begin
      if (k == KW'(i)) begin
        mul_x = x_hist[i];
        mul_b = TAPS[i];
      end
    end
  end

  ia_bw_mult #(
    .WIDTH   (WIDTH),
    .CUT_MSB (CUT_MSB)
  ) u_mult (
    .x (mul_x),
    .b (mul_b),
    .p (prod)
  );

  assign acc_next = acc + ACC_W'(prod);

  // Delay line: shifts when a sample is taken
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NTAPS; i++) x_hist[i] <= '0;
    end else if (take) begin
      x_hist[0] <= in_x;
      for (int unsigned i = 1; i < NTAPS; i++) x_hist[i] <= x_hist[i-1];
    end
  end

  // Tap sequencer and accumulator
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      k         <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (state == S_MAC) begin
        if (last_tap) begin
          out_y     <= acc_next;
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end else begin
          acc <= acc_next;
          k   <= k + 1'b1;
        end
      end
      if (take) begin
        state <= S_MAC;
        k     <= '0;
        acc   <= '0;
      end
    end
  end

  // A taken sample produces its output exactly NTAPS+1 cycles later
  a_latency : assert property (@(posedge clk) disable iff (!rst_n)
                               take |-> ##(NTAPS + 1) out_valid)
    else $error("ia_fir: output did not follow a sample after NTAPS+1 cycles");

endmodule
