// tb_accuracy_char: input-aware accuracy characterisation of the multiplier.
//
// The error of an approximate multiplier depends on which inputs it actually
// sees. This testbench measures the two cut configurations (2 and 3
// coefficient rows removed) under two workloads:
//   all inputs    every one of the 65,536 (x, b) pairs, each equally likely;
//   coefficients  the 256 sample values x (equally likely) times the five
//                 filter coefficient codes, each weighted by how often the
//                 filter applies it (0.0027, 0.0523, 0.2157, 0.4478, 0.2815).
// Metrics, with errors in Q2.14 units converted to real numbers:
//   EP    wrong results / all scenarios (count, not weighted);
//   MED   sum over scenarios of P(scenario) * |approx - exact|;
//   MRED  the same, relative to |exact| (scenarios with exact = 0 skipped);
//   AWCE  largest |approx - exact|.
// The exact product is computed here with integer arithmetic. The expected
// values are the published characterisation of these two multipliers
// (EP 0 / 0.75 / 0.2 / 0.87, MED 0 / 0.25 / 0.035 / 0.25, AWCE 0 / 1 /
// 0.25 / 1), checked with a tolerance that covers reading them off a chart.
`timescale 1ns/1ps
module tb_accuracy_char;

  import iaa_pkg::*;

  logic [7:0]         x, b;
  logic signed [15:0] p_axc1, p_axc2;

  ia_bw_mult #(.CUT_MSB(CUT_AXC1)) u_axc1 (.x(x), .b(b), .p(p_axc1));
  ia_bw_mult #(.CUT_MSB(CUT_AXC2)) u_axc2 (.x(x), .b(b), .p(p_axc2));

  int checks   = 0;
  int failures = 0;

  localparam logic [7:0] CODES [5] = '{COEF_0, COEF_3, COEF_14, COEF_29, COEF_36};
  localparam real        PROB  [5] = '{0.0027, 0.0523, 0.2157, 0.4478, 0.2815};

  typedef struct {
    int  n;        // scenarios
    int  wrong;    // scenarios with an error
    real med;
    real mred;
    real awce;
  } metrics_t;

  function automatic int sgn8(input logic [7:0] v);
    return (v >= 8'd128) ? int'(v) - 256 : int'(v);
  endfunction

  function automatic void add(ref metrics_t m, input int approx, input int exact, input real p);
    real ed;
    ed = real'((approx > exact) ? approx - exact : exact - approx) / 16384.0;
    m.n++;
    if (approx != exact) m.wrong++;
    m.med += p * ed;
    if (exact != 0) m.mred += p * ed / (real'((exact < 0) ? -exact : exact) / 16384.0);
    if (ed > m.awce) m.awce = ed;
  endfunction

  task automatic check_near(input string what, input real got, input real exp, input real tol);
    checks++;
    if ((got - exp > tol) || (exp - got > tol)) begin
      failures++;
      $display("FAIL %s got=%f expected=%f (+-%f)", what, got, exp, tol);
    end
  endtask

  task automatic report(input string name, input metrics_t m);
    $display("%-22s EP=%0.4f MED=%0.5f MRED=%0.5f AWCE=%0.5f", name,
             real'(m.wrong) / real'(m.n), m.med, m.mred, m.awce);
  endtask

  metrics_t a1_all, a2_all, a1_coef, a2_coef;

  initial begin
    a1_all = '{default: 0}; a2_all = '{default: 0};
    a1_coef = '{default: 0}; a2_coef = '{default: 0};
    // workload 1: all input pairs, uniform
    for (int xi = 0; xi < 256; xi++) begin
      for (int bi = 0; bi < 256; bi++) begin
        x = 8'(xi);
        b = 8'(bi);
        #1;
        add(a1_all, int'(p_axc1), sgn8(x) * sgn8(b), 1.0 / 65536.0);
        add(a2_all, int'(p_axc2), sgn8(x) * sgn8(b), 1.0 / 65536.0);
      end
    end
    // workload 2: the filter's coefficients with their probabilities
    for (int xi = 0; xi < 256; xi++) begin
      for (int c = 0; c < 5; c++) begin
        x = 8'(xi);
        b = CODES[c];
        #1;
        add(a1_coef, int'(p_axc1), sgn8(x) * sgn8(b), PROB[c] / 256.0);
        add(a2_coef, int'(p_axc2), sgn8(x) * sgn8(b), PROB[c] / 256.0);
      end
    end
    report("2 rows cut, all inputs", a1_all);
    report("2 rows cut, coeffs",     a1_coef);
    report("3 rows cut, all inputs", a2_all);
    report("3 rows cut, coeffs",     a2_coef);

    check_near("EP   cut2 coeffs", real'(a1_coef.wrong) / a1_coef.n, 0.0,   0.0);
    check_near("MED  cut2 coeffs", a1_coef.med,                      0.0,   0.0);
    check_near("AWCE cut2 coeffs", a1_coef.awce,                     0.0,   0.0);
    check_near("EP   cut2 all",    real'(a1_all.wrong) / a1_all.n,   0.75,  0.02);
    check_near("MED  cut2 all",    a1_all.med,                       0.25,  0.01);
    check_near("AWCE cut2 all",    a1_all.awce,                      1.0,   0.01);
    check_near("EP   cut3 coeffs", real'(a2_coef.wrong) / a2_coef.n, 0.2,   0.02);
    check_near("MED  cut3 coeffs", a2_coef.med,                      0.035, 0.002);
    check_near("AWCE cut3 coeffs", a2_coef.awce,                     0.25,  0.01);
    check_near("EP   cut3 all",    real'(a2_all.wrong) / a2_all.n,   0.87,  0.02);
    check_near("MED  cut3 all",    a2_all.med,                       0.25,  0.01);
    check_near("AWCE cut3 all",    a2_all.awce,                      1.0,   0.01);
    // input-aware AWCE never exceeds the all-inputs AWCE
    check_near("AWCE coeffs <= all (cut2)", real'(a1_coef.awce <= a1_all.awce), 1.0, 0.0);
    check_near("AWCE coeffs <= all (cut3)", real'(a2_coef.awce <= a2_all.awce), 1.0, 0.0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
