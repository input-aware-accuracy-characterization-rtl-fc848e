// tb_ia_bw_mult: exhaustive self-check of the input-aware Baugh-Wooley
// multiplier in its three cut configurations.
//
// All 65,536 (x, b) pairs are applied to three instances: CUT_MSB = 0 (full
// array), 2 (default, two top coefficient rows removed) and 3 (bit 5 removed
// as well). Each product is compared with integer arithmetic done here:
// x * b for the full array, and x times the coefficient with its cut bits
// cleared (read as unsigned) for the cut ones. It also checks the property
// the design rests on: for the five coefficient codes of the filter the
// default cut multiplier is exact, and the 3-row cut is exact for all but
// 0.28125, where it is short by x * 0.25.
`timescale 1ns/1ps
module tb_ia_bw_mult;

  logic [7:0]         x, b;
  logic signed [15:0] p_exact, p_axc1, p_axc2;

  ia_bw_mult #(.CUT_MSB(0)) u_exact (.x(x), .b(b), .p(p_exact));
  ia_bw_mult                u_axc1  (.x(x), .b(b), .p(p_axc1));
  ia_bw_mult #(.CUT_MSB(3)) u_axc2  (.x(x), .b(b), .p(p_axc2));

  int checks   = 0;
  int failures = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s x=%0d b=%02h got=%0d expected=%0d", what, $signed(x), b, got, exp);
    end
  endtask

  localparam logic [7:0] CODES [5] = '{8'h00, 8'h03, 8'h0E, 8'h1D, 8'h24};

  initial begin
    int sx, sb;
    for (int xi = 0; xi < 256; xi++) begin
      for (int bi = 0; bi < 256; bi++) begin
        x = 8'(xi);
        b = 8'(bi);
        #1;
        sx = (xi >= 128) ? xi - 256 : xi;
        sb = (bi >= 128) ? bi - 256 : bi;
        check("exact", int'(p_exact), sx * sb);
        check("cut2",  int'(p_axc1),  sx * (bi % 64));
        check("cut3",  int'(p_axc2),  sx * (bi % 32));
      end
    end
    // input-aware property on the filter's coefficient codes
    for (int xi = 0; xi < 256; xi++) begin
      foreach (CODES[c]) begin
        x = 8'(xi);
        b = CODES[c];
        #1;
        sx = (xi >= 128) ? xi - 256 : xi;
        check("cut2 exact on codes", int'(p_axc1), int'(p_exact));
        check("cut3 error on codes", int'(p_exact) - int'(p_axc2),
              (b == 8'h24) ? sx * 32 : 0);
      end
    end
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
