// tb_branch_metric_unit: exhaustive check of the branch metric unit. For every
// received symbol, each of the four metrics must equal the number of bit
// positions in which it differs from the expected symbol, counted here bit by
// bit.
module tb_branch_metric_unit;
  import viterbi_pkg::*;
  symbol_t    r;
  logic [1:0] bm [4];
  int checks = 0, failures = 0;

  branch_metric_unit dut (.r(r), .bm(bm));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rv = 0; rv < 4; rv++) begin
      r = symbol_t'(rv);
      #1;
      for (int c = 0; c < 4; c++) begin
        int d;
        d = 0;
        if (rv[0] != c[0]) d++;
        if (rv[1] != c[1]) d++;
        checks++;
        if (int'(bm[c]) != d) begin
          failures++;
          $display("FAIL: r=%b c=%b bm=%0d expected %0d", r, c[1:0], bm[c], d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
