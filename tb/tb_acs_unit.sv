// tb_acs_unit: random and corner tests of one add-compare-select unit.
//
// Two path metrics are drawn close to a random base value, so that they
// sometimes wrap around the 8-bit range. The expected survivor is found with
// plain integers (no wrap): the smaller of the two sums, predecessor 0 on a
// tie. Ties are forced every few vectors.
module tb_acs_unit;
  localparam int PM_W = 8;
  logic [PM_W-1:0] pm0, pm1, pm_new;
  logic [1:0]      bm0, bm1;
  logic            decision;
  int checks = 0, failures = 0, ties = 0, wraps = 0;

  acs_unit #(.PM_W(PM_W)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int base, d0, d1, b0, b1, s0, s1, best;
      bit exp_dec;
      base = $urandom_range(0, 255);
      d0   = $urandom_range(0, 40);
      d1   = $urandom_range(0, 40);
      b0   = $urandom_range(0, 2);
      b1   = $urandom_range(0, 2);
      if (i % 5 == 0) d1 = d0 + b0 - b1 >= 0 ? d0 + b0 - b1 : d0;
      s0 = d0 + b0;
      s1 = d1 + b1;
      exp_dec = (s1 < s0);
      best = exp_dec ? s1 : s0;
      if (s0 == s1) ties++;
      if (base + best > 255) wraps++;
      pm0 = PM_W'(base + d0);
      pm1 = PM_W'(base + d1);
      bm0 = 2'(b0);
      bm1 = 2'(b1);
      #1;
      checks++;
      if (decision != exp_dec || pm_new != PM_W'(base + best)) begin
        failures++;
        $display("FAIL: pm0=%0d pm1=%0d bm0=%0d bm1=%0d -> %0d/%b, expected %0d/%b",
                 pm0, pm1, bm0, bm1, pm_new, decision, PM_W'(base + best), exp_dec);
      end
    end
    checks++;
    if (ties == 0 || wraps == 0) begin
      failures++;
      $display("FAIL: corner cases not reached (ties %0d, wraps %0d)", ties, wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
