// tb_conv_encoder: self-checking test of conv_encoder.
//
// Instance A is the small K = 3 code with generators 7 and 5 (octal); it must
// turn the input 1,0,1,1 started from the all-zero state into the symbols
// 11,10,00,01, the worked example of the design description. Instance B is the
// default K = 9 encoder fed with random bits, some cycles idle; every symbol is
// compared with a reference that convolves the bit history with the generator
// taps. Both check the zero tail: x_ready low for exactly K-1 cycles per frame
// and y_last on the frame's final symbol.
module tb_conv_encoder;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- instance A: K = 3 worked example ----------------
  logic a_xv, a_x, a_xr, a_yv, a_yl;
  symbol_t a_y;
  conv_encoder #(.K(3), .G0('o7), .G1('o5), .FRAME_LEN(8)) dut_a (
    .clk(clk), .rst_n(rst_n), .x_valid(a_xv), .x(a_x), .x_ready(a_xr),
    .y_valid(a_yv), .y(a_y), .y_last(a_yl));

  // ---------------- instance B: default K = 9 ----------------
  logic b_xv, b_x, b_xr, b_yv, b_yl;
  symbol_t b_y;
  conv_encoder dut_b (
    .clk(clk), .rst_n(rst_n), .x_valid(b_xv), .x(b_x), .x_ready(b_xr),
    .y_valid(b_yv), .y(b_y), .y_last(b_yl));

  localparam int KB = DEF_K;
  localparam int FL = DEF_FRAME_LEN;

  // reference: bit history, newest at index 0
  bit hist [KB];
  symbol_t exp_q[$];
  bit      exp_last_q[$];
  int      stage_ref = 0;
  int      ready_low = 0, tails_seen = 0;

  function automatic symbol_t ref_sym();
    bit c0 = 0, c1 = 0;
    for (int i = 0; i < KB; i++) begin
      c0 ^= hist[i] & DEF_G0[KB-1-i];
      c1 ^= hist[i] & DEF_G1[KB-1-i];
    end
    return {c0, c1};
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Instance B driver and reference, sampled on the clock edge.
  int b_sent = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (b_yv) begin
        symbol_t e; bit el;
        check(exp_q.size() > 0, "B: unexpected symbol");
        if (exp_q.size() > 0) begin
          e = exp_q.pop_front(); el = exp_last_q.pop_front();
          check(b_y == e, $sformatf("B: symbol %b expected %b", b_y, e));
          check(b_yl == el, "B: y_last wrong");
        end
      end
      if (!b_xr) ready_low++;
      if (!b_xr || b_xv) begin
        // one trellis step: data bit or tail zero
        for (int i = KB-1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = b_xr ? b_x : 1'b0;
        check((stage_ref >= FL-(KB-1)) == !b_xr, "B: x_ready at wrong stage");
        exp_q.push_back(ref_sym());
        exp_last_q.push_back(stage_ref == FL-1);
        if (stage_ref == FL-1) begin
          stage_ref = 0;
          tails_seen++;
        end else stage_ref++;
        if (b_xr) b_sent++;
      end
    end
    b_xv <= ($urandom_range(0, 3) != 0);
    b_x  <= $urandom_range(0, 1);
  end

  initial begin
    symbol_t got[$];
    bit ex[4] = '{1, 0, 1, 1};
    a_xv = 0; a_x = 0; b_xv = 0; b_x = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Instance A: the worked example
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      a_xv = 1; a_x = ex[i];
      @(posedge clk);
      #1;
      check(a_yv, "A: y_valid missing");
      got.push_back(a_y);
    end
    @(negedge clk) a_xv = 0;
    check(got[0] == 2'b11 && got[1] == 2'b10 && got[2] == 2'b00 && got[3] == 2'b01,
          $sformatf("A: example gave %b %b %b %b", got[0], got[1], got[2], got[3]));
    // Instance A: after 6 data bits the 2 tail bits come, then y_last
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); a_xv = 1; a_x = 1;
      @(posedge clk);
    end
    @(negedge clk) a_xv = 0;
    check(!a_xr, "A: x_ready should be low in the tail");
    @(posedge clk); #1;
    check(a_yv && !a_yl, "A: first tail symbol");
    check(!a_xr, "A: x_ready low for second tail bit");
    @(posedge clk); #1;
    check(a_yv && a_yl, "A: y_last on the final tail symbol");
    check(a_xr, "A: x_ready high again after the tail");
    // Instance B: run three frames
    wait (tails_seen >= 3);
    repeat (3) @(posedge clk);
    check(ready_low == 3 * (KB - 1),
          $sformatf("B: x_ready low %0d cycles, expected %0d", ready_low, 3 * (KB - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
