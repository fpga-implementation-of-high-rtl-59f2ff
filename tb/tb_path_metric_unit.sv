// tb_path_metric_unit: checks the 256-state path metric unit against a
// reference Viterbi forward pass kept in plain integers.
//
// The reference builds the trellis itself: from state p with input b the next
// state is (b << (K-2)) | (p >> 1), and the branch symbol is the convolution of
// the K-bit register with the generator taps. For every stage it forms all
// candidates, keeps the smaller (predecessor with even index on a tie) and
// compares the DUT's decision vector and all metrics, modulo 2^PM_W. Symbols
// are random, with gaps in step; a long run without init makes the metrics
// wrap; an init in the middle must restore the start metrics.
module tb_path_metric_unit;
  import viterbi_pkg::*;
  localparam int K = DEF_K, NS = 2 ** (K - 1), PM_W = DEF_PM_W;
  localparam int BIAS = 2 ** (PM_W - 2);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic            init, step;
  symbol_t         r;
  logic [1:0]      bm [4];
  logic [NS-1:0]   decisions;
  logic [PM_W-1:0] pm [NS];
  int checks = 0, failures = 0, wraps = 0, inits = 0;

  branch_metric_unit u_bmu (.r(r), .bm(bm));
  path_metric_unit dut (.clk(clk), .rst_n(rst_n), .init(init), .step(step),
                        .bm(bm), .decisions(decisions), .pm(pm));

  int ref_pm [NS];
  int ref_nx [NS];
  bit ref_dec [NS];

  function automatic int sym_of(int p, int b);
    int reg_k, c0, c1;
    reg_k = (b << (K - 1)) | p;
    c0 = 0; c1 = 0;
    for (int i = 0; i < K; i++) begin
      c0 ^= ((reg_k >> i) & 1) & ((DEF_G0 >> i) & 1);
      c1 ^= ((reg_k >> i) & 1) & ((DEF_G1 >> i) & 1);
    end
    return c0 * 2 + c1;
  endfunction

  function automatic int hd(int a, int b);
    int x = a ^ b;
    return (x & 1) + ((x >> 1) & 1);
  endfunction

  task automatic ref_init();
    for (int s = 0; s < NS; s++) ref_pm[s] = (s == 0) ? 0 : BIAS;
  endtask

  task automatic ref_step(int rv);
    for (int s = 0; s < NS; s++) ref_nx[s] = -1;
    for (int p = 0; p < NS; p++)
      for (int b = 0; b < 2; b++) begin
        int ns, m;
        ns = (b << (K - 2)) | (p >> 1);
        m  = ref_pm[p] + hd(rv, sym_of(p, b));
        if (ref_nx[ns] < 0 || m < ref_nx[ns] || (m == ref_nx[ns] && (p & 1) == 0)) begin
          ref_nx[ns]  = m;
          ref_dec[ns] = p & 1;
        end
      end
    for (int s = 0; s < NS; s++) begin
      if (ref_nx[s] / (2 ** PM_W) != ref_pm[s] / (2 ** PM_W)) wraps++;
      ref_pm[s] = ref_nx[s];
    end
  endtask

  task automatic compare_pm(string when);
    int bad = 0;
    for (int s = 0; s < NS; s++) if (pm[s] != PM_W'(ref_pm[s])) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL: %s: %0d metrics differ", when, bad);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n);
    for (int i = 0; i < n; i++) begin
      int bad;
      @(negedge clk);
      step = ($urandom_range(0, 4) != 0);
      r    = symbol_t'($urandom_range(0, 3));
      #1;
      if (step) begin
        ref_step(int'(r));
        bad = 0;
        for (int s = 0; s < NS; s++) if (decisions[s] != ref_dec[s]) bad++;
        checks++;
        if (bad != 0) begin
          failures++;
          $display("FAIL: step %0d: %0d decisions differ", i, bad);
        end
      end
      @(posedge clk); #1;
      compare_pm($sformatf("after cycle %0d", i));
    end
  endtask

  initial begin
    init = 0; step = 0; r = 0;
    ref_init();
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare_pm("after reset");
    run(3000);
    @(negedge clk) begin init = 1; step = 0; end
    @(posedge clk); #1;
    init = 0; inits++;
    ref_init();
    compare_pm("after init");
    run(200);
    checks++;
    if (wraps == 0 || inits == 0) begin
      failures++;
      $display("FAIL: metric wrap-around not exercised");
    end
    $display("metric wraps seen: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
