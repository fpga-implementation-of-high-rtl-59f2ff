// tb_traceback_unit: traceback over a decision memory modelled in the
// testbench (one cycle read latency, like the survivor RAM).
//
// For each frame a random data sequence plus K-1 zero tail bits is pushed
// through the state recursion s' = (b << (K-2)) | (s >> 1); at every stage the
// decision bit of the true state is set to the true predecessor's LSB and all
// other bits are random. Tracing back from state 0 must then return the data
// bits, in order, on z. Also checked: read addresses go from FRAME_LEN-1 down
// to 0, busy lasts FRAME_LEN+1 cycles, exactly DATA_LEN bits come out, and
// path_ok is high with frame_done only for the frames whose planted path
// starts in state 0 (the last frame starts elsewhere).
module tb_traceback_unit;
  localparam int K = 9, NS = 2 ** (K - 1), L = 128, DL = L - (K - 1);
  localparam int AW = $clog2(L);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic          start, busy, z_valid, z, frame_done, path_ok;
  logic [AW-1:0] rd_addr;
  logic [NS-1:0] rd_data;
  logic [NS-1:0] mem [L];
  int checks = 0, failures = 0;

  traceback_unit #(.K(K), .FRAME_LEN(L)) dut (.*);

  always_ff @(posedge clk) rd_data <= mem[rd_addr];

  bit data [DL];
  int out_cnt, busy_cycles, addr_errs;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect output and watch the address sequence
  int exp_addr;
  always @(posedge clk) if (rst_n) begin
    if (z_valid) begin
      if (out_cnt < DL) check(z == data[out_cnt], $sformatf("bit %0d wrong", out_cnt));
      out_cnt++;
    end
    if (busy) begin
      busy_cycles++;
      if (exp_addr >= 0) begin
        if (int'(rd_addr) != exp_addr) addr_errs++;
        exp_addr--;
      end
    end
  end

  initial begin
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      int s, prev;
      bit ok_seen;
      s = (f == 3) ? $urandom_range(1, NS - 1) : 0;
      for (int t = 0; t < L; t++) begin
        int b;
        b = (t < DL) ? $urandom_range(0, 1) : 0;
        if (t < DL) data[t] = b[0];
        for (int k = 0; k < NS / 32; k++) mem[t][k*32 +: 32] = $urandom;
        prev = s;
        s = (b << (K - 2)) | (s >> 1);
        mem[t][s] = prev[0];
      end
      out_cnt = 0; busy_cycles = 0; addr_errs = 0; exp_addr = L - 1;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (frame_done);
      ok_seen = path_ok;
      check(ok_seen == (f != 3), $sformatf("frame %0d: path_ok %b", f, ok_seen));
      @(posedge clk);
      check(busy_cycles == L + 1, $sformatf("busy for %0d cycles, expected %0d", busy_cycles, L + 1));
      check(addr_errs == 0, "read address sequence wrong");
      repeat (DL + 5) @(posedge clk);
      check(out_cnt == DL, $sformatf("%0d bits out, expected %0d", out_cnt, DL));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
