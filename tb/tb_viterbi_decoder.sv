// tb_viterbi_decoder: end-to-end test of the decoder on its own.
//
// Frames of random data with a zero tail are encoded by the testbench's
// reference encoder, corrupted, and fed to the decoder with random gaps in
// r_valid. Three channel conditions rotate: clean, sparse errors (one flipped
// bit every 24 symbols or more, within the code's correcting power) and heavy
// errors (about 15% of symbols hit). Every decoded bit must equal the reference
// Viterbi decoder's output, and in the first two conditions also the sent data.
// The stall while a frame is traced back is measured: r_ready must be low for
// FRAME_LEN+2 cycles per frame. In clean and sparse-error frames the traced
// path must begin in state 0 (path_ok).
module tb_viterbi_decoder;
  import viterbi_pkg::*;
  localparam int REF_K = DEF_K, REF_G0 = DEF_G0, REF_G1 = DEF_G1, REF_L = DEF_FRAME_LEN;
  localparam int DL = REF_L - (REF_K - 1);
  localparam int FRAMES = 9;
  `include "viterbi_ref.svh"

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic    r_valid, r_ready, z_valid, z, frame_done, path_ok;
  symbol_t r;
  int checks = 0, failures = 0;

  viterbi_decoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (FRAMES * REF_L * 4 + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_ref_q[$];    // reference decoder output
  bit exp_data_q[$];   // sent data
  bit must_match_q[$]; // 1 where the data must be recovered
  int z_count = 0, data_errs_heavy = 0, ready_low = 0, frames_done = 0, flips = 0;

  always @(posedge clk) if (rst_n) begin
    if (!r_ready) ready_low++;
    if (frame_done) begin
      if (frames_done % 3 != 2) check(path_ok, $sformatf("frame %0d: path_ok low", frames_done));
      frames_done++;
    end
    if (z_valid) begin
      bit er, ed, mm;
      check(exp_ref_q.size() > 0, "unexpected output bit");
      if (exp_ref_q.size() > 0) begin
        er = exp_ref_q.pop_front(); ed = exp_data_q.pop_front(); mm = must_match_q.pop_front();
        check(z == er, $sformatf("output bit %0d differs from reference decoder", z_count));
        if (mm) check(z == ed, $sformatf("output bit %0d differs from sent data", z_count));
        else if (z != ed) data_errs_heavy++;
      end
      z_count++;
    end
  end

  initial begin
    r_valid = 0; r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      bit bits [REF_L];
      bit dec [REF_L];
      int syms [REF_L];
      int mode;
      mode = f % 3;
      for (int t = 0; t < REF_L; t++) bits[t] = (t < DL) ? 1'($urandom_range(0, 1)) : 1'b0;
      ref_encode(bits, syms);
      for (int t = 0; t < REF_L; t++) begin
        if (mode == 1 && t % 24 == 11) begin
          syms[t] ^= 1 << $urandom_range(0, 1);
          flips++;
        end
        if (mode == 2 && $urandom_range(0, 99) < 15) begin
          syms[t] ^= $urandom_range(1, 3);
          flips++;
        end
      end
      ref_decode(syms, dec);
      for (int t = 0; t < DL; t++) begin
        exp_ref_q.push_back(dec[t]);
        exp_data_q.push_back(bits[t]);
        must_match_q.push_back(mode != 2);
      end
      for (int t = 0; t < REF_L; t++) begin
        @(negedge clk);
        while ($urandom_range(0, 5) == 0) begin
          r_valid = 0;
          @(negedge clk);
        end
        r_valid = 1; r = symbol_t'(syms[t]);
        @(posedge clk);
        while (!r_ready) @(posedge clk);
        #1;
      end
      @(negedge clk) r_valid = 0;
    end
    wait (frames_done == FRAMES);
    repeat (DL + 5) @(posedge clk);
    check(z_count == FRAMES * DL, $sformatf("%0d bits decoded, expected %0d", z_count, FRAMES * DL));
    check(ready_low == FRAMES * (REF_L + 2),
          $sformatf("r_ready low %0d cycles, expected %0d", ready_low, FRAMES * (REF_L + 2)));
    $display("channel bit flips %0d, residual errors in heavy frames %0d", flips, data_errs_heavy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
