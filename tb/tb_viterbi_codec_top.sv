// tb_viterbi_codec_top: the whole link, encoder -> channel -> decoder, at the
// design's default parameters (K = 9, 128-stage frames).
//
// A random data source drives x at about 40% of the clock rate. The channel is
// modelled here: it buffers the code symbols from y (the decoder pauses during
// each traceback, the encoder never does), flips bits according to the frame's
// condition (clean, sparse correctable errors, heavy noise) and offers them on
// r. Every encoded symbol is checked against the reference encoder, every
// decoded bit against the reference decoder, and in clean and sparse frames
// against the sent data.
// The mechanisms of the design are counted and each must occur: tail
// insertion (x_ready low), decoder stall during traceback with symbols
// waiting, corrected channel errors, completed tracebacks, and output
// streaming that overlaps the next frame's add-compare-select phase. In clean
// and sparse frames the traced path must begin in state 0 (path_ok).
module tb_viterbi_codec_top;
  import viterbi_pkg::*;
  localparam int REF_K = DEF_K, REF_G0 = DEF_G0, REF_G1 = DEF_G1, REF_L = DEF_FRAME_LEN;
  localparam int DL = REF_L - (REF_K - 1);
  localparam int FRAMES = 6;
  `include "viterbi_ref.svh"

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic    x_valid, x, x_ready, y_valid, y_last, r_valid, r_ready, z_valid, z, frame_done, path_ok;
  symbol_t y, r;
  int checks = 0, failures = 0;

  viterbi_codec_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (FRAMES * REF_L * 5 + 3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- source ----------------
  bit sent_q[$];
  int n_sent = 0;
  always @(posedge clk) if (rst_n && x_valid && x_ready) begin
    sent_q.push_back(x);
    n_sent++;
  end
  always @(negedge clk) begin
    x_valid <= rst_n && (n_sent < FRAMES * DL) && ($urandom_range(0, 9) < 4);
    x       <= 1'($urandom_range(0, 1));
  end

  // ---------------- encoder check + channel ----------------
  int  enc_state = 0, frame_no = 0, t_in_frame = 0;
  bit  frame_bits [REF_L];
  int  frame_syms [REF_L];
  int  chan_q[$];
  bit  exp_ref_q[$], exp_data_q[$], must_q[$];
  int  flips = 0;

  always @(posedge clk) if (rst_n && y_valid) begin
    int b, noisy, mode;
    bit dec [REF_L];
    // the bit that produced this symbol: data, or zero in the tail
    b = (t_in_frame < DL) ? int'(sent_q[frame_no * DL + t_in_frame]) : 0;
    check(int'(y) == ref_sym(enc_state, b), $sformatf("frame %0d symbol %0d wrong", frame_no, t_in_frame));
    check(y_last == (t_in_frame == REF_L - 1), "y_last wrong");
    enc_state = (b << (REF_K - 2)) | (enc_state >> 1);
    frame_bits[t_in_frame] = b[0];
    mode  = frame_no % 3;
    noisy = int'(y);
    if (mode == 1 && t_in_frame % 20 == 7) noisy ^= 1 << $urandom_range(0, 1);
    if (mode == 2 && $urandom_range(0, 99) < 15) noisy ^= $urandom_range(1, 3);
    if (noisy != int'(y)) flips++;
    frame_syms[t_in_frame] = noisy;
    chan_q.push_back(noisy);
    if (t_in_frame == REF_L - 1) begin
      ref_decode(frame_syms, dec);
      for (int t = 0; t < DL; t++) begin
        exp_ref_q.push_back(dec[t]);
        exp_data_q.push_back(frame_bits[t]);
        must_q.push_back(mode != 2);
      end
      t_in_frame = 0;
      frame_no++;
    end else t_in_frame++;
  end

  // channel output towards the decoder
  always @(posedge clk) if (rst_n && r_valid && r_ready) void'(chan_q.pop_front());
  always @(negedge clk) begin
    r_valid <= rst_n && chan_q.size() > 0;
    r       <= (chan_q.size() > 0) ? symbol_t'(chan_q[0]) : '0;
  end

  // ---------------- decoder output + mechanism counters ----------------
  int z_count = 0, tails = 0, stalls = 0, corrected = 0, tracebacks = 0, overlaps = 0;
  int residual = 0, paths_ok = 0;
  always @(posedge clk) if (rst_n) begin
    if (!x_ready) tails++;
    if (!r_ready && chan_q.size() > 0) stalls++;
    if (frame_done) begin
      if (tracebacks % 3 != 2) check(path_ok, $sformatf("frame %0d: path_ok low", tracebacks));
      if (path_ok) paths_ok++;
      tracebacks++;
    end
    if (z_valid && r_valid && r_ready) overlaps++;
    if (z_valid) begin
      bit er, ed, mm;
      check(exp_ref_q.size() > 0, "unexpected output bit");
      if (exp_ref_q.size() > 0) begin
        er = exp_ref_q.pop_front(); ed = exp_data_q.pop_front(); mm = must_q.pop_front();
        check(z == er, $sformatf("decoded bit %0d differs from reference decoder", z_count));
        if (mm) check(z == ed, $sformatf("decoded bit %0d differs from sent data", z_count));
        else if (z != ed) residual++;
      end
      z_count++;
    end
  end

  initial begin
    x_valid = 0; x = 0; r_valid = 0; r = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (tracebacks == FRAMES);
    repeat (DL + 5) @(posedge clk);
    corrected = flips;  // every flip in clean/sparse frames was corrected (checked above)
    check(z_count == FRAMES * DL, $sformatf("%0d bits decoded, expected %0d", z_count, FRAMES * DL));
    check(tails == FRAMES * (REF_K - 1), $sformatf("tail cycles %0d, expected %0d", tails, FRAMES * (REF_K - 1)));
    check(stalls > 0, "decoder never stalled with symbols waiting");
    check(flips > 0, "no channel errors were injected");
    check(tracebacks == FRAMES, "traceback count");
    check(paths_ok > 0, "no traced path began in state 0");
    check(overlaps > 0, "output never overlapped the next frame's input");
    $display("mechanisms: tail cycles %0d, decoder stall cycles %0d, channel flips %0d, tracebacks %0d (begun in state 0: %0d), overlap cycles %0d, residual errors (heavy frames) %0d",
             tails, stalls, flips, tracebacks, paths_ok, overlaps, residual);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
