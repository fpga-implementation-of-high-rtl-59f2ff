// viterbi_ref.svh: reference model of the code and of the decoder, for the
// testbenches. Included inside a testbench module that defines REF_K, REF_G0,
// REF_G1 and REF_L (frame length) as localparams.
//
// ref_encode: convolution of the K-bit register {bit, state} with the two
//             generators, state starting at 0; symbol = c0*2 + c1.
// ref_decode: textbook hard-decision Viterbi with integer path metrics (start
//             metrics 0 for state 0 and REF_BIAS elsewhere, ties to the even
//             predecessor), then traceback from state 0 at the last stage.

localparam int REF_NS   = 2 ** (REF_K - 1);
localparam int REF_BIAS = 64;

function automatic int ref_sym(int state, int b);
  int u, c0, c1;
  u = (b << (REF_K - 1)) | state;
  c0 = 0; c1 = 0;
  for (int i = 0; i < REF_K; i++) begin
    c0 ^= ((u >> i) & 1) & ((REF_G0 >> i) & 1);
    c1 ^= ((u >> i) & 1) & ((REF_G1 >> i) & 1);
  end
  return c0 * 2 + c1;
endfunction

// Encodes one frame: bits[0 .. REF_L-1] (the caller puts the zero tail in).
function automatic void ref_encode(input bit bits [REF_L], output int syms [REF_L]);
  int s = 0;
  for (int t = 0; t < REF_L; t++) begin
    syms[t] = ref_sym(s, int'(bits[t]));
    s = (int'(bits[t]) << (REF_K - 2)) | (s >> 1);
  end
endfunction

// Decodes one frame of received symbols into REF_L bits.
function automatic void ref_decode(input int syms [REF_L], output bit bits [REF_L]);
  int pm [REF_NS];
  int nx [REF_NS];
  bit dec [REF_L][REF_NS];
  int s;
  for (int i = 0; i < REF_NS; i++) pm[i] = (i == 0) ? 0 : REF_BIAS;
  for (int t = 0; t < REF_L; t++) begin
    for (int i = 0; i < REF_NS; i++) nx[i] = -1;
    for (int p = 0; p < REF_NS; p++)
      for (int b = 0; b < 2; b++) begin
        int ns, m, x;
        ns = (b << (REF_K - 2)) | (p >> 1);
        x  = syms[t] ^ ref_sym(p, b);
        m  = pm[p] + (x & 1) + ((x >> 1) & 1);
        if (nx[ns] < 0 || m < nx[ns] || (m == nx[ns] && (p & 1) == 0)) begin
          nx[ns] = m;
          dec[t][ns] = p[0];
        end
      end
    pm = nx;
  end
  s = 0;
  for (int t = REF_L - 1; t >= 0; t--) begin
    bits[t] = s[REF_K - 2];
    s = ((s << 1) & (REF_NS - 1)) | int'(dec[t][s]);
  end
endfunction
