// viterbi_codec_top: the encoder and decoder of a convolutionally coded link.
//
// Input data X enters the rate-1/2, K = 9 convolutional encoder, whose code
// symbols Y leave the chip towards the channel. The channel, which adds the
// noise, is outside this design: its output R comes back in and is decoded by
// the hard-decision Viterbi decoder into the estimate Z of X. This is the chain
// of the design description's system diagram with the channel left open.
//
// Interface: x/x_valid/x_ready (ready is low while the encoder inserts the K-1
// tail bits that close each frame), y/y_valid/y_last one symbol per cycle,
// r/r_valid/r_ready, z/z_valid one decoded bit per cycle, frame_done at the end
// of each traceback, path_ok with it when the traced path began in state 0.
// Frames are FRAME_LEN symbols, of which FRAME_LEN-(K-1) carry data.
module viterbi_codec_top
  import viterbi_pkg::*;
#(
  parameter int unsigned K         = DEF_K,
  parameter int unsigned G0        = DEF_G0,
  parameter int unsigned G1        = DEF_G1,
  parameter int unsigned FRAME_LEN = DEF_FRAME_LEN,
  parameter int unsigned PM_W      = DEF_PM_W
) (
  input  logic    clk,
  input  logic    rst_n,
  // data source
  input  logic    x_valid,
  input  logic    x,
  output logic    x_ready,
  // towards the channel
  output logic    y_valid,
  output symbol_t y,
  output logic    y_last,
  // from the channel
  input  logic    r_valid,
  input  symbol_t r,
  output logic    r_ready,
  // decoded data
  output logic    z_valid,
  output logic    z,
  output logic    frame_done,
  output logic    path_ok
);
  conv_encoder #(.K(K), .G0(G0), .G1(G1), .FRAME_LEN(FRAME_LEN)) u_enc (
    .clk     (clk),
    .rst_n   (rst_n),
    .x_valid (x_valid),
    .x       (x),
    .x_ready (x_ready),
    .y_valid (y_valid),
    .y       (y),
    .y_last  (y_last)
  );

  viterbi_decoder #(.K(K), .G0(G0), .G1(G1), .FRAME_LEN(FRAME_LEN), .PM_W(PM_W)) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .r_valid    (r_valid),
    .r          (r),
    .r_ready    (r_ready),
    .z_valid    (z_valid),
    .z          (z),
    .frame_done (frame_done),
    .path_ok    (path_ok)
  );
endmodule
