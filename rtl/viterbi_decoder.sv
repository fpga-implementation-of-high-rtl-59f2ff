// viterbi_decoder: frame-based hard-decision Viterbi decoder.
//
// Built from the three units the design description names: the branch metric
// unit (Hamming distances of the received symbol), the path metric unit
// (2^(K-1) add-compare-select units, one trellis stage per clock) and the
// survivor memory unit (decision RAM plus traceback). A small controller
// sequences them:
//   ACS phase:  each received symbol (r_valid && r_ready) advances the trellis
//               one stage and writes that stage's decisions to the RAM.
//   Traceback:  after FRAME_LEN stages the controller starts the traceback from
//               state 0 and reloads the start metrics; r_ready is low for
//               FRAME_LEN+2 cycles. The decoded data bits then stream out on
//               z/z_valid while the next frame is received.
// The input stream must be framed as conv_encoder produces it: FRAME_LEN
// symbols per frame, the last K-1 of them from zero tail bits. Frame length,
// the ready/valid interface and the overlap of output with the next frame are
// own choices. path_ok, with frame_done, tells whether the traced path began
// in state 0, as a correctly framed, correctable frame must.
module viterbi_decoder
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
  input  logic    r_valid,
  input  symbol_t r,
  output logic    r_ready,
  output logic    z_valid,
  output logic    z,
  output logic    frame_done,
  output logic    path_ok
);
  localparam int unsigned NS = 2 ** (K - 1);
  localparam int unsigned AW = $clog2(FRAME_LEN);

  logic [1:0]      bm [4];
  logic [NS-1:0]   decisions;
  logic [PM_W-1:0] pm [NS];
  logic [AW-1:0]   stage;
  logic            step;
  logic            tb_start;
  logic            tb_busy;
  logic [AW-1:0]   tb_addr;
  logic [NS-1:0]   mem_rdata;

  assign r_ready = !(tb_start || tb_busy);
  assign step    = r_valid && r_ready;

  branch_metric_unit u_bmu (
    .r  (r),
    .bm (bm)
  );

  path_metric_unit #(.K(K), .G0(G0), .G1(G1), .PM_W(PM_W)) u_pmu (
    .clk       (clk),
    .rst_n     (rst_n),
    .init      (tb_start),
    .step      (step),
    .bm        (bm),
    .decisions (decisions),
    .pm        (pm)
  );

  survivor_memory #(.WIDTH(NS), .DEPTH(FRAME_LEN)) u_smem (
    .clk   (clk),
    .we    (step),
    .addr  (tb_busy ? tb_addr : stage),
    .wdata (decisions),
    .rdata (mem_rdata)
  );

  traceback_unit #(.K(K), .FRAME_LEN(FRAME_LEN)) u_tbu (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (tb_start),
    .busy       (tb_busy),
    .rd_addr    (tb_addr),
    .rd_data    (mem_rdata),
    .z_valid    (z_valid),
    .z          (z),
    .frame_done (frame_done),
    .path_ok    (path_ok)
  );

  // Frame controller: stage counter and traceback trigger.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage    <= '0;
      tb_start <= 1'b0;
    end else begin
      tb_start <= 1'b0;
      if (step) begin
        if (stage == AW'(FRAME_LEN - 1)) begin
          stage    <= '0;
          tb_start <= 1'b1;
        end else begin
          stage <= stage + 1'b1;
        end
      end
    end
  end

  // The RAM port is shared: no write may happen during a traceback.
  assert property (@(posedge clk) disable iff (!rst_n) step |-> !tb_busy);

endmodule
