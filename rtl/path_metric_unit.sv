// path_metric_unit: the 2^(K-1) add-compare-select units and path metric
// registers of the decoder.
//
// All states are updated in parallel, one trellis stage per clock in which
// step is high, so each stage makes 2^(K-1) decisions at once as the design
// description states. For next state ns the two predecessors are
// {ns[K-3:0], 0} and {ns[K-3:0], 1}; the branch from predecessor d carries the
// code symbol of encoder register {ns, d}, whose branch metric is picked from
// the BMU outputs. The decision vector goes to the survivor memory in the same
// cycle (combinational output, valid while step is high).
//
// Reset and init load the start metrics: 0 for state 0 (encoding starts in the
// all-zero state) and INIT_BIAS for every other state (own choice, so that
// paths from state 0 win). Metrics wrap modulo 2^PM_W (see acs_unit).
module path_metric_unit
  import viterbi_pkg::*;
#(
  parameter int unsigned K    = DEF_K,
  parameter int unsigned G0   = DEF_G0,
  parameter int unsigned G1   = DEF_G1,
  parameter int unsigned PM_W = DEF_PM_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic                 step,
  input  logic [1:0]           bm        [4],
  output logic [2**(K-1)-1:0]  decisions,
  output logic [PM_W-1:0]      pm        [2**(K-1)]
);
  localparam int unsigned NS        = 2 ** (K - 1);
  localparam int unsigned INIT_BIAS = 2 ** (PM_W - 2);

  logic [PM_W-1:0] pm_next [NS];

  for (genvar ns = 0; ns < NS; ns++) begin : g_state
    localparam int unsigned P0   = (ns * 2) % NS;
    localparam int unsigned P1   = P0 + 1;
    localparam symbol_t     SYM0 = code_symbol((ns * 2),     G0, G1);
    localparam symbol_t     SYM1 = code_symbol((ns * 2) + 1, G0, G1);

    acs_unit #(.PM_W(PM_W)) u_acs (
      .pm0      (pm[P0]),
      .pm1      (pm[P1]),
      .bm0      (bm[SYM0]),
      .bm1      (bm[SYM1]),
      .pm_new   (pm_next[ns]),
      .decision (decisions[ns])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pm[ns] <= (ns == 0) ? '0 : PM_W'(INIT_BIAS);
      end else if (init) begin
        pm[ns] <= (ns == 0) ? '0 : PM_W'(INIT_BIAS);
      end else if (step) begin
        pm[ns] <= pm_next[ns];
      end
    end
  end
endmodule
