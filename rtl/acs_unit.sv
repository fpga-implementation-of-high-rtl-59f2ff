// acs_unit: add-compare-select for one trellis state.
//
// Two adders form the candidate metrics pm0+bm0 and pm1+bm1 of the two
// branches entering the state, a comparator picks the smaller and a selector
// passes it on as the new path metric, with the decision bit (1 when the
// branch from predecessor 1 survives). This structure follows the design
// description. Own choices: metrics are PM_W-bit unsigned numbers that may wrap;
// they are compared by the sign of their modulo-2^PM_W difference, which is
// exact while all metrics lie within 2^(PM_W-1) of each other. Ties keep
// predecessor 0. Combinational.
module acs_unit #(
  parameter int unsigned PM_W = 8
) (
  input  logic [PM_W-1:0] pm0,
  input  logic [PM_W-1:0] pm1,
  input  logic [1:0]      bm0,
  input  logic [1:0]      bm1,
  output logic [PM_W-1:0] pm_new,
  output logic            decision
);
  logic [PM_W-1:0] sum0, sum1, diff;

  always_comb begin
    sum0     = pm0 + PM_W'(bm0);
    sum1     = pm1 + PM_W'(bm1);
    diff     = sum1 - sum0;
    decision = diff[PM_W-1];          // sum1 < sum0 (modulo compare)
    pm_new   = decision ? sum1 : sum0;
  end
endmodule
