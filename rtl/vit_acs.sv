// vit_acs -- add-compare-select unit of the Viterbi decoder.
//
// A trellis state is reached from two predecessor states. The unit adds
// each predecessor's path metric to the metric of its branch, compares the
// two sums and keeps the smaller (the more likely path under a Hamming
// distance metric). `decision` tells which predecessor won (1 = path 1);
// on a tie path 0 is kept. Purely combinational; the caller registers the
// new path metric. PM_W must be wide enough that no sum overflows (the
// decoder sizes it for a whole frame, so no normalisation is needed).
module vit_acs #(
  parameter int unsigned PM_W = 10,
  parameter int unsigned BM_W = 2
) (
  input  logic [PM_W-1:0] pm0,
  input  logic [BM_W-1:0] bm0,
  input  logic [PM_W-1:0] pm1,
  input  logic [BM_W-1:0] bm1,
  output logic [PM_W-1:0] pm_out,
  output logic            decision
);
  logic [PM_W-1:0] sum0, sum1;
  assign sum0     = pm0 + PM_W'(bm0);
  assign sum1     = pm1 + PM_W'(bm1);
  assign decision = (sum1 < sum0);
  assign pm_out   = decision ? sum1 : sum0;
endmodule
