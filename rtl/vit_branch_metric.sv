// vit_branch_metric -- hard-decision branch metric unit.
//
// The branch metric is the Hamming distance between the N received code
// symbols and the N symbols expected on a trellis branch: XOR the two
// words and count the ones. Purely combinational; output width holds 0..N.
module vit_branch_metric #(
  parameter int unsigned N = 2,
  localparam int unsigned BM_W = $clog2(N + 1)
) (
  input  logic [N-1:0]    rx,
  input  logic [N-1:0]    expected,
  output logic [BM_W-1:0] metric
);
  logic [N-1:0] diff;
  assign diff = rx ^ expected;
  always_comb begin
    metric = '0;
    for (int unsigned i = 0; i < N; i++) metric = metric + BM_W'(diff[i]);
  end
endmodule
