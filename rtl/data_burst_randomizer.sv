// data_burst_randomizer -- reverse-link power-control-group gating mask.
//
// At data rates below full rate the reverse-link symbols are repeated, and
// only one copy of each needs to be sent. The randomizer chooses which of
// the 16 power control groups of a 20 ms frame are transmitted, using the
// 14 bits b0..b13 taken from the user's long code near the end of the
// previous frame, so that the bursts of different users fall at
// pseudo-random positions. The choice is nested, as in IS-95:
//   full rate    : all 16 groups;
//   half rate    : group 2i + b_i, i = 0..7;
//   quarter rate : from half-rate pair i' = 2i + b_(8+i), i = 0..3;
//   eighth rate  : from quarter-rate choice 2i + b_(12+i), i = 0..1.
// mask[g] = 1 means power control group g is transmitted.
// Purely combinational. The design only names the block; the rule is the
// IS-95 one.
module data_burst_randomizer (
  input  logic [1:0]  rate,   // 0 full, 1 half, 2 quarter, 3 eighth
  input  logic [13:0] pn,     // long-code bits b0..b13
  output logic [15:0] mask
);
  logic [3:0] half_g [8];     // group chosen in each half-rate pair
  logic [3:0] qtr_g  [4];
  logic [3:0] eig_g  [2];
  logic [2:0] hi;
  logic [1:0] qi;

  always_comb begin
    for (int i = 0; i < 8; i++) half_g[i] = 4'(2 * i) + 4'(pn[i]);
    for (int i = 0; i < 4; i++) begin
      hi        = 3'(2 * i) + 3'(pn[8 + i]);
      qtr_g[i]  = half_g[hi];
    end
    for (int i = 0; i < 2; i++) begin
      qi        = 2'(2 * i) + 2'(pn[12 + i]);
      eig_g[i]  = qtr_g[qi];
    end
    mask = '0;
    unique case (rate)
      2'd0: mask = '1;
      2'd1: for (int i = 0; i < 8; i++) mask[half_g[i]] = 1'b1;
      2'd2: for (int i = 0; i < 4; i++) mask[qtr_g[i]]  = 1'b1;
      default: for (int i = 0; i < 2; i++) mask[eig_g[i]] = 1'b1;
    endcase
  end
endmodule
