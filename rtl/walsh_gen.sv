// walsh_gen -- Walsh code generator (tree-structured orthogonal codes).
//
// Produces the LEN-chip Walsh code number `idx` as a parallel word, chip 0 in
// bit 0. The code is built the way the code tree grows: starting from the
// single chip "0", every level doubles the code to {c, c} or {c, ~c}, the
// choice being bit `level` of the index. The result equals the Sylvester
// Hadamard row: chip j = parity(idx & j). Codes with different indices are
// orthogonal over LEN chips. A chip value of 0 maps to +1 on the channel,
// 1 to -1.
//
// Purely combinational. The code length of 64 is the IS-95 value and is a
// choice of this design; the tree construction follows the code-tree figure
// of the design description.
module walsh_gen #(
  parameter int unsigned LEN = 64,
  localparam int unsigned IW = $clog2(LEN)
) (
  input  logic [IW-1:0]  idx,
  output logic [LEN-1:0] code
);
  always_comb begin
    code = '0;
    for (int unsigned l = 0; l < IW; l++) begin
      for (int unsigned j = 0; j < (1 << l); j++) begin
        code[j + (1 << l)] = code[j] ^ idx[l];
      end
    end
  end
endmodule
