// conv_encoder -- rate 1/N, constraint length K convolutional encoder.
//
// Each input bit b, together with the K-1 previous bits held in the state
// register, forms the K-bit word {b, state}; output symbol i is the parity
// of that word masked by generator GEN[i]. The N symbols of one bit leave
// one per transfer, symbol 0 first, so the output is a plain symbol
// stream. The state register shifts the new bit in at the top:
// next state = {b, state[K-2:1]}. `in_first` (start of a traffic frame)
// encodes from the all-zero state; the 8 zero tail bits of every frame
// bring the encoder back to it anyway.
//
// Interface: valid/ready on both sides; a bit is accepted only when the
// symbols of the previous bit have all left, so the encoder sustains one
// symbol per cycle. out_first marks the first symbol of a frame.
// Defaults: K = 9, rate 1/2, generators 753/561 (octal), the IS-95 forward
// link code; for rate 1/3 use N = 3 and 557/663/711.
module conv_encoder #(
  parameter int unsigned K = 9,
  parameter int unsigned N = 2,
  parameter logic [N-1:0][K-1:0] GEN = {9'o561, 9'o753}
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  input  logic in_first,
  output logic out_valid,
  input  logic out_ready,
  output logic out_sym,
  output logic out_first
);
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1;

  logic [K-2:0]   state;
  logic [N-1:0]   syms;
  logic [NW-1:0]  sidx;
  logic           first_q;
  logic [K-2:0]   state_use;
  logic [K-1:0]   word;
  logic [N-1:0]   enc;

  always_comb begin
    state_use = in_first ? '0 : state;
    word      = {in_bit, state_use};
    for (int unsigned i = 0; i < N; i++) enc[i] = ^(word & GEN[i]);
  end

  assign in_ready  = !out_valid || (out_ready && sidx == NW'(N-1));
  assign out_sym   = syms[sidx];
  assign out_first = first_q && (sidx == '0);

  // stream rule: a symbol offered and not taken stays offered, unchanged
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_sym) && $stable(out_first));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      syms      <= '0;
      sidx      <= '0;
      first_q   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) begin
        if (sidx == NW'(N-1)) out_valid <= 1'b0;
        sidx <= sidx + 1'b1;
      end
      if (in_valid && in_ready) begin
        syms      <= enc;
        sidx      <= '0;
        first_q   <= in_first;
        out_valid <= 1'b1;
        state     <= word[K-1:1];
      end
    end
  end
endmodule
