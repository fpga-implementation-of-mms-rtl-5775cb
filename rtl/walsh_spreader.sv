// walsh_spreader -- direct-sequence spreader of the transmit path.
//
// Each code symbol taken from the input stream is multiplied (XOR in the
// 0/1 domain) by the LEN chips of the selected Walsh code, so one symbol
// occupies LEN chip periods. A chip is produced on every cycle where
// `chip_en` is high and a symbol is held; `chip_sync` marks the first chip
// of a symbol that carries `in_first`, i.e. the start of a traffic frame,
// so that a receiver can align its despreader and deinterleaver.
//
// Interface: symbol stream in_valid/in_ready/in_sym/in_first (a transfer
// happens when valid and ready are both high); chip outputs are registered
// and valid for one cycle per chip_en. A new symbol is accepted in the cycle
// its predecessor's last chip is sent, so chips are back to back.
// The Walsh length (64) is the IS-95 value, a choice of this design.
module walsh_spreader #(
  parameter int unsigned LEN = 64,
  localparam int unsigned IW = $clog2(LEN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW-1:0] walsh_idx,
  input  logic          chip_en,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          in_sym,
  input  logic          in_first,
  output logic          chip,
  output logic          chip_valid,
  output logic          chip_sync
);
  logic [LEN-1:0] code;
  logic           have;
  logic           sym_q, first_q;
  logic [IW-1:0]  cnt;
  logic           last_chip;

  walsh_gen #(.LEN(LEN)) u_walsh (.idx(walsh_idx), .code(code));

  assign last_chip = have && chip_en && (cnt == IW'(LEN-1));
  assign in_ready  = !have || last_chip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have       <= 1'b0;
      sym_q      <= 1'b0;
      first_q    <= 1'b0;
      cnt        <= '0;
      chip       <= 1'b0;
      chip_valid <= 1'b0;
      chip_sync  <= 1'b0;
    end else begin
      chip_valid <= 1'b0;
      chip_sync  <= 1'b0;
      if (have && chip_en) begin
        chip       <= sym_q ^ code[cnt];
        chip_valid <= 1'b1;
        chip_sync  <= first_q && (cnt == '0);
        cnt        <= cnt + 1'b1;
        if (last_chip) have <= 1'b0;
      end
      if (in_valid && in_ready) begin
        have    <= 1'b1;
        sym_q   <= in_sym;
        first_q <= in_first;
        cnt     <= '0;
      end
    end
  end
endmodule
