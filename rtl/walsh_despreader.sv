// walsh_despreader -- correlating despreader of the receive path.
//
// Received chips are signed soft samples (+A for a transmitted 0 chip, -A
// for a 1 chip, plus whatever other users and noise add). Over LEN chips the
// despreader accumulates sample * (+1 or -1 according to the local Walsh
// chip), which is the time correlation that keeps only the user with the
// matching code: other Walsh users are orthogonal and sum to zero. At the
// end of the symbol the sign gives the hard symbol (negative -> 1) and the
// magnitude gives a signal-strength measure for power control.
//
// Interface: chip_valid qualifies chip_in; chip_sync on a chip restarts the
// chip count at 0 and marks the resulting symbol as the first of a frame
// (sym_first). sym_valid pulses for one cycle, registered, one cycle after
// the LEN-th chip. Accumulator width and soft-sample format are choices of
// this design.
module walsh_despreader #(
  parameter int unsigned LEN    = 64,
  parameter int unsigned CHIP_W = 8,
  localparam int unsigned IW    = $clog2(LEN),
  localparam int unsigned ACC_W = CHIP_W + IW + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [IW-1:0]            walsh_idx,
  input  logic signed [CHIP_W-1:0] chip_in,
  input  logic                     chip_valid,
  input  logic                     chip_sync,
  output logic                     sym_valid,
  output logic                     sym,
  output logic                     sym_first,
  output logic [ACC_W-1:0]         sym_mag
);
  logic [LEN-1:0]          code;
  logic [IW-1:0]           cnt, cnt_use;
  logic signed [ACC_W-1:0] acc, acc_base, acc_next, term;
  logic                    first_q, first_use;

  walsh_gen #(.LEN(LEN)) u_walsh (.idx(walsh_idx), .code(code));

  always_comb begin
    cnt_use   = chip_sync ? '0 : cnt;
    acc_base  = chip_sync ? '0 : acc;
    first_use = chip_sync ? 1'b1 : first_q;
    term      = ACC_W'(chip_in);
    acc_next  = code[cnt_use] ? (acc_base - term) : (acc_base + term);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= '0;
      first_q   <= 1'b0;
      sym_valid <= 1'b0;
      sym       <= 1'b0;
      sym_first <= 1'b0;
      sym_mag   <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (chip_valid) begin
        cnt <= cnt_use + 1'b1;
        if (cnt_use == IW'(LEN-1)) begin
          acc       <= '0;
          first_q   <= 1'b0;
          sym_valid <= 1'b1;
          sym       <= acc_next[ACC_W-1];
          sym_first <= first_use;
          sym_mag   <= acc_next[ACC_W-1] ? ACC_W'(-acc_next) : ACC_W'(acc_next);
        end else begin
          acc     <= acc_next;
          first_q <= first_use;
        end
      end
    end
  end
endmodule
