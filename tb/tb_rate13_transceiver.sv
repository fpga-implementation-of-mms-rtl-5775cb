// tb_rate13_transceiver -- the transceiver built for rate-1/3 coding
// (generators 557/663/711, K=9) with an 18 x 32 interleaver page, the
// page size a 576-symbol rate-1/3 frame needs. Three traffic frames go
// through a loop-back channel with a second Walsh user and noise; the
// second frame has 12 inverted symbols that the decoder must correct.
module tb_rate13_transceiver;
  import cdma_pkg::*;
  localparam int NTF = 3, NMMS = NTF * 12, FRAME_CHIPS = 576 * 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        tx_valid = 0, tx_ready, tx_hdr_ok;
  logic [13:0] tx_word = 0;
  logic        tx_chip, tx_chip_valid, tx_chip_sync;
  logic signed [7:0] rx_chip = 0;
  logic        rx_chip_valid = 0, rx_chip_sync = 0, rx_overflow;
  logic        rx_valid, rx_hdr_known, rx_crc_ok;
  logic [3:0]  rx_hdr, rx_user1, rx_user2;
  logic [1:0]  rx_sel;
  logic [13:0] sent [NMMS];
  int n_sent = 0, n_rx = 0, tx_frame = -1, chip_n = 0;

  mms_cdma_transceiver #(.RATE_N(3), .GEN({9'o711, 9'o663, 9'o557}), .IL_ROWS(18), .IL_COLS(32)) dut (
    .clk, .rst_n,
    .tx_valid, .tx_ready, .tx_hdr(tx_word[13:10]), .tx_sel(tx_word[9:8]),
    .tx_user1(tx_word[7:4]), .tx_user2(tx_word[3:0]), .tx_hdr_ok,
    .tx_walsh_idx(6'd12), .chip_en(1'b1), .tx_chip, .tx_chip_valid, .tx_chip_sync,
    .rx_walsh_idx(6'd12), .rx_chip, .rx_chip_valid, .rx_chip_sync, .rx_overflow,
    .rx_valid, .rx_hdr, .rx_hdr_known, .rx_sel, .rx_user1, .rx_user2, .rx_crc_ok,
    .pc_setpoint(20'd40000), .pc_valid(), .pc_bit(), .pc_group_energy(), .pc_energy_diff(),
    .dbr_rate(2'd0), .dbr_pn(14'd0), .dbr_mask());

  always_ff @(negedge clk) begin
    if (!tx_valid || tx_ready) begin
      tx_valid <= rst_n && n_sent < NMMS;
      tx_word  <= {4'b1010, 2'($urandom), 4'($urandom), 4'($urandom)};
    end
  end

  always_ff @(posedge clk) begin
    if (tx_valid && tx_ready) begin sent[n_sent] <= tx_word; n_sent <= n_sent + 1; end
    rx_chip_valid <= 1'b0;
    rx_chip_sync  <= 1'b0;
    if (tx_chip_valid) begin
      automatic int f = tx_chip_sync ? tx_frame + 1 : tx_frame;
      automatic int n = tx_chip_sync ? 0 : chip_n;
      automatic int s = n / 64;
      automatic int v = (tx_chip ? -40 : 40) + (((n / 64) % 3 == 0) ^ (^(6'd33 & 6'(n))) ? -20 : 20)
                      + int'($urandom_range(0, 16)) - 8;
      if (f == 1 && (s % 48) == 7) v = -v;     // 12 symbols inverted
      tx_frame      <= f;
      chip_n        <= n + 1;
      rx_chip       <= 8'(v);
      rx_chip_valid <= 1'b1;
      rx_chip_sync  <= tx_chip_sync;
    end
    if (rx_valid) begin
      checks += 2;
      if (!rx_crc_ok) begin failures++; $display("FAIL crc at mms %0d", n_rx); end
      if ({rx_hdr, rx_sel, rx_user1, rx_user2} !== sent[n_rx]) begin failures++; $display("FAIL mms %0d", n_rx); end
      n_rx <= n_rx + 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_rx == NMMS);
    repeat (10) @(negedge clk);
    checks++;
    if (rx_overflow) failures++;
    $display("rate 1/3: %0d MMS frames received, %0d chips per traffic frame", n_rx, FRAME_CHIPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
