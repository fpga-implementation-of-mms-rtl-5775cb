// tb_mms_cdma_transceiver -- end-to-end test of the transceiver at its
// default (full) size: 5 traffic frames of 12 MMS frames each are sent
// through the transmit chain, over a channel model back into the receive
// chain, and compared field by field.
//
// Channel: every chip becomes +A / -A (chip 0 / 1), plus a second user on
// Walsh code 9 with its own random symbols, plus bounded uniform noise.
// Per traffic frame:
//   0  strong (A = 40), clean
//   1  strong, 9 whole symbols inverted (Viterbi must correct them)
//   2  weak (A = 12), clean (power control must ask for more power)
//   3  strong, 140 symbols inverted (CRC must flag the frame as bad)
//   4  strong, clean
// Mechanisms counted: transmit back-pressure, both interleaver pages full,
// corrected channel errors, CRC failure, power-up and power-down bits,
// each of the five channel headers received, second-user rejection. Each
// must occur at least once. The data burst randomizer mask is checked for
// its group count at every rate.
module tb_mms_cdma_transceiver;
  import cdma_pkg::*;
  localparam int NTF = 5, NMMS = NTF * 12, SYM_CHIPS = 64, FRAME_SYMS = 384;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts

  // transmit side
  logic        tx_valid = 0, tx_ready, tx_hdr_ok;
  logic [3:0]  tx_hdr = 0, tx_user1 = 0, tx_user2 = 0;
  logic [1:0]  tx_sel = 0;
  logic        tx_chip, tx_chip_valid, tx_chip_sync;
  // receive side
  logic signed [7:0] rx_chip = 0;
  logic        rx_chip_valid = 0, rx_chip_sync = 0, rx_overflow;
  logic        rx_valid, rx_hdr_known, rx_crc_ok;
  logic [3:0]  rx_hdr, rx_user1, rx_user2;
  logic [1:0]  rx_sel;
  logic        pc_valid, pc_bit;
  logic [19:0] pc_group_energy;
  logic signed [20:0] pc_energy_diff;
  logic [1:0]  dbr_rate = 0;
  logic [13:0] dbr_pn = 0;
  logic [15:0] dbr_mask;

  mms_cdma_transceiver dut (
    .clk, .rst_n,
    .tx_valid, .tx_ready, .tx_hdr, .tx_sel, .tx_user1, .tx_user2, .tx_hdr_ok,
    .tx_walsh_idx(6'd44), .chip_en(1'b1), .tx_chip, .tx_chip_valid, .tx_chip_sync,
    .rx_walsh_idx(6'd44), .rx_chip, .rx_chip_valid, .rx_chip_sync, .rx_overflow,
    .rx_valid, .rx_hdr, .rx_hdr_known, .rx_sel, .rx_user1, .rx_user2, .rx_crc_ok,
    .pc_setpoint(20'd40000), .pc_valid, .pc_bit, .pc_group_energy, .pc_energy_diff,
    .dbr_rate, .dbr_pn, .dbr_mask);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  logic [13:0] sent [NMMS];
  logic [3:0]  codes [5] = '{4'b0011, 4'b1100, 4'b1010, 4'b0101, 4'b0111};
  int n_sent = 0;
  int tx_stalls = 0, pages_full = 0;

  always_ff @(negedge clk) begin
    if (!tx_valid || tx_ready) begin
      tx_valid <= rst_n && (n_sent < NMMS);
      tx_hdr   <= codes[n_sent % 5];
      tx_sel   <= 2'($urandom);
      tx_user1 <= 4'($urandom);
      tx_user2 <= 4'($urandom);
    end
  end

  always_ff @(posedge clk) begin
    if (tx_valid && tx_ready) begin
      sent[n_sent] <= {tx_hdr, tx_sel, tx_user1, tx_user2};
      n_sent <= n_sent + 1;
      checks++;
      if (!tx_hdr_ok && n_sent > 0) failures++;
    end
    if (tx_valid && !tx_ready) tx_stalls <= tx_stalls + 1;
    if (dut.u_il.full == 2'b11) pages_full <= pages_full + 1;
  end

  // ---------------- channel ----------------
  int tx_frame = -1, tx_chip_n = 0;
  logic intf_sym = 0;
  int inv_syms [NTF];
  int amp [NTF] = '{40, 40, 12, 40, 40};

  function automatic bit inverted(int f, int s);
    if (f == 1) return (s % 45) == 17;                         // 9 symbols
    if (f == 3) return (s % 11) < 4 && s < 385;                // 140 symbols
    return 1'b0;
  endfunction

  always_ff @(posedge clk) begin
    rx_chip_valid <= 1'b0;
    rx_chip_sync  <= 1'b0;
    if (tx_chip_valid) begin
      automatic int f = tx_chip_sync ? tx_frame + 1 : tx_frame;
      automatic int n = tx_chip_sync ? 0 : tx_chip_n;
      automatic int s = n / SYM_CHIPS, c = n % SYM_CHIPS;
      automatic int a = (f >= 0 && f < NTF) ? amp[f] : 40;
      automatic logic isym = (c == 0) ? 1'($urandom) : intf_sym;
      automatic int v = (tx_chip ? -a : a)
                      + ((isym ^ (^(6'd9 & 6'(c)))) ? -20 : 20)
                      + int'($urandom_range(0, 16)) - 8;
      if (f >= 0 && f < NTF && inverted(f, s)) v = -v;
      intf_sym      <= isym;
      tx_frame      <= f;
      tx_chip_n     <= n + 1;
      rx_chip       <= 8'(v);
      rx_chip_valid <= 1'b1;
      rx_chip_sync  <= tx_chip_sync;
    end
  end

  // ---------------- checking ----------------
  int n_rx = 0, crc_fail_frames = 0, corrected_frames = 0, weak_ok = 0;
  int pc_up = 0, pc_down = 0, pc_groups = 0;
  int hdr_seen [5] = '{0, 0, 0, 0, 0};

  always_ff @(posedge clk) begin
    if (rx_valid) begin
      automatic int f = n_rx / 12;
      automatic logic [13:0] e = sent[n_rx];
      if (f == 3) begin
        checks++;
        if (rx_crc_ok) begin failures++; $display("FAIL corrupted frame passed its CRC"); end
        if (n_rx % 12 == 0 && !rx_crc_ok) crc_fail_frames <= crc_fail_frames + 1;
      end else begin
        checks += 6;
        if (!rx_crc_ok)           begin failures++; $display("FAIL crc frame %0d", f); end
        if (rx_hdr   !== e[13:10]) begin failures++; $display("FAIL hdr mms %0d", n_rx); end
        if (rx_sel   !== e[9:8])   begin failures++; $display("FAIL sel mms %0d", n_rx); end
        if (rx_user1 !== e[7:4])   begin failures++; $display("FAIL user1 mms %0d", n_rx); end
        if (rx_user2 !== e[3:0])   begin failures++; $display("FAIL user2 mms %0d", n_rx); end
        if (!rx_hdr_known)         begin failures++; $display("FAIL hdr unknown mms %0d", n_rx); end
        for (int h = 0; h < 5; h++) if (rx_hdr == codes[h] && rx_crc_ok) hdr_seen[h] <= hdr_seen[h] + 1;
        if (f == 1 && n_rx % 12 == 11 && rx_crc_ok) corrected_frames <= corrected_frames + 1;
        if (f == 2 && n_rx % 12 == 11 && rx_crc_ok) weak_ok <= weak_ok + 1;
      end
      n_rx <= n_rx + 1;
    end
    if (pc_valid) begin
      // group g of received frame: strong frames must ask for less power,
      // the weak frame for more
      automatic int f = pc_groups / 16;
      checks++;
      if (pc_bit !== (f != 2)) begin failures++; $display("FAIL pc bit frame %0d group %0d", f, pc_groups % 16); end
      if (pc_bit) pc_down <= pc_down + 1; else pc_up <= pc_up + 1;
      pc_groups <= pc_groups + 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // burst randomizer: group counts at each rate
    for (int r = 0; r < 4; r++) begin
      dbr_rate = 2'(r); dbr_pn = 14'($urandom);
      @(negedge clk);
      checks++;
      if ($countones(dbr_mask) != (16 >> r)) begin failures++; $display("FAIL dbr rate %0d", r); end
    end
    wait (n_rx == NMMS);
    repeat (10) @(negedge clk);
    checks += 10;
    if (tx_stalls == 0)        begin failures++; $display("FAIL no transmit back-pressure"); end
    if (pages_full == 0)       begin failures++; $display("FAIL interleaver never had both pages full"); end
    if (corrected_frames == 0) begin failures++; $display("FAIL channel errors not corrected"); end
    if (crc_fail_frames == 0)  begin failures++; $display("FAIL no CRC failure seen"); end
    if (weak_ok == 0)          begin failures++; $display("FAIL weak frame lost"); end
    if (pc_up == 0)            begin failures++; $display("FAIL no power-up bit"); end
    if (pc_down == 0)          begin failures++; $display("FAIL no power-down bit"); end
    if (pc_groups != NTF * 16) begin failures++; $display("FAIL %0d power control groups", pc_groups); end
    if (rx_overflow)           begin failures++; $display("FAIL receive overflow"); end
    for (int h = 0; h < 5; h++) if (hdr_seen[h] == 0) begin failures++; $display("FAIL header %b never received", codes[h]); end
    $display("stalls=%0d pages_full=%0d corrected_frames=%0d crc_fail_frames=%0d pc_up=%0d pc_down=%0d hdr_seen=%p",
             tx_stalls, pages_full, corrected_frames, crc_fail_frames, pc_up, pc_down, hdr_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
