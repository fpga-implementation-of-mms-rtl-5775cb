// tb_two_user_link -- two transceivers, one for each user, share the same
// channel at the same time on different Walsh codes (5 and 40). Each
// receives the sum of both transmissions plus noise and must recover only
// the other station's frames. Station 1 sends REQ, then user-1 data under
// "communication 1-2", then CLOSED; station 2 answers with ACK, user-2 data
// under "communication 2-1", then CLOSED. Every received frame must match
// what the other side sent, with a good CRC, and each of the five headers
// must be seen.
module tb_two_user_link;
  import cdma_pkg::*;
  localparam int NTF = 4, NMMS = NTF * 12;
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

  // per-station signals, index 0 = user 1 station, 1 = user 2 station
  logic        tx_valid [2], tx_ready [2], tx_hdr_ok [2];
  logic [3:0]  tx_hdr [2], tx_u1 [2], tx_u2 [2];
  logic [1:0]  tx_sel [2];
  logic        tx_chip [2], tx_chip_valid [2], tx_chip_sync [2];
  logic signed [7:0] rx_chip = 0;
  logic        rx_chip_valid = 0, rx_chip_sync = 0;
  logic        rx_overflow [2], rx_valid [2], rx_hdr_known [2], rx_crc_ok [2];
  logic [3:0]  rx_hdr [2], rx_u1 [2], rx_u2 [2];
  logic [1:0]  rx_sel [2];
  logic [5:0]  code [2] = '{6'd5, 6'd40};
  logic [13:0] script [2][NMMS];
  int          n_sent [2] = '{0, 0};
  int          n_rx [2] = '{0, 0};
  int          hdr_seen [5] = '{0, 0, 0, 0, 0};
  logic [3:0]  codes [5] = '{4'b0011, 4'b1100, 4'b1010, 4'b0101, 4'b0111};

  for (genvar u = 0; u < 2; u++) begin : g_station
    mms_cdma_transceiver dut (
      .clk, .rst_n,
      .tx_valid(tx_valid[u]), .tx_ready(tx_ready[u]), .tx_hdr(tx_hdr[u]), .tx_sel(tx_sel[u]),
      .tx_user1(tx_u1[u]), .tx_user2(tx_u2[u]), .tx_hdr_ok(tx_hdr_ok[u]),
      .tx_walsh_idx(code[u]), .chip_en(1'b1),
      .tx_chip(tx_chip[u]), .tx_chip_valid(tx_chip_valid[u]), .tx_chip_sync(tx_chip_sync[u]),
      .rx_walsh_idx(code[1-u]), .rx_chip, .rx_chip_valid, .rx_chip_sync,
      .rx_overflow(rx_overflow[u]), .rx_valid(rx_valid[u]), .rx_hdr(rx_hdr[u]),
      .rx_hdr_known(rx_hdr_known[u]), .rx_sel(rx_sel[u]), .rx_user1(rx_u1[u]), .rx_user2(rx_u2[u]),
      .rx_crc_ok(rx_crc_ok[u]),
      .pc_setpoint(20'd40000), .pc_valid(), .pc_bit(), .pc_group_energy(), .pc_energy_diff(),
      .dbr_rate(2'd0), .dbr_pn(14'd0), .dbr_mask());

    always_ff @(negedge clk) begin
      if (!tx_valid[u] || tx_ready[u]) begin
        tx_valid[u] <= rst_n && n_sent[u] < NMMS;
        {tx_hdr[u], tx_sel[u], tx_u1[u], tx_u2[u]} <= script[u][n_sent[u] % NMMS];
      end
    end
    always_ff @(posedge clk) begin
      if (tx_valid[u] && tx_ready[u]) n_sent[u] <= n_sent[u] + 1;
      if (rx_valid[u]) begin
        automatic logic [13:0] e = script[1-u][n_rx[u]];
        checks += 3;
        if (!rx_crc_ok[u]) begin failures++; $display("FAIL station %0d crc at %0d", u, n_rx[u]); end
        if ({rx_hdr[u], rx_sel[u], rx_u1[u], rx_u2[u]} !== e) begin
          failures++; $display("FAIL station %0d frame %0d", u, n_rx[u]);
        end
        if (!rx_hdr_known[u]) failures++;
        for (int h = 0; h < 5; h++) if (rx_hdr[u] == codes[h]) hdr_seen[h] <= hdr_seen[h] + 1;
        n_rx[u] <= n_rx[u] + 1;
      end
    end
  end

  initial begin
    tx_valid = '{0, 0};
    for (int i = 0; i < NMMS; i++) begin
      automatic int tf = i / 12;
      automatic logic [3:0] h1 = (tf == 0) ? 4'b0011 : (tf == NTF - 1) ? 4'b0111 : 4'b1010;
      automatic logic [3:0] h2 = (tf == 0) ? 4'b1100 : (tf == NTF - 1) ? 4'b0111 : 4'b0101;
      script[0][i] = {h1, 2'b01, 4'($urandom), 4'b0000};
      script[1][i] = {h2, 2'b10, 4'b0000, 4'($urandom)};
    end
  end

  // shared channel: both users (chip-aligned) plus noise
  always_ff @(posedge clk) begin
    rx_chip_valid <= tx_chip_valid[0];
    rx_chip_sync  <= tx_chip_sync[0];
    if (tx_chip_valid[0]) begin
      automatic int v = (tx_chip[0] ? -35 : 35) + (tx_chip[1] ? -30 : 30)
                      + int'($urandom_range(0, 30)) - 15;
      rx_chip <= 8'(v);
      checks++;
      if (tx_chip_valid[1] !== 1'b1 || tx_chip_sync[1] !== tx_chip_sync[0]) begin
        failures++; $display("FAIL stations not chip-aligned");
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_rx[0] == NMMS && n_rx[1] == NMMS);
    repeat (10) @(negedge clk);
    for (int h = 0; h < 5; h++) begin
      checks++;
      if (hdr_seen[h] == 0) begin failures++; $display("FAIL header %b never received", codes[h]); end
    end
    checks += 2;
    if (rx_overflow[0] || rx_overflow[1]) failures++;
    if (!(tx_hdr_ok[0] && tx_hdr_ok[1])) failures++;
    $display("two-user link: %0d frames each way, headers seen %p", NMMS, hdr_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
