// mms_cdma_transceiver -- IS-95B style CDMA traffic-channel transceiver
// for 14-bit MMS frames.
//
// Transmit path (one traffic frame = 12 MMS frames = 20 ms):
//   frame_assembler -> traffic_frame_builder (pad, CRC-12, 8 tail bits,
//   192 bits) -> conv_encoder (K=9, rate 1/2, 384 symbols) ->
//   block_interleaver (2 pages of 16 x 24) -> walsh_spreader (64 chips per
//   symbol, one chip per chip_en) -> tx_chip.
// Receive path:
//   rx_chip (signed soft samples) -> walsh_despreader -> block_interleaver
//   used as deinterleaver (24 x 16) -> viterbi_decoder -> traffic_frame_parser
//   (CRC check, unpack) -> frame_disassembler -> rx_* outputs.
//   The despreader's symbol magnitudes also feed power_control, which
//   issues one power control bit per 24-symbol group.
// Beside the two paths, data_burst_randomizer gives the reverse-link
// power-control-group mask for the current rate.
//
// One clock and one asynchronous active-low reset drive everything.
// tx_chip_sync marks the first chip of each transmitted traffic frame;
// the receiver needs the same marker on rx_chip_sync (frame timing
// acquisition is outside this design). At one chip per clock (1.2288
// Mchip/s) the chain carries 9600 bit/s. rx_overflow is a sticky flag set
// if a despread symbol finds both deinterleaver pages full.
module mms_cdma_transceiver
  import cdma_pkg::*;
#(
  parameter int unsigned K         = 9,
  parameter int unsigned RATE_N    = 2,
  parameter logic [RATE_N-1:0][K-1:0] GEN = {G_R2_1, G_R2_0},
  parameter int unsigned IL_ROWS   = 16,
  parameter int unsigned IL_COLS   = 24,
  parameter int unsigned WALSH_LEN_P = WALSH_LEN,
  parameter int unsigned CHIP_W    = 8,
  parameter int unsigned PC_GROUP  = 24,
  localparam int unsigned IW       = $clog2(WALSH_LEN_P),
  localparam int unsigned MAG_W    = CHIP_W + IW + 1,
  localparam int unsigned PC_W     = MAG_W + $clog2(PC_GROUP + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // transmit: MMS frame fields
  input  logic                     tx_valid,
  output logic                     tx_ready,
  input  logic [HDR_BITS-1:0]      tx_hdr,
  input  logic [SEL_BITS-1:0]      tx_sel,
  input  logic [USER_BITS-1:0]     tx_user1,
  input  logic [USER_BITS-1:0]     tx_user2,
  output logic                     tx_hdr_ok,
  // transmit: chips
  input  logic [IW-1:0]            tx_walsh_idx,
  input  logic                     chip_en,
  output logic                     tx_chip,
  output logic                     tx_chip_valid,
  output logic                     tx_chip_sync,
  // receive: chips
  input  logic [IW-1:0]            rx_walsh_idx,
  input  logic signed [CHIP_W-1:0] rx_chip,
  input  logic                     rx_chip_valid,
  input  logic                     rx_chip_sync,
  output logic                     rx_overflow,
  // receive: MMS frame fields
  output logic                     rx_valid,
  output logic [HDR_BITS-1:0]      rx_hdr,
  output logic                     rx_hdr_known,
  output logic [SEL_BITS-1:0]      rx_sel,
  output logic [USER_BITS-1:0]     rx_user1,
  output logic [USER_BITS-1:0]     rx_user2,
  output logic                     rx_crc_ok,
  // power control
  input  logic [PC_W-1:0]          pc_setpoint,
  output logic                     pc_valid,
  output logic                     pc_bit,
  output logic [PC_W-1:0]          pc_group_energy,
  output logic signed [PC_W:0]     pc_energy_diff,
  // reverse-link data burst randomizer
  input  logic [1:0]               dbr_rate,
  input  logic [13:0]              dbr_pn,
  output logic [15:0]              dbr_mask
);
  localparam int unsigned VIT_L = FRAME_BITS;

  // ---------------- transmit ----------------
  mms_frame_t fa_frame;
  logic       fa_valid, fa_ready;
  logic       tb_valid, tb_ready, tb_bit, tb_first;
  logic       ce_valid, ce_ready, ce_sym, ce_first;
  logic       il_valid, il_ready, il_sym, il_first;

  frame_assembler u_fa (
    .clk, .rst_n,
    .in_valid(tx_valid), .in_ready(tx_ready), .in_hdr(tx_hdr), .in_sel(tx_sel),
    .in_user1(tx_user1), .in_user2(tx_user2),
    .out_valid(fa_valid), .out_ready(fa_ready), .out_frame(fa_frame), .hdr_ok(tx_hdr_ok));

  traffic_frame_builder u_tfb (
    .clk, .rst_n,
    .in_valid(fa_valid), .in_ready(fa_ready), .in_frame(fa_frame),
    .out_valid(tb_valid), .out_ready(tb_ready), .out_bit(tb_bit), .out_first(tb_first));

  conv_encoder #(.K(K), .N(RATE_N), .GEN(GEN)) u_enc (
    .clk, .rst_n,
    .in_valid(tb_valid), .in_ready(tb_ready), .in_bit(tb_bit), .in_first(tb_first),
    .out_valid(ce_valid), .out_ready(ce_ready), .out_sym(ce_sym), .out_first(ce_first));

  block_interleaver #(.ROWS(IL_ROWS), .COLS(IL_COLS)) u_il (
    .clk, .rst_n,
    .in_valid(ce_valid), .in_ready(ce_ready), .in_sym(ce_sym), .in_first(ce_first),
    .out_valid(il_valid), .out_ready(il_ready), .out_sym(il_sym), .out_first(il_first));

  walsh_spreader #(.LEN(WALSH_LEN_P)) u_spr (
    .clk, .rst_n, .walsh_idx(tx_walsh_idx), .chip_en,
    .in_valid(il_valid), .in_ready(il_ready), .in_sym(il_sym), .in_first(il_first),
    .chip(tx_chip), .chip_valid(tx_chip_valid), .chip_sync(tx_chip_sync));

  // ---------------- receive ----------------
  logic             ds_valid, ds_sym, ds_first;
  logic [MAG_W-1:0] ds_mag;
  logic             di_ready, di_valid, di_sym, di_first;
  logic             vd_ready, vd_valid, vd_bit, vd_first, vd_last;
  logic             fp_ready, fp_valid, fp_crc_ok;
  mms_frame_t       fp_frame;

  walsh_despreader #(.LEN(WALSH_LEN_P), .CHIP_W(CHIP_W)) u_desp (
    .clk, .rst_n, .walsh_idx(rx_walsh_idx),
    .chip_in(rx_chip), .chip_valid(rx_chip_valid), .chip_sync(rx_chip_sync),
    .sym_valid(ds_valid), .sym(ds_sym), .sym_first(ds_first), .sym_mag(ds_mag));

  block_interleaver #(.ROWS(IL_COLS), .COLS(IL_ROWS)) u_deil (
    .clk, .rst_n,
    .in_valid(ds_valid), .in_ready(di_ready), .in_sym(ds_sym), .in_first(ds_first),
    .out_valid(di_valid), .out_ready(vd_ready), .out_sym(di_sym), .out_first(di_first));

  viterbi_decoder #(.K(K), .N(RATE_N), .GEN(GEN), .L(VIT_L)) u_vit (
    .clk, .rst_n,
    .in_valid(di_valid), .in_ready(vd_ready), .in_sym(di_sym), .in_first(di_first),
    .out_valid(vd_valid), .out_ready(fp_ready), .out_bit(vd_bit),
    .out_first(vd_first), .out_last(vd_last));

  traffic_frame_parser u_tfp (
    .clk, .rst_n,
    .in_valid(vd_valid), .in_ready(fp_ready), .in_bit(vd_bit),
    .in_first(vd_first), .in_last(vd_last),
    .out_valid(fp_valid), .out_frame(fp_frame), .out_crc_ok(fp_crc_ok));

  frame_disassembler u_fd (
    .clk, .rst_n,
    .in_valid(fp_valid), .in_frame(fp_frame), .in_crc_ok(fp_crc_ok),
    .out_valid(rx_valid), .hdr(rx_hdr), .hdr_known(rx_hdr_known), .sel(rx_sel),
    .user1(rx_user1), .user2(rx_user2), .crc_ok(rx_crc_ok));

  power_control #(.GROUP(PC_GROUP), .MAG_W(MAG_W)) u_pc (
    .clk, .rst_n,
    .sym_valid(ds_valid), .sym_first(ds_first), .sym_mag(ds_mag), .setpoint(pc_setpoint),
    .pc_valid, .pc_bit, .group_energy(pc_group_energy), .energy_diff(pc_energy_diff));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    rx_overflow <= 1'b0;
    else if (ds_valid && !di_ready) rx_overflow <= 1'b1;
  end

  // ---------------- reverse-link burst gating ----------------
  data_burst_randomizer u_dbr (.rate(dbr_rate), .pn(dbr_pn), .mask(dbr_mask));

endmodule
