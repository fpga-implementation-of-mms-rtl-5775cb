// traffic_frame_parser -- checks and unpacks a decoded traffic frame.
//
// Takes the decoded information and CRC bits of one traffic frame (172 +
// 12 bits, the tail already removed by the Viterbi decoder), recomputes the
// CRC over the 172 information bits and compares it with the 12 received
// check bits. The 12 MMS frames held in the information field are then
// released one per cycle, each tagged with the frame's CRC verdict; the 4
// pad bits are dropped.
//
// Interface: bit stream in with valid/ready and in_first/in_last (in_first
// restarts the bit count); in_ready is low while the frames are released.
// Output: out_valid pulses per MMS frame, no back-pressure.
module traffic_frame_parser
  import cdma_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  input  logic       in_first,
  input  logic       in_last,
  output logic       out_valid,
  output mms_frame_t out_frame,
  output logic       out_crc_ok
);
  localparam int unsigned DATA_BITS = FRAMES_PER_TRAFFIC * MMS_FRAME_BITS;   // 168
  localparam int unsigned NBITS     = INFO_BITS + CRC_BITS;                  // 184

  logic                 emitting;
  logic [DATA_BITS-1:0] data_sr;
  logic [CRC_BITS-2:0]  rx_crc;      // first 11 received check bits
  logic [CRC_BITS-1:0]  crc;
  logic [7:0]           bit_cnt, cnt_use;
  logic [3:0]           frm_cnt;
  logic                 crc_ok_q;
  logic                 fire;

  assign in_ready = !emitting;
  assign fire     = in_valid && in_ready;
  assign cnt_use  = in_first ? '0 : bit_cnt;

  crc_gen #(.W(CRC_BITS), .POLY(CRC12_POLY)) u_crc (
    .clk(clk), .rst_n(rst_n), .clear(fire && in_first),
    .en(fire && cnt_use < 8'(INFO_BITS)), .din(in_bit), .crc(crc));

  assign out_valid  = emitting;
  assign out_frame  = data_sr[DATA_BITS-1 -: MMS_FRAME_BITS];
  assign out_crc_ok = crc_ok_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      emitting <= 1'b0;
      data_sr  <= '0;
      rx_crc   <= '0;
      bit_cnt  <= '0;
      frm_cnt  <= '0;
      crc_ok_q <= 1'b0;
    end else begin
      if (fire) begin
        bit_cnt <= cnt_use + 1'b1;
        if (cnt_use < 8'(DATA_BITS))
          data_sr <= {data_sr[DATA_BITS-2:0], in_bit};
        else if (cnt_use >= 8'(INFO_BITS))
          rx_crc <= {rx_crc[CRC_BITS-3:0], in_bit};
        if (in_last || cnt_use == 8'(NBITS - 1)) begin
          bit_cnt  <= '0;
          emitting <= 1'b1;
          frm_cnt  <= '0;
          crc_ok_q <= (cnt_use == 8'(NBITS - 1)) && ({rx_crc[CRC_BITS-2:0], in_bit} == crc);
        end
      end
      if (emitting) begin
        data_sr <= {data_sr[DATA_BITS-MMS_FRAME_BITS-1:0], {MMS_FRAME_BITS{1'b0}}};
        if (frm_cnt == 4'(FRAMES_PER_TRAFFIC - 1)) emitting <= 1'b0;
        frm_cnt <= frm_cnt + 1'b1;
      end
    end
  end
endmodule
