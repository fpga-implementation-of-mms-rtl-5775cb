// traffic_frame_builder -- packs MMS frames into a 20 ms traffic frame.
//
// A traffic frame at 9600 bit/s carries 192 bits: 172 information bits,
// the 12-bit frame quality CRC and 8 zero tail bits that flush the
// convolutional encoder. The builder takes FRAMES (12) MMS frames of 14
// bits, sends them MSB first, pads the information field with 4 zero bits,
// appends the CRC computed over all 172 information bits and ends with the
// tail, so the frame leaves as one serial bit stream:
//     DATA (12 x 14) | PAD (4) | CRC (12) | TAIL (8)
// Interface: MMS frame in with valid/ready (accepted one at a time, when
// the previous one has been shifted out); bit stream out with valid/ready,
// out_first on the first bit of a traffic frame. One bit per cycle when
// the output is ready. The 12-frames-per-traffic-frame packing is this
// design's own choice; the field sizes are those of IS-95 rate set 1.
module traffic_frame_builder
  import cdma_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  mms_frame_t in_frame,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit,
  output logic       out_first
);
  typedef enum logic [1:0] {DATA, PAD, CRC, TAIL} phase_e;

  phase_e                    phase;
  logic [MMS_FRAME_BITS-1:0] sr;
  logic                      have;
  logic [4:0]                bit_cnt;
  logic [3:0]                frm_cnt;
  logic [CRC_BITS-1:0]       crc;
  logic                      fire, crc_en;

  assign in_ready  = (phase == DATA) && !have;
  assign out_valid = (phase == DATA) ? have : 1'b1;
  assign fire      = out_valid && out_ready;
  assign out_first = (phase == DATA) && (frm_cnt == '0) && (bit_cnt == '0);
  assign crc_en    = fire && (phase == DATA || phase == PAD);

  always_comb begin
    unique case (phase)
      DATA:    out_bit = sr[MMS_FRAME_BITS-1];
      CRC:     out_bit = crc[4'(CRC_BITS - 1) - bit_cnt[3:0]];
      default: out_bit = 1'b0;
    endcase
  end

  crc_gen #(.W(CRC_BITS), .POLY(CRC12_POLY)) u_crc (
    .clk(clk), .rst_n(rst_n), .clear(out_first), .en(crc_en), .din(out_bit), .crc(crc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= DATA;
      sr      <= '0;
      have    <= 1'b0;
      bit_cnt <= '0;
      frm_cnt <= '0;
    end else begin
      if (in_valid && in_ready) begin
        sr   <= in_frame;
        have <= 1'b1;
      end
      if (fire) begin
        bit_cnt <= bit_cnt + 1'b1;
        unique case (phase)
          DATA: begin
            sr <= {sr[MMS_FRAME_BITS-2:0], 1'b0};
            if (bit_cnt == 5'(MMS_FRAME_BITS - 1)) begin
              bit_cnt <= '0;
              have    <= 1'b0;
              if (frm_cnt == 4'(FRAMES_PER_TRAFFIC - 1)) begin
                frm_cnt <= '0;
                phase   <= PAD;
              end else begin
                frm_cnt <= frm_cnt + 1'b1;
              end
            end
          end
          PAD:  if (bit_cnt == 5'(PAD_BITS - 1))  begin bit_cnt <= '0; phase <= CRC;  end
          CRC:  if (bit_cnt == 5'(CRC_BITS - 1))  begin bit_cnt <= '0; phase <= TAIL; end
          TAIL: if (bit_cnt == 5'(TAIL_BITS - 1)) begin bit_cnt <= '0; phase <= DATA; end
        endcase
      end
    end
  end
endmodule
