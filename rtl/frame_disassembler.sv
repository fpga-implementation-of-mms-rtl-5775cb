// frame_disassembler -- splits a received 14-bit MMS frame into its fields.
//
// Receive-side counterpart of frame_assembler: header (bits 13:10),
// selector (9:8), user 1 data (7:4) and user 2 data (3:0). The header is
// also checked against the five channel codes: `hdr_known` is low for any
// other pattern, and `hdr` then carries the raw bits. The CRC verdict of
// the traffic frame the MMS frame came in travels alongside (crc_ok).
//
// Registered: outputs are valid one cycle after in_valid; no back-pressure.
module frame_disassembler
  import cdma_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  mms_frame_t            in_frame,
  input  logic                  in_crc_ok,
  output logic                  out_valid,
  output logic [HDR_BITS-1:0]   hdr,
  output logic                  hdr_known,
  output logic [SEL_BITS-1:0]   sel,
  output logic [USER_BITS-1:0]  user1,
  output logic [USER_BITS-1:0]  user2,
  output logic                  crc_ok
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      hdr       <= '0;
      hdr_known <= 1'b0;
      sel       <= '0;
      user1     <= '0;
      user2     <= '0;
      crc_ok    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hdr       <= in_frame.hdr;
        hdr_known <= hdr_is_known(in_frame.hdr);
        sel       <= in_frame.sel;
        user1     <= in_frame.user1;
        user2     <= in_frame.user2;
        crc_ok    <= in_crc_ok;
      end
    end
  end
endmodule
