// frame_assembler -- builds the 14-bit MMS frame.
//
// The medium access layer places the 4-bit channel header, the 2-bit
// selector and the 4-bit data of user 1 and user 2, in that order from the
// most significant bit, into one frame: {header, selector, user1, user2}.
// The header is one of the five channel codes of cdma_pkg::hdr_e (REQ,
// ACK, communication 1-2, communication 2-1, closed); `hdr_ok` reports
// whether the header presented is one of them.
//
// Interface: valid/ready in and out, one output register (a frame is
// accepted whenever the register is empty or being emptied), so one frame
// per cycle and one cycle of latency. Field layout follows the design;
// the handshake is this design's choice.
module frame_assembler
  import cdma_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [HDR_BITS-1:0]  in_hdr,
  input  logic [SEL_BITS-1:0]  in_sel,
  input  logic [USER_BITS-1:0] in_user1,
  input  logic [USER_BITS-1:0] in_user2,
  output logic                 out_valid,
  input  logic                 out_ready,
  output mms_frame_t           out_frame,
  output logic                 hdr_ok
);
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_frame <= '0;
      hdr_ok    <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_frame <= '{hdr: in_hdr, sel: in_sel, user1: in_user1, user2: in_user2};
        hdr_ok    <= hdr_is_known(in_hdr);
      end
    end
  end
endmodule
