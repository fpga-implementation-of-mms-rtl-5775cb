// cdma_pkg -- types and constants shared by the MMS-over-CDMA transceiver.
//
// The 14-bit MMS frame layout (4-bit channel header, 2-bit selector, two
// 4-bit user data fields) and the five header codes follow the frame
// assembler description of the design. The IS-95B traffic-frame numbers used
// by the rest of the chain (172 information bits, 12-bit frame quality CRC,
// 8 tail bits, 64-chip Walsh codes, K=9 generator polynomials) are taken from
// the IS-95 air interface, since the design builds on it and its 16x24
// interleaver page (384 symbols = 192 bits at rate 1/2) matches those sizes.
package cdma_pkg;

  // ---------------- MMS frame ----------------
  localparam int unsigned MMS_FRAME_BITS = 14;
  localparam int unsigned HDR_BITS       = 4;
  localparam int unsigned SEL_BITS       = 2;
  localparam int unsigned USER_BITS      = 4;

  typedef enum logic [3:0] {
    HDR_REQ    = 4'b0011,   // connection request
    HDR_ACK    = 4'b1100,   // acknowledge
    HDR_COMM12 = 4'b1010,   // communication, user 1 to user 2
    HDR_COMM21 = 4'b0101,   // communication, user 2 to user 1
    HDR_CLOSED = 4'b0111    // channel closed
  } hdr_e;

  typedef struct packed {
    logic [HDR_BITS-1:0]  hdr;
    logic [SEL_BITS-1:0]  sel;
    logic [USER_BITS-1:0] user1;
    logic [USER_BITS-1:0] user2;
  } mms_frame_t;

  // True for the five header codes the channel defines.
  function automatic logic hdr_is_known(logic [3:0] h);
    return (h == HDR_REQ) || (h == HDR_ACK) || (h == HDR_COMM12) ||
           (h == HDR_COMM21) || (h == HDR_CLOSED);
  endfunction

  // ---------------- traffic frame (9600 bit/s, 20 ms) ----------------
  localparam int unsigned FRAMES_PER_TRAFFIC = 12;                       // MMS frames per 20 ms frame
  localparam int unsigned INFO_BITS  = 172;                              // 12*14 + 4 pad
  localparam int unsigned PAD_BITS   = INFO_BITS - FRAMES_PER_TRAFFIC*MMS_FRAME_BITS;
  localparam int unsigned CRC_BITS   = 12;
  localparam int unsigned TAIL_BITS  = 8;
  localparam int unsigned FRAME_BITS = INFO_BITS + CRC_BITS + TAIL_BITS; // 192

  // Frame-quality CRC: g(x) = x^12+x^11+x^10+x^9+x^8+x^4+x+1 (x^12 implicit)
  localparam logic [11:0] CRC12_POLY = 12'hF13;

  // ---------------- convolutional code ----------------
  // Generator taps, bit K-1 = current input, bit 0 = oldest bit.
  localparam logic [8:0] G_R2_0 = 9'o753;
  localparam logic [8:0] G_R2_1 = 9'o561;
  localparam logic [8:0] G_R3_0 = 9'o557;
  localparam logic [8:0] G_R3_1 = 9'o663;
  localparam logic [8:0] G_R3_2 = 9'o711;

  // ---------------- spreading ----------------
  localparam int unsigned WALSH_LEN = 64;

endpackage
