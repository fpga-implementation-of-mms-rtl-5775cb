// crc_gen -- serial frame-quality CRC generator / checker.
//
// A W-bit linear feedback shift register that divides the bit stream by
// the generator polynomial POLY (x^W implicit). `clear` loads INIT (all
// ones, as in the IS-95 frame quality indicator); every cycle with `en`
// high shifts one message bit in, most significant bit first. After the
// message, `crc` holds the check bits to transmit, MSB first. The same
// module checks a received frame by running it over the message bits and
// comparing `crc` with the received check bits.
//
// Timing: `crc` is registered and reflects all bits shifted in up to the
// previous clock edge. `clear` together with `en` starts a new message
// with the bit presented (the register is taken as INIT for that shift). The 12-bit polynomial
// x^12+x^11+x^10+x^9+x^8+x^4+x+1 is the IS-95 one at 9600 bit/s; the
// design only names a CRC generator.
module crc_gen #(
  parameter int unsigned  W    = 12,
  parameter logic [W-1:0] POLY = 12'hF13,
  parameter logic [W-1:0] INIT = '1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic         din,
  output logic [W-1:0] crc
);
  logic [W-1:0] base;
  logic         fb;
  assign base = clear ? INIT : crc;
  assign fb   = din ^ base[W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             crc <= INIT;
    else if (en)            crc <= {base[W-2:0], 1'b0} ^ (fb ? POLY : '0);
    else if (clear)         crc <= INIT;
  end
endmodule
