// tb_vit_encoder_engine -- all 256 states x 2 input bits of the K=9 rate-1/2
// and rate-1/3 engines against direct convolution.
module tb_vit_encoder_engine;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] state;
  logic       in_bit;
  logic [7:0] ns2, ns3;
  logic [1:0] s2;
  logic [2:0] s3;

  vit_encoder_engine #(.K(9), .N(2)) dut2 (.state, .in_bit, .next_state(ns2), .syms(s2));
  vit_encoder_engine #(.K(9), .N(3), .GEN({9'o711, 9'o663, 9'o557})) dut3 (
    .state, .in_bit, .next_state(ns3), .syms(s3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic hist [9];
    for (int s = 0; s < 256; s++)
      for (int b = 0; b < 2; b++) begin
        state = 8'(s); in_bit = 1'(b);
        #1;
        // state bit 7 is the most recent earlier bit
        hist[0] = 1'(b);
        for (int t = 1; t < 9; t++) hist[t] = state[8 - t];
        checks += 7;
        if (s2[0] !== conv_sym(9'o753, hist, 9)) failures++;
        if (s2[1] !== conv_sym(9'o561, hist, 9)) failures++;
        if (s3[0] !== conv_sym(9'o557, hist, 9)) failures++;
        if (s3[1] !== conv_sym(9'o663, hist, 9)) failures++;
        if (s3[2] !== conv_sym(9'o711, hist, 9)) failures++;
        if (ns2 !== {1'(b), state[7:1]}) failures++;
        if (ns3 !== ns2) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
