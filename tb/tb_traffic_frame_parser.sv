// tb_traffic_frame_parser -- decoded traffic frames (168 data bits, 4 pad,
// CRC-12) built with the reference CRC; the parser must release the 12 MMS
// frames in order with crc_ok set, and with crc_ok clear when one bit of
// the frame was corrupted.
module tb_traffic_frame_parser;
  import cdma_pkg::*;
  import tb_ref_pkg::*;
  localparam int NTF = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts

  logic in_valid = 0, in_ready, in_bit = 0, in_first = 0, in_last = 0;
  logic out_valid, out_crc_ok;
  mms_frame_t out_frame;
  logic [13:0] frames [NTF*12];
  logic        bad [NTF] = '{0, 1, 0, 1};
  int got = 0;

  traffic_frame_parser dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) begin
    if (out_valid) begin
      checks += 2;
      if (out_frame !== frames[got]) begin failures++; $display("FAIL frame %0d", got); end
      if (out_crc_ok !== !bad[got / 12]) begin failures++; $display("FAIL crc flag frame %0d", got / 12); end
      got <= got + 1;
    end
  end

  initial begin
    automatic logic msg [] = new[172];
    automatic logic stream [184];
    for (int i = 0; i < NTF*12; i++) frames[i] = 14'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NTF; t++) begin
      automatic logic [11:0] c;
      for (int i = 0; i < 168; i++) msg[i] = frames[t*12 + i/14][13 - i%14];
      for (int i = 168; i < 172; i++) msg[i] = 1'b0;
      c = crc12_ref(msg, 172);
      for (int i = 0; i < 172; i++) stream[i] = msg[i];
      for (int i = 0; i < 12; i++) stream[172 + i] = c[11 - i];
      if (bad[t]) begin                       // a data or CRC bit hit
        automatic int pos = 100 + 24 * t;
        stream[pos] ^= 1'b1;
        if (pos < 168) frames[t*12 + pos/14][13 - pos%14] ^= 1'b1;
      end
      for (int i = 0; i < 184; i++) begin
        in_valid = 1; in_bit = stream[i]; in_first = (i == 0); in_last = (i == 183);
        @(negedge clk);
        while (!in_ready) @(negedge clk);
      end
      in_valid = 0;
      repeat (20) @(negedge clk);
    end
    checks++;
    if (got != NTF*12) begin failures++; $display("FAIL got %0d frames", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
