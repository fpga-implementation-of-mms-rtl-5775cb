// tb_traffic_frame_builder -- three traffic frames of 12 random MMS frames
// each. Every 192-bit frame must be the 168 data bits MSB first, 4 zero pad
// bits, the CRC-12 of the 172 information bits (long-division reference)
// and 8 zero tail bits, with out_first on bit 0. With a ready sink and
// frames always offered, a traffic frame takes 192 cycles plus one
// load cycle per MMS frame.
module tb_traffic_frame_builder;
  import cdma_pkg::*;
  import tb_ref_pkg::*;
  localparam int NTF = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts

  logic in_valid, in_ready, out_valid, out_ready = 0, out_bit, out_first;
  mms_frame_t in_frame;
  logic [13:0] frames [NTF*12];
  logic        exp_bits [NTF*192];
  int sent = 0, got = 0, cyc = 0, c_start = 0;
  bit stall = 1;

  traffic_frame_builder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(negedge clk) begin
    out_ready <= !stall || $urandom_range(0, 3) != 0;
  end
  assign in_valid = rst_n && sent < NTF*12;
  assign in_frame = frames[sent % (NTF*12)];

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) sent <= sent + 1;
    if (out_valid && out_ready) begin
      checks += 2;
      if (out_bit !== exp_bits[got]) begin failures++; $display("FAIL bit %0d (pos %0d)", got, got % 192); end
      if (out_first !== (got % 192 == 0)) begin failures++; $display("FAIL first %0d", got); end
      if (got == 192) c_start <= cyc;
      if (got == 2*192) begin
        checks++;
        if (cyc - c_start != 192 + 12) begin failures++; $display("FAIL frame took %0d cycles", cyc - c_start); end
      end
      got <= got + 1;
    end
  end

  initial begin
    automatic logic msg [] = new[172];
    for (int i = 0; i < NTF*12; i++) frames[i] = 14'($urandom);
    for (int t = 0; t < NTF; t++) begin
      automatic logic [11:0] c;
      for (int i = 0; i < 168; i++) msg[i] = frames[t*12 + i/14][13 - i%14];
      for (int i = 168; i < 172; i++) msg[i] = 1'b0;
      c = crc12_ref(msg, 172);
      for (int i = 0; i < 172; i++) exp_bits[t*192 + i] = msg[i];
      for (int i = 0; i < 12; i++)  exp_bits[t*192 + 172 + i] = c[11 - i];
      for (int i = 0; i < 8; i++)   exp_bits[t*192 + 184 + i] = 1'b0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (got == 192);
    stall = 0;
    wait (got == NTF*192);
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
