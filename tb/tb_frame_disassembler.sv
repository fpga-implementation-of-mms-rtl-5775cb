// tb_frame_disassembler -- random 14-bit frames: fields, header-code check
// and CRC flag must come out one cycle later.
module tb_frame_disassembler;
  import cdma_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts

  logic in_valid = 0, in_crc_ok = 0;
  mms_frame_t in_frame = '0;
  logic out_valid, hdr_known, crc_ok;
  logic [3:0] hdr, user1, user2;
  logic [1:0] sel;

  frame_disassembler dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      automatic logic [13:0] w = 14'($urandom);
      automatic logic v = 1'($urandom);
      automatic logic c = 1'($urandom);
      automatic int h;
      if (n % 3 == 0) w[13:10] = (n % 2) ? 4'b1010 : 4'b0111;
      in_valid = v; in_frame = w; in_crc_ok = c;
      @(negedge clk);
      h = int'(w[13:10]);
      checks++;
      if (out_valid !== v) failures++;
      if (v) begin
        checks += 6;
        if (hdr !== w[13:10]) failures++;
        if (sel !== w[9:8]) failures++;
        if (user1 !== w[7:4]) failures++;
        if (user2 !== w[3:0]) failures++;
        if (crc_ok !== c) failures++;
        if (hdr_known !== (h == 3 || h == 12 || h == 10 || h == 5 || h == 7)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
