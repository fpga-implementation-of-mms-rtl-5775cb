// tb_crc_gen -- random messages of traffic-frame length: the CRC must match
// polynomial long division, and running the register over message + CRC
// must leave zero (the receiver's check).
module tb_crc_gen;
  import tb_ref_pkg::*;
  localparam int NMSG = 20, NB = 172;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts
  logic clear, en, din;
  logic [11:0] crc;
  logic msg [];

  crc_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [11:0] ref_crc;
    clear = 0; en = 0; din = 0;
    msg = new[NB];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < NMSG; m++) begin
      automatic int n = (m == 0) ? NB : int'($urandom_range(12, NB));
      for (int i = 0; i < n; i++) msg[i] = 1'($urandom);
      ref_crc = crc12_ref(msg, n);
      for (int i = 0; i < n; i++) begin
        en = 1; din = msg[i]; clear = (i == 0);
        @(negedge clk);
        if (m % 3 == 1 && i == 5) begin en = 0; clear = 0; @(negedge clk); end  // pause
      end
      en = 0; clear = 0;
      @(negedge clk);
      checks++;
      if (crc !== ref_crc) begin failures++; $display("FAIL msg %0d crc %h ref %h", m, crc, ref_crc); end
      for (int i = 0; i < 12; i++) begin en = 1; din = ref_crc[11 - i]; @(negedge clk); end
      en = 0;
      @(negedge clk);
      checks++;
      if (crc !== 12'h000) begin failures++; $display("FAIL residue %h", crc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
