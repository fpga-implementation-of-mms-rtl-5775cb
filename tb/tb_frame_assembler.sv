// tb_frame_assembler -- random field values with random back-pressure; each
// output frame must be {header, selector, user1, user2} of the matching
// input, in order, with the header-code check right, and one frame per
// cycle must pass when the output is always ready.
module tb_frame_assembler;
  import cdma_pkg::*;
  localparam int NF = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts

  logic in_valid = 0, in_ready, out_valid, out_ready = 0, hdr_ok;
  logic [3:0] in_hdr = 0, in_user1 = 0, in_user2 = 0;
  logic [1:0] in_sel = 0;
  mms_frame_t out_frame;
  logic [13:0] sent_q [$];
  int sent = 0, got = 0, cyc = 0, c0 = 0, c1 = 0;
  logic [3:0] codes [5] = '{4'b0011, 4'b1100, 4'b1010, 4'b0101, 4'b0111};
  bit stall = 1;

  frame_assembler dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(negedge clk) begin
    if (!in_valid || in_ready) begin
      in_valid <= rst_n && sent < 2*NF && (!stall || $urandom_range(0, 3) != 0);
      in_hdr   <= ($urandom_range(0, 3) == 0) ? 4'($urandom) : codes[$urandom_range(0, 4)];
      in_sel   <= 2'($urandom);
      in_user1 <= 4'($urandom);
      in_user2 <= 4'($urandom);
    end
    out_ready <= !stall || $urandom_range(0, 2) != 0;
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin
      sent_q.push_back({in_hdr, in_sel, in_user1, in_user2});
      sent <= sent + 1;
    end
    if (out_valid && out_ready) begin
      automatic logic [13:0] e = sent_q.pop_front();
      automatic logic known = (e[13:10] == 4'b0011) || (e[13:10] == 4'b1100) ||
                              (e[13:10] == 4'b1010) || (e[13:10] == 4'b0101) || (e[13:10] == 4'b0111);
      checks += 5;
      if (out_frame.hdr   !== e[13:10]) failures++;
      if (out_frame.sel   !== e[9:8])   failures++;
      if (out_frame.user1 !== e[7:4])   failures++;
      if (out_frame.user2 !== e[3:0])   failures++;
      if (hdr_ok !== known) failures++;
      if (got == NF) c0 <= cyc;
      c1 <= cyc;
      got <= got + 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (got == NF);
    stall = 0;
    wait (got == 2*NF);
    checks++;
    if (c1 - c0 > NF + 2) begin failures++; $display("FAIL rate %0d", c1 - c0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
