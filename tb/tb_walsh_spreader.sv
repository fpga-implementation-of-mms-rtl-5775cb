// tb_walsh_spreader -- feeds random symbols and checks every chip against
// symbol XOR parity(idx & chip), the frame marker, and that a continuous
// symbol supply gives back-to-back chips (64 cycles per symbol). A second
// phase toggles chip_en at random and checks that no chip appears in a
// cycle after chip_en was low.
module tb_walsh_spreader;
  localparam int LEN = 64, NSYM = 40, NSYM2 = 60;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts
  logic [5:0] walsh_idx = 6'd37;
  logic chip_en, chip_en_q = 0, in_valid, in_ready, in_sym, in_first;
  logic chip, chip_valid, chip_sync;
  logic syms [NSYM2];
  int lim = NSYM, en_low_chips = 0, sent = 0, got = 0, first_cycle = -1, last_cycle = -1, cyc = 0;

  walsh_spreader #(.LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign in_valid = rst_n && (sent < lim);
  assign in_sym   = syms[sent < NSYM2 ? sent : 0];
  assign in_first = (sent % 10) == 0;

  always_ff @(posedge clk) begin
    chip_en_q <= chip_en;
    cyc <= cyc + 1;
    if (in_valid && in_ready) sent <= sent + 1;
    if (chip_valid && !chip_en_q) en_low_chips <= en_low_chips + 1;
    if (chip_valid) begin
      automatic int s = got / LEN, c = got % LEN;
      automatic logic exp = syms[s] ^ (^(walsh_idx & 6'(c)));
      checks++;
      if (chip !== exp) begin failures++; $display("FAIL chip %0d sym %0d sent %0d", c, s, sent); end
      checks++;
      if (chip_sync !== (c == 0 && (s % 10) == 0)) begin failures++; $display("FAIL sync at %0d", got); end
      if (got == 0) first_cycle <= cyc;
      last_cycle <= cyc;
      got <= got + 1;
    end
  end

  initial begin
    for (int i = 0; i < NSYM2; i++) syms[i] = 1'($urandom);
    chip_en = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (got == NSYM * LEN);
    @(posedge clk);
    checks++;
    if (last_cycle - first_cycle != NSYM * LEN - 1) begin
      failures++; $display("FAIL rate: %0d cycles", last_cycle - first_cycle + 1);
    end
    // chip_en gating: chips only in cycles after chip_en was high
    lim = NSYM2;
    while (got < NSYM2 * LEN) begin
      chip_en = ($urandom_range(0, 2) == 0);
      @(negedge clk);
    end
    chip_en = 1'b0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (en_low_chips != 0) begin failures++; $display("FAIL %0d chips without chip_en", en_low_chips); end
    if (got != NSYM2 * LEN) begin failures++; $display("FAIL chip count %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
