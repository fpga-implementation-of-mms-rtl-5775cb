// tb_conv_encoder -- random bits with random stalls on both sides into the
// rate-1/2 (753/561) and rate-1/3 (557/663/711) K=9 encoders; every symbol
// is compared with a direct convolution of the input history. in_first
// every 50 bits must restart from the zero state. With no stalls the
// rate-1/2 encoder must sustain one symbol per cycle.
module tb_conv_encoder;
  import tb_ref_pkg::*;
  localparam int NBITS = 400;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts

  logic bits [NBITS];
  logic g2_ready, g2_ovalid, g2_sym, g2_ofirst;
  logic g3_ready, g3_ovalid, g3_sym, g3_ofirst;
  logic in_valid2 = 0, in_valid3 = 0, out_ready2 = 0, out_ready3 = 0;
  int   sent2 = 0, sent3 = 0, got2 = 0, got3 = 0;
  logic exp2 [2*NBITS];
  logic exp3 [3*NBITS];
  logic stall = 1'b1;
  int   cyc = 0, c_first = 0, c_last = 0;

  conv_encoder #(.K(9), .N(2)) dut2 (
    .clk, .rst_n, .in_valid(in_valid2), .in_ready(g2_ready), .in_bit(bits[sent2 % NBITS]),
    .in_first(sent2 % 50 == 0), .out_valid(g2_ovalid), .out_ready(out_ready2),
    .out_sym(g2_sym), .out_first(g2_ofirst));
  conv_encoder #(.K(9), .N(3), .GEN({9'o711, 9'o663, 9'o557})) dut3 (
    .clk, .rst_n, .in_valid(in_valid3), .in_ready(g3_ready), .in_bit(bits[sent3 % NBITS]),
    .in_first(sent3 % 50 == 0), .out_valid(g3_ovalid), .out_ready(out_ready3),
    .out_sym(g3_sym), .out_first(g3_ofirst));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(negedge clk) begin
    in_valid2  <= rst_n && sent2 < NBITS && (!stall || $urandom_range(0, 3) != 0);
    in_valid3  <= rst_n && sent3 < NBITS && (!stall || $urandom_range(0, 3) != 0);
    out_ready2 <= !stall || $urandom_range(0, 3) != 0;
    out_ready3 <= !stall || $urandom_range(0, 3) != 0;
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid2 && g2_ready) sent2 <= sent2 + 1;
    if (in_valid3 && g3_ready) sent3 <= sent3 + 1;
    if (g2_ovalid && out_ready2) begin
      checks += 2;
      if (g2_sym !== exp2[got2 % (2*NBITS)]) begin failures++; $display("FAIL r2 sym %0d", got2); end
      if (g2_ofirst !== (got2 % 100 == 0)) begin failures++; $display("FAIL r2 first %0d", got2); end
      if (got2 % (2*NBITS) == 0) c_first <= cyc;
      c_last <= cyc;
      got2 <= got2 + 1;
    end
    if (g3_ovalid && out_ready3) begin
      checks += 2;
      if (g3_sym !== exp3[got3 % (3*NBITS)]) begin failures++; $display("FAIL r3 sym %0d", got3); end
      if (g3_ofirst !== (got3 % 150 == 0)) begin failures++; $display("FAIL r3 first %0d", got3); end
      got3 <= got3 + 1;
    end
  end

  initial begin
    automatic logic hist [9];
    for (int i = 0; i < NBITS; i++) bits[i] = 1'($urandom);
    for (int i = 0; i < NBITS; i++) begin
      if (i % 50 == 0) for (int t = 0; t < 9; t++) hist[t] = 1'b0;
      for (int t = 8; t > 0; t--) hist[t] = hist[t-1];
      hist[0] = bits[i];
      exp2[2*i]   = conv_sym(9'o753, hist, 9);
      exp2[2*i+1] = conv_sym(9'o561, hist, 9);
      exp3[3*i]   = conv_sym(9'o557, hist, 9);
      exp3[3*i+1] = conv_sym(9'o663, hist, 9);
      exp3[3*i+2] = conv_sym(9'o711, hist, 9);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (got2 == 2*NBITS && got3 == 3*NBITS);
    // second pass without stalls: throughput check
    @(negedge clk);
    stall = 1'b0;
    sent2 = 0; sent3 = 0;
    wait (got2 == 4*NBITS && got3 == 6*NBITS);
    checks++;
    if (c_last - c_first != 2*NBITS - 1) begin
      failures++; $display("FAIL rate: %0d cycles for %0d symbols", c_last - c_first + 1, 2*NBITS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
