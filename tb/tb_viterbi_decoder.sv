// tb_viterbi_decoder -- frames of 184 random bits plus 8 zero tail bits are
// encoded by a reference encoder (rate 1/2 753/561 and rate 1/3
// 557/663/711, K=9), some code symbols are inverted, and the decoders must
// return the 184 bits exactly. Checks out_first/out_last framing and the
// timing: the first decoded bit is valid the cycle after the last symbol,
// and a frame drains in 184 cycles.
module tb_viterbi_decoder;
  import tb_ref_pkg::*;
  localparam int L = 192, NOUT = L - 8, NFR = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts

  logic bits [NFR][L];
  logic sy2 [NFR][2*L];
  logic sy3 [NFR][3*L];
  int   errs_injected = 0;

  logic v2_in_valid = 0, v2_in_sym = 0, v2_in_first = 0, v2_ready;
  logic v2_out_valid, v2_bit, v2_first, v2_last;
  logic v3_in_valid = 0, v3_in_sym = 0, v3_in_first = 0, v3_ready;
  logic v3_out_valid, v3_bit, v3_first, v3_last;

  viterbi_decoder #(.K(9), .N(2), .L(L)) dut2 (
    .clk, .rst_n, .in_valid(v2_in_valid), .in_ready(v2_ready), .in_sym(v2_in_sym),
    .in_first(v2_in_first), .out_valid(v2_out_valid), .out_ready(1'b1), .out_bit(v2_bit),
    .out_first(v2_first), .out_last(v2_last));
  viterbi_decoder #(.K(9), .N(3), .GEN({9'o711, 9'o663, 9'o557}), .L(L)) dut3 (
    .clk, .rst_n, .in_valid(v3_in_valid), .in_ready(v3_ready), .in_sym(v3_in_sym),
    .in_first(v3_in_first), .out_valid(v3_out_valid), .out_ready(1'b1), .out_bit(v3_bit),
    .out_first(v3_first), .out_last(v3_last));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fr2 = 0, ob2 = 0, fr3 = 0, ob3 = 0;
  int cyc = 0, last_in2 = 0, first_out2 = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (v2_in_valid && v2_ready) last_in2 <= cyc;
    if (v2_out_valid) begin
      checks += 3;
      if (v2_bit !== bits[fr2][ob2]) begin failures++; $display("FAIL r2 frame %0d bit %0d", fr2, ob2); end
      if (v2_first !== (ob2 == 0)) failures++;
      if (v2_last !== (ob2 == NOUT - 1)) failures++;
      if (ob2 == 0) begin
        first_out2 <= cyc;
        checks++;
        if (cyc != last_in2 + 1) begin failures++; $display("FAIL latency %0d", cyc - last_in2); end
      end
      if (ob2 == NOUT - 1) begin
        checks++;
        if (cyc - first_out2 != NOUT - 1) failures++;
        fr2 <= fr2 + 1; ob2 <= 0;
      end else ob2 <= ob2 + 1;
    end
    if (v3_out_valid) begin
      checks += 3;
      if (v3_bit !== bits[fr3][ob3]) begin failures++; $display("FAIL r3 frame %0d bit %0d", fr3, ob3); end
      if (v3_first !== (ob3 == 0)) failures++;
      if (v3_last !== (ob3 == NOUT - 1)) failures++;
      if (ob3 == NOUT - 1) begin fr3 <= fr3 + 1; ob3 <= 0; end else ob3 <= ob3 + 1;
    end
  end

  task automatic feed2(input int f);
    for (int i = 0; i < 2*L; i++) begin
      if ($urandom_range(0, 5) == 0) begin v2_in_valid = 0; @(negedge clk); end
      v2_in_valid = 1; v2_in_sym = sy2[f][i]; v2_in_first = (i == 0);
      @(negedge clk);
      while (!v2_ready) @(negedge clk);
    end
    v2_in_valid = 0;
  endtask

  task automatic feed3(input int f);
    for (int i = 0; i < 3*L; i++) begin
      v3_in_valid = 1; v3_in_sym = sy3[f][i]; v3_in_first = (i == 0);
      @(negedge clk);
      while (!v3_ready) @(negedge clk);
    end
    v3_in_valid = 0;
  endtask

  initial begin
    automatic logic hist [9];
    for (int f = 0; f < NFR; f++) begin
      for (int i = 0; i < L; i++) bits[f][i] = (i < NOUT) ? 1'($urandom) : 1'b0;
      for (int t = 0; t < 9; t++) hist[t] = 1'b0;
      for (int i = 0; i < L; i++) begin
        for (int t = 8; t > 0; t--) hist[t] = hist[t-1];
        hist[0] = bits[f][i];
        sy2[f][2*i]   = conv_sym(9'o753, hist, 9);
        sy2[f][2*i+1] = conv_sym(9'o561, hist, 9);
        sy3[f][3*i]   = conv_sym(9'o557, hist, 9);
        sy3[f][3*i+1] = conv_sym(9'o663, hist, 9);
        sy3[f][3*i+2] = conv_sym(9'o711, hist, 9);
      end
      // channel errors: none in frame 0, scattered ones afterwards
      if (f > 0) for (int e = 0; e < 6 * f; e++) begin
        sy2[f][(e * 61 + 7 * f) % (2*L)] ^= 1'b1;
        sy3[f][(e * 89 + 5 * f) % (3*L)] ^= 1'b1;
        errs_injected++;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      for (int f = 0; f < NFR; f++) begin feed2(f); wait (ob2 == 0 && v2_ready); @(negedge clk); end
      for (int f = 0; f < NFR; f++) begin feed3(f); wait (ob3 == 0 && v3_ready); @(negedge clk); end
    join
    repeat (NOUT + 5) @(negedge clk);
    checks += 2;
    if (fr2 != NFR) begin failures++; $display("FAIL r2 frames %0d", fr2); end
    if (fr3 != NFR) begin failures++; $display("FAIL r3 frames %0d", fr3); end
    $display("corrected %0d injected symbol errors per decoder", errs_injected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
