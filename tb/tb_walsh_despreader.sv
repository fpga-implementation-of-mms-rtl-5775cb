// tb_walsh_despreader -- two users on different Walsh codes plus bounded
// noise share the channel; the despreader for user A must return A's
// symbols, the exact correlation magnitude and the frame marker.
module tb_walsh_despreader;
  localparam int LEN = 64, NSYM = 60, CW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts
  logic [5:0] walsh_idx = 6'd21;
  logic signed [CW-1:0] chip_in;
  logic chip_valid, chip_sync;
  logic sym_valid, sym, sym_first;
  logic [14:0] sym_mag;
  logic sa [NSYM];
  int   exp_mag [NSYM];
  int   got = 0;

  walsh_despreader #(.LEN(LEN), .CHIP_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) begin
    if (sym_valid) begin
      checks += 3;
      if (sym !== sa[got]) begin failures++; $display("FAIL sym %0d", got); end
      if (int'(sym_mag) != exp_mag[got]) begin failures++; $display("FAIL mag %0d: %0d vs %0d", got, sym_mag, exp_mag[got]); end
      if (sym_first !== (got % 20 == 0)) begin failures++; $display("FAIL first %0d", got); end
      got <= got + 1;
    end
  end

  initial begin
    chip_valid = 0; chip_sync = 0; chip_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NSYM; s++) begin
      automatic logic sb = 1'($urandom);
      automatic int acc = 0;
      sa[s] = 1'($urandom);
      for (int c = 0; c < LEN; c++) begin
        automatic int a  = (sa[s] ^ (^(walsh_idx & 6'(c)))) ? -30 : 30;
        automatic int b  = (sb ^ (^(6'd50 & 6'(c)))) ? -25 : 25;
        automatic int nz = int'($urandom_range(0, 20)) - 10;
        automatic int v  = a + b + nz;
        acc += (^(walsh_idx & 6'(c))) ? -v : v;
        // idle cycles between chips now and then
        if ($urandom_range(0, 7) == 0) begin chip_valid = 0; @(negedge clk); end
        chip_in = CW'(v);
        chip_valid = 1;
        chip_sync = (c == 0) && (s % 20 == 0);
        @(negedge clk);
      end
      exp_mag[s] = acc < 0 ? -acc : acc;
    end
    chip_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != NSYM) begin failures++; $display("FAIL count %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
