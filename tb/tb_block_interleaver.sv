// tb_block_interleaver -- a 16x24 interleaver feeding a 24x16
// deinterleaver. Checks the interleaver's output order (input symbol
// c*16 + r appears at output position r*24 + c), that the chain restores
// the input order, that a second page is written while the first is read
// (ping-pong), that in_ready drops when both pages are full, and that
// in_first drops a partial page and starts a new one.
module tb_block_interleaver;
  localparam int R = 16, C = 24, D = R * C, NPG = 4, PART = 100, TOTAL = (NPG + 1) * D + PART;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge so that the asynchronous reset acts

  logic syms [TOTAL];
  int   sent = 0, mid = 0, got = 0;
  logic in_valid = 0, in_ready, in_first;
  logic m_valid, m_ready, m_sym, m_first;
  logic o_valid, o_ready, o_sym, o_first;
  logic ready_en = 1'b0;
  int   full_stalls = 0, overlap = 0;

  block_interleaver #(.ROWS(R), .COLS(C)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_sym(syms[sent % TOTAL]), .in_first,
    .out_valid(m_valid), .out_ready(m_ready), .out_sym(m_sym), .out_first(m_first));
  block_interleaver #(.ROWS(C), .COLS(R)) deil (
    .clk, .rst_n, .in_valid(m_valid && m_ready), .in_ready(), .in_sym(m_sym), .in_first(m_first),
    .out_valid(o_valid), .out_ready(o_ready), .out_sym(o_sym), .out_first(o_first));

  // pages start every D symbols; after NPG pages a partial page of PART
  // symbols is cut short by a new in_first
  assign in_first = (sent < NPG*D + PART) ? (sent % D == 0) : (sent == NPG*D + PART);
  assign m_ready  = ready_en;
  assign o_ready  = 1'b1;

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(negedge clk) in_valid <= rst_n && sent < TOTAL && $urandom_range(0, 4) != 0;

  always_ff @(posedge clk) begin
    if (in_valid && !in_ready) full_stalls <= full_stalls + 1;
    if (in_valid && in_ready) begin
      sent <= sent + 1;
      if (m_valid) overlap <= overlap + 1;   // writing while a page is readable
    end
    if (m_valid && m_ready) begin
      automatic int pg = mid / D, j = mid % D;
      automatic int src = (pg < NPG ? pg*D : NPG*D + PART) + (j % C) * R + (j / C);
      checks += 2;
      if (m_sym !== syms[src]) begin failures++; $display("FAIL il pos %0d", mid); end
      if (m_first !== (j == 0)) begin failures++; $display("FAIL il first %0d", mid); end
      mid <= mid + 1;
    end
    if (o_valid && o_ready) begin
      checks += 2;
      if (o_sym !== syms[got < NPG*D ? got : got + PART]) begin failures++; $display("FAIL deil pos %0d", got); end
      if (o_first !== (got % D == 0)) begin failures++; $display("FAIL deil first %0d", got); end
      got <= got + 1;
    end
  end

  initial begin
    for (int i = 0; i < TOTAL; i++) syms[i] = 1'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reader held off: both pages fill, then the writer must stall
    wait (sent == 2*D);
    repeat (50) @(negedge clk);
    checks++;
    if (in_ready !== 1'b0 || full_stalls == 0) begin failures++; $display("FAIL no stall with both pages full"); end
    ready_en = 1'b1;
    wait (got == (NPG + 1) * D);
    repeat (5) @(negedge clk);
    checks += 2;
    if (overlap == 0) begin failures++; $display("FAIL pages never overlapped"); end
    if (mid != (NPG + 1) * D) begin failures++; $display("FAIL %0d symbols read, partial page not dropped", mid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
