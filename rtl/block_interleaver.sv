// block_interleaver -- two-page rectangular block (de)interleaver.
//
// The memory holds two pages of ROWS x COLS symbols. While one page is
// filled from the input the other is read to the output (ping-pong), so a
// full page is one 20 ms frame and the stream is never stopped for long.
// Writing goes column by column (input symbol i lands in row i % ROWS,
// column i / ROWS) and reading goes row by row, so symbols that were
// adjacent at the input leave COLS positions apart at the
// output, which spreads a burst of channel errors over many code words.
// The same module with ROWS and COLS exchanged is the exact inverse and is
// used as the receive-side deinterleaver.
//
// Interface: valid/ready streams. in_first restarts the write position of
// the current page at 0 (frame alignment for the receiver). A page becomes
// readable once its last symbol is written; in_ready is low while both
// pages are full. out_first marks the first symbol read from a page.
// Reads are combinational from the page array (distributed RAM). Default
// 16 x 24 per page as the design specifies; of the two orders the
// description gives, column-wise write / row-wise read is the one used.
module block_interleaver #(
  parameter int unsigned ROWS = 16,
  parameter int unsigned COLS = 24,
  localparam int unsigned DEPTH = ROWS * COLS,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned CW    = $clog2(COLS)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_sym,
  input  logic in_first,
  output logic out_valid,
  input  logic out_ready,
  output logic out_sym,
  output logic out_first
);
  logic [DEPTH-1:0] mem [2];
  logic [1:0]       full;
  logic             wr_page, rd_page;
  logic [RW-1:0]    wr_row, row_use;
  logic [CW-1:0]    wr_col, col_use;
  logic [AW-1:0]    rd_addr;
  logic             wr_fire, wr_last;

  assign in_ready  = !full[wr_page];
  assign wr_fire   = in_valid && in_ready;
  assign row_use   = in_first ? '0 : wr_row;
  assign col_use   = in_first ? '0 : wr_col;
  assign wr_last   = (row_use == RW'(ROWS-1)) && (col_use == CW'(COLS-1));

  assign out_valid = full[rd_page];
  assign out_sym   = mem[rd_page][rd_addr];
  assign out_first = (rd_addr == '0);

  // stream rule: a symbol offered and not taken stays offered, unchanged
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_sym) && $stable(out_first));

  always_ff @(posedge clk) begin
    if (wr_fire) mem[wr_page][AW'(row_use) * AW'(COLS) + AW'(col_use)] <= in_sym;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= '0;
      wr_page <= 1'b0;
      rd_page <= 1'b0;
      wr_row  <= '0;
      wr_col  <= '0;
      rd_addr <= '0;
    end else begin
      if (wr_fire) begin
        if (wr_last) begin
          wr_row  <= '0;
          wr_col  <= '0;
          wr_page <= ~wr_page;
        end else if (row_use == RW'(ROWS-1)) begin
          wr_row <= '0;
          wr_col <= col_use + 1'b1;
        end else begin
          wr_row <= row_use + 1'b1;
          wr_col <= col_use;
        end
      end
      if (out_valid && out_ready) begin
        if (rd_addr == AW'(DEPTH-1)) begin
          rd_addr <= '0;
          rd_page <= ~rd_page;
        end else begin
          rd_addr <= rd_addr + 1'b1;
        end
      end
      // page status: set by the write side, cleared by the read side
      for (int p = 0; p < 2; p++) begin
        if (wr_fire && wr_last && (wr_page == 1'(p)))
          full[p] <= 1'b1;
        else if (out_valid && out_ready && rd_addr == AW'(DEPTH-1) && (rd_page == 1'(p)))
          full[p] <= 1'b0;
      end
    end
  end
endmodule
