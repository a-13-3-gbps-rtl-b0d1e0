// row_fifo: one row of delay for a coefficient stream, the BlockRAM-based
// FIFO of the vertical units.
//
// The FIFO is a memory of DEPTH words addressed by a column pointer. On each
// cycle with shift high the word stored at the current column is presented on
// rd_data (it was written one row earlier) and wr_data replaces it; the pointer
// then advances, or returns to column 0 when row_end is high. The delay is
// therefore exactly one row of whatever length the stream uses at run time, up
// to DEPTH. The original design names these row FIFOs and sizes them to one
// row; building them as a pointer-addressed memory with an asynchronous read
// port is this design's choice (a registered-read BlockRAM would add one cycle
// of read-ahead to the address).
//
// Interface: rd_data is valid in the cycle shift is asserted. Contents are not
// reset; the users never read a column before writing it.
module row_fifo #(
  parameter int W     = 20,
  parameter int DEPTH = 2048
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         row_end,
  input  logic [W-1:0] wr_data,
  output logic [W-1:0] rd_data
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;

  assign rd_data = mem[ptr];

  always_ff @(posedge clk) begin
    if (shift) mem[ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                                  ptr <= '0;
    else if (shift && (row_end || DEPTH == 1))   ptr <= '0;
    else if (shift)                              ptr <= ptr + AW'(1);
  end

endmodule
