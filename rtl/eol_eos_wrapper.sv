// eol_eos_wrapper: generates the end-of-line and end-of-stream flags the DWT
// expects, for a source that delivers bare pixel pairs.
//
// Two counters follow the pairs that are accepted downstream: the column
// counter raises eol on pair width/2 - 1 of every row, and the row counter
// raises eos together with eol on the last row, after which both restart for
// the next frame. The image size is set at run time through cfg_width (pixels,
// even) and cfg_height (rows); it must not change while a frame is in flight.
// The original design mentions such an external wrapper, driven by static or
// run-time image dimensions, without describing it; this counter pair is this
// design's version of it.
//
// Interface: valid/ready pass straight through (no added latency); the flags
// are combinational functions of the counters.
module eol_eos_wrapper
  import dwt97m_pkg::*;
#(
  parameter int DIM_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIM_W-1:0] cfg_width,
  input  logic [DIM_W-1:0] cfg_height,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_x_even,
  input  logic [PIX_W-1:0] in_x_odd,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [PIX_W-1:0] out_x_even,
  output logic [PIX_W-1:0] out_x_odd,
  output logic             out_eol,
  output logic             out_eos
);

  logic [DIM_W-1:0] col, row;
  logic             last_col, last_row;

  assign last_col   = (col == (cfg_width >> 1) - DIM_W'(1));
  assign last_row   = (row == cfg_height - DIM_W'(1));
  assign out_valid  = in_valid;
  assign in_ready   = out_ready;
  assign out_x_even = in_x_even;
  assign out_x_odd  = in_x_odd;
  assign out_eol    = last_col;
  assign out_eos    = last_col && last_row;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else if (out_valid && out_ready) begin
      if (!last_col) begin
        col <= col + DIM_W'(1);
      end else begin
        col <= '0;
        row <= last_row ? '0 : row + DIM_W'(1);
      end
    end
  end

endmodule
