// gearbox_fifo: asymmetric 1:2 decoupling FIFO between two 2D-DWT levels.
//
// It takes the LL stream of one level, one coefficient per cycle, and hands
// the next level (x_even, x_odd) pairs of consecutive coefficients. An even
// coefficient waits in a holding register; when its odd partner arrives the
// pair is written into a small FIFO of PAIRS entries, which is what decouples
// the two levels. eol/eos of a pair are those of its odd coefficient (rows
// have even length, so a row never ends on an even coefficient). The original
// design names this gearbox FIFO and its 1:2 ratio; the holding register, the
// circular pair FIFO and its depth of 4 are this design's choices.
//
// Interface: valid/ready on both sides. Timing: a pair can leave the cycle
// after its odd coefficient was accepted; one coefficient in per cycle and
// one pair out per cycle can be sustained.
module gearbox_fifo
  import dwt97m_pkg::*;
#(
  parameter int PAIRS = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output pair_t   out_data
);

  localparam int AW = (PAIRS > 1) ? $clog2(PAIRS) : 1;

  pair_t         mem [PAIRS];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          even_v;
  coef_t         even_d;

  logic full, push, pop;
  assign full      = (count == (AW+1)'(PAIRS));
  assign in_ready  = !even_v || !full;
  assign push      = in_valid && in_ready && even_v;
  assign pop       = out_valid && out_ready;
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(PAIRS - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= '{x_even: even_d, x_odd: in_data.data,
                               eol: in_data.eol, eos: in_data.eos};
    if (in_valid && in_ready && !even_v) even_d <= in_data.data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      even_v <= 1'b0;
    end else begin
      if (in_valid && in_ready) even_v <= !even_v;
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      unique case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
