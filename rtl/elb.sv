// elb: two-entry elastic buffer placed between the sub-units of the DWT.
//
// It decouples a valid/ready producer from a valid/ready consumer while
// keeping full throughput: with one beat stored it can accept and deliver in
// the same cycle, and the second slot absorbs the beat that is in flight when
// the consumer stalls. Both in_ready and out_valid come straight from flops,
// so no combinational path crosses the buffer. The original design places
// such buffers between feeders and pipelines and names them Elastic Buffers;
// the two-slot organisation is this design's choice.
//
// Interface: a beat moves when valid and ready are both high at a rising
// clock edge. Reset (rst_n low, synchronous) empties the buffer.
// Timing: one cycle from in to out; one beat per cycle sustained.
module elb #(
  parameter type T = logic [7:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);

  T     slot [2];
  logic rd_ptr, wr_ptr;
  logic [1:0] count;

  logic push, pop;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign in_ready  = (count != 2'd2);
  assign out_valid = (count != 2'd0);
  assign out_data  = slot[rd_ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= 1'b0;
      wr_ptr <= 1'b0;
      count  <= 2'd0;
    end else begin
      if (push) begin
        slot[wr_ptr] <= in_data;
        wr_ptr       <= ~wr_ptr;
      end
      if (pop) rd_ptr <= ~rd_ptr;
      unique case ({push, pop})
        2'b10:   count <= count + 2'd1;
        2'b01:   count <= count - 2'd1;
        default: count <= count;
      endcase
    end
  end

  // A beat offered to the consumer stays offered, unchanged, until taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
