// v_feeder: Vertical Feeder. Turns a stream of rows (one coefficient per
// cycle, raster order) into the column 5-tuples of the vertical lifting steps.
//
// Seven row FIFOs F0..F6 form a chain of row delays. Every step (one column
// of one row "push") writes a value into each FIFO and reads the value that
// FIFO took at the same column one push earlier. During push p the FIFO
// outputs are F_i = row p-1-i for i = 0..5, so F0, F2, F3, F4 are the taps
// x_{2j+4}, x_{2j+2}, x_{2j+1}, x_{2j} of step j when p = 2j+5, and F6 (fed
// from F5) gives x_{2j-2}. Tuples are emitted on odd pushes from p = 5 on, one
// per column. The symmetric extension of the 9/7M boundary filters is done by
// two multiplexers, as in the original feeder:
//   - top edge: during push 4, F6 is written from F1 (row 2) instead of F5,
//     so step 0 sees x_{-2} = x_2; the tuples of push 5 carry left_mirror;
//   - bottom edge: after the row flagged eos, four pushes without input
//     follow. The first writes F1 into F0 (x_{2N} = x_{2N-2}), the third
//     writes F5 into F0 (x_{2N+2} = x_{2N-4}); pushes two and four emit the
//     tuples of steps N-2 and N-1.
// A frame of 2N rows of w samples therefore takes (2N+4)*w steps and yields
// N rows of w tuples; the last tuple of each output row carries eol and the
// very last one eos. The row length w is taken from the eol flags at run time
// (at most DEPTH); frames need an even number of rows, at least six. The FIFO
// chain and its muxes follow the original feeder; the push sequencing is this
// design's reading of it.
//
// Interface: valid/ready on both sides; the tuple is registered.
module v_feeder
  import dwt97m_pkg::*;
#(
  parameter int DEPTH = 2048
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output tuple_t  out_data
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic          mirror;     // in the four input-less pushes after eos
  logic [1:0]    mr;         // which of the four
  logic [2:0]    p_sat;      // push index in the frame, saturating at 6
  logic          p_odd;      // push index parity
  logic [AW-1:0] col, wlen_m1;

  coef_t f_in [7];
  coef_t f_out[7];

  logic adv_ok, step, row_end, emit;
  assign adv_ok   = !out_valid || out_ready;
  assign in_ready = !mirror && adv_ok;
  assign step     = adv_ok && (mirror || in_valid);
  assign row_end  = mirror ? (col == wlen_m1) : in_data.eol;
  assign emit     = p_odd && (p_sat >= 3'd5);

  for (genvar i = 0; i < 7; i++) begin : g_fifo
    row_fifo #(.W(COEF_W), .DEPTH(DEPTH)) u_row (
      .clk     (clk),
      .rst_n   (rst_n),
      .shift   (step),
      .row_end (row_end),
      .wr_data (f_in[i]),
      .rd_data (f_out[i])
    );
  end

  always_comb begin
    // input multiplexer of F0
    if (!mirror)         f_in[0] = in_data.data;
    else if (mr == 2'd2) f_in[0] = f_out[5];   // x_{2N+2} = x_{2N-4}
    else                 f_in[0] = f_out[1];   // x_{2N}   = x_{2N-2}
    for (int i = 1; i < 6; i++) f_in[i] = f_out[i-1];
    // input multiplexer of F6
    f_in[6] = (p_sat == 3'd4) ? f_out[1] : f_out[5];   // x_{-2} = x_2
  end

  always_ff @(posedge clk) begin
    if (step && emit) begin
      out_data.x4          <= f_out[0];
      out_data.x2          <= f_out[2];
      out_data.x1          <= f_out[3];
      out_data.x0          <= f_out[4];
      out_data.xm2         <= f_out[6];
      out_data.left_mirror <= (p_sat == 3'd5);
      out_data.eol         <= row_end;
      out_data.eos         <= row_end && mirror && (mr == 2'd3);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mirror    <= 1'b0;
      mr        <= 2'd0;
      p_sat     <= 3'd0;
      p_odd     <= 1'b0;
      col       <= '0;
      wlen_m1   <= '0;
    end else begin
      if (step)           out_valid <= emit;
      else if (out_ready) out_valid <= 1'b0;
      if (step) begin
        if (!row_end) begin
          col <= col + AW'(1);
        end else begin
          col <= '0;
          if (!mirror) wlen_m1 <= col;
          if (!mirror && in_data.eos) begin
            mirror <= 1'b1;
            mr     <= 2'd0;
          end else if (mirror) begin
            mr <= mr + 2'd1;
            if (mr == 2'd3) mirror <= 1'b0;
          end
          if (mirror && mr == 2'd3) begin
            p_sat <= 3'd0;
            p_odd <= 1'b0;
          end else begin
            p_odd <= ~p_odd;
            if (p_sat != 3'd6) p_sat <= p_sat + 3'd1;
          end
        end
      end
    end
  end

endmodule
