// dwt_pipeline: the arithmetic pipeline of one 9/7M integer lifting step,
// shared by the horizontal and the vertical DWT units.
//
// From a 5-tuple (x_{2j-2}, x_{2j}, x_{2j+1}, x_{2j+2}, x_{2j+4}) it computes
//   D_j = x_{2j+1} - ((9*(x_{2j}+x_{2j+2}) - (x_{2j-2}+x_{2j+4}) + 8) >>> 4)
//   C_j = x_{2j}   - ((2 - (D_{j-1}+D_j)) >>> 2)
// with arithmetic (flooring) shifts, which is the 9/7M prediction and update
// of the CCSDS recommendation written with 9 additions and 3 shifts. The work
// is split over eight stages exactly as the original datapath does it:
//   0: a = x_{2j+4}+x_{2j-2}, b = x_{2j+2}+x_{2j}   1: 9b = (b<<3)+b
//   2: 9b - a                                      3: (+8) >>> 4
//   4: D = x_{2j+1} - that                         5: D + D_{j-1}
//   6: (2 - sum) >>> 2                             7: C = x_{2j} - that
// D_{j-1} comes from a z^-w delay: a single register for a horizontal unit
// (DEPTH = 1) or a one-row memory for a vertical unit (DEPTH = row length),
// where the D of the same column one row earlier is the previous one. When
// left_mirror is set (the tuple of C_0) the mux of stage 5 takes D_0 itself,
// so C_0 = x_0 - ((2 - 2*D_0) >>> 2), the symmetric extension D_{-1} = D_0.
//
// The pipeline holds nine register ranks (the input rank and one after each
// of the eight stages) and stalls as a whole: it advances whenever its last
// rank is empty or being emptied. The C and D outputs are two streams; a
// result retires once both consumers have taken it (an eager fork), so each
// stream follows the valid/ready rules on its own. Internal sums are COEF_W+6
// bits wide so nothing overflows before the results are cut back to COEF_W.
// The stage split follows the original datapath; the stall scheme, the fork
// and the internal widths are this design's choices.
//
// Timing: a tuple accepted at a clock edge shows up on both outputs 8 cycles
// later when nothing stalls; one tuple per cycle sustained.
module dwt_pipeline
  import dwt97m_pkg::*;
#(
  parameter int DEPTH = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  tuple_t  in_data,
  output logic    c_valid,
  input  logic    c_ready,
  output sample_t c_data,
  output logic    d_valid,
  input  logic    d_ready,
  output sample_t d_data
);

  localparam int IW = COEF_W + 6;
  typedef logic signed [IW-1:0] wide_t;

  function automatic wide_t ext(input coef_t v);
    return wide_t'(v);
  endfunction

  // Valid and side-band flags of ranks 0..8 (left_mirror is used up in rank 5).
  logic [8:0] v, eol, eos;
  logic [5:0] lm;

  // Rank contents, named after the figure's wires.
  wide_t r0_x4, r0_x2, r0_x0, r0_xm2, r0_x1;
  wide_t r1_a, r1_b, r1_x0, r1_x1;
  wide_t r2_a, r2_b9, r2_x0, r2_x1;
  wide_t r3_p, r3_x0, r3_x1;
  wide_t r4_q, r4_x0, r4_x1;
  wide_t r5_d, r5_x0;
  wide_t r6_sum, r6_x0;
  wide_t r7_t, r7_x0;
  coef_t r6_d, r7_d;
  coef_t r8_c, r8_d;

  logic done_c, done_d, retire, adv;
  assign retire   = v[8] && (done_c || c_ready) && (done_d || d_ready);
  assign adv      = !v[8] || retire;
  assign in_ready = adv;

  assign c_valid = v[8] && !done_c;
  assign d_valid = v[8] && !done_d;
  assign c_data  = '{data: r8_c, eol: eol[8], eos: eos[8]};
  assign d_data  = '{data: r8_d, eol: eol[8], eos: eos[8]};

  // z^-w element: D of the previous step (horizontal) or of the same column
  // one row earlier (vertical). Written with each D that enters rank 6.
  wide_t d_prev, d_sel;
  logic  [COEF_W-1:0] d_prev_raw;
  row_fifo #(.W(COEF_W), .DEPTH(DEPTH)) u_zw (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift   (adv && v[5]),
    .row_end (eol[5]),
    .wr_data (coef_t'(r5_d)),
    .rd_data (d_prev_raw)
  );
  assign d_prev = ext(coef_t'(d_prev_raw));
  assign d_sel  = lm[5] ? r5_d : d_prev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v <= '0;
    end else if (adv) begin
      v <= {v[7:0], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done_c <= 1'b0;
      done_d <= 1'b0;
    end else if (retire) begin
      done_c <= 1'b0;
      done_d <= 1'b0;
    end else begin
      if (c_valid && c_ready) done_c <= 1'b1;
      if (d_valid && d_ready) done_d <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      lm  <= {lm[4:0],  in_data.left_mirror};
      eol <= {eol[7:0], in_data.eol};
      eos <= {eos[7:0], in_data.eos};
      // rank 0: input registers
      r0_x4  <= ext(in_data.x4);
      r0_x2  <= ext(in_data.x2);
      r0_x0  <= ext(in_data.x0);
      r0_xm2 <= ext(in_data.xm2);
      r0_x1  <= ext(in_data.x1);
      // stage 0: the two pair sums
      r1_a  <= r0_x4 + r0_xm2;
      r1_b  <= r0_x2 + r0_x0;
      r1_x0 <= r0_x0;
      r1_x1 <= r0_x1;
      // stage 1: 9*b as (b << 3) + b
      r2_a  <= r1_a;
      r2_b9 <= (r1_b <<< 3) + r1_b;
      r2_x0 <= r1_x0;
      r2_x1 <= r1_x1;
      // stage 2: 9*b - a
      r3_p  <= r2_b9 - r2_a;
      r3_x0 <= r2_x0;
      r3_x1 <= r2_x1;
      // stage 3: rounding offset and division by 16
      r4_q  <= (r3_p + wide_t'(8)) >>> 4;
      r4_x0 <= r3_x0;
      r4_x1 <= r3_x1;
      // stage 4: high-pass coefficient D_j
      r5_d  <= ext(coef_t'(r4_x1 - r4_q));
      r5_x0 <= r4_x0;
      // stage 5: D_{j-1} + D_j (D_0 + D_0 for the first step)
      r6_sum <= r5_d + d_sel;
      r6_d   <= coef_t'(r5_d);
      r6_x0  <= r5_x0;
      // stage 6: rounding offset and division by 4
      r7_t  <= (wide_t'(2) - r6_sum) >>> 2;
      r7_d  <= r6_d;
      r7_x0 <= r6_x0;
      // stage 7: low-pass coefficient C_j
      r8_c <= coef_t'(r7_x0 - r7_t);
      r8_d <= r7_d;
    end
  end

endmodule
