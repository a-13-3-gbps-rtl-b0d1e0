// h_feeder: Horizontal Feeder. Turns a row arriving as (x_even, x_odd) pairs
// into the 5-tuples of the horizontal lifting steps.
//
// The even samples run through four slice registers r0..r3 and the odd
// samples through three, o0..o2. Once pair m of a row has been loaded,
// r0 = x_{2m}, r1 = x_{2m-2}, r2 = x_{2m-4}, r3 = x_{2m-6} and o2 = x_{2m-3},
// which is the tuple of step j = m-2 (x_{2j+4}, x_{2j+2}, x_{2j}, x_{2j-2},
// x_{2j+1}). Two multiplexers apply the symmetric extension of the 9/7M
// boundary filters:
//   - left edge: while pair 2 is loaded, r3 takes r0 (x_2) instead of r2, so
//     the tuple of step 0 uses x_{-2} = x_2; that tuple carries left_mirror;
//   - right edge: after the pair flagged eol, two extra shifts without input
//     feed r0 back into r0 (x_{2N} = x_{2N-2}) and then r2 into r0
//     (x_{2N+2} = x_{2N-4}), giving the tuples of steps N-2 and N-1.
// A row of N pairs thus takes N+2 cycles and yields N tuples; the first two
// pairs of a row yield none. The tuple of step N-1 carries eol, and also eos
// when the row's last pair carried eos. Rows need N >= 3 pairs (at least six
// samples). The register chain and both muxes follow the original feeder; the
// control sequence is this design's reading of it.
//
// Interface: valid/ready on both sides. The tuple is registered; the chain
// advances when no tuple is held or the held one is being taken.
module h_feeder
  import dwt97m_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  pair_t  in_data,
  output logic   out_valid,
  input  logic   out_ready,
  output tuple_t out_data
);

  typedef enum logic [1:0] {LOAD, FLUSH1, FLUSH2} state_e;

  state_e     state;
  logic [1:0] m;            // pairs loaded in this row, saturating at 3
  logic       eos_pending;  // the row being flushed is the last one
  coef_t      r0, r1, r2, r3, o0, o1, o2;
  logic       out_lm, out_eol, out_eos;

  logic adv_ok, take, shift;
  assign adv_ok   = !out_valid || out_ready;
  assign in_ready = (state == LOAD) && adv_ok;
  assign take     = in_valid && in_ready;
  assign shift    = take || ((state != LOAD) && adv_ok);

  assign out_data = '{xm2: r3, x0: r2, x1: o2, x2: r1, x4: r0,
                      left_mirror: out_lm, eol: out_eol, eos: out_eos};

  // Even-sample chain with the two mirroring multiplexers.
  always_ff @(posedge clk) begin
    if (shift) begin
      unique case (state)
        LOAD:    r0 <= in_data.x_even;
        FLUSH1:  r0 <= r0;   // x_{2N}   = x_{2N-2}
        default: r0 <= r2;   // x_{2N+2} = x_{2N-4}
      endcase
      r1 <= r0;
      r2 <= r1;
      r3 <= (state == LOAD && m == 2'd2) ? r0 : r2;   // x_{-2} = x_2
      o0 <= in_data.x_odd;
      o1 <= o0;
      o2 <= o1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= LOAD;
      m           <= 2'd0;
      eos_pending <= 1'b0;
      out_valid   <= 1'b0;
      out_lm      <= 1'b0;
      out_eol     <= 1'b0;
      out_eos     <= 1'b0;
    end else if (shift) begin
      unique case (state)
        LOAD: begin
          out_valid <= (m >= 2'd2);
          out_lm    <= (m == 2'd2);
          out_eol   <= 1'b0;
          out_eos   <= 1'b0;
          if (in_data.eol) begin
            state       <= FLUSH1;
            eos_pending <= in_data.eos;
            m           <= 2'd0;
          end else if (m != 2'd3) begin
            m <= m + 2'd1;
          end
        end
        FLUSH1: begin
          out_valid <= 1'b1;
          out_lm    <= 1'b0;
          out_eol   <= 1'b0;
          out_eos   <= 1'b0;
          state     <= FLUSH2;
        end
        default: begin
          out_valid <= 1'b1;
          out_lm    <= 1'b0;
          out_eol   <= 1'b1;
          out_eos   <= eos_pending;
          state     <= LOAD;
        end
      endcase
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

endmodule
