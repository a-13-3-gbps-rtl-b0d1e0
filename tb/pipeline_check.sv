// pipeline_check: drives one dwt_pipeline instance for dwt_pipeline_tb.
//
// It sends NF frames of w columns x 2N rows as the tuple stream a feeder
// would produce (steps j in order, columns c within each step), with taps
// taken from the symmetrically extended columns. HORIZ selects the row-end
// flag of a horizontal unit (eol on step N-1 only, w = 1) or of a vertical
// unit (eol on the last column of each step). C and D are checked against the
// reference lifting of every column; their ready inputs stall independently at
// random. The first tuple after reset, with both sinks ready, must reach the
// outputs 8 cycles after the edge that accepted it, so a sink samples it at
// the ninth rising edge (LATENCY = 9 in that count).
module pipeline_check
  import dwt97m_pkg::*;
  import dwt97m_ref_pkg::*;
#(
  parameter int DEPTH = 1,
  parameter bit HORIZ = 1,
  parameter int NF = 3,
  parameter int FW[4] = '{1, 1, 1, 1},
  parameter int FH[4] = '{6, 20, 12, 8},
  parameter int LATENCY = 9
) (
  input  logic clk,
  output bit   done,
  output int   checks,
  output int   failures
);

  logic rst_n = 1'b0;
  logic in_valid, in_ready, c_valid, c_ready, d_valid, d_ready;
  tuple_t  in_data;
  sample_t c_data, d_data;

  dwt_pipeline #(.DEPTH(DEPTH)) dut (.*);

  img_t frames[NF], cref[NF], dref[NF];
  int   cf = 0, ci = 0, df = 0, di = 0, cyc = 0, t_acc = -1, t_out = -1;
  bit   stall_ok = 0;

  initial begin
    done = 0;
    checks = 0;
    failures = 0;
  end

  function automatic int tap(int f, int c, int r);
    img_t col;
    for (int y = 0; y < FH[f]; y++) col.push_back(frames[f][y*FW[f] + c]);
    return sym(col, r);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready && t_acc < 0) t_acc = cyc;
    if (rst_n && c_valid && t_out < 0) t_out = cyc;
    c_ready <= !stall_ok || ($urandom_range(0, 2) != 0);
    d_ready <= !stall_ok || ($urandom_range(0, 2) != 0);
    if (rst_n && c_valid && c_ready) begin
      checks++;
      if (c_data.data !== coef_t'(cref[cf][ci]) ||
          c_data.eol !== (HORIZ ? ci == FH[cf]/2-1 : ci % FW[cf] == FW[cf]-1) ||
          c_data.eos !== (ci == cref[cf].size()-1)) begin
        failures++;
        $display("C frame %0d #%0d: got %0d exp %0d", cf, ci, c_data.data, cref[cf][ci]);
      end
      if (ci == cref[cf].size()-1) begin ci <= 0; cf <= cf + 1; end
      else ci <= ci + 1;
    end
    if (rst_n && d_valid && d_ready) begin
      checks++;
      if (d_data.data !== coef_t'(dref[df][di]) || d_data.eos !== (di == dref[df].size()-1)) begin
        failures++;
        $display("D frame %0d #%0d: got %0d exp %0d", df, di, d_data.data, dref[df][di]);
      end
      if (di == dref[df].size()-1) begin di <= 0; df <= df + 1; end
      else di <= di + 1;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < FW[f]*FH[f]; i++)
        frames[f].push_back(int'($urandom_range(0, 20'h3FFFF)) - 20'h20000);
      lift_cols(frames[f], FW[f], FH[f], cref[f], dref[f]);
    end
    in_valid = 0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      for (int j = 0; j < FH[f]/2; j++) begin
        for (int c = 0; c < FW[f]; c++) begin
          while (stall_ok && $urandom_range(0, 4) == 0) begin
            @(negedge clk);
            in_valid = 0;
          end
          @(negedge clk);
          in_valid = 1;
          in_data = '{xm2: coef_t'(tap(f, c, 2*j-2)), x0: coef_t'(tap(f, c, 2*j)),
                      x1: coef_t'(tap(f, c, 2*j+1)), x2: coef_t'(tap(f, c, 2*j+2)),
                      x4: coef_t'(tap(f, c, 2*j+4)), left_mirror: (j == 0),
                      eol: HORIZ ? (j == FH[f]/2-1) : (c == FW[f]-1),
                      eos: (j == FH[f]/2-1 && c == FW[f]-1)};
          while (!in_ready) @(negedge clk);
          @(posedge clk);
          stall_ok = 1;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    wait (cf == NF && df == NF);
    checks++;
    if (t_out - t_acc != LATENCY) begin
      failures++;
      $display("latency %0d cycles, expected %0d", t_out - t_acc, LATENCY);
    end
    done = 1;
  end
endmodule
