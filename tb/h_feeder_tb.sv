// h_feeder_tb: self-checking test of the Horizontal Feeder. Rows of random
// length (3..12 pairs) and random samples are sent with random source gaps
// and random sink stalls; every tuple is compared with the five taps of step
// j taken from the symmetrically extended row, and left_mirror/eol/eos are
// checked. A final stretch of rows with no gaps and no stalls must take
// exactly N+2 cycles per row of N pairs.
module h_feeder_tb;
  import dwt97m_pkg::*;
  import dwt97m_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  pair_t in_data;
  tuple_t out_data;
  int checks = 0, failures = 0;

  h_feeder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int ROWS = 60, FAST = 10;
  img_t rows[ROWS];
  bit   stall_ok = 1, measure = 0;
  int   exp_row = 0, exp_j = 0;
  int   cyc = 0, fast_start = -1, fast_end = -1, fast_pairs = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // sink
  always @(posedge clk) begin
    if (in_valid && in_ready && measure && fast_start < 0) fast_start = cyc;
    out_ready <= !stall_ok || ($urandom_range(0, 3) != 0);
    if (rst_n && out_valid && out_ready) begin
      automatic int n = rows[exp_row].size() / 2;
      automatic int j = exp_j;
      checks++;
      if (out_data.x4  !== coef_t'(sym(rows[exp_row], 2*j+4)) ||
          out_data.x2  !== coef_t'(sym(rows[exp_row], 2*j+2)) ||
          out_data.x0  !== coef_t'(sym(rows[exp_row], 2*j))   ||
          out_data.xm2 !== coef_t'(sym(rows[exp_row], 2*j-2)) ||
          out_data.x1  !== coef_t'(sym(rows[exp_row], 2*j+1)) ||
          out_data.left_mirror !== (j == 0) || out_data.eol !== (j == n-1) ||
          out_data.eos !== (j == n-1 && exp_row == ROWS-1)) begin
        failures++;
        $display("row %0d step %0d: got %0d %0d %0d %0d %0d lm%0d eol%0d eos%0d exp %0d %0d %0d %0d %0d", exp_row, j, out_data.x4, out_data.x2, out_data.x0, out_data.xm2, out_data.x1, out_data.left_mirror, out_data.eol, out_data.eos, sym(rows[exp_row], 2*j+4), sym(rows[exp_row], 2*j+2), sym(rows[exp_row], 2*j), sym(rows[exp_row], 2*j-2), sym(rows[exp_row], 2*j+1));
      end
      if (j == n-1) begin
        exp_row <= exp_row + 1;
        exp_j   <= 0;
        if (exp_row == ROWS-1) fast_end = cyc;
      end else exp_j <= j + 1;
    end
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      automatic int n = $urandom_range(3, 12);
      for (int i = 0; i < 2*n; i++) rows[r].push_back(int'($urandom_range(0, 20'hFFFFF)) - 20'h80000);
    end
    in_valid = 0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      automatic int n = rows[r].size() / 2;
      if (r == ROWS - FAST) begin
        stall_ok = 0;
      end
      if (r >= ROWS - FAST) fast_pairs += n;
      for (int i = 0; i < n; i++) begin
        while (stall_ok && $urandom_range(0, 4) == 0) begin
          @(negedge clk);
          in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1;
        if (r == ROWS - FAST) measure = 1;
        in_data  = '{x_even: coef_t'(rows[r][2*i]), x_odd: coef_t'(rows[r][2*i+1]),
                     eol: (i == n-1), eos: (i == n-1 && r == ROWS-1)};
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    wait (exp_row == ROWS);
    checks++;
    // FAST rows of N pairs each take N+2 cycles, the last tuple one cycle
    // after the last flush step
    if (fast_end - fast_start != fast_pairs + 2*FAST) begin
      failures++;
      $display("timing: %0d cycles for %0d pairs in %0d rows", fast_end - fast_start, fast_pairs, FAST);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
