// v_feeder_tb: self-checking test of the Vertical Feeder. Frames of several
// sizes (row length 3..16, 6..14 rows) and random samples are sent with
// random source gaps and sink stalls. Every tuple (step j, column c) is
// compared with the taps of column c of the symmetrically extended frame, and
// left_mirror/eol/eos are checked. The last frame runs without gaps or stalls
// and must take exactly (2N+4)*w cycles for 2N rows of w samples.
module v_feeder_tb;
  import dwt97m_pkg::*;
  import dwt97m_ref_pkg::*;

  localparam int DEPTH = 16;
  localparam int NF = 4;
  localparam int FW[NF] = '{8, 3, 16, 11};
  localparam int FH[NF] = '{10, 6, 14, 8};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  sample_t in_data;
  tuple_t  out_data;
  int checks = 0, failures = 0;

  v_feeder #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  img_t frames[NF];
  bit   stall_ok = 1, measure = 0;
  int   ef = 0, ej = 0, ec = 0;
  int   cyc = 0, t_start = -1, t_end = -1;

  function automatic int tap(int f, int c, int r);
    img_t col;
    for (int y = 0; y < FH[f]; y++) col.push_back(frames[f][y*FW[f] + c]);
    return sym(col, r);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (in_valid && in_ready && measure && t_start < 0) t_start = cyc;
    out_ready <= !stall_ok || ($urandom_range(0, 3) != 0);
    if (rst_n && out_valid && out_ready) begin
      automatic int n = FH[ef] / 2;
      automatic bit last_c = (ec == FW[ef] - 1);
      checks++;
      if (out_data.x4  !== coef_t'(tap(ef, ec, 2*ej+4)) ||
          out_data.x2  !== coef_t'(tap(ef, ec, 2*ej+2)) ||
          out_data.x0  !== coef_t'(tap(ef, ec, 2*ej))   ||
          out_data.xm2 !== coef_t'(tap(ef, ec, 2*ej-2)) ||
          out_data.x1  !== coef_t'(tap(ef, ec, 2*ej+1)) ||
          out_data.left_mirror !== (ej == 0) || out_data.eol !== last_c ||
          out_data.eos !== (last_c && ej == n-1)) begin
        failures++;
        $display("frame %0d step %0d col %0d: wrong tuple", ef, ej, ec);
      end
      if (!last_c) ec <= ec + 1;
      else begin
        ec <= 0;
        if (ej == n-1) begin
          ej <= 0;
          ef <= ef + 1;
          if (ef == NF-1) t_end = cyc;
        end else ej <= ej + 1;
      end
    end
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < FW[f]*FH[f]; i++)
        frames[f].push_back(int'($urandom_range(0, 20'hFFFFF)) - 20'h80000);
    in_valid = 0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      if (f == NF-1) stall_ok = 0;
      for (int i = 0; i < FW[f]*FH[f]; i++) begin
        while (stall_ok && $urandom_range(0, 4) == 0) begin
          @(negedge clk);
          in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1;
        if (f == NF-1) measure = 1;
        in_data = '{data: coef_t'(frames[f][i]), eol: ((i % FW[f]) == FW[f]-1),
                    eos: (i == FW[f]*FH[f]-1)};
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    wait (ef == NF);
    checks++;
    if (t_end - t_start != (FH[NF-1] + 4) * FW[NF-1]) begin
      failures++;
      $display("timing: %0d cycles, expected %0d", t_end - t_start, (FH[NF-1] + 4) * FW[NF-1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
