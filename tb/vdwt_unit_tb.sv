// vdwt_unit_tb: self-checking test of the Vertical DWT unit (row FIFOs of 16
// words). Frames of several sizes (w = 16, 5, 9, 12; 6..14 rows) are sent in
// raster order with random source gaps while both outputs stall at random;
// C and D are compared with the reference 1D transform of every column. The
// last frame runs without gaps or stalls: from the first to the last low-pass
// output of a frame of 2N rows, (2N-1)*w - 1 cycles pass (one output row per
// two input rows, the last two during the bottom mirroring).
module vdwt_unit_tb;
  import dwt97m_pkg::*;
  import dwt97m_ref_pkg::*;

  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, c_valid, c_ready, d_valid, d_ready;
  sample_t in_data, c_data, d_data;
  bit stall_en = 1;
  int checks, failures;
  int ck_c, ck_d, fl_c, fl_d, n_c, n_d, st_c, st_d;

  vdwt_unit #(.DEPTH(DEPTH)) dut (.*);
  stream_sink u_c (.clk, .rst_n, .stall_en, .valid(c_valid), .ready(c_ready), .data(c_data.data),
                   .eol(c_data.eol), .eos(c_data.eos), .checks(ck_c), .failures(fl_c),
                   .count(n_c), .stalls(st_c));
  stream_sink u_d (.clk, .rst_n, .stall_en, .valid(d_valid), .ready(d_ready), .data(d_data.data),
                   .eol(d_data.eol), .eos(d_data.eos), .checks(ck_d), .failures(fl_d),
                   .count(n_d), .stalls(st_d));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", ck_c + ck_d, fl_c + fl_d + 1);
    $finish;
  end

  task automatic send_frame(input int w, input int h, input bit gaps);
    img_t f, lo, hi;
    for (int i = 0; i < w*h; i++) f.push_back(int'($urandom_range(0, 20'h3FFFF)) - 20'h20000);
    lift_cols(f, w, h, lo, hi);
    u_c.expect_band(lo, w, h/2);
    u_d.expect_band(hi, w, h/2);
    for (int i = 0; i < w*h; i++) begin
      while (gaps && $urandom_range(0, 4) == 0) begin
        @(negedge clk);
        in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1;
      in_data = '{data: coef_t'(f[i]), eol: (i % w == w-1), eos: (i == w*h-1)};
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0;
    in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_frame(16, 10, 1);
    send_frame(5, 6, 1);
    send_frame(9, 14, 1);
    while (!(u_c.empty() && u_d.empty())) @(posedge clk);
    repeat (20) @(posedge clk);
    stall_en = 0;
    u_c.t_first = -1;
    send_frame(12, 12, 0);
    while (!(u_c.empty() && u_d.empty())) @(posedge clk);
    repeat (2) @(posedge clk);
    checks = ck_c + ck_d + 1;
    failures = fl_c + fl_d;
    if (u_c.t_last - u_c.t_first != 11 * 12 - 1) begin
      failures++;
      $display("rate: %0d cycles from first to last output", u_c.t_last - u_c.t_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
