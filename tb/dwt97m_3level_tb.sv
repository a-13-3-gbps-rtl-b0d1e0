// dwt97m_3level_tb: self-checking test of the three-level DWT core at
// MAX_WIDTH = 64. Random 16-bit images of 48x32, 24x24, 64x40 and 32x24
// pixels are sent back to back with random source gaps while all ten
// sub-band streams stall at random; every sub-band is compared with the
// reference three-level transform. The widths change from frame to frame, so
// the run-time row length of every unit is exercised too.
module dwt97m_3level_tb;
  import dwt97m_pkg::*;
  import dwt97m_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s_valid, s_ready, s_eol, s_eos;
  logic [PIX_W-1:0] s_x_even, s_x_odd;
  logic [NUM_SB-1:0] m_valid, m_ready, m_eol, m_eos;
  logic [NUM_SB-1:0][COEF_W-1:0] m_data;
  bit stall_en = 1;
  int checks, failures, stalls, beats;

  dwt97m_3level #(.MAX_WIDTH(64)) dut (.*);
  subband_sinks u_sinks (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic send_frame(input int w, input int h);
    img_t img;
    for (int i = 0; i < w*h; i++) img.push_back(int'($urandom_range(0, 16'hFFFF)));
    u_sinks.expect_frame(img, w, h);
    for (int i = 0; i < w*h; i += 2) begin
      while ($urandom_range(0, 5) == 0) begin
        @(negedge clk);
        s_valid = 0;
      end
      @(negedge clk);
      s_valid = 1;
      s_x_even = PIX_W'(img[i]);
      s_x_odd = PIX_W'(img[i+1]);
      s_eol = (i % w == w-2);
      s_eos = (i == w*h-2);
      while (!s_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    s_valid = 0;
  endtask

  initial begin
    s_valid = 0;
    s_x_even = 0;
    s_x_odd = 0;
    s_eol = 0;
    s_eos = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_frame(48, 32);
    send_frame(24, 24);
    send_frame(64, 40);
    send_frame(32, 24);
    while (!u_sinks.all_empty()) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
