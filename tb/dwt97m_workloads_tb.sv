// dwt97m_workloads_tb: the image sizes used to characterise the architecture,
// run through the DWT front end with every parameter at its default.
//
// Frames, back to back, each with an always-valid source and always-ready
// sinks: a 288 x 248 full-scale checkerboard (pixels 0 and 65535, a pattern
// meant to drive the high-pass sub-bands towards their largest values), then
// random 16-bit images of 512 x 512, 1024 x 1024 and 2048 x 2048 pixels.
// Every sub-band coefficient is checked against the reference transform, the
// cycle count of each frame must be W*H/2 + 2*H + 3.5*W + 77, and the samples
// per cycle are printed.
module dwt97m_workloads_tb;
  import dwt97m_pkg::*;
  import dwt97m_ref_pkg::*;

  localparam int FILL = 77;
  localparam int NF = 4;
  localparam int FW[NF] = '{288, 512, 1024, 2048};
  localparam int FH[NF] = '{248, 512, 1024, 2048};

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_gen_flags = 1'b0;
  logic [15:0] cfg_width = '0, cfg_height = '0;
  logic s_valid, s_ready, s_eol, s_eos;
  logic [PIX_W-1:0] s_x_even, s_x_odd;
  logic [NUM_SB-1:0] m_valid, m_ready, m_eol, m_eos;
  logic [NUM_SB-1:0][COEF_W-1:0] m_data;
  bit stall_en = 0;
  int checks, failures, stalls, beats;
  int cyc = 0, t_first = -1, extra_checks = 0, extra_failures = 0;

  dwt97m_top dut (.*);
  subband_sinks u_sinks (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks,
             failures + extra_failures + 1);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && s_valid && s_ready && t_first < 0) t_first = cyc;
  end

  initial begin
    img_t img;
    int w, h, cycles, expected;
    s_valid = 0;
    s_x_even = 0;
    s_x_odd = 0;
    s_eol = 0;
    s_eos = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      w = FW[f];
      h = FH[f];
      img.delete();
      for (int i = 0; i < w*h; i++)
        img.push_back(f == 0 ? ((((i / w) + (i % w)) % 2 == 1) ? 65535 : 0)
                             : int'($urandom_range(0, 16'hFFFF)));
      u_sinks.expect_frame(img, w, h);
      repeat (10) @(posedge clk);
      t_first = -1;
      for (int i = 0; i < w*h; i += 2) begin
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
      while (!u_sinks.all_empty()) @(posedge clk);
      cycles = u_sinks.last_beat() - t_first;
      expected = w*h/2 + 2*h + (7*w)/2 + FILL;
      $display("%0dx%0d: %0d cycles (expected %0d), %f samples/cycle",
               w, h, cycles, expected, real'(w*h) / real'(cycles));
      extra_checks++;
      if (cycles != expected) extra_failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks,
             failures + extra_failures);
    $finish;
  end
endmodule
