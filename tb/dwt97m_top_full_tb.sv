// dwt97m_top_full_tb: one complete 4096 x 4096 frame through the DWT front
// end with every parameter at its default (MAX_WIDTH = 4096), the largest
// configuration of the architecture.
//
// A random 16-bit image is streamed with an always-valid source and
// always-ready sinks; all ten sub-bands are compared with the reference
// three-level transform. The cycles from the first accepted pixel pair to the
// last sub-band beat must equal W*H/2 + 2*H + 3.5*W + 77, the cycle-count
// model of the architecture plus this implementation's fill/drain latency
// of 77 cycles, and the achieved samples per cycle are printed.
module dwt97m_top_full_tb;
  import dwt97m_pkg::*;
  import dwt97m_ref_pkg::*;

  localparam int W = 4096, H = 4096, FILL = 77;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_gen_flags = 1'b0;
  logic [15:0] cfg_width = 16'(W), cfg_height = 16'(H);
  logic s_valid, s_ready, s_eol, s_eos;
  logic [PIX_W-1:0] s_x_even, s_x_odd;
  logic [NUM_SB-1:0] m_valid, m_ready, m_eol, m_eos;
  logic [NUM_SB-1:0][COEF_W-1:0] m_data;
  bit stall_en = 0;
  int checks, failures, stalls, beats;
  int cyc = 0, t_first = -1, cycles, expected;

  dwt97m_top dut (.*);
  subband_sinks u_sinks (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (9000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && s_valid && s_ready && t_first < 0) t_first = cyc;
  end

  img_t img;
  initial begin
    s_valid = 0;
    s_x_even = 0;
    s_x_odd = 0;
    s_eol = 0;
    s_eos = 0;
    for (int i = 0; i < W*H; i++) img.push_back(int'($urandom_range(0, 16'hFFFF)));
    u_sinks.expect_frame(img, W, H);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < W*H; i += 2) begin
      @(negedge clk);
      s_valid = 1;
      s_x_even = PIX_W'(img[i]);
      s_x_odd = PIX_W'(img[i+1]);
      s_eol = (i % W == W-2);
      s_eos = (i == W*H-2);
      while (!s_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    s_valid = 0;
    while (!u_sinks.all_empty()) @(posedge clk);
    cycles = u_sinks.last_beat() - t_first;
    expected = W*H/2 + 2*H + (7*W)/2 + FILL;
    $display("%0dx%0d: %0d cycles (expected %0d), %f samples/cycle",
             W, H, cycles, expected, real'(W*H) / real'(cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1,
             failures + int'(cycles != expected));
    $finish;
  end
endmodule
