// dwt97m_top_tb: end-to-end test of the complete DWT front end at
// MAX_WIDTH = 64.
//
// Phase 1 sends four random 16-bit images of different sizes, alternating
// between source-supplied flags and flags generated from cfg_width/height,
// with random source gaps while all ten outputs stall at random. Every
// sub-band is compared with the reference three-level transform.
// Phase 2 sends a 64x40 and then a 32x24 image with an always-valid source
// and always-ready sinks and measures, for each, the cycles from the first
// accepted pixel pair to the last sub-band beat. Their difference must equal
// that of W*H/2 + 2*H + 3.5*W, the cycle count model of the architecture
// (two mirroring cycles per level-1 row, four rows of vertical mirroring per
// level and frame); the constant remainder is the fill/drain latency.
// Every mechanism of the design is counted and must occur at least once:
// input back-pressure, output stalls, left and right mirroring in the
// horizontal and vertical feeders of each level, gearbox pairs, end of
// stream on every sub-band and both flag sources.
module dwt97m_top_tb;
  import dwt97m_pkg::*;
  import dwt97m_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_gen_flags;
  logic [15:0] cfg_width, cfg_height;
  logic s_valid, s_ready, s_eol, s_eos;
  logic [PIX_W-1:0] s_x_even, s_x_odd;
  logic [NUM_SB-1:0] m_valid, m_ready, m_eol, m_eos;
  logic [NUM_SB-1:0][COEF_W-1:0] m_data;
  bit stall_en = 1, gaps = 1;
  int checks, failures, stalls, beats;
  int extra_checks = 0, extra_failures = 0;

  dwt97m_top #(.MAX_WIDTH(64)) dut (.*);
  subband_sinks u_sinks (.*);
  always #5 clk = ~clk;

  // ---- mechanism counters ----
  int cyc = 0, t_first = -1;
  int n_backpressure = 0, n_gen_frames = 0, n_ext_frames = 0;
  int n_h_left[3], n_h_right[3], n_v_left[6], n_v_right[6], n_gear[2], n_eos[NUM_SB];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && s_valid && !s_ready) n_backpressure++;
    if (rst_n && s_valid && s_ready && t_first < 0) t_first = cyc;
    for (int s = 0; s < NUM_SB; s++) if (rst_n && m_valid[s] && m_ready[s] && m_eos[s]) n_eos[s]++;
  end

  for (genvar k = 0; k < 3; k++) begin : g_cnt
    always @(posedge clk) if (rst_n) begin
      if (dut.u_core.g_level[k].u_dwt2d.u_hdwt.u_feeder.out_valid &&
          dut.u_core.g_level[k].u_dwt2d.u_hdwt.u_feeder.out_ready) begin
        if (dut.u_core.g_level[k].u_dwt2d.u_hdwt.u_feeder.out_data.left_mirror) n_h_left[k]++;
        if (dut.u_core.g_level[k].u_dwt2d.u_hdwt.u_feeder.out_data.eol) n_h_right[k]++;
      end
      if (dut.u_core.g_level[k].u_dwt2d.u_vdwt_low.u_feeder.step &&
          dut.u_core.g_level[k].u_dwt2d.u_vdwt_low.u_feeder.mirror) n_v_right[2*k]++;
      if (dut.u_core.g_level[k].u_dwt2d.u_vdwt_high.u_feeder.step &&
          dut.u_core.g_level[k].u_dwt2d.u_vdwt_high.u_feeder.mirror) n_v_right[2*k+1]++;
      if (dut.u_core.g_level[k].u_dwt2d.u_vdwt_low.u_feeder.out_valid &&
          dut.u_core.g_level[k].u_dwt2d.u_vdwt_low.u_feeder.out_ready &&
          dut.u_core.g_level[k].u_dwt2d.u_vdwt_low.u_feeder.out_data.left_mirror) n_v_left[2*k]++;
      if (dut.u_core.g_level[k].u_dwt2d.u_vdwt_high.u_feeder.out_valid &&
          dut.u_core.g_level[k].u_dwt2d.u_vdwt_high.u_feeder.out_ready &&
          dut.u_core.g_level[k].u_dwt2d.u_vdwt_high.u_feeder.out_data.left_mirror) n_v_left[2*k+1]++;
    end
  end
  for (genvar k = 0; k < 2; k++) begin : g_gcnt
    always @(posedge clk)
      if (rst_n && dut.u_core.g_level[k].g_gearbox.u_gearbox.out_valid &&
          dut.u_core.g_level[k].g_gearbox.u_gearbox.out_ready) n_gear[k]++;
  end

  task automatic check(input bit ok, input string what);
    extra_checks++;
    if (!ok) begin
      extra_failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic finish(input int extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks,
             failures + extra_failures + extra);
    $finish;
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    finish(1);
  end

  task automatic send_frame(input int w, input int h, input bit gen);
    img_t img;
    for (int i = 0; i < w*h; i++) img.push_back(int'($urandom_range(0, 16'hFFFF)));
    u_sinks.expect_frame(img, w, h);
    @(negedge clk);
    cfg_gen_flags = gen;
    cfg_width = 16'(w);
    cfg_height = 16'(h);
    if (gen) n_gen_frames++;
    else n_ext_frames++;
    for (int i = 0; i < w*h; i += 2) begin
      while (gaps && $urandom_range(0, 5) == 0) begin
        @(negedge clk);
        s_valid = 0;
      end
      @(negedge clk);
      s_valid = 1;
      s_x_even = PIX_W'(img[i]);
      s_x_odd = PIX_W'(img[i+1]);
      // with generated flags the source's own flags are deliberately wrong
      s_eol = gen ? 1'b0 : (i % w == w-2);
      s_eos = gen ? 1'b1 : (i == w*h-2);
      while (!s_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    s_valid = 0;
  endtask

  function automatic int model_cycles(int w, int h);
    return w*h/2 + 2*h + (7*w)/2;
  endfunction

  int t_a, t_b;
  initial begin
    s_valid = 0;
    s_x_even = 0;
    s_x_odd = 0;
    s_eol = 0;
    s_eos = 0;
    cfg_gen_flags = 0;
    cfg_width = 0;
    cfg_height = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: mixed sizes, random gaps and stalls
    send_frame(48, 32, 0);
    send_frame(24, 24, 1);
    send_frame(64, 40, 0);
    send_frame(40, 32, 1);
    while (!u_sinks.all_empty()) @(posedge clk);
    repeat (50) @(posedge clk);
    // phase 2: full-rate frames for the cycle-count model
    stall_en = 0;
    gaps = 0;
    repeat (5) @(posedge clk);
    t_first = -1;
    send_frame(64, 40, 0);
    while (!u_sinks.all_empty()) @(posedge clk);
    t_a = u_sinks.last_beat() - t_first;
    repeat (50) @(posedge clk);
    t_first = -1;
    send_frame(32, 24, 1);
    while (!u_sinks.all_empty()) @(posedge clk);
    t_b = u_sinks.last_beat() - t_first;
    $display("64x40: %0d cycles (model %0d + %0d), 32x24: %0d cycles (model %0d + %0d)",
             t_a, model_cycles(64, 40), t_a - model_cycles(64, 40),
             t_b, model_cycles(32, 24), t_b - model_cycles(32, 24));
    check(t_a - t_b == model_cycles(64, 40) - model_cycles(32, 24), "cycle-count model");
    repeat (5) @(posedge clk);
    // mechanisms
    check(n_backpressure > 0, "input back-pressure");
    check(stalls > 0, "output stalls");
    check(n_gen_frames > 0 && n_ext_frames > 0, "both flag sources");
    for (int k = 0; k < 3; k++) begin
      check(n_h_left[k] > 0, $sformatf("level %0d horizontal left mirror", k+1));
      check(n_h_right[k] > 0, $sformatf("level %0d horizontal right mirror", k+1));
    end
    for (int u = 0; u < 6; u++) begin
      check(n_v_left[u] > 0, $sformatf("vertical unit %0d top mirror", u));
      check(n_v_right[u] > 0, $sformatf("vertical unit %0d bottom mirror", u));
    end
    check(n_gear[0] > 0 && n_gear[1] > 0, "gearbox pairs");
    for (int s = 0; s < NUM_SB; s++) check(n_eos[s] == 6, $sformatf("eos on sub-band %0d", s));
    $display("back-pressure %0d, output stalls %0d, h-left %0d/%0d/%0d, gearbox pairs %0d/%0d",
             n_backpressure, stalls, n_h_left[0], n_h_left[1], n_h_left[2], n_gear[0], n_gear[1]);
    finish(0);
  end
endmodule
