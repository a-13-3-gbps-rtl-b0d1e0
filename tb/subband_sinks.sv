// subband_sinks: the ten checking sinks of the three-level DWT testbenches.
//
// expect_frame() runs the reference three-level transform of a W x H image
// (level 1 on the image, level 2 on LL1, level 3 on LL2) and queues every
// sub-band on the sink of its stream (index = dwt97m_pkg::subband_e). The
// module also reports the summed checks/failures/stalls, whether all queues
// have drained, and the last cycle any sub-band beat was taken.
module subband_sinks
  import dwt97m_pkg::*;
  import dwt97m_ref_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  bit                             stall_en,
  input  logic [NUM_SB-1:0]              m_valid,
  output logic [NUM_SB-1:0]              m_ready,
  input  logic [NUM_SB-1:0][COEF_W-1:0]  m_data,
  input  logic [NUM_SB-1:0]              m_eol,
  input  logic [NUM_SB-1:0]              m_eos,
  output int                             checks,
  output int                             failures,
  output int                             stalls,
  output int                             beats
);

  int ck[NUM_SB], fl[NUM_SB], n[NUM_SB], st[NUM_SB];

  for (genvar s = 0; s < NUM_SB; s++) begin : g_sink
    stream_sink u_s (.clk, .rst_n, .stall_en, .valid(m_valid[s]), .ready(m_ready[s]),
                     .data(m_data[s]), .eol(m_eol[s]), .eos(m_eos[s]),
                     .checks(ck[s]), .failures(fl[s]), .count(n[s]), .stalls(st[s]));
  end

  always_comb begin
    checks = 0;
    failures = 0;
    stalls = 0;
    beats = 0;
    for (int s = 0; s < NUM_SB; s++) begin
      checks += ck[s];
      failures += fl[s];
      stalls += st[s];
      beats += n[s];
    end
  end

  function automatic void expect_frame(const ref img_t img, input int w, input int h);
    img_t ll1, lh1, hl1, hh1, ll2, lh2, hl2, hh2, ll3, lh3, hl3, hh3;
    dwt2d(img, w, h, ll1, lh1, hl1, hh1);
    dwt2d(ll1, w/2, h/2, ll2, lh2, hl2, hh2);
    dwt2d(ll2, w/4, h/4, ll3, lh3, hl3, hh3);
    g_sink[SB_LL3].u_s.expect_band(ll3, w/8, h/8);
    g_sink[SB_HL3].u_s.expect_band(hl3, w/8, h/8);
    g_sink[SB_LH3].u_s.expect_band(lh3, w/8, h/8);
    g_sink[SB_HH3].u_s.expect_band(hh3, w/8, h/8);
    g_sink[SB_HL2].u_s.expect_band(hl2, w/4, h/4);
    g_sink[SB_LH2].u_s.expect_band(lh2, w/4, h/4);
    g_sink[SB_HH2].u_s.expect_band(hh2, w/4, h/4);
    g_sink[SB_HL1].u_s.expect_band(hl1, w/2, h/2);
    g_sink[SB_LH1].u_s.expect_band(lh1, w/2, h/2);
    g_sink[SB_HH1].u_s.expect_band(hh1, w/2, h/2);
  endfunction

  function automatic bit all_empty();
    return g_sink[0].u_s.empty() && g_sink[1].u_s.empty() && g_sink[2].u_s.empty() &&
           g_sink[3].u_s.empty() && g_sink[4].u_s.empty() && g_sink[5].u_s.empty() &&
           g_sink[6].u_s.empty() && g_sink[7].u_s.empty() && g_sink[8].u_s.empty() &&
           g_sink[9].u_s.empty();
  endfunction

  function automatic int last_beat();
    int t;
    t = g_sink[0].u_s.t_last;
    if (g_sink[1].u_s.t_last > t) t = g_sink[1].u_s.t_last;
    if (g_sink[2].u_s.t_last > t) t = g_sink[2].u_s.t_last;
    if (g_sink[3].u_s.t_last > t) t = g_sink[3].u_s.t_last;
    if (g_sink[4].u_s.t_last > t) t = g_sink[4].u_s.t_last;
    if (g_sink[5].u_s.t_last > t) t = g_sink[5].u_s.t_last;
    if (g_sink[6].u_s.t_last > t) t = g_sink[6].u_s.t_last;
    if (g_sink[7].u_s.t_last > t) t = g_sink[7].u_s.t_last;
    if (g_sink[8].u_s.t_last > t) t = g_sink[8].u_s.t_last;
    if (g_sink[9].u_s.t_last > t) t = g_sink[9].u_s.t_last;
    return t;
  endfunction

endmodule
