// dwt2d_unit_tb: self-checking test of one 2D-DWT level (row FIFOs of 16
// words). Frames of 32x12, 12x6 and 20x16 random samples are sent as pairs
// with random source gaps while the four outputs stall at random; LL, LH, HL
// and HH are compared with the reference 2D level (all rows, then all
// columns of both horizontal outputs).
module dwt2d_unit_tb;
  import dwt97m_pkg::*;
  import dwt97m_ref_pkg::*;

  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready;
  pair_t in_data;
  logic [3:0] v, r;
  sample_t o[4];
  bit stall_en = 1;
  int ck[4], fl[4], n[4], st[4];
  int checks, failures;

  dwt2d_unit #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .ll_valid(v[0]), .ll_ready(r[0]), .ll_data(o[0]),
    .lh_valid(v[1]), .lh_ready(r[1]), .lh_data(o[1]),
    .hl_valid(v[2]), .hl_ready(r[2]), .hl_data(o[2]),
    .hh_valid(v[3]), .hh_ready(r[3]), .hh_data(o[3])
  );
  stream_sink u_ll (.clk, .rst_n, .stall_en, .valid(v[0]), .ready(r[0]), .data(o[0].data),
                    .eol(o[0].eol), .eos(o[0].eos), .checks(ck[0]), .failures(fl[0]), .count(n[0]), .stalls(st[0]));
  stream_sink u_lh (.clk, .rst_n, .stall_en, .valid(v[1]), .ready(r[1]), .data(o[1].data),
                    .eol(o[1].eol), .eos(o[1].eos), .checks(ck[1]), .failures(fl[1]), .count(n[1]), .stalls(st[1]));
  stream_sink u_hl (.clk, .rst_n, .stall_en, .valid(v[2]), .ready(r[2]), .data(o[2].data),
                    .eol(o[2].eol), .eos(o[2].eos), .checks(ck[2]), .failures(fl[2]), .count(n[2]), .stalls(st[2]));
  stream_sink u_hh (.clk, .rst_n, .stall_en, .valid(v[3]), .ready(r[3]), .data(o[3].data),
                    .eol(o[3].eol), .eos(o[3].eos), .checks(ck[3]), .failures(fl[3]), .count(n[3]), .stalls(st[3]));
  always #5 clk = ~clk;

  function automatic bit all_empty();
    return u_ll.empty() && u_lh.empty() && u_hl.empty() && u_hh.empty();
  endfunction

  task automatic report(input int extra);
    checks = 0;
    failures = extra;
    for (int i = 0; i < 4; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    report(1);
  end

  task automatic send_frame(input int w, input int h);
    img_t f, ll, lh, hl, hh;
    for (int i = 0; i < w*h; i++) f.push_back(int'($urandom_range(0, 16'hFFFF)));
    dwt2d(f, w, h, ll, lh, hl, hh);
    u_ll.expect_band(ll, w/2, h/2);
    u_lh.expect_band(lh, w/2, h/2);
    u_hl.expect_band(hl, w/2, h/2);
    u_hh.expect_band(hh, w/2, h/2);
    for (int i = 0; i < w*h; i += 2) begin
      while ($urandom_range(0, 4) == 0) begin
        @(negedge clk);
        in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1;
      in_data = '{x_even: coef_t'(f[i]), x_odd: coef_t'(f[i+1]),
                  eol: (i % w == w-2), eos: (i == w*h-2)};
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
    send_frame(32, 12);
    send_frame(12, 6);
    send_frame(20, 16);
    while (!all_empty()) @(posedge clk);
    repeat (5) @(posedge clk);
    report(0);
  end
endmodule
