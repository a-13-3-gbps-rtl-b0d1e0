// hdwt_unit_tb: self-checking test of the Horizontal DWT unit. Rows of 6..32
// random samples are sent as pairs with random source gaps while both output
// streams stall at random; C and D are compared with the reference 1D 9/7M
// transform of each row. Then a batch of rows runs without gaps or stalls: the
// outputs of a row of N pairs must come every N+2 cycles (N coefficients,
// then the two mirroring cycles).
module hdwt_unit_tb;
  import dwt97m_pkg::*;
  import dwt97m_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, c_valid, c_ready, d_valid, d_ready;
  pair_t in_data;
  sample_t c_data, d_data;
  bit stall_en = 1;
  int checks, failures;
  int ck_c, ck_d, fl_c, fl_d, n_c, n_d, st_c, st_d;

  hdwt_unit dut (.*);
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

  task automatic send_rows(input int nrows, input bit gaps);
    img_t row, c, d;
    for (int r = 0; r < nrows; r++) begin
      automatic int n = $urandom_range(3, 16);
      row.delete();
      for (int i = 0; i < 2*n; i++) row.push_back(int'($urandom_range(0, 20'h3FFFF)) - 20'h20000);
      lift1d(row, c, d);
      for (int i = 0; i < n; i++) begin
        u_c.exp_d.push_back(c[i]); u_c.exp_eol.push_back(i == n-1); u_c.exp_eos.push_back(i == n-1 && r == nrows-1);
        u_d.exp_d.push_back(d[i]); u_d.exp_eol.push_back(i == n-1); u_d.exp_eos.push_back(i == n-1 && r == nrows-1);
      end
      total_pairs += n;
      for (int i = 0; i < n; i++) begin
        while (gaps && $urandom_range(0, 4) == 0) begin
          @(negedge clk);
          in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1;
        in_data = '{x_even: coef_t'(row[2*i]), x_odd: coef_t'(row[2*i+1]),
                    eol: (i == n-1), eos: (i == n-1 && r == nrows-1)};
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  int total_pairs = 0;
  localparam int FAST = 12;

  initial begin
    in_valid = 0;
    in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_rows(40, 1);
    while (!(u_c.empty() && u_d.empty())) @(posedge clk);
    repeat (20) @(posedge clk);
    stall_en = 0;
    total_pairs = 0;
    u_c.t_first = -1;
    send_rows(FAST, 0);
    while (!(u_c.empty() && u_d.empty())) @(posedge clk);
    repeat (2) @(posedge clk);
    checks = ck_c + ck_d + 1;
    failures = fl_c + fl_d;
    // first to last low-pass output of FAST rows: every row costs N+2
    // cycles, less the two mirroring cycles after the last row
    if (u_c.t_last - u_c.t_first != total_pairs + 2*FAST - 3) begin
      failures++;
      $display("rate: %0d cycles for %0d pairs in %0d rows", u_c.t_last - u_c.t_first, total_pairs, FAST);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
