// gearbox_fifo_tb: self-checking test of the 1:2 gearbox FIFO. Rows of even
// length (2..12) of random coefficients go in one per cycle with random gaps
// and the pair side stalls at random; every pair must hold two consecutive
// coefficients with the odd one's eol/eos. Then 400 coefficients go in with
// no gaps or stalls and must come out as 200 pairs, one every other cycle,
// without ever stalling the input.
module gearbox_fifo_tb;
  import dwt97m_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  sample_t in_data;
  pair_t   out_data;
  int checks = 0, failures = 0;
  bit stall_en = 1;
  int exp_q[$];
  bit eol_q[$], eos_q[$];
  int in_stalls = 0, pairs = 0;

  gearbox_fifo dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    out_ready <= !stall_en || ($urandom_range(0, 2) != 0);
    if (rst_n && !stall_en && in_valid && !in_ready) in_stalls++;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      pairs++;
      if (exp_q.size() < 2 ||
          out_data.x_even !== coef_t'(exp_q[0]) || out_data.x_odd !== coef_t'(exp_q[1]) ||
          out_data.eol !== eol_q[1] || out_data.eos !== eos_q[1]) begin
        failures++;
        $display("pair %0d wrong", pairs);
      end
      repeat (2) begin
        void'(exp_q.pop_front());
        void'(eol_q.pop_front());
        void'(eos_q.pop_front());
      end
    end
  end

  task automatic send(input int d, input bit eol, input bit eos, input bit gaps);
    while (gaps && $urandom_range(0, 3) == 0) begin
      @(negedge clk);
      in_valid = 0;
    end
    @(negedge clk);
    in_valid = 1;
    in_data = '{data: coef_t'(d), eol: eol, eos: eos};
    exp_q.push_back(d);
    eol_q.push_back(eol);
    eos_q.push_back(eos);
    while (!in_ready) @(negedge clk);
    @(posedge clk);
  endtask

  int t0, t1;
  initial begin
    in_valid = 0;
    in_data = '0;
    out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 50; r++) begin
      automatic int len = 2 * $urandom_range(1, 6);
      for (int i = 0; i < len; i++) send(int'($urandom) % 300000, i == len-1, r == 49 && i == len-1, 1);
    end
    @(negedge clk);
    in_valid = 0;
    while (exp_q.size() != 0) @(posedge clk);
    stall_en = 0;
    repeat (3) @(posedge clk);
    pairs = 0;
    t0 = $time;
    for (int i = 0; i < 400; i++) send(i * 3 - 500, (i % 20) == 19, i == 399, 0);
    @(negedge clk);
    in_valid = 0;
    while (exp_q.size() != 0) @(posedge clk);
    checks++;
    if (in_stalls != 0 || pairs != 200) begin
      failures++;
      $display("throughput: %0d input stalls, %0d pairs", in_stalls, pairs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
