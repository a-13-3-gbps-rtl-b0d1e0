// stream_sink: checking sink for one coefficient stream of the testbenches.
//
// The testbench pushes the expected coefficients with their eol/eos flags
// into exp_d/exp_eol/exp_eos. Each beat taken is compared with the head of
// those queues. ready is registered and random while stall_en is high and
// constantly high otherwise. The sink also records the cycle of its first
// and last beat and the number of cycles it held ready low while data was
// offered (the back-pressure it applied).
module stream_sink
  import dwt97m_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  bit    stall_en,
  input  logic  valid,
  output logic  ready,
  input  coef_t data,
  input  logic  eol,
  input  logic  eos,
  output int    checks,
  output int    failures,
  output int    count,
  output int    stalls
);

  int exp_d[$];
  bit exp_eol[$];
  bit exp_eos[$];
  int cyc = 0, t_first = -1, t_last = -1;

  initial begin
    checks = 0;
    failures = 0;
    count = 0;
    stalls = 0;
    ready = 1'b0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    ready <= !stall_en || ($urandom_range(0, 3) != 0);
    if (rst_n && valid && !ready) stalls++;
    if (rst_n && valid && ready) begin
      checks++;
      if (exp_d.size() == 0) begin
        failures++;
        $display("%m: unexpected beat %0d", data);
      end else begin
        if (data !== coef_t'(exp_d[0]) || eol !== exp_eol[0] || eos !== exp_eos[0]) begin
          failures++;
          if (failures < 10)
            $display("%m: beat %0d got %0d/%0b/%0b exp %0d/%0b/%0b", count, data, eol, eos,
                     exp_d[0], exp_eol[0], exp_eos[0]);
        end
        void'(exp_d.pop_front());
        void'(exp_eol.pop_front());
        void'(exp_eos.pop_front());
      end
      if (t_first < 0) t_first = cyc;
      t_last = cyc;
      count++;
    end
  end

  // Queue a w x h sub-band in raster order.
  function automatic void expect_band(const ref int band[$], input int w, input int h);
    for (int i = 0; i < w*h; i++) begin
      exp_d.push_back(band[i]);
      exp_eol.push_back((i % w) == w-1);
      exp_eos.push_back(i == w*h-1);
    end
  endfunction

  function automatic bit empty();
    return exp_d.size() == 0;
  endfunction

endmodule
