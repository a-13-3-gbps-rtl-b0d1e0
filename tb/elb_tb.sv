// elb_tb: self-checking test of the elastic buffer. A source that holds each
// beat until it is taken and a sink with random ready exchange 2000 numbered
// beats; order and values are checked, then 200 beats with both sides always
// willing must pass in 201 cycles (full throughput, one cycle of latency).
module elb_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  int checks = 0, failures = 0;
  int sent = 0, got = 0, cycles = 0;
  bit phase2 = 0;

  elb #(.T(logic [15:0])) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_valid  <= 1'b0;
      in_data   <= '0;
      out_ready <= 1'b0;
    end else begin
      if (in_valid && in_ready) sent <= sent + 1;
      if (!in_valid || in_ready) begin
        in_valid <= (sent + int'(in_valid && in_ready) < (phase2 ? 2200 : 2000)) &&
                    (phase2 || ($urandom_range(0, 3) != 0));
        in_data  <= 16'(sent + int'(in_valid && in_ready)) * 16'd7;
      end
      out_ready <= phase2 || ($urandom_range(0, 2) != 0);
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== 16'(got) * 16'd7) begin
          failures++;
          $display("mismatch beat %0d: %h", got, out_data);
        end
        got <= got + 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (got == 2000);
    @(posedge clk);
    phase2 = 1;
    cycles = 0;
    while (got < 2200) begin
      @(posedge clk);
      cycles++;
    end
    checks++;
    if (cycles > 203) begin
      failures++;
      $display("throughput: 200 beats took %0d cycles", cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
