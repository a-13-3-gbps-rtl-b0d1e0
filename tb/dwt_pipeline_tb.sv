// dwt_pipeline_tb: self-checking test of the 9/7M arithmetic pipeline in both
// of its configurations: a horizontal one (one-register D delay, 1D rows of
// 6..24 samples) and a vertical one (row-FIFO D delay of 16 words, frames of
// 16, 5 and 9 columns). Each is driven by a pipeline_check instance.
module dwt_pipeline_tb;
  logic clk = 1'b0;
  bit done_h, done_v;
  int checks_h, checks_v, fail_h, fail_v, checks, failures;

  always #5 clk = ~clk;

  pipeline_check #(.DEPTH(1), .HORIZ(1), .NF(4), .FW('{1, 1, 1, 1}), .FH('{6, 24, 12, 8}))
    u_h (.clk, .done(done_h), .checks(checks_h), .failures(fail_h));
  pipeline_check #(.DEPTH(16), .HORIZ(0), .NF(3), .FW('{16, 5, 9, 1}), .FH('{10, 6, 14, 6}))
    u_v (.clk, .done(done_v), .checks(checks_v), .failures(fail_v));

  initial begin
    fork
      begin
        wait (done_h && done_v);
        failures = fail_h + fail_v;
      end
      begin
        repeat (100000) @(posedge clk);
        failures = fail_h + fail_v + 1;
      end
    join_any
    checks = checks_h + checks_v;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
