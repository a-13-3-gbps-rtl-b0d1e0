// eol_eos_wrapper_tb: self-checking test of the EOL/EOS generator. Three
// frames of different configured sizes pass with random source gaps and sink
// stalls; every pair must come out unchanged, with eol exactly on the last
// pair of each row and eos exactly on the last pair of each frame.
module eol_eos_wrapper_tb;
  import dwt97m_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] cfg_width, cfg_height;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [PIX_W-1:0] in_x_even, in_x_odd, out_x_even, out_x_odd;
  logic out_eol, out_eos;
  int checks = 0, failures = 0;
  int col = 0, row = 0;

  eol_eos_wrapper dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_x_even !== 16'(row * 1000 + 2*col) || out_x_odd !== 16'(row * 1000 + 2*col + 1) ||
          out_eol !== (2*col == cfg_width - 2) ||
          out_eos !== (2*col == cfg_width - 2 && row == cfg_height - 1)) begin
        failures++;
        $display("row %0d pair %0d wrong", row, col);
      end
      if (2*col == cfg_width - 2) begin
        col = 0;
        row = (row == cfg_height - 1) ? 0 : row + 1;
      end else col++;
    end
  end

  initial begin
    in_valid = 0;
    in_x_even = 0;
    in_x_odd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (dims[f]) begin
      cfg_width = 16'(dims[f][0]);
      cfg_height = 16'(dims[f][1]);
      for (int y = 0; y < dims[f][1]; y++)
        for (int x = 0; x < dims[f][0]; x += 2) begin
          while ($urandom_range(0, 3) == 0) begin
            @(negedge clk);
            in_valid = 0;
          end
          @(negedge clk);
          in_valid = 1;
          in_x_even = 16'(y * 1000 + x);
          in_x_odd = 16'(y * 1000 + x + 1);
          while (!in_ready) @(negedge clk);
          @(posedge clk);
        end
      @(negedge clk);
      in_valid = 0;
      repeat (2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dims[3][2] = '{'{24, 8}, '{64, 3}, '{10, 12}};
endmodule
