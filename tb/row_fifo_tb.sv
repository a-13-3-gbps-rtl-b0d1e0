// row_fifo_tb: self-checking test of the row FIFO. A stream of random words
// is written in rows of a run-time length (changing between row groups, up
// to DEPTH) with random idle cycles; every word read must equal the word
// written at the same column one row earlier.
module row_fifo_tb;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic shift, row_end;
  logic [19:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  logic [19:0] prev_row[DEPTH];
  bit have_prev;
  int len, col;

  row_fifo #(.W(20), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0;
    row_end = 0;
    wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 8; g++) begin
      len = (g == 0) ? DEPTH : $urandom_range(1, DEPTH);
      have_prev = 0;
      for (int r = 0; r < 6; r++) begin
        for (col = 0; col < len; col++) begin
          while ($urandom_range(0, 3) == 0) begin
            @(negedge clk);
            shift = 0;
          end
          @(negedge clk);
          shift = 1;
          row_end = (col == len - 1);
          wr_data = 20'($urandom);
          if (have_prev) begin
            checks++;
            if (rd_data !== prev_row[col]) begin
              failures++;
              $display("group %0d row %0d col %0d: got %h exp %h", g, r, col, rd_data, prev_row[col]);
            end
          end
          prev_row[col] = wr_data;
          @(posedge clk);
        end
        have_prev = 1;
      end
    end
    @(negedge clk);
    shift = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
