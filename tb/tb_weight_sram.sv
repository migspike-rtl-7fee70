// tb_weight_sram: self-checking test of the dual-port weight memory.
//
// Writes a pseudo-random weight pattern (a hash of row and column) through
// the host port into a 64 x 32 instance, then reads whole rows through the
// spike port and single weights through the host port and compares them with
// the same hash, checking the one-cycle read latency of both ports.
module tb_weight_sram;
  localparam int ROWS = 64, COLS = 32;
  logic clk = 0;
  always #5 clk = ~clk;

  logic a_en, b_en, b_we;
  logic [5:0] a_row, b_row;
  logic [4:0] b_col;
  logic [7:0] b_wdata, b_rdata;
  logic [COLS-1:0][7:0] a_data;

  weight_sram #(.ROWS(ROWS), .COLS(COLS), .W_W(8)) dut (.*);

  int checks = 0, failures = 0;
  function automatic logic [7:0] pat(int r, int c);
    return 8'((r * 37) ^ (c * 11) ^ (r + c * 5 + 3));
  endfunction

  initial begin
    a_en = 0; b_en = 0; b_we = 0; a_row = 0; b_row = 0; b_col = 0; b_wdata = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        b_en = 1; b_we = 1; b_row = 6'(r); b_col = 5'(c); b_wdata = pat(r, c);
      end
    @(negedge clk);
    b_en = 0; b_we = 0;
    for (int k = 0; k < 200; k++) begin
      int r, r2, c2;
      r = $urandom_range(0, ROWS-1); r2 = $urandom_range(0, ROWS-1); c2 = $urandom_range(0, COLS-1);
      @(negedge clk);
      a_en = 1; a_row = 6'(r);
      b_en = 1; b_we = 0; b_row = 6'(r2); b_col = 5'(c2);
      @(negedge clk);
      a_en = 0; b_en = 0;
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (a_data[c] != pat(r, c)) failures++;
      end
      checks++;
      if (b_rdata != pat(r2, c2)) failures++;
      // outputs hold when the ports are idle
      @(negedge clk);
      checks++;
      if (a_data[0] != pat(r, 0) || b_rdata != pat(r2, c2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
