// tb_pe_id_lut: self-checking test of the PE-ID input-sparsity table.
//
// Checks that after reset every PE-ID selects all neurons, programs entries
// 1..7 with random masks word by word (keeping a copy in the testbench),
// leaves entry 0 untouched, then compares the mask seen for every PE-ID and
// the host read-back of every word with the copy.
module tb_pe_id_lut;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic [2:0] pe_id, wr_entry, rd_entry;
  logic [255:0] mask;
  logic wr_en;
  logic [3:0] wr_word, rd_word;
  logic [15:0] wr_data, rd_data;

  pe_id_lut dut (.*);

  int checks = 0, failures = 0;
  logic [255:0] ref_m [8];

  initial begin
    rst_n = 0;
    wr_en = 0; pe_id = 0; wr_entry = 0; wr_word = 0; wr_data = 0; rd_entry = 0; rd_word = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 8; e++) ref_m[e] = '1;
    for (int e = 0; e < 8; e++) begin
      @(negedge clk); pe_id = 3'(e); #1;
      checks++; if (mask != '1) failures++;
    end
    for (int e = 1; e < 8; e++)
      for (int w = 0; w < 16; w++) begin
        @(negedge clk);
        wr_en = 1; wr_entry = 3'(e); wr_word = 4'(w); wr_data = 16'($urandom);
        ref_m[e][w*16 +: 16] = wr_data;
      end
    @(negedge clk); wr_en = 0;
    for (int e = 0; e < 8; e++) begin
      pe_id = 3'(e); #1;
      checks++; if (mask != ref_m[e]) failures++;
      for (int w = 0; w < 16; w++) begin
        rd_entry = 3'(e); rd_word = 4'(w); #1;
        checks++; if (rd_data != ref_m[e][w*16 +: 16]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
