// tb_output_remap_lut: self-checking test of the output remapping tables.
//
// Programs a migration base of 200, random AER LUT entries and random
// Address LUT entries (about one neuron in eight left without a valid
// destination), then streams every local AER 0..255 through the unit under
// random output backpressure. Each AER below the base must leave with its
// own AER and PE-ID 0, each AER at or above it with the AER LUT entry at
// (AER - 200), every flit with its neuron's destination, and neurons without
// a valid destination must send nothing. Also reads back both tables.
// Counts original, migrated and dropped spikes; each must occur.
module tb_output_remap_lut;
  import migspike_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, busy;
  logic [7:0] in_aer;
  flit_t out_flit;
  logic base_we, wr_en, wr_sel, rd_sel;
  logic [8:0] base_wdata, base;
  logic [7:0] wr_idx, rd_idx;
  logic [15:0] wr_data, rd_data;

  output_remap_lut dut (.*);

  int checks = 0, failures = 0;
  logic [10:0] aer_tab [256];
  logic [12:0] adr_tab [256];
  flit_t exp_q [$];
  int n_orig = 0, n_mig = 0, n_drop = 0;
  localparam int BASE = 200;

  initial begin
    rst_n = 0;
    in_valid = 0; out_ready = 0; in_aer = 0; base_we = 0; base_wdata = 0;
    wr_en = 0; wr_sel = 0; wr_idx = 0; wr_data = 0; rd_sel = 0; rd_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (base != 9'd256) failures++;
    @(negedge clk); base_we = 1; base_wdata = 9'(BASE);
    @(negedge clk); base_we = 0;
    for (int i = 0; i < 256; i++) begin
      aer_tab[i] = 11'($urandom);
      adr_tab[i] = {($urandom_range(0, 7) != 0), 12'($urandom)};
      @(negedge clk); wr_en = 1; wr_sel = 0; wr_idx = 8'(i); wr_data = 16'(aer_tab[i]);
      @(negedge clk); wr_en = 1; wr_sel = 1; wr_idx = 8'(i); wr_data = 16'(adr_tab[i]);
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 256; i++) begin
      rd_sel = 0; rd_idx = 8'(i); #1;
      checks++; if (rd_data != 16'(aer_tab[i])) failures++;
      rd_sel = 1; #1;
      checks++; if (rd_data != 16'(adr_tab[i])) failures++;
    end
    for (int i = 0; i < 256; i++) begin
      flit_t f;
      if (adr_tab[i][12]) begin
        if (i >= BASE) begin
          f = make_spike(coord_t'(adr_tab[i][11:0]), aer_tab[i-BASE][10:8], aer_tab[i-BASE][7:0]);
          n_mig++;
        end else begin
          f = make_spike(coord_t'(adr_tab[i][11:0]), 3'd0, 8'(i));
          n_orig++;
        end
        exp_q.push_back(f);
      end else n_drop++;
    end
    fork
      begin
        for (int i = 0; i < 256; i++) begin
          @(negedge clk);
          in_valid = 1; in_aer = 8'(i);
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
        end
        @(negedge clk); in_valid = 0;
      end
      begin
        int got;
        got = 0;
        while (got < n_orig + n_mig) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 2) != 0);
          #1;
          if (out_valid && out_ready) begin
            flit_t e;
            e = exp_q.pop_front();
            checks++;
            if (out_flit != e) begin
              failures++;
              if (failures < 5) $display("FAIL flit %h expected %h", out_flit, e);
            end
            got++;
          end
        end
      end
    join
    repeat (4) @(negedge clk);
    checks++; if (out_valid) failures++;
    checks++; if (n_orig == 0 || n_mig == 0 || n_drop == 0) failures++;
    $display("original=%0d migrated=%0d dropped=%0d", n_orig, n_mig, n_drop);
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
