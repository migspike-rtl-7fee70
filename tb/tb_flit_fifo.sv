// tb_flit_fifo: self-checking test of the FIFO with random push/pop.
//
// Pushes a numbered sequence under random valid and random ready and checks
// that the data come out complete and in order, that in_ready falls exactly
// when DEPTH entries are held and that count tracks a testbench counter.
module tb_flit_fifo;
  import migspike_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  flit_t in_data, out_data;
  logic [3:0] count;

  flit_fifo #(.T(flit_t), .DEPTH(8)) dut (.*);

  mem_pl_t pl;
  int checks = 0, failures = 0, sent = 0, rcvd = 0, occ = 0, full_seen = 0;

  initial begin
    rst_n = 0;
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (rcvd < 2000) begin
      @(negedge clk);
      in_valid  = (sent < 2000) && ($urandom_range(0, 3) != 0);
      in_data   = make_mem(FT_MEM, '0, MEM_WR, 20'(sent), 16'(sent * 7));
      out_ready = ($urandom_range(0, 2) == 0) || (rcvd > 1000 && $urandom_range(0, 1) == 0);
      #1;
      checks++;
      if (count != 4'(occ) || in_ready != (occ < 8) || out_valid != (occ > 0)) failures++;
      if (occ == 8) full_seen++;
      if (out_valid && out_ready) begin
        checks++;
        pl = mem_pl_t'(out_data.payload);
        if (pl.addr != 20'(rcvd) || pl.data != 16'(rcvd * 7)) failures++;
        rcvd++; occ--;
      end
      if (in_valid && in_ready) begin sent++; occ++; end
    end
    checks++;
    if (full_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
