// tb_aer_encoder: self-checking test of the spike-vector to AER serialiser.
//
// Loads random 256-bit spike vectors of varying density and collects the
// addresses emitted under random backpressure. Each vector must come out as
// exactly its set bits, in ascending order, one per accepted cycle; with
// ready held high, a vector of n spikes must take exactly n cycles.
module tb_aer_encoder;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic load, valid, ready, busy;
  logic [255:0] spikes;
  logic [7:0] aer;

  aer_encoder dut (.*);

  int checks = 0, failures = 0;

  initial begin
    rst_n = 0;
    load = 0; ready = 0; spikes = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      logic [255:0] v;
      int n, cyc, last;
      bit bp;
      bp = (t % 2 == 1);
      for (int i = 0; i < 256; i++) v[i] = ($urandom_range(0, 99) < (t * 3) % 100);
      if (t == 5) v = '0;
      if (t == 6) v = '1;
      @(negedge clk);
      load = 1; spikes = v;
      @(negedge clk);
      load = 0;
      n = 0; cyc = 0; last = -1;
      while (busy) begin
        ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
        #1;
        if (valid && ready) begin
          checks++;
          if (!v[aer] || int'(aer) <= last) failures++;
          last = int'(aer);
          n++;
        end
        cyc++;
        @(negedge clk);
      end
      ready = 0;
      checks++;
      if (n != $countones(v)) failures++;
      if (!bp) begin
        checks++;
        if (cyc != $countones(v)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
