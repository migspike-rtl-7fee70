// tb_neuron_cluster: self-checking test of weight memory + LIF array.
//
// A 64-neuron, 32-input cluster gets random signed weights, thresholds,
// leaks and refractory periods through its configuration port. Then, for 40
// time steps, random input spikes with random neuron masks are applied, the
// step is pulsed, and the post-synaptic spike vector and every neuron's
// potential (read back through the configuration port) are compared with an
// integer model. Weight read-back (sign extended) and the spike-vector words
// are checked too, as is the two-cycle latency from step to spike_vec_valid.
module tb_neuron_cluster;
  import migspike_pkg::*;
  localparam int N = 64, A = 32;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic ax_valid, step, clear, spike_vec_valid, cfg_en, cfg_we;
  logic [4:0] ax_row;
  logic [N-1:0] ax_mask, spike_vec;
  logic [19:0] cfg_addr;
  logic [15:0] cfg_wdata, cfg_rdata;

  neuron_cluster #(.NEURONS(N), .AXONS(A)) dut (.*);

  int checks = 0, failures = 0, n_fire = 0;
  int w [A][N];
  int thr [N], lk [N], rp [N], v [N], rc [N];
  logic [N-1:0] exp_spk;

  task automatic wr(int addr, int data);
    @(negedge clk);
    cfg_en = 1; cfg_we = 1; cfg_addr = 20'(addr); cfg_wdata = 16'(data);
    @(negedge clk);
    cfg_en = 0; cfg_we = 0;
  endtask

  task automatic rd(int addr, output int data);
    @(negedge clk);
    cfg_en = 1; cfg_we = 0; cfg_addr = 20'(addr);
    @(negedge clk);
    cfg_en = 0;
    #1 data = int'(signed'(cfg_rdata));
  endtask

  function automatic int clampv(int x);
    return x > 32767 ? 32767 : (x < -32768 ? -32768 : x);
  endfunction

  initial begin
    int d;
    rst_n = 0;
    ax_valid = 0; step = 0; clear = 0; cfg_en = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    ax_row = 0; ax_mask = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < A; r++)
      for (int n = 0; n < N; n++) begin
        w[r][n] = $urandom_range(0, 60) - 20;
        wr((r << 8) | n, w[r][n]);
      end
    for (int n = 0; n < N; n++) begin
      thr[n] = $urandom_range(40, 200); lk[n] = $urandom_range(0, 10); rp[n] = $urandom_range(0, 3);
      v[n] = 0; rc[n] = 0;
      wr('h10000 | n, thr[n]); wr('h10100 | n, lk[n]); wr('h10200 | n, rp[n]);
    end
    for (int k = 0; k < 20; k++) begin
      int r, n;
      r = $urandom_range(0, A-1); n = $urandom_range(0, N-1);
      rd((r << 8) | n, d);
      checks++; if (d != w[r][n]) failures++;
      rd('h10000 | n, d);
      checks++; if (d != thr[n]) failures++;
    end
    for (int s = 0; s < 40; s++) begin
      int nsp, lat;
      nsp = $urandom_range(0, 12);
      for (int k = 0; k < nsp; k++) begin
        int r;
        logic [N-1:0] m;
        r = $urandom_range(0, A-1);
        m = {$urandom, $urandom};
        @(negedge clk);
        ax_valid = 1; ax_row = 5'(r); ax_mask = m;
        for (int n = 0; n < N; n++)
          if (m[n] && rc[n] == 0) v[n] = clampv(v[n] + w[r][n]);
      end
      @(negedge clk); ax_valid = 0;
      @(negedge clk); step = 1;
      for (int n = 0; n < N; n++) begin
        exp_spk[n] = 0;
        if (rc[n] != 0) rc[n]--;
        else begin
          int vl;
          vl = clampv(v[n] - lk[n]);
          if (vl >= thr[n]) begin exp_spk[n] = 1; v[n] = 0; rc[n] = rp[n]; n_fire++; end
          else v[n] = vl;
        end
      end
      @(negedge clk); step = 0;
      lat = 1;
      while (!spike_vec_valid) begin @(negedge clk); lat++; end
      checks++; if (lat != 2) failures++;
      checks++;
      if (spike_vec != exp_spk) begin
        failures++;
        $display("FAIL step %0d spikes %h expected %h", s, spike_vec, exp_spk);
      end
      for (int n = 0; n < N; n++) begin
        rd('h10300 | n, d);
        checks++;
        if (d != v[n]) begin
          failures++;
          if (failures < 6) $display("FAIL step %0d neuron %0d v=%0d expected %0d", s, n, d, v[n]);
        end
      end
      for (int wd = 0; wd < N / 16; wd++) begin
        rd('h10700 | wd, d);
        checks++; if (16'(d) != exp_spk[wd*16 +: 16]) failures++;
      end
    end
    checks++; if (n_fire == 0) failures++;
    $display("spikes fired=%0d", n_fire);
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
