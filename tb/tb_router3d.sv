// tb_router3d: self-checking test of the 3D-mesh router.
//
// The router sits at (1,1,1). All seven inputs inject random flits (spikes
// and memory accesses to random nodes of a 3x3x3 cube, plus read replies)
// under random output backpressure. The expected output port of each flit is
// worked out here from the XYZ rule: correct x first, then y, then z; at the
// destination the local port; replies head for (0,0,0), i.e. -x from here.
// Checked: every flit leaves exactly once, on the expected port, and flits
// from one input to one output keep their order. Counts output contention
// (more than one input waiting for the same output) and backpressure stalls;
// both must occur. Also measures the one-cycle latency through an idle router.
module tb_router3d;
  import migspike_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  coord_t here;
  logic  [6:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [6:0] in_flit, out_flit;

  router3d dut (.*);

  int checks = 0, failures = 0, n_cont = 0, n_stall = 0;
  flit_t exp_q [7][7][$];   // [input][output]
  int sent = 0, rcvd = 0;

  function automatic int exp_port(flit_t f);
    int dx, dy, dz;
    if (f.ftype == FT_REPLY) begin dx = 0; dy = 0; dz = 0; end
    else begin dx = f.dst.x; dy = f.dst.y; dz = f.dst.z; end
    if (dx > 1) return 1;
    if (dx < 1) return 2;
    if (dy > 1) return 3;
    if (dy < 1) return 4;
    if (dz > 1) return 5;
    if (dz < 1) return 6;
    return (f.ftype == FT_REPLY) ? 2 : 0;
  endfunction

  // tag each flit with its input and sequence number in the address field
  function automatic flit_t rnd_flit(int i, int seq);
    coord_t d;
    int k;
    d.x = COORD_W'($urandom_range(0, 2));
    d.y = COORD_W'($urandom_range(0, 2));
    d.z = COORD_W'($urandom_range(0, 2));
    k = $urandom_range(0, 5);
    if (k == 0) return make_mem(FT_REPLY, '0, MEM_RD, 20'((i << 16) | seq), 16'(seq));
    return make_mem(k == 1 ? FT_SPIKE : FT_MEM, d, MEM_WR, 20'((i << 16) | seq), 16'(seq));
  endfunction

  initial begin
    int seq [7];
    bit take [7];
    rst_n = 0;
    here = '{z: 1, y: 1, x: 1};
    in_valid = '0; out_ready = '0; in_flit = '0;
    foreach (seq[i]) seq[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency through an idle router
    @(negedge clk);
    in_valid[3] = 1; in_flit[3] = make_spike('{z: 1, y: 1, x: 1}, 3'd0, 8'd9); out_ready = '1;
    @(negedge clk);
    in_valid = '0;
    #1;
    checks++; if (!(out_valid == 7'b0000001 && out_flit[0] == make_spike('{z: 1, y: 1, x: 1}, 3'd0, 8'd9))) failures++;
    @(negedge clk);
    for (int c = 0; c < 4000; c++) begin
      for (int i = 0; i < 7; i++) begin
        if (!in_valid[i] && c < 3500 && $urandom_range(0, 2) == 0) begin
          in_valid[i] = 1;
          in_flit[i] = rnd_flit(i, seq[i]);
          seq[i]++;
        end
      end
      for (int o = 0; o < 7; o++) out_ready[o] = ($urandom_range(0, 3) != 0);
      #1;
      // observe the outputs
      for (int o = 0; o < 7; o++) begin
        if (out_valid[o] && !out_ready[o]) n_stall++;
        if (out_valid[o] && out_ready[o]) begin
          mem_pl_t p;
          int src;
          p = mem_pl_t'(out_flit[o].payload);
          src = int'(p.addr >> 16);
          checks++;
          if (src > 6 || exp_q[src][o].size() == 0 || exp_q[src][o][0] != out_flit[o]) begin
            failures++;
            if (failures < 5) $display("FAIL flit %h on port %0d", out_flit[o], o);
          end else void'(exp_q[src][o].pop_front());
          rcvd++;
        end
      end
      // contention: several buffered head flits for the same output
      for (int o = 0; o < 7; o++) begin
        int cnt;
        cnt = 0;
        for (int i = 0; i < 7; i++)
          if (dut.head_valid[i] && int'(dut.dest[i]) == o) cnt++;
        if (cnt > 1) n_cont++;
      end
      for (int i = 0; i < 7; i++) take[i] = in_valid[i] && in_ready[i];
      @(negedge clk);
      for (int i = 0; i < 7; i++)
        if (take[i]) begin
          exp_q[i][exp_port(in_flit[i])].push_back(in_flit[i]);
          sent++;
          in_valid[i] = 0;
        end
    end
    for (int i = 0; i < 7; i++) for (int o = 0; o < 7; o++) begin
      checks++; if (exp_q[i][o].size() != 0) failures++;
    end
    checks++; if (n_cont == 0 || n_stall == 0 || sent < 3000) failures++;
    $display("sent=%0d received=%0d contention=%0d stalls=%0d", sent, rcvd, n_cont, n_stall);
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
