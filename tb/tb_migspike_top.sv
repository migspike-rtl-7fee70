// tb_migspike_top: end-to-end test of the MigSpike mesh, built here as a
// 2x2x2 mesh (every other parameter at its default: 256 neurons and 256
// inputs per node) so that it compiles quickly; a separate full-size test runs the
// same scenario on the default 4x4x4 mesh. It runs a small three-layer
// network through one fault repair of each kind.
//
// Network (healthy form): layer 1 = 8 neurons on node A (1,0,0) fed by 8
// host inputs; layer 2 = 4 neurons on node B (1,1,1) fed by layer 1;
// layer 3 = 4 neurons on node C (0,1,0) fed by layer 2. Two neurons are
// faulty (threshold stuck at zero, so they fire every step) and are
// repaired as the migration scheme prescribes:
//  * node-level recovery: B's neuron 2 is silenced (no destination) and a
//    spare neuron of B (local 250) takes its weights and parameters; the AER
//    LUT makes its spikes carry AER 2, so layer 3 cannot tell the difference.
//  * system-level recovery: A's neuron 5 is silenced and migrates to B's
//    spare neuron 249. Host inputs reach it with PE-ID 1, whose mask selects
//    only neuron 249, while layer-1 spikes use PE-ID 0, whose mask now
//    excludes it; its spikes leave as AER 5 towards B itself.
// Every time step the host sends the inputs, then steps C, B and A in that
// order (so a spike always counts in the receiver's next step). After each
// step the testbench reads back, by burst reads, A's and B's spike vectors
// and C's potentials, and compares them with two integer models: one of the
// repaired system as programmed, and one of the healthy network without any
// fault. Layer 3 must match the healthy network exactly.
//
// Also counted (each must occur): single and burst writes and reads, PE-ID
// masked spikes, migrated-slot spikes, dropped spikes of silenced neurons,
// spikes looped back into their own node, flits on vertical links,
// refractory steps, and backpressure stalls inside the mesh (the host stops
// accepting replies for a while).
module tb_migspike_top;
  import migspike_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic  host_in_valid, host_in_ready, host_out_valid, host_out_ready;
  flit_t host_in_flit, host_out_flit;
  localparam int MX = 2, MY = 2, MZ = 2, NT = MX * MY * MZ;
  logic [NT-1:0] busy;
  logic [NT-1:0][7:0] step_count;

  migspike_top #(.MESH_X(MX), .MESH_Y(MY), .MESH_Z(MZ)) dut (.*);

  int checks = 0, failures = 0;
  int n_swr = 0, n_bwr = 0, n_srd = 0, n_brd = 0, n_pe = 0, n_mig = 0, n_drop = 0,
      n_loop = 0, n_z = 0, n_refr = 0, n_stall = 0, n_leak = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- host side
  flit_t rx [$];
  always_ff @(posedge clk)
    if (rst_n && host_out_valid && host_out_ready) rx.push_back(host_out_flit);

  // network activity counters
  always_ff @(posedge clk)
    if (rst_n)
      for (int t = 0; t < NT; t++)
        for (int p = 1; p < 7; p++) begin
          if (dut.out_valid[t][p] && dut.out_ready[t][p] && (p == P_ZP || p == P_ZM)) n_z++;
          if (dut.out_valid[t][p] && !dut.out_ready[t][p]) n_stall++;
        end

  task automatic send(flit_t f);
    @(negedge clk);
    host_in_valid = 1; host_in_flit = f;
    #1;
    while (!host_in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    host_in_valid = 0;
  endtask

  localparam coord_t NA = '{z: 0, y: 0, x: 1};
  localparam coord_t NB = '{z: 1, y: 1, x: 1};
  localparam coord_t NC = '{z: 0, y: 1, x: 0};
  function automatic int tid(coord_t c); return c.x + MX * (c.y + MY * c.z); endfunction

  task automatic wr(coord_t d, int addr, int data);
    send(make_mem(FT_MEM, d, MEM_WR, 20'(addr), 16'(data)));
    n_swr++;
  endtask

  task automatic wr_burst(coord_t d, int addr, int vals [$]);
    send(make_mem(FT_MEM, d, MEM_WR_BST, 20'(addr), 16'(vals.size())));
    foreach (vals[i]) send(make_mem(FT_MEM, d, MEM_DATA, 20'(0), 16'(vals[i])));
    n_bwr++;
  endtask

  task automatic rd_burst(coord_t d, int addr, int len, output int vals [$]);
    int t;
    rx.delete();
    send(make_mem(FT_MEM, d, MEM_RD_BST, 20'(addr), 16'(len)));
    t = 0;
    while (rx.size() < len && t < 2000) begin @(negedge clk); t++; end
    chk(rx.size() == len, "burst read reply count");
    vals.delete();
    for (int i = 0; i < len && rx.size() > 0; i++) begin
      mem_pl_t pl;
      flit_t f;
      f = rx.pop_front();
      pl = mem_pl_t'(f.payload);
      chk(f.ftype == FT_REPLY && int'(pl.addr) == addr + i, "reply address");
      vals.push_back(int'(signed'(pl.data)));
    end
    n_brd++;
  endtask

  task automatic rd_single(coord_t d, int addr, output int val);
    int t;
    rx.delete();
    send(make_mem(FT_MEM, d, MEM_RD, 20'(addr), 16'(0)));
    t = 0;
    while (rx.size() < 1 && t < 2000) begin @(negedge clk); t++; end
    chk(rx.size() == 1, "single read reply");
    val = 0;
    if (rx.size() > 0) begin
      mem_pl_t pl;
      flit_t f;
      f = rx.pop_front();
      pl = mem_pl_t'(f.payload);
      val = int'(pl.data);
    end
    n_srd++;
  endtask

  task automatic wait_idle(coord_t c);
    int t;
    t = 0;
    @(negedge clk);
    while (busy[tid(c)] && t < 5000) begin @(negedge clk); t++; end
    chk(!busy[tid(c)], "node finished its step");
    repeat (60) @(negedge clk);   // let emitted spikes cross the mesh
  endtask

  // ---------------------------------------------------------------- models
  // neuron record; node 0 = A, 1 = B, 2 = C
  typedef struct {
    int thr, lk, rp, v, rc;
    bit ok;       // has a destination
    int dnode;    // destination node index
    int daer;     // AER it sends
    int dpe;      // PE-ID it sends
    bit spk;
  } neu_t;

  // repaired system as programmed
  neu_t sys [3][int];
  int   sw  [3][int][int];   // [node][row][neuron] weight
  bit   mask [3][2][int];    // [node][pe][neuron] masks of configured neurons
  // healthy network
  neu_t hl  [3][int];

  function automatic void deliver(ref neu_t m [3][int], input int node, int pe, int row);
    foreach (m[node][n])
      if (mask[node][pe][n] && m[node][n].rc == 0) m[node][n].v += sw[node][row][n];
  endfunction

  function automatic void step_node(ref neu_t m [3][int], input int node);
    int pend_node [$], pend_aer [$], pend_pe [$];
    foreach (m[node][n]) begin
      m[node][n].spk = 0;
      if (m[node][n].rc != 0) begin m[node][n].rc--; n_refr++; end
      else begin
        m[node][n].v -= m[node][n].lk;
        if (m[node][n].lk != 0 ) n_leak++;
        if (m[node][n].v >= m[node][n].thr) begin
          m[node][n].spk = 1;
          m[node][n].v = 0;
          m[node][n].rc = m[node][n].rp;
          if (m[node][n].ok) begin
            pend_node.push_back(m[node][n].dnode);
            pend_aer.push_back(m[node][n].daer);
            pend_pe.push_back(m[node][n].dpe);
            if (m[node][n].dnode == node) n_loop++;
            if ((n == 249 || n == 250)) n_mig++;
          end else n_drop++;
        end
      end
    end
    foreach (pend_node[i]) deliver(m, pend_node[i], pend_pe[i], pend_aer[i]);
  endfunction

  // ---------------------------------------------------------------- test
  int hw [3][int][int];   // healthy weights [node][row][neuron]

  function automatic void hdeliver(int node, int row);
    foreach (hl[node][n]) if (hl[node][n].rc == 0) hl[node][n].v += hw[node][row][n];
  endfunction

  function automatic void hstep(int node);
    int dn [$], da [$];
    foreach (hl[node][n]) begin
      if (hl[node][n].rc != 0) hl[node][n].rc--;
      else begin
        hl[node][n].v -= hl[node][n].lk;
        if (hl[node][n].v >= hl[node][n].thr) begin
          hl[node][n].v = 0;
          hl[node][n].rc = hl[node][n].rp;
          if (hl[node][n].ok) begin dn.push_back(hl[node][n].dnode); da.push_back(n); end
        end
      end
    end
    foreach (dn[i]) hdeliver(dn[i], da[i]);
  endfunction

  function automatic neu_t mk(int thr, int lk, int rp, bit ok, int dnode, int daer, int dpe);
    neu_t r;
    r.thr = thr; r.lk = lk; r.rp = rp; r.v = 0; r.rc = 0;
    r.ok = ok; r.dnode = dnode; r.daer = daer; r.dpe = dpe; r.spk = 0;
    return r;
  endfunction

  function automatic int adr_word(bit ok, coord_t c);
    return {ok, c.z, c.y, c.x};
  endfunction

  initial begin
    int vals [$];
    int d;
    coord_t nodes [3];
    rst_n = 0;
    host_in_valid = 0; host_in_flit = '0; host_out_ready = 1;
    nodes[0] = NA; nodes[1] = NB; nodes[2] = NC;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // ---------------- healthy network
    for (int n = 0; n < 8; n++) begin
      hl[0][n] = mk($urandom_range(50, 90), $urandom_range(0, 4), $urandom_range(0, 1), 1, 1, n, 0);
      for (int r = 0; r < 8; r++) hw[0][r][n] = $urandom_range(0, 45) - 8;
    end
    for (int n = 0; n < 4; n++) begin
      hl[1][n] = mk($urandom_range(60, 110), $urandom_range(0, 4), $urandom_range(0, 2), 1, 2, n, 0);
      for (int r = 0; r < 8; r++) hw[1][r][n] = $urandom_range(0, 50) - 10;
    end
    for (int n = 0; n < 4; n++) begin
      hl[2][n] = mk($urandom_range(80, 150), $urandom_range(1, 3), 2, 0, 0, 0, 0);
      for (int r = 0; r < 4; r++) hw[2][r][n] = $urandom_range(0, 60) - 10;
    end

    // ---------------- repaired system
    // A: neurons 0..7, neuron 5 faulty (threshold 0, no destination)
    for (int n = 0; n < 8; n++) begin
      sys[0][n] = hl[0][n];
      for (int r = 0; r < 8; r++) sw[0][r][n] = hw[0][r][n];
      mask[0][0][n] = 1;
    end
    sys[0][5].thr = 0; sys[0][5].ok = 0;
    // B: neurons 0..3, neuron 2 faulty; 250 = copy of 2; 249 = migrated A5
    for (int n = 0; n < 4; n++) begin
      sys[1][n] = hl[1][n];
      for (int r = 0; r < 8; r++) sw[1][r][n] = hw[1][r][n];
    end
    sys[1][2].thr = 0; sys[1][2].ok = 0;
    sys[1][250] = hl[1][2];
    sys[1][249] = hl[0][5];
    sys[1][249].dnode = 1; sys[1][249].daer = 5; sys[1][249].dpe = 0;
    for (int r = 0; r < 8; r++) begin
      sw[1][r][250] = hw[1][r][2];
      sw[1][r][249] = hw[0][r][5];
    end
    foreach (sys[1][n]) begin
      mask[1][0][n] = (n != 249);
      mask[1][1][n] = (n == 249);
    end
    // C
    for (int n = 0; n < 4; n++) begin
      sys[2][n] = hl[2][n];
      for (int r = 0; r < 4; r++) sw[2][r][n] = hw[2][r][n];
      mask[2][0][n] = 1;
    end

    // ---------------- program the hardware
    for (int k = 0; k < 3; k++) begin
      int rows;
      rows = (k == 2) ? 4 : 8;
      for (int r = 0; r < rows; r++) begin
        int ws [$];
        ws.delete();
        for (int n = 0; n < ((k == 0) ? 8 : 4); n++) ws.push_back(sw[k][r][n]);
        wr_burst(nodes[k], r << 8, ws);
      end
      foreach (sys[k][n]) begin
        wr(nodes[k], 'h10000 | n, sys[k][n].thr);
        wr(nodes[k], 'h10100 | n, sys[k][n].lk);
        wr(nodes[k], 'h10200 | n, sys[k][n].rp);
        wr(nodes[k], 'h10600 | n, adr_word(sys[k][n].ok, nodes[sys[k][n].dnode]));
      end
    end
    for (int r = 0; r < 8; r++) begin
      wr(NB, (r << 8) | 249, sw[1][r][249]);
      wr(NB, (r << 8) | 250, sw[1][r][250]);
    end
    wr(NB, 'h10800, 248);                      // migrated slots start at 248
    wr(NB, 'h10501, {3'd0, 8'd5});             // slot 249 speaks as A's neuron 5
    wr(NB, 'h10502, {3'd0, 8'd2});             // slot 250 speaks as B's neuron 2
    wr(NB, 'h1040f, 16'hfdff);                 // PE-ID 0: everyone but 249
    for (int wd = 0; wd < 16; wd++) wr(NB, 'h10410 | wd, (wd == 15) ? 16'h0200 : 16'h0000);
    rd_burst(NB, 'h10600 + 249, 2, vals);
    chk(vals.size() == 2 && vals[0] == adr_word(1, NB) && vals[1] == adr_word(1, NC), "Address LUT read back");
    rd_single(NB, 'h1041f, d);
    chk(d == 'h0200, "PE-ID LUT read back");

    // ---------------- run
    for (int s = 0; s < 16; s++) begin
      logic [7:0] ins;
      ins = 8'($urandom);
      for (int r = 0; r < 8; r++) if (ins[r]) begin
        send(make_spike(NA, 3'd0, 8'(r)));
        send(make_spike(NB, 3'd1, 8'(r)));
        deliver(sys, 0, 0, r);
        deliver(sys, 1, 1, r);
        hdeliver(0, r);
        n_pe++;
      end
      repeat (30) @(negedge clk);
      for (int k = 2; k >= 0; k--) begin
        wr(nodes[k], 'h10801, 1);
        wait_idle(nodes[k]);
        step_node(sys, k);
        hstep(k);
      end
      // spike vectors of A and B
      rd_burst(NA, 'h10700, 1, vals);
      for (int n = 0; n < 8; n++) chk(vals.size() > 0 && vals[0][n] == sys[0][n].spk, "A spike vector");
      // hold off the replies for a while: backpressure into the mesh
      fork
        rd_burst(NB, 'h10700, 16, vals);
        begin
          if (s % 4 == 1) begin
            @(negedge clk); host_out_ready = 0;
            repeat (40) @(negedge clk);
            host_out_ready = 1;
          end
        end
      join
      foreach (sys[1][n]) chk(vals.size() == 16 && vals[n / 16][n % 16] == sys[1][n].spk, "B spike vector");
      // layer 3 potentials: as programmed and as the healthy network
      rd_burst(NC, 'h10300, 4, vals);
      for (int n = 0; n < 4; n++) begin
        chk(vals.size() == 4 && vals[n] == sys[2][n].v, "C potential vs repaired model");
        chk(vals.size() == 4 && vals[n] == hl[2][n].v, "C potential vs healthy network");
      end
    end
    rd_single(NB, 'h10802, d);
    chk(d == ((16 << 8) | 0), "B status: 16 steps, idle");
    $display("single wr=%0d burst wr=%0d single rd=%0d burst rd=%0d pe-id spikes=%0d migrated=%0d dropped=%0d looped=%0d z-link=%0d refractory=%0d leak=%0d stalls=%0d",
             n_swr, n_bwr, n_srd, n_brd, n_pe, n_mig, n_drop, n_loop, n_z, n_refr, n_leak, n_stall);
    chk(n_swr > 0, "single writes");   chk(n_bwr > 0, "burst writes");
    chk(n_srd > 0, "single reads");    chk(n_brd > 0, "burst reads");
    chk(n_pe > 0, "PE-ID masked spikes");
    chk(n_mig > 0, "migrated-slot spikes"); chk(n_drop > 0, "dropped spikes");
    chk(n_loop > 0, "looped-back spikes");  chk(n_z > 0, "vertical-link flits");
    chk(n_refr > 0, "refractory steps");    chk(n_leak > 0, "leak applied");
    chk(n_stall > 0, "backpressure stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
