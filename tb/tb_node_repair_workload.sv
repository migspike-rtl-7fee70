// tb_node_repair_workload: fault-rate workload on one full-size node -
// 80% of the neurons mapped, 20% spare, 5%, 10%, 15% and 20% of the neurons
// made faulty and repaired by node-level migration.
//
// One snn_tile at its default size (256 neurons, 256 input AERs) sits at
// (0,0,0) with the host on its -x port. The host maps W = 205 neurons (80%)
// onto slots 0..204 with random weights on input rows 0..15, random
// thresholds, leaks and refractory periods, all sending to node (1,0,0);
// slots 205..255 are the R = 51 spares, and the migration base is 205.
// The fault rate then grows in four phases, k = 13, 26, 38 and 51 faulty
// neurons (5..20% of 256; the faults of one phase stay in the next). A fault
// is a corrupted threshold (most negative value), so the neuron fires
// whenever it is not refractory. Each phase:
//  1. injects the new faults, clears the potentials and runs 3 steps with
//     random inputs; the spikes leaving on +x must differ from those of a
//     healthy integer model at least once (the fault is visible);
//  2. repairs each new faulty neuron f into the next free spare slot s:
//     copies f's weight column, threshold, leak and refractory period to s,
//     sets AER LUT[s - 205] = {PE-ID 0, f} and s's destination, and clears
//     f's Address LUT entry;
//  3. clears the potentials and runs 8 steps; the set of AERs leaving on +x
//     in every step must equal the healthy model's set of firing neurons.
// Counted and required: visible faults, repaired neurons, spikes produced by
// repaired neurons in spare slots, refractory steps.
//
// The sizes (256 neurons per node, 20% spares, 5..20% faults) are the
// evaluated configuration; the random network, the fault model and the
// 16 input rows are this testbench's choices.
module tb_node_repair_workload;
  import migspike_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  coord_t here;
  logic  [6:0] link_in_valid, link_in_ready, link_out_valid, link_out_ready;
  flit_t [6:0] link_in_flit, link_out_flit;
  logic busy;
  logic [7:0] step_count;

  snn_tile dut (.*);

  localparam int E = 256, W = 205, BASE = W, ROWS = 16;
  localparam coord_t DST = '{z: 0, y: 0, x: 1};

  int checks = 0, failures = 0;
  int n_visible = 0, n_repaired = 0, n_spare_spk = 0, n_refr = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  flit_t rx [$];
  always_ff @(posedge clk)
    if (rst_n && link_out_valid[P_XP] && link_out_ready[P_XP]) rx.push_back(link_out_flit[P_XP]);

  task automatic send(flit_t f);
    @(negedge clk);
    link_in_valid[P_XM] = 1; link_in_flit[P_XM] = f;
    #1;
    while (!link_in_ready[P_XM]) begin @(negedge clk); #1; end
    @(negedge clk);
    link_in_valid[P_XM] = 0;
  endtask

  task automatic mem(mem_cmd_e c, int addr, int data);
    send(make_mem(FT_MEM, '{z: 0, y: 0, x: 0}, c, 20'(addr), 16'(data)));
  endtask

  // healthy network model, indexed by the original neuron number
  int w [ROWS][W];
  int thr [W], lk [W], rp [W], v [W], rc [W];
  int slot_of [W];     // slot now holding neuron n
  bit faulty [W];

  task automatic clear_all();
    mem(MEM_WR, 'h10801, 2);
    foreach (v[n]) begin v[n] = 0; rc[n] = 0; end
  endtask

  // one time step: random inputs, step, compare; returns whether the
  // hardware's firing set matched the healthy model's
  task automatic run_step(output bit same);
    logic [ROWS-1:0] ins;
    bit exp_fire [W];
    bit got_fire [W];
    int extra;
    ins = ROWS'($urandom);
    for (int r = 0; r < ROWS; r++)
      if (ins[r]) begin
        send(make_spike('{z: 0, y: 0, x: 0}, 3'd0, 8'(r)));
        foreach (v[n]) if (rc[n] == 0) v[n] += w[r][n];
      end
    foreach (v[n]) begin
      exp_fire[n] = 0;
      if (rc[n] != 0) begin rc[n]--; n_refr++; end
      else begin
        v[n] -= lk[n];
        if (v[n] >= thr[n]) begin
          v[n] = 0; rc[n] = rp[n]; exp_fire[n] = 1;
          if (slot_of[n] != n) n_spare_spk++;
        end
      end
    end
    rx.delete();
    mem(MEM_WR, 'h10801, 1);
    repeat (4) @(negedge clk);
    while (busy) @(negedge clk);
    repeat (8) @(negedge clk);
    foreach (got_fire[n]) got_fire[n] = 0;
    extra = 0;
    foreach (rx[i]) begin
      spike_pl_t pl;
      pl = spike_pl_t'(rx[i].payload);
      if (rx[i].ftype != FT_SPIKE || rx[i].dst != DST || pl.pe_id != 0 || pl.aer >= W ||
          got_fire[pl.aer]) extra++;
      else got_fire[pl.aer] = 1;
    end
    same = (extra == 0) && (got_fire == exp_fire);
  endtask

  initial begin
    int next_spare;
    int rates [4] = '{13, 26, 38, 51};
    int nfault;
    bit same, differed;
    rst_n = 0;
    here = '{z: 0, y: 0, x: 0};
    link_in_valid = '0; link_in_flit = '0; link_out_ready = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------------- map the healthy network
    for (int r = 0; r < ROWS; r++) begin
      mem(MEM_WR_BST, r << 8, W);
      for (int n = 0; n < W; n++) begin
        w[r][n] = $urandom_range(0, 40) - 8;
        mem(MEM_DATA, 0, w[r][n]);
      end
    end
    for (int n = 0; n < W; n++) begin
      thr[n] = $urandom_range(30, 90); lk[n] = $urandom_range(0, 5); rp[n] = $urandom_range(0, 2);
      slot_of[n] = n; faulty[n] = 0;
    end
    mem(MEM_WR_BST, 'h10000, W); for (int n = 0; n < W; n++) mem(MEM_DATA, 0, thr[n]);
    mem(MEM_WR_BST, 'h10100, W); for (int n = 0; n < W; n++) mem(MEM_DATA, 0, lk[n]);
    mem(MEM_WR_BST, 'h10200, W); for (int n = 0; n < W; n++) mem(MEM_DATA, 0, rp[n]);
    mem(MEM_WR_BST, 'h10600, W);
    for (int n = 0; n < W; n++) mem(MEM_DATA, 0, {1'b1, DST});
    mem(MEM_WR, 'h10800, BASE);

    // sanity: the healthy mapping matches the model
    clear_all();
    for (int s = 0; s < 4; s++) begin run_step(same); chk(same, "healthy mapping"); end

    next_spare = BASE;
    nfault = 0;
    foreach (rates[ph]) begin
      int newf [$];
      newf.delete();
      // ---------------- inject faults up to this phase's count
      while (nfault < rates[ph]) begin
        int f;
        f = $urandom_range(0, W - 1);
        if (!faulty[f]) begin
          faulty[f] = 1; nfault++; newf.push_back(f);
          mem(MEM_WR, 'h10000 | f, 16'h8000);
        end
      end
      clear_all();
      differed = 0;
      for (int s = 0; s < 3; s++) begin run_step(same); if (!same) differed = 1; end
      chk(differed, "faults visible before the repair");
      if (differed) n_visible++;
      // ---------------- node-level repair into spare slots
      foreach (newf[i]) begin
        int f, s;
        f = newf[i]; s = next_spare++;
        for (int r = 0; r < ROWS; r++) mem(MEM_WR, (r << 8) | s, w[r][f]);
        mem(MEM_WR, 'h10000 | s, thr[f]);
        mem(MEM_WR, 'h10100 | s, lk[f]);
        mem(MEM_WR, 'h10200 | s, rp[f]);
        mem(MEM_WR, 'h10500 | (s - BASE), {3'd0, 8'(f)});
        mem(MEM_WR, 'h10600 | s, {1'b1, DST});
        mem(MEM_WR, 'h10600 | f, 0);
        slot_of[f] = s;
        n_repaired++;
      end
      clear_all();
      for (int s = 0; s < 8; s++) begin run_step(same); chk(same, "repaired node matches the healthy network"); end
      $display("phase %0d: %0d faulty neurons of %0d (%0d%%), %0d spares used",
               ph, nfault, E, (100 * nfault + E / 2) / E, next_spare - BASE);
    end

    $display("visible=%0d repaired=%0d spare-slot spikes=%0d refractory=%0d",
             n_visible, n_repaired, n_spare_spk, n_refr);
    chk(n_visible == 4 && n_repaired == 51 && n_spare_spk > 0 && n_refr > 0,
        "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
