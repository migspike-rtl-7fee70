// tb_snn_tile: self-checking test of one complete node (router + NI + cluster).
//
// The tile sits at (0,0,0) with the host on its -x port, as in the mesh.
// Through memory-access flits the host programs 8 neurons (weights of input
// rows 0..7 with a burst write, thresholds, leaks, refractory periods) and
// the Address LUT so that neurons leave on +x, +y and +z or are dropped, and
// one neuron is served from the AER LUT (a migrated slot). For 12 time steps
// the host sends random input spikes, then the step command; the flits that
// leave on +x/+y/+z are compared with an integer model of the neurons and
// the remapping, and every potential is read back with a burst read whose
// replies return on -x. Counts spikes per output port, dropped spikes,
// migrated-slot spikes and refractory steps; each must occur.
module tb_snn_tile;
  import migspike_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  coord_t here;
  logic  [6:0] link_in_valid, link_in_ready, link_out_valid, link_out_ready;
  flit_t [6:0] link_in_flit, link_out_flit;
  logic busy;
  logic [7:0] step_count;

  snn_tile dut (.*);

  int checks = 0, failures = 0;
  int n_port [7];
  int n_drop = 0, n_mig = 0, n_refr = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // everything leaving the tile is collected per port
  flit_t rx [7][$];
  always_ff @(posedge clk)
    if (rst_n) for (int p = 1; p < 7; p++)
      if (link_out_valid[p] && link_out_ready[p]) rx[p].push_back(link_out_flit[p]);

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

  localparam int NN = 8;
  int w [8][NN];
  int thr [NN], lk [NN], rp [NN], v [NN], rc [NN];
  logic [12:0] adr [NN];
  localparam int BASE = 7;              // neuron 7 is a migrated slot
  localparam logic [10:0] MIG_AER = {3'd4, 8'd77};

  initial begin
    rst_n = 0;
    here = '{z: 0, y: 0, x: 0};
    link_in_valid = '0; link_in_flit = '0; link_out_ready = '1;
    foreach (n_port[p]) n_port[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // weights: one burst of 8 per row
    for (int r = 0; r < 8; r++) begin
      mem(MEM_WR_BST, r << 8, NN);
      for (int n = 0; n < NN; n++) begin
        w[r][n] = $urandom_range(0, 50) - 10;
        mem(MEM_DATA, 0, w[r][n]);
      end
    end
    for (int n = 0; n < NN; n++) begin
      thr[n] = $urandom_range(40, 90); lk[n] = $urandom_range(0, 6); rp[n] = $urandom_range(0, 2);
      v[n] = 0; rc[n] = 0;
      mem(MEM_WR, 'h10000 | n, thr[n]);
      mem(MEM_WR, 'h10100 | n, lk[n]);
      mem(MEM_WR, 'h10200 | n, rp[n]);
      case (n % 4)
        0: adr[n] = {1'b1, 4'd0, 4'd0, 4'd1};   // +x neighbour
        1: adr[n] = {1'b1, 4'd0, 4'd2, 4'd0};   // +y, two hops
        2: adr[n] = {1'b1, 4'd1, 4'd0, 4'd0};   // +z (vertical link)
        default: adr[n] = {1'b0, 12'd0};        // no destination
      endcase
      if (n == 7) adr[n] = {1'b1, 4'd0, 4'd0, 4'd3};
      mem(MEM_WR, 'h10600 | n, adr[n]);
    end
    mem(MEM_WR, 'h10800, BASE);
    mem(MEM_WR, 'h10500, MIG_AER);

    for (int s = 0; s < 12; s++) begin
      logic [7:0] ins;
      flit_t exp_f [7][$];
      ins = 8'($urandom);
      for (int r = 0; r < 8; r++)
        if (ins[r]) begin
          send(make_spike('{z: 0, y: 0, x: 0}, 3'd0, 8'(r)));
          for (int n = 0; n < NN; n++) if (rc[n] == 0) v[n] = v[n] + w[r][n];
        end
      mem(MEM_WR, 'h10801, 1);
      for (int n = 0; n < NN; n++) begin
        if (rc[n] != 0) begin rc[n]--; n_refr++; end
        else begin
          v[n] = v[n] - lk[n];
          if (v[n] >= thr[n]) begin
            v[n] = 0; rc[n] = rp[n];
            if (adr[n][12]) begin
              int p;
              coord_t d;
              d = coord_t'(adr[n][11:0]);
              p = (d.x != 0) ? P_XP : (d.y != 0) ? P_YP : P_ZP;
              if (n >= BASE) begin exp_f[p].push_back(make_spike(d, MIG_AER[10:8], MIG_AER[7:0])); n_mig++; end
              else exp_f[p].push_back(make_spike(d, 3'd0, 8'(n)));
              n_port[p]++;
            end else n_drop++;
          end
        end
      end
      repeat (60) @(negedge clk);
      for (int p = 1; p < 7; p++) begin
        chk(rx[p].size() == exp_f[p].size(), "number of output spikes");
        while (rx[p].size() > 0 && exp_f[p].size() > 0)
          chk(rx[p].pop_front() == exp_f[p].pop_front(), "output spike flit");
        rx[p].delete();
      end
      // read back the potentials
      mem(MEM_RD_BST, 'h10300, NN);
      repeat (40) @(negedge clk);
      chk(rx[P_XM].size() == NN, "burst read replies");
      for (int n = 0; n < NN && rx[P_XM].size() > 0; n++) begin
        mem_pl_t pl;
        flit_t f;
        f = rx[P_XM].pop_front();
        pl = mem_pl_t'(f.payload);
        chk(f.ftype == FT_REPLY && int'(pl.addr) == ('h10300 | n) && int'(signed'(pl.data)) == v[n],
            "potential read back");
      end
      rx[P_XM].delete();
    end
    chk(step_count == 8'd12, "step count");
    $display("+x=%0d +y=%0d +z=%0d dropped=%0d migrated=%0d refractory=%0d",
             n_port[P_XP], n_port[P_YP], n_port[P_ZP], n_drop, n_mig, n_refr);
    chk(n_port[P_XP] > 0 && n_port[P_YP] > 0 && n_port[P_ZP] > 0 && n_drop > 0 &&
        n_mig > 0 && n_refr > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
