// tb_network_interface: self-checking test of the network interface.
//
// The NI (32 neurons, 32 inputs) is driven with flits as the router would
// deliver them, while the testbench plays the neuron cluster: it records
// configuration writes, answers reads with a known function of the address
// one cycle later, and answers step with a chosen spike vector two cycles
// later. Checked: single and burst writes reach the cluster at the right
// addresses; single and burst reads return reply flits with the right
// address and data; PE-ID LUT programming and the mask/row presented for
// each spike flit; the time step waits for buffered spikes to drain; the
// output spikes leave as flits remapped by the base, AER LUT and Address
// LUT, with neurons lacking a destination dropped; the status register;
// and output backpressure. Each of these mechanisms is counted.
module tb_network_interface;
  import migspike_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit, out_flit;
  logic ax_valid, step, clear, spike_vec_valid, cfg_en, cfg_we, busy;
  logic [4:0] ax_row;
  logic [N-1:0] ax_mask, spike_vec;
  logic [19:0] cfg_addr;
  logic [15:0] cfg_wdata, cfg_rdata;
  logic [7:0] step_count;

  network_interface #(.NEURONS(N), .AXONS(32)) dut (.*);

  int checks = 0, failures = 0;
  int n_wr = 0, n_burst_wr = 0, n_rd = 0, n_burst_rd = 0, n_spk_in = 0, n_spk_out = 0,
      n_drop = 0, n_bp = 0, n_drain = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- cluster model
  typedef struct { int addr; int data; } wr_t;
  wr_t wq [$];
  logic [N-1:0] next_spikes;
  logic step_d1;
  int axq_row [$];
  logic [N-1:0] axq_mask [$];
  always_ff @(posedge clk) begin
    if (cfg_en && !cfg_we) cfg_rdata <= 16'(cfg_addr * 3 + 1);
    if (cfg_en && cfg_we) wq.push_back('{int'(cfg_addr), int'(cfg_wdata)});
    step_d1 <= step;
    spike_vec_valid <= step_d1;
    if (step_d1) spike_vec <= next_spikes;
    if (ax_valid) begin axq_row.push_back(int'(ax_row)); axq_mask.push_back(ax_mask); end
  end

  // ---------------- flit driver and reply collector
  flit_t rx [$];
  always_ff @(posedge clk) if (rst_n && out_valid && out_ready) rx.push_back(out_flit);

  task automatic send(flit_t f);
    @(negedge clk);
    in_valid = 1; in_flit = f;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic mem(mem_cmd_e c, int addr, int data);
    send(make_mem(FT_MEM, '0, c, 20'(addr), 16'(data)));
  endtask

  task automatic wait_rx(int n);
    int t;
    t = 0;
    while (rx.size() < n && t < 500) begin @(negedge clk); t++; end
  endtask

  task automatic expect_reply(int addr, int data);
    mem_pl_t p;
    flit_t f;
    wait_rx(1);
    chk(rx.size() > 0, "reply present");
    if (rx.size() > 0) begin
      f = rx.pop_front();
      p = mem_pl_t'(f.payload);
      chk(f.ftype == FT_REPLY && int'(p.addr) == addr && int'(p.data) == data, "reply content");
      if (!(f.ftype == FT_REPLY && int'(p.addr) == addr && int'(p.data) == data)) $display("  got %0d %h %h cmd %0d exp %h %h", f.ftype, p.addr, p.data, p.cmd, addr, data);
    end
  endtask

  logic [10:0] aer_tab [N];
  logic [12:0] adr_tab [N];

  initial begin
    rst_n = 0;
    in_valid = 0; in_flit = '0; out_ready = 1; next_spikes = '0; spike_vec = '0;
    spike_vec_valid = 0; cfg_rdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // single write / read to the cluster
    mem(MEM_WR, 'h00305, 'h7f);
    repeat (2) @(negedge clk);
    chk(wq.size() == 1 && wq[0].addr == 'h00305 && wq[0].data == 'h7f, "single write");
    wq.delete(); n_wr++;
    mem(MEM_RD, 'h10112, 0);
    expect_reply('h10112, ('h10112 * 3 + 1) & 'hffff); n_rd++;

    // burst write of 5
    mem(MEM_WR_BST, 'h00200, 5);
    for (int i = 0; i < 5; i++) mem(MEM_DATA, 0, 100 + i);
    repeat (2) @(negedge clk);
    chk(wq.size() == 5, "burst write count");
    foreach (wq[i]) chk(wq[i].addr == 'h200 + i && wq[i].data == 100 + i, "burst write word");
    wq.delete(); n_burst_wr++;

    // burst read of 4 under output backpressure
    fork
      mem(MEM_RD_BST, 'h10300, 4);
      begin
        repeat (12) begin @(negedge clk); out_ready = ($urandom_range(0, 1) == 1); if (!out_ready && out_valid) n_bp++; end
        out_ready = 1;
      end
    join
    wait_rx(4);
    for (int i = 0; i < 4; i++) expect_reply('h10300 + i, (('h10300 + i) * 3 + 1) & 'hffff);
    n_burst_rd++;

    // PE-ID LUT: entry 2 = neurons 30,31 only; entry 5 = alternating
    mem(MEM_WR, 'h10420, 'h0000); mem(MEM_WR, 'h10421, 'hc000);
    mem(MEM_WR, 'h10450, 'h5555); mem(MEM_WR, 'h10451, 'h5555);
    mem(MEM_RD, 'h10421, 0);
    expect_reply('h10421, 'hc000);
    chk(wq.size() == 0, "LUT writes stay in the NI");
    axq_row.delete(); axq_mask.delete();
    begin
      int pes [4] = '{0, 2, 5, 7};
      logic [N-1:0] exp_m [4] = '{'1, 32'hc000_0000, 32'h5555_5555, '1};
      for (int i = 0; i < 4; i++) send(make_spike('0, 3'(pes[i]), 8'(3 + i)));
      repeat (3) @(negedge clk);
      chk(axq_row.size() == 4, "spikes decoded");
      for (int i = 0; i < 4 && i < axq_row.size(); i++)
        chk(axq_row[i] == 3 + i && axq_mask[i] == exp_m[i], "row and mask");
      n_spk_in += 4;
    end

    // output remap: base 24, AER LUT for 8 migrated slots, Address LUT for all
    mem(MEM_WR, 'h10800, 24);
    for (int i = 0; i < N; i++) begin
      aer_tab[i] = 11'($urandom);
      adr_tab[i] = {(i % 5 != 4), 12'($urandom)};
      if (i < 8) mem(MEM_WR, 'h10500 + i, aer_tab[i]);
      mem(MEM_WR, 'h10600 + i, adr_tab[i]);
    end
    mem(MEM_RD, 'h10603, 0);
    expect_reply('h10603, adr_tab[3]);
    mem(MEM_RD, 'h10800, 0);
    expect_reply('h10800, 24);

    // spike flits sent back to back, then the step command: every spike must
    // reach the cluster before the step pulse
    next_spikes = 32'hf100_0213;
    axq_row.delete();
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      in_valid = 1; in_flit = make_spike('0, 3'd0, 8'(i));
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    in_flit = make_mem(FT_MEM, '0, MEM_WR, 20'h10801, 16'd1);
    @(negedge clk);
    in_valid = 0;
    n_spk_in += 6;
    begin
      int t;
      t = 0;
      while (!step && t < 100) begin @(negedge clk); t++; end
      chk(step, "step issued");
      chk(axq_row.size() == 6, "spikes delivered before the step");
      if (axq_row.size() == 6) n_drain++;
    end
    repeat (40) @(negedge clk);
    begin
      int got;
      got = 0;
      for (int i = 0; i < N; i++) begin
        if (next_spikes[i]) begin
          if (adr_tab[i][12]) begin
            flit_t e, f;
            if (i >= 24) e = make_spike(coord_t'(adr_tab[i][11:0]), aer_tab[i-24][10:8], aer_tab[i-24][7:0]);
            else         e = make_spike(coord_t'(adr_tab[i][11:0]), 3'd0, 8'(i));
            chk(rx.size() > 0, "output spike present");
            if (rx.size() > 0) begin
              f = rx.pop_front();
              chk(f == e, "output spike flit");
              n_spk_out++;
            end
          end else n_drop++;
        end
      end
      chk(rx.size() == 0, "no extra output flits");
    end
    mem(MEM_RD, 'h10802, 0);
    expect_reply('h10802, 'h0100);  // one step done, idle

    $display("wr=%0d bwr=%0d rd=%0d brd=%0d spk_in=%0d spk_out=%0d drop=%0d bp=%0d drain=%0d",
             n_wr, n_burst_wr, n_rd, n_burst_rd, n_spk_in, n_spk_out, n_drop, n_bp, n_drain);
    chk(n_wr > 0 && n_burst_wr > 0 && n_rd > 0 && n_burst_rd > 0 && n_spk_in > 0 &&
        n_spk_out > 0 && n_drop > 0 && n_bp > 0 && n_drain > 0, "all mechanisms exercised");
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
