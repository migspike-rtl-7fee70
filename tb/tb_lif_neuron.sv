// tb_lif_neuron: self-checking test of one LIF neuron against a cycle model.
//
// Programs threshold, leak and refractory period through the configuration
// port, then drives random weighted spikes and end-of-step pulses for 3000
// cycles and compares potential, spike output and refractory counter every
// cycle with an independent model written with plain integers. Also checks
// saturation at the top of the potential range and that clear works. Counts
// how often the neuron fired and was refractory and fails if either never
// happened.
module tb_lif_neuron;
  import migspike_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic        in_valid, step, clear, cfg_we, spike;
  logic signed [7:0]  in_weight;
  logic [1:0]  cfg_sel;
  logic [15:0] cfg_wdata;
  logic signed [15:0] vmem, thr, leak;
  logic [3:0]  refr_period, refr_cnt;

  lif_neuron dut (.*);

  int checks = 0, failures = 0;
  int m_v = 0, m_r = 0, m_thr = 0, m_leak = 0, m_rp = 0;
  bit m_spk = 0;
  int n_fire = 0, n_refr = 0, n_sat = 0;

  function automatic int clampv(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: v=%0d model=%0d spk=%0b/%0b r=%0d/%0d",
                                  what, $time, vmem, m_v, spike, m_spk, refr_cnt, m_r);
    end
  endtask

  task automatic cfg(int sel, int val);
    @(negedge clk);
    cfg_we = 1; cfg_sel = 2'(sel); cfg_wdata = 16'(val);
    @(negedge clk);
    cfg_we = 0;
    case (sel)
      0: m_thr = int'(signed'(16'(val)));
      1: m_leak = int'(signed'(16'(val)));
      2: m_rp = val & 15;
      default: m_v = int'(signed'(16'(val)));
    endcase
  endtask

  // model update on each rising edge, from the values driven at negedge
  task automatic model_cycle();
    int va, vl;
    bit act;
    act = (m_r == 0);
    va = m_v;
    if (in_valid && act) va = clampv(m_v + int'(in_weight));
    vl = clampv(va - m_leak);
    m_spk = 0;
    if (clear) begin m_v = 0; m_r = 0; end
    else if (step) begin
      if (!act) begin m_r--; n_refr++; end
      else if (vl >= m_thr) begin m_v = 0; m_r = m_rp; m_spk = 1; n_fire++; end
      else m_v = vl;
    end else m_v = va;
    if (step && act && !clear && vl >= m_thr) m_spk = 1;
  endtask

  initial begin
    rst_n = 0;
    in_valid = 0; step = 0; clear = 0; cfg_we = 0; cfg_sel = 0; cfg_wdata = 0; in_weight = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(thr == 16'sh7fff && vmem == 0, "reset values");
    cfg(0, 300); cfg(1, 7); cfg(2, 3);
    check(thr == 300 && leak == 7 && refr_period == 3, "config readback");
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 3) != 0);
      in_weight = 8'($urandom_range(0, 255));
      if (c < 1500) in_weight = 8'($urandom_range(0, 90)); // mostly excitatory
      step  = ($urandom_range(0, 9) == 0);
      clear = (c == 2200);
      @(posedge clk);
      model_cycle();
      #1;
      check(vmem == 16'(m_v), "potential");
      check(spike == m_spk, "spike");
      check(refr_cnt == 4'(m_r), "refractory counter");
    end
    // saturation: huge threshold, many positive inputs, no steps
    @(negedge clk);
    step = 0; clear = 0; in_valid = 0;
    cfg(0, 32767);
    cfg(3, 32700);
    for (int c = 0; c < 4; c++) begin
      @(negedge clk);
      in_valid = 1; in_weight = 8'sd100;
    end
    @(negedge clk);
    in_valid = 0;
    check(vmem == 16'sh7fff, "saturation");
    if (vmem == 16'sh7fff) n_sat++;
    // step at exactly threshold fires (after leak)
    cfg(1, 0); cfg(0, 1000); cfg(3, 1000);
    @(negedge clk); step = 1;
    @(negedge clk); step = 0;
    check(spike == 1 && vmem == 0, "fire at threshold");
    check(n_fire > 10, "neuron fired");
    check(n_refr > 10, "refractory steps seen");
    check(n_sat == 1, "saturation seen");
    $display("fired=%0d refractory=%0d", n_fire, n_refr);
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
