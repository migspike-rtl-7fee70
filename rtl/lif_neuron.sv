// lif_neuron: one leaky integrate-and-fire neuron with its own parameter registers.
//
// While a time step runs, every cycle with in_valid adds the signed weighted
// spike in_weight to the membrane potential (adder + register, saturating at
// the VMEM_W range). When step is pulsed (end of the time step) the leak is
// subtracted, the result is compared with the threshold and, if it reaches
// it, the neuron fires: spike is high for the cycle after step, the potential
// returns to zero and a refractory counter is loaded with the refractory
// period. While the counter is non-zero, weighted inputs are ignored and each
// step only decrements it, so the neuron stays silent for that many steps.
// A weighted input arriving in the same cycle as step is counted before the
// leak. clear zeroes the potential and the refractory counter.
//
// The parameter registers (threshold, leak, refractory period) and the
// potential are written through cfg_we/cfg_sel/cfg_wdata by the network
// interface's memory-access path; all four are readable.
//
// Follows the architecture: accumulate, subtract the leak at the end of the
// step, compare with the threshold, refractory countdown. Own choices: signed
// saturating arithmetic (the leak is a signed value too), reset of the potential to zero on a spike, comparison
// after the leak, per-neuron parameters, reset values (threshold 0x7fff,
// leak 0, refractory 0).
module lif_neuron
  import migspike_pkg::*;
#(
  parameter int unsigned W_W = WEIGHT_W,
  parameter int unsigned V_W = VMEM_W,
  parameter int unsigned R_W = REFR_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // weighted spike input
  input  logic                in_valid,
  input  logic signed [W_W-1:0] in_weight,
  // time-step control
  input  logic                step,
  input  logic                clear,
  // configuration: sel 0 = threshold, 1 = leak, 2 = refractory period, 3 = potential
  input  logic                cfg_we,
  input  logic [1:0]          cfg_sel,
  input  logic [V_W-1:0]      cfg_wdata,
  // outputs
  output logic                spike,
  output logic signed [V_W-1:0] vmem,
  output logic signed [V_W-1:0] thr,
  output logic signed [V_W-1:0] leak,
  output logic [R_W-1:0]      refr_period,
  output logic [R_W-1:0]      refr_cnt
);

  localparam logic signed [V_W:0] VMAX = {2'b00, {(V_W-1){1'b1}}};
  localparam logic signed [V_W:0] VMIN = {2'b11, {(V_W-1){1'b0}}};

  function automatic logic signed [V_W-1:0] sat(input logic signed [V_W:0] v);
    if (v > VMAX) return VMAX[V_W-1:0];
    if (v < VMIN) return VMIN[V_W-1:0];
    return v[V_W-1:0];
  endfunction

  logic                  active;
  logic signed [V_W-1:0] v_acc;    // potential after this cycle's input
  logic signed [V_W-1:0] v_leak;   // potential after the leak
  logic                  fire;

  assign active = (refr_cnt == '0);

  always_comb begin
    v_acc = vmem;
    if (in_valid && active)
      v_acc = sat((V_W+1)'(vmem) + (V_W+1)'(in_weight));
    v_leak = sat((V_W+1)'(v_acc) - (V_W+1)'(leak));
    fire   = step && active && (v_leak >= thr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vmem        <= '0;
      thr         <= VMAX[V_W-1:0];
      leak        <= '0;
      refr_period <= '0;
      refr_cnt    <= '0;
      spike       <= 1'b0;
    end else begin
      spike <= fire;
      if (clear) begin
        vmem     <= '0;
        refr_cnt <= '0;
      end else if (cfg_we && cfg_sel == 2'd3) begin
        vmem <= cfg_wdata;
      end else if (step) begin
        if (!active) begin
          refr_cnt <= refr_cnt - 1'b1;
        end else if (fire) begin
          vmem     <= '0;
          refr_cnt <= refr_period;
        end else begin
          vmem <= v_leak;
        end
      end else begin
        vmem <= v_acc;
      end
      if (cfg_we) begin
        unique case (cfg_sel)
          2'd0: thr         <= cfg_wdata;
          2'd1: leak        <= cfg_wdata;
          2'd2: refr_period <= cfg_wdata[R_W-1:0];
          default: ;
        endcase
      end
    end
  end

endmodule
