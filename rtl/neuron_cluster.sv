// neuron_cluster: the computing part of a node - weight memory, LIF array and
// post-synaptic spike register.
//
// Spike path: the network interface presents a decoded input spike as
// ax_valid with the weight-memory row ax_row (the AER) and the neuron mask
// ax_mask (from the PE-ID lookup). The row is read from the weight SRAM; one
// cycle later every neuron whose mask bit is set receives its weight from
// that row as a weighted spike, so a node takes one input spike per cycle
// with a latency of two cycles to the membrane potential.
//
// Time step: step (one cycle) makes all neurons leak, compare and possibly
// fire; the cycle after, the neurons' spikes are captured in the
// post-synaptic register spike_vec and spike_vec_valid pulses (two cycles
// after step). clear zeroes all potentials and refractory counters.
//
// Configuration: memory-access requests from the NI arrive as cfg_en/cfg_we/
// cfg_addr/cfg_wdata; read data is in cfg_rdata the cycle after cfg_en.
// Address map (see migspike_pkg): region 0 = weights (row in addr[15:8],
// neuron in addr[7:0], sign-extended on read), region 1 sub-blocks 0..3 =
// threshold, leak, refractory period, potential of neuron addr[7:0]; sub-block
// 7 = post-synaptic spike vector, 16 bits per word.
//
// Follows the architecture: AER-addressed weight rows, enable per neuron,
// parallel LIF neurons, post-synaptic storage of the output spikes, 256
// neurons of 8-bit weights with 256 input addresses. This design's choices:
// all neurons update in parallel from one wide row read, and the timing above.
module neuron_cluster
  import migspike_pkg::*;
#(
  parameter int unsigned NEURONS = 256,
  parameter int unsigned AXONS   = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // decoded input spikes
  input  logic                        ax_valid,
  input  logic [$clog2(AXONS)-1:0]    ax_row,
  input  logic [NEURONS-1:0]          ax_mask,
  // time step
  input  logic                        step,
  input  logic                        clear,
  output logic [NEURONS-1:0]          spike_vec,
  output logic                        spike_vec_valid,
  // configuration / memory access
  input  logic                        cfg_en,
  input  logic                        cfg_we,
  input  logic [ADDR_W-1:0]           cfg_addr,
  input  logic [DATA_W-1:0]           cfg_wdata,
  output logic [DATA_W-1:0]           cfg_rdata
);
  localparam int unsigned RW = $clog2(AXONS);
  localparam int unsigned NW = $clog2(NEURONS);
  localparam int unsigned SW = (NEURONS / DATA_W > 1) ? $clog2(NEURONS / DATA_W) : 1;

  // ---------------------------------------------------------------- decode
  logic          is_w, is_n, is_spk;
  logic [3:0]    sub;
  logic [NW-1:0] nidx;

  assign sub    = cfg_addr[11:8];
  assign nidx   = cfg_addr[NW-1:0];
  assign is_w   = cfg_en && (cfg_addr[19:16] == REG_WEIGHT);
  assign is_n   = cfg_en && (cfg_addr[19:16] == REG_NODE) && (sub <= SUB_VMEM);
  assign is_spk = cfg_en && (cfg_addr[19:16] == REG_NODE) && (sub == SUB_SPIKES);

  // ---------------------------------------------------------------- weights
  logic [NEURONS-1:0][WEIGHT_W-1:0] row;
  logic [WEIGHT_W-1:0]              w_rdata;
  logic                             ax_valid_q;
  logic [NEURONS-1:0]               ax_mask_q;

  weight_sram #(.ROWS(AXONS), .COLS(NEURONS), .W_W(WEIGHT_W)) u_wmem (
    .clk     (clk),
    .a_en    (ax_valid),
    .a_row   (ax_row),
    .a_data  (row),
    .b_en    (is_w),
    .b_we    (cfg_we),
    .b_row   (cfg_addr[8 +: RW]),
    .b_col   (cfg_addr[0 +: NW]),
    .b_wdata (cfg_wdata[WEIGHT_W-1:0]),
    .b_rdata (w_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ax_valid_q <= 1'b0;
      ax_mask_q  <= '0;
    end else begin
      ax_valid_q <= ax_valid;
      ax_mask_q  <= ax_mask;
    end
  end

  // ---------------------------------------------------------------- LIF array
  logic [NEURONS-1:0]                    spk;
  logic signed [NEURONS-1:0][VMEM_W-1:0] vm, th, lk;
  logic [NEURONS-1:0][REFR_W-1:0]        rp, rc;

  for (genvar n = 0; n < NEURONS; n++) begin : g_neuron
    lif_neuron u_lif (
      .clk         (clk),
      .rst_n       (rst_n),
      .in_valid    (ax_valid_q && ax_mask_q[n]),
      .in_weight   (row[n]),
      .step        (step),
      .clear       (clear),
      .cfg_we      (is_n && cfg_we && (nidx == NW'(n))),
      .cfg_sel     (sub[1:0]),
      .cfg_wdata   (cfg_wdata),
      .spike       (spk[n]),
      .vmem        (vm[n]),
      .thr         (th[n]),
      .leak        (lk[n]),
      .refr_period (rp[n]),
      .refr_cnt    (rc[n])
    );
  end

  // ---------------------------------------------------------------- post-synaptic register
  logic step_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q          <= 1'b0;
      spike_vec       <= '0;
      spike_vec_valid <= 1'b0;
    end else begin
      step_q          <= step;
      spike_vec_valid <= step_q;
      if (step_q) spike_vec <= spk;
    end
  end

  // ---------------------------------------------------------------- read-back
  typedef enum logic [1:0] { RS_W, RS_REG, RS_NONE } rsrc_e;
  rsrc_e             rsrc;
  logic [DATA_W-1:0] reg_q;
  logic [DATA_W-1:0] spk_words [NEURONS/DATA_W > 0 ? NEURONS/DATA_W : 1];

  always_comb begin
    for (int w = 0; w < $size(spk_words); w++)
      spk_words[w] = DATA_W'(spike_vec >> (w * DATA_W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsrc  <= RS_NONE;
      reg_q <= '0;
    end else begin
      rsrc  <= is_w ? RS_W : RS_REG;
      reg_q <= '0;
      if (is_n) begin
        unique case (sub[1:0])
          2'd0: reg_q <= th[nidx];
          2'd1: reg_q <= lk[nidx];
          2'd2: reg_q <= DATA_W'(rp[nidx]);
          default: reg_q <= vm[nidx];
        endcase
      end else if (is_spk) begin
        reg_q <= spk_words[cfg_addr[SW-1:0]];
      end
    end
  end

  assign cfg_rdata = (rsrc == RS_W) ? DATA_W'(signed'(w_rdata)) : reg_q;

endmodule
