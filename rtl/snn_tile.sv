// snn_tile: one MigSpike node - router, network interface and neuron cluster.
//
// The router's local port connects to the network interface, which feeds the
// neuron cluster (weight SRAM + LIF array) and sends the cluster's output
// spikes, remapped by the output LUTs, back into the network. The six
// neighbour ports (index 1..6 of the port arrays, ordering +x, -x, +y, -y,
// +z, -z; index 0 is unused and tied off) leave the tile. The tile's mesh
// coordinate is an input so that all tiles of a mesh share one module.
//
// Everything here is the composition the architecture describes for a node;
// see the sub-modules for their own timing.
module snn_tile
  import migspike_pkg::*;
#(
  parameter int unsigned NEURONS   = 256,
  parameter int unsigned AXONS     = 256,
  parameter int unsigned LUT_DEPTH = 256,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  coord_t               here,
  input  logic  [NPORTS-1:0]   link_in_valid,
  output logic  [NPORTS-1:0]   link_in_ready,
  input  flit_t [NPORTS-1:0]   link_in_flit,
  output logic  [NPORTS-1:0]   link_out_valid,
  input  logic  [NPORTS-1:0]   link_out_ready,
  output flit_t [NPORTS-1:0]   link_out_flit,
  output logic                 busy,
  output logic [7:0]           step_count
);
  logic  [NPORTS-1:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  flit_t [NPORTS-1:0] r_in_flit, r_out_flit;

  logic                     ax_valid, step, clear, spike_vec_valid;
  logic [$clog2(AXONS)-1:0] ax_row;
  logic [NEURONS-1:0]       ax_mask, spike_vec;
  logic                     cfg_en, cfg_we;
  logic [ADDR_W-1:0]        cfg_addr;
  logic [DATA_W-1:0]        cfg_wdata, cfg_rdata;

  logic  ni_out_valid, ni_in_ready;
  flit_t ni_out_flit;

  always_comb begin
    r_in_valid  = link_in_valid;
    r_in_flit   = link_in_flit;
    r_out_ready = link_out_ready;
    link_in_ready  = r_in_ready;
    link_out_valid = r_out_valid;
    link_out_flit  = r_out_flit;
    link_in_ready[P_LOCAL]  = 1'b0;
    link_out_valid[P_LOCAL] = 1'b0;
    link_out_flit[P_LOCAL]  = '0;
    r_in_valid[P_LOCAL]     = ni_out_valid;
    r_in_flit[P_LOCAL]      = ni_out_flit;
    r_out_ready[P_LOCAL]    = ni_in_ready;
  end

  router3d #(.BUF_DEPTH(BUF_DEPTH)) u_router (
    .clk       (clk),
    .rst_n     (rst_n),
    .here      (here),
    .in_valid  (r_in_valid),
    .in_ready  (r_in_ready),
    .in_flit   (r_in_flit),
    .out_valid (r_out_valid),
    .out_ready (r_out_ready),
    .out_flit  (r_out_flit)
  );

  network_interface #(
    .NEURONS(NEURONS), .AXONS(AXONS), .LUT_DEPTH(LUT_DEPTH)
  ) u_ni (
    .clk             (clk),
    .rst_n           (rst_n),
    .in_valid        (r_out_valid[P_LOCAL]),
    .in_ready        (ni_in_ready),
    .in_flit         (r_out_flit[P_LOCAL]),
    .out_valid       (ni_out_valid),
    .out_ready       (r_in_ready[P_LOCAL]),
    .out_flit        (ni_out_flit),
    .ax_valid        (ax_valid),
    .ax_row          (ax_row),
    .ax_mask         (ax_mask),
    .step            (step),
    .clear           (clear),
    .spike_vec       (spike_vec),
    .spike_vec_valid (spike_vec_valid),
    .cfg_en          (cfg_en),
    .cfg_we          (cfg_we),
    .cfg_addr        (cfg_addr),
    .cfg_wdata       (cfg_wdata),
    .cfg_rdata       (cfg_rdata),
    .busy            (busy),
    .step_count      (step_count)
  );

  neuron_cluster #(.NEURONS(NEURONS), .AXONS(AXONS)) u_cluster (
    .clk             (clk),
    .rst_n           (rst_n),
    .ax_valid        (ax_valid),
    .ax_row          (ax_row),
    .ax_mask         (ax_mask),
    .step            (step),
    .clear           (clear),
    .spike_vec       (spike_vec),
    .spike_vec_valid (spike_vec_valid),
    .cfg_en          (cfg_en),
    .cfg_we          (cfg_we),
    .cfg_addr        (cfg_addr),
    .cfg_wdata       (cfg_wdata),
    .cfg_rdata       (cfg_rdata)
  );

endmodule
