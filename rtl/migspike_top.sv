// migspike_top: a MigSpike neuromorphic system - a 3D mesh of SNN tiles.
//
// MESH_X x MESH_Y x MESH_Z tiles (4 x 4 x 4 by default, the smallest 3D mesh
// the architecture is evaluated on), each with NEURONS LIF neurons, a 64 KB
// weight memory, a network interface with the migration lookup tables and a
// 3D-mesh router. Neighbouring routers are connected in all three dimensions;
// the vertical (z) links stand for the through-silicon vias between stacked
// layers. The host processor is attached to the -x port of tile (0,0,0): it
// injects spike flits (network inputs) and memory-access flits (configuration,
// weight copies for migrated neurons, time-step commands) on host_in_*, and
// receives read replies on host_out_*. Spikes produced by the neurons travel
// between tiles as the Address and AER LUTs direct; the host does not see
// them. Unused edge ports of the mesh are tied off (never valid, always
// ready); XYZ routing to coordinates inside the mesh never uses them.
//
// Tile index t = x + MESH_X * (y + MESH_Y * z). busy/step_count give each
// tile's time-step controller status.
module migspike_top
  import migspike_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned MESH_Z    = 4,
  parameter int unsigned NEURONS   = 256,
  parameter int unsigned AXONS     = 256,
  parameter int unsigned LUT_DEPTH = 256,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // host processor link at tile (0,0,0), -x side
  input  logic        host_in_valid,
  output logic        host_in_ready,
  input  flit_t       host_in_flit,
  output logic        host_out_valid,
  input  logic        host_out_ready,
  output flit_t       host_out_flit,
  // per-tile status
  output logic [MESH_X*MESH_Y*MESH_Z-1:0]      busy,
  output logic [MESH_X*MESH_Y*MESH_Z-1:0][7:0] step_count
);
  localparam int unsigned NT = MESH_X * MESH_Y * MESH_Z;

  logic  [NT-1:0][NPORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [NT-1:0][NPORTS-1:0] in_flit, out_flit;

  function automatic int unsigned tid(int unsigned x, int unsigned y, int unsigned z);
    return x + MESH_X * (y + MESH_Y * z);
  endfunction

  for (genvar z = 0; z < MESH_Z; z++) begin : g_z
    for (genvar y = 0; y < MESH_Y; y++) begin : g_y
      for (genvar x = 0; x < MESH_X; x++) begin : g_x
        localparam int unsigned T = tid(x, y, z);

        snn_tile #(
          .NEURONS(NEURONS), .AXONS(AXONS), .LUT_DEPTH(LUT_DEPTH), .BUF_DEPTH(BUF_DEPTH)
        ) u_tile (
          .clk            (clk),
          .rst_n          (rst_n),
          .here           ('{z: COORD_W'(z), y: COORD_W'(y), x: COORD_W'(x)}),
          .link_in_valid  (in_valid[T]),
          .link_in_ready  (in_ready[T]),
          .link_in_flit   (in_flit[T]),
          .link_out_valid (out_valid[T]),
          .link_out_ready (out_ready[T]),
          .link_out_flit  (out_flit[T]),
          .busy           (busy[T]),
          .step_count     (step_count[T])
        );

        // local port is handled inside the tile
        assign in_valid[T][P_LOCAL]  = 1'b0;
        assign in_flit[T][P_LOCAL]   = '0;
        assign out_ready[T][P_LOCAL] = 1'b0;

        // +x / -x
        if (x + 1 < MESH_X) begin : g_xp
          assign in_valid[T][P_XP]  = out_valid[tid(x+1, y, z)][P_XM];
          assign in_flit[T][P_XP]   = out_flit[tid(x+1, y, z)][P_XM];
          assign out_ready[T][P_XP] = in_ready[tid(x+1, y, z)][P_XM];
        end else begin : g_xp_edge
          assign in_valid[T][P_XP]  = 1'b0;
          assign in_flit[T][P_XP]   = '0;
          assign out_ready[T][P_XP] = 1'b1;
        end
        if (x > 0) begin : g_xm
          assign in_valid[T][P_XM]  = out_valid[tid(x-1, y, z)][P_XP];
          assign in_flit[T][P_XM]   = out_flit[tid(x-1, y, z)][P_XP];
          assign out_ready[T][P_XM] = in_ready[tid(x-1, y, z)][P_XP];
        end else if (y == 0 && z == 0) begin : g_host
          assign in_valid[T][P_XM]  = host_in_valid;
          assign in_flit[T][P_XM]   = host_in_flit;
          assign out_ready[T][P_XM] = host_out_ready;
        end else begin : g_xm_edge
          assign in_valid[T][P_XM]  = 1'b0;
          assign in_flit[T][P_XM]   = '0;
          assign out_ready[T][P_XM] = 1'b1;
        end

        // +y / -y
        if (y + 1 < MESH_Y) begin : g_yp
          assign in_valid[T][P_YP]  = out_valid[tid(x, y+1, z)][P_YM];
          assign in_flit[T][P_YP]   = out_flit[tid(x, y+1, z)][P_YM];
          assign out_ready[T][P_YP] = in_ready[tid(x, y+1, z)][P_YM];
        end else begin : g_yp_edge
          assign in_valid[T][P_YP]  = 1'b0;
          assign in_flit[T][P_YP]   = '0;
          assign out_ready[T][P_YP] = 1'b1;
        end
        if (y > 0) begin : g_ym
          assign in_valid[T][P_YM]  = out_valid[tid(x, y-1, z)][P_YP];
          assign in_flit[T][P_YM]   = out_flit[tid(x, y-1, z)][P_YP];
          assign out_ready[T][P_YM] = in_ready[tid(x, y-1, z)][P_YP];
        end else begin : g_ym_edge
          assign in_valid[T][P_YM]  = 1'b0;
          assign in_flit[T][P_YM]   = '0;
          assign out_ready[T][P_YM] = 1'b1;
        end

        // +z / -z (vertical links)
        if (z + 1 < MESH_Z) begin : g_zp
          assign in_valid[T][P_ZP]  = out_valid[tid(x, y, z+1)][P_ZM];
          assign in_flit[T][P_ZP]   = out_flit[tid(x, y, z+1)][P_ZM];
          assign out_ready[T][P_ZP] = in_ready[tid(x, y, z+1)][P_ZM];
        end else begin : g_zp_edge
          assign in_valid[T][P_ZP]  = 1'b0;
          assign in_flit[T][P_ZP]   = '0;
          assign out_ready[T][P_ZP] = 1'b1;
        end
        if (z > 0) begin : g_zm
          assign in_valid[T][P_ZM]  = out_valid[tid(x, y, z-1)][P_ZP];
          assign in_flit[T][P_ZM]   = out_flit[tid(x, y, z-1)][P_ZP];
          assign out_ready[T][P_ZM] = in_ready[tid(x, y, z-1)][P_ZP];
        end else begin : g_zm_edge
          assign in_valid[T][P_ZM]  = 1'b0;
          assign in_flit[T][P_ZM]   = '0;
          assign out_ready[T][P_ZM] = 1'b1;
        end
      end
    end
  end

  assign host_in_ready  = in_ready[0][P_XM];
  assign host_out_valid = out_valid[0][P_XM];
  assign host_out_flit  = out_flit[0][P_XM];

endmodule
