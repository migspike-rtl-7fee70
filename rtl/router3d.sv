// router3d: packet-switched 3D-mesh router with seven ports.
//
// Ports: 0 local (the node's network interface), 1/2 = +x/-x, 3/4 = +y/-y,
// 5/6 = +z/-z (the vertical links between stacked layers). Every packet is a
// single flit, so there is no wormhole state: each input port buffers flits
// in a FIFO, the head flit's output port is computed by dimension-ordered
// XYZ routing against the router's own coordinate `here`, and every output
// port picks one requesting input per cycle with a round-robin arbiter and
// passes the head flit straight through the crossbar. Links use valid/ready:
// a flit moves when out_valid and out_ready are both high. in_ready is the
// input FIFO's room, so ready never depends on valid combinationally and
// chains of routers have no combinational loop.
//
// Read replies are routed towards node (0,0,0) and leave it on its -x port,
// where the host is attached.
//
// Latency: a flit entering an idle router in cycle t can leave in cycle t+1.
// Throughput: one flit per output per cycle.
//
// From the architecture: a 3D-mesh router with six neighbour directions plus
// the node, packet switching, single-flit spike and memory-access packets.
// This design's choices: buffer depth, XYZ routing, round-robin arbitration
// and the handshake. The fault-tolerance features of the router the
// architecture builds on (protected buffers, crossbar and routing logic,
// fault-tolerant routing) and its unicast-based multicast are not part of
// this router.
//
// rst_n is the asynchronous reset of every register and also disables the
// one-grant-per-input assertion; a linter may report that second use as a
// synchronous use of the reset net, which is harmless here.
module router3d
  import migspike_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  coord_t               here,
  input  logic  [NPORTS-1:0]   in_valid,
  output logic  [NPORTS-1:0]   in_ready,
  input  flit_t [NPORTS-1:0]   in_flit,
  output logic  [NPORTS-1:0]   out_valid,
  input  logic  [NPORTS-1:0]   out_ready,
  output flit_t [NPORTS-1:0]   out_flit
);
  localparam int unsigned IW = $clog2(NPORTS);

  flit_t [NPORTS-1:0]         head;
  logic  [NPORTS-1:0]         head_valid, pop;
  port_e [NPORTS-1:0]         dest;
  logic  [NPORTS-1:0][NPORTS-1:0] req;    // req[o][i]
  logic  [NPORTS-1:0][NPORTS-1:0] gnt;    // gnt[o][i]
  logic  [NPORTS-1:0][IW-1:0]     rr;     // last granted input per output

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    flit_fifo #(.T(flit_t), .DEPTH(BUF_DEPTH)) u_buf (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid[i]),
      .in_ready  (in_ready[i]),
      .in_data   (in_flit[i]),
      .out_valid (head_valid[i]),
      .out_ready (pop[i]),
      .out_data  (head[i]),
      .count     ()
    );
    assign dest[i] = route_xyz(head[i], here);
  end

  // request matrix and round-robin grant
  always_comb begin
    req = '0;
    gnt = '0;
    for (int i = 0; i < NPORTS; i++)
      if (head_valid[i]) req[dest[i]][i] = 1'b1;
    for (int o = 0; o < NPORTS; o++) begin
      for (int k = NPORTS; k >= 1; k--) begin
        // candidates after the last winner have priority; highest k checked last wins
        int cand;
        cand = (int'(rr[o]) + k) % NPORTS;
        if (req[o][cand]) begin
          gnt[o]       = '0;
          gnt[o][cand] = 1'b1;
        end
      end
    end
  end

  // crossbar
  always_comb begin
    pop = '0;
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = |gnt[o];
      out_flit[o]  = '0;
      for (int i = 0; i < NPORTS; i++) begin
        if (gnt[o][i]) begin
          out_flit[o] = head[i];
          if (out_ready[o]) pop[i] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++)
        for (int i = 0; i < NPORTS; i++)
          if (gnt[o][i] && out_ready[o]) rr[o] <= IW'(i);
    end
  end

  // a flit is granted to at most one output
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    logic [NPORTS-1:0] col;
    for (genvar o = 0; o < NPORTS; o++) begin : g_col
      assign col[o] = gnt[o][i];
    end
    a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(col))
      else $error("router3d: input %0d granted twice", i);
  end

endmodule
