// migspike_pkg: types and constants shared by the MigSpike neuromorphic node and mesh.
//
// A MigSpike system is a 3D mesh of nodes. Each node holds a cluster of leaky
// integrate-and-fire (LIF) neurons, a synaptic weight memory addressed by the
// incoming spike's AER (address-event representation) value, a network
// interface (NI) and a 3D-mesh router. Packets are single flits of two kinds,
// as in the architecture this follows: spikes (AER plus a 3-bit PE-ID that
// selects a neuron mask at the receiver) and memory accesses issued by a host
// processor (single and burst, read and write). A third kind, the read reply,
// carries data back to the host.
//
// Sizes that follow the architecture: 256 neurons per node, 256 input AER
// addresses (8-bit AER), 8-bit synaptic weights (64 KB of weights per node),
// 3-bit PE-ID. Sizes chosen here: 4-bit mesh coordinates (meshes up to
// 16x16x16), 16-bit membrane potential and data word, 20-bit local address.
package migspike_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned COORD_W  = 4;   // per-dimension mesh coordinate
  localparam int unsigned AER_W    = 8;   // local/global AER of a neuron
  localparam int unsigned PEID_W   = 3;   // PE-ID field of a spike flit
  localparam int unsigned WEIGHT_W = 8;   // synaptic weight, two's complement
  localparam int unsigned VMEM_W   = 16;  // membrane potential, two's complement
  localparam int unsigned REFR_W   = 4;   // refractory period counter
  localparam int unsigned ADDR_W   = 20;  // node-local memory-access address
  localparam int unsigned DATA_W   = 16;  // memory-access data word

  // ---------------------------------------------------------------- flit
  typedef enum logic [1:0] {
    FT_SPIKE = 2'd0,   // AER spike between neurons
    FT_MEM   = 2'd1,   // memory access from the host
    FT_REPLY = 2'd2    // read data returned to the host
  } flit_type_e;

  typedef enum logic [2:0] {
    MEM_WR     = 3'd0, // single write: addr, data
    MEM_RD     = 3'd1, // single read : addr
    MEM_WR_BST = 3'd2, // burst write header: addr, data = length
    MEM_RD_BST = 3'd3, // burst read : addr, data = length
    MEM_DATA   = 3'd4  // burst write payload word
  } mem_cmd_e;

  typedef struct packed {
    logic [COORD_W-1:0] z;
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] x;
  } coord_t;

  localparam int unsigned PAYLOAD_W = 3 + ADDR_W + DATA_W;  // 39

  typedef struct packed {
    flit_type_e             ftype;
    coord_t                 dst;
    logic [PAYLOAD_W-1:0]   payload;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // payload views
  typedef struct packed {
    logic [PAYLOAD_W-PEID_W-AER_W-1:0] rsvd;
    logic [PEID_W-1:0]                 pe_id;
    logic [AER_W-1:0]                  aer;
  } spike_pl_t;

  typedef struct packed {
    mem_cmd_e             cmd;
    logic [ADDR_W-1:0]    addr;
    logic [DATA_W-1:0]    data;
  } mem_pl_t;

  // ---------------------------------------------------------------- router ports
  localparam int unsigned NPORTS = 7;
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_XP    = 3'd1,   // east  (+x)
    P_XM    = 3'd2,   // west  (-x); at node (0,0,0) this is the host I/O port
    P_YP    = 3'd3,   // north (+y)
    P_YM    = 3'd4,   // south (-y)
    P_ZP    = 3'd5,   // up    (+z, TSV)
    P_ZM    = 3'd6    // down  (-z, TSV)
  } port_e;

  // ---------------------------------------------------------------- local memory map
  // addr[19:16] selects the region; the low bits index it.
  //   0x0_RRNN : weight of input AER RR for neuron NN (8-bit, sign-extended on read)
  //   0x1_00NN : threshold of neuron NN
  //   0x1_01NN : leak of neuron NN
  //   0x1_02NN : refractory period of neuron NN
  //   0x1_03NN : membrane potential of neuron NN (read; write sets it)
  //   0x1_04PW : PE-ID LUT entry P (0..7), 16-bit word W of the neuron mask
  //   0x1_05NN : AER LUT entry NN   {pe_id, aer} of a migrated neuron slot
  //   0x1_06NN : Address LUT entry NN {valid, z, y, x} destination of neuron NN
  //   0x1_070W : post-synaptic spike vector, 16-bit word W (read only)
  //   0x1_0800 : migration base address (first local AER served by the AER LUT)
  //   0x1_0801 : control: bit0 = end of time step, bit1 = clear potentials
  //   0x1_0802 : status : bit0 = busy, [15:8] = time-step count (read only)
  localparam logic [3:0] REG_WEIGHT = 4'h0;
  localparam logic [3:0] REG_NODE   = 4'h1;
  localparam logic [3:0] SUB_THR    = 4'h0;
  localparam logic [3:0] SUB_LEAK   = 4'h1;
  localparam logic [3:0] SUB_REFR   = 4'h2;
  localparam logic [3:0] SUB_VMEM   = 4'h3;
  localparam logic [3:0] SUB_PEID   = 4'h4;
  localparam logic [3:0] SUB_AERLUT = 4'h5;
  localparam logic [3:0] SUB_ADRLUT = 4'h6;
  localparam logic [3:0] SUB_SPIKES = 4'h7;
  localparam logic [3:0] SUB_CTRL   = 4'h8;
  localparam logic [7:0] CTRL_BASE   = 8'h00;
  localparam logic [7:0] CTRL_STEP   = 8'h01;
  localparam logic [7:0] CTRL_STATUS = 8'h02;

  // Dimension-ordered (X, then Y, then Z) routing. Replies always travel to
  // the host, which hangs off the -x port of node (0,0,0).
  function automatic port_e route_xyz(flit_t f, coord_t here);
    coord_t d;
    d = (f.ftype == FT_REPLY) ? '0 : f.dst;
    if      (d.x > here.x) return P_XP;
    else if (d.x < here.x) return P_XM;
    else if (d.y > here.y) return P_YP;
    else if (d.y < here.y) return P_YM;
    else if (d.z > here.z) return P_ZP;
    else if (d.z < here.z) return P_ZM;
    else if (f.ftype == FT_REPLY) return P_XM;
    else return P_LOCAL;
  endfunction

  function automatic flit_t make_spike(coord_t dst, logic [PEID_W-1:0] pe_id,
                                       logic [AER_W-1:0] aer);
    flit_t     f;
    spike_pl_t p;
    p       = '0;
    p.pe_id = pe_id;
    p.aer   = aer;
    f.ftype   = FT_SPIKE;
    f.dst     = dst;
    f.payload = p;
    return f;
  endfunction

  function automatic flit_t make_mem(flit_type_e t, coord_t dst, mem_cmd_e cmd,
                                     logic [ADDR_W-1:0] addr, logic [DATA_W-1:0] data);
    flit_t   f;
    mem_pl_t p;
    p.cmd  = cmd;
    p.addr = addr;
    p.data = data;
    f.ftype   = t;
    f.dst     = dst;
    f.payload = p;
    return f;
  endfunction

endpackage
