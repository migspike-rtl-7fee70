// output_remap_lut: maps a firing neuron's local AER to the spike flit it sends.
//
// A neuron that migrated into this node no longer sits at the AER position
// its receivers expect. The node therefore has a migration base address:
// local AERs at or above it belong to neurons hosted here after a migration,
// and (AER - base) indexes the AER LUT, whose entry {pe_id, aer} is the
// neuron's global address as seen by its receivers. Local AERs below the base
// belong to the node's original neurons and keep their AER, with PE-ID 0. A
// multiplexer picks one of the two. Independently, the Address LUT (one entry
// per local neuron: {valid, z, y, x}) gives the destination node; a neuron
// whose entry is not valid (a faulty, spare or unused neuron) sends nothing.
//
// Interface: in_valid/in_ready/in_aer from the AER encoder; out_valid/
// out_ready/out_flit towards the NI's output; one pipeline register, so the
// flit appears the cycle after the AER is accepted. The host writes and reads
// the tables word by word (wr_sel/rd_sel: 0 = AER LUT, 1 = Address LUT); the
// base register (one bit wider than an AER, reset to NEURONS = nothing
// migrated) has its own write port. Read data is combinational.
//
// From the architecture: subtraction of the base, the AER LUT, the mux
// between mapped and original AER, the destination look-up, and a depth of
// 256 so that a spare node holding only migrated neurons can be served.
// This design's choices: the entry formats, PE-ID 0 for original neurons,
// one destination per neuron and the valid bit.
module output_remap_lut
  import migspike_pkg::*;
#(
  parameter int unsigned NEURONS   = 256,
  parameter int unsigned LUT_DEPTH = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // stream in
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [AER_W-1:0]            in_aer,
  // stream out
  output logic                        out_valid,
  input  logic                        out_ready,
  output flit_t                       out_flit,
  output logic                        busy,
  // table access
  input  logic                        base_we,
  input  logic [AER_W:0]              base_wdata,
  output logic [AER_W:0]              base,
  input  logic                        wr_en,
  input  logic                        wr_sel,
  input  logic [AER_W-1:0]            wr_idx,
  input  logic [DATA_W-1:0]           wr_data,
  input  logic                        rd_sel,
  input  logic [AER_W-1:0]            rd_idx,
  output logic [DATA_W-1:0]           rd_data
);
  typedef struct packed {
    logic [PEID_W-1:0] pe_id;
    logic [AER_W-1:0]  aer;
  } aer_ent_t;

  typedef struct packed {
    logic   valid;
    coord_t dst;
  } adr_ent_t;

  aer_ent_t aer_lut [LUT_DEPTH];
  adr_ent_t adr_lut [NEURONS];

  // ---------------------------------------------------------------- lookup
  logic [AER_W-1:0]  offset;
  logic              migrated;
  aer_ent_t          mapped;
  adr_ent_t          dest;
  logic              accept;

  assign offset   = in_aer - base[AER_W-1:0];
  assign migrated = ({1'b0, in_aer} >= base);
  assign mapped   = migrated ? aer_lut[offset[$clog2(LUT_DEPTH)-1:0]]
                             : '{pe_id: '0, aer: in_aer};
  assign dest     = adr_lut[in_aer[$clog2(NEURONS)-1:0]];
  assign in_ready = !out_valid || out_ready;
  assign accept   = in_valid && in_ready;
  assign busy     = out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else if (in_ready) begin
      out_valid <= accept && dest.valid;
      out_flit  <= make_spike(dest.dst, mapped.pe_id, mapped.aer);
    end
  end

  // ---------------------------------------------------------------- tables
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base <= (AER_W+1)'(NEURONS);  // no migrated slot
      for (int i = 0; i < LUT_DEPTH; i++) aer_lut[i] <= '0;
      for (int i = 0; i < NEURONS; i++)   adr_lut[i] <= '0;
    end else begin
      if (base_we) base <= base_wdata;
      if (wr_en && !wr_sel) aer_lut[wr_idx[$clog2(LUT_DEPTH)-1:0]] <= aer_ent_t'(wr_data);
      if (wr_en &&  wr_sel) adr_lut[wr_idx[$clog2(NEURONS)-1:0]]   <= adr_ent_t'(wr_data);
    end
  end

  assign rd_data = rd_sel ? DATA_W'(adr_lut[rd_idx[$clog2(NEURONS)-1:0]])
                          : DATA_W'(aer_lut[rd_idx[$clog2(LUT_DEPTH)-1:0]]);

endmodule
