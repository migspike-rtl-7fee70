// pe_id_lut: input-sparsity lookup table of the network interface.
//
// Every spike flit carries a 3-bit PE-ID next to its AER. The PE-ID indexes
// this programmable table of ENTRIES neuron masks; the selected mask is the
// per-neuron enable for the weight row that the AER addresses, so one weight
// row can feed different subsets of neurons (neurons of different layers, or
// neurons migrated here from another node). mask is combinational from
// pe_id. All entries reset to all ones, so PE-ID 0 (and any entry not yet
// programmed) reaches every neuron, as the architecture describes for entry 0.
// The host writes an entry 16 bits at a time (wr_word selects the word) and
// reads it back the same way through rd_entry/rd_word (combinational).
module pe_id_lut #(
  parameter int unsigned NEURONS = 256,
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned WORD_W  = 16
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [$clog2(ENTRIES)-1:0]         pe_id,
  output logic [NEURONS-1:0]                 mask,
  input  logic                               wr_en,
  input  logic [$clog2(ENTRIES)-1:0]         wr_entry,
  input  logic [$clog2(NEURONS/WORD_W)-1:0]  wr_word,
  input  logic [WORD_W-1:0]                  wr_data,
  input  logic [$clog2(ENTRIES)-1:0]         rd_entry,
  input  logic [$clog2(NEURONS/WORD_W)-1:0]  rd_word,
  output logic [WORD_W-1:0]                  rd_data
);
  localparam int unsigned WORDS = NEURONS / WORD_W;

  logic [WORDS-1:0][WORD_W-1:0] lut [ENTRIES];

  assign mask    = lut[pe_id];
  assign rd_data = lut[rd_entry][rd_word];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) lut[e] <= '1;
    end else if (wr_en) begin
      lut[wr_entry][wr_word] <= wr_data;
    end
  end

endmodule
