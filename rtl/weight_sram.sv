// weight_sram: dual-port synaptic weight memory of a node.
//
// ROWS rows, one per input AER address, each holding COLS weights of W_W bits,
// one per neuron (256 x 256 x 8 bit = 64 KB by default, the size of the node's
// weight memory). Port A is the spike port: a read of a whole row, registered,
// so a_data holds the row one cycle after a_en. Port B is the host port used
// by memory-access flits: one weight per access, written when b_we is high or
// read into b_rdata one cycle after b_en. Both ports run every cycle; a read
// of a weight written in the same cycle returns the old value.
//
// The architecture specifies the size, the dual-port organisation and the
// use (the decoded AER addresses a row, enables select neurons); the exact
// port timing is this design's choice, modelling a synchronous SRAM macro as
// an array.
module weight_sram #(
  parameter int unsigned ROWS = 256,
  parameter int unsigned COLS = 256,
  parameter int unsigned W_W  = 8
) (
  input  logic                       clk,
  // port A: spike row read
  input  logic                       a_en,
  input  logic [$clog2(ROWS)-1:0]    a_row,
  output logic [COLS-1:0][W_W-1:0]   a_data,
  // port B: single-weight host access
  input  logic                       b_en,
  input  logic                       b_we,
  input  logic [$clog2(ROWS)-1:0]    b_row,
  input  logic [$clog2(COLS)-1:0]    b_col,
  input  logic [W_W-1:0]             b_wdata,
  output logic [W_W-1:0]             b_rdata
);

  logic [COLS-1:0][W_W-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (a_en) a_data <= mem[a_row];
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_row][b_col] <= b_wdata;
      else      b_rdata           <= mem[b_row][b_col];
    end
  end

endmodule
