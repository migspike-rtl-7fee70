// aer_encoder: turns the node's output spike vector into a stream of AERs.
//
// load captures the NEURONS-bit post-synaptic spike vector. While any bit is
// pending, the encoder presents the index of the lowest pending bit as an
// AER_W-bit address on aer/valid; each accepted address (valid && ready)
// clears that bit, so the firing neurons leave one per cycle in ascending
// order. busy is high while bits are pending. A load while busy replaces the
// pending set. The serial, one-address-per-cycle output follows the
// architecture (addresses of the set bits are sent serially to the remap
// table); the lowest-index-first priority order is this design's choice.
module aer_encoder #(
  parameter int unsigned NEURONS = 256,
  parameter int unsigned AW      = $clog2(NEURONS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [NEURONS-1:0] spikes,
  output logic               valid,
  input  logic               ready,
  output logic [AW-1:0]      aer,
  output logic               busy
);
  logic [NEURONS-1:0] pending;

  always_comb begin
    aer = '0;
    for (int i = NEURONS - 1; i >= 0; i--)
      if (pending[i]) aer = AW'(i);
  end

  assign valid = |pending;
  assign busy  = valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              pending <= '0;
    else if (load)           pending <= spikes;
    else if (valid && ready) pending[aer] <= 1'b0;
  end

endmodule
