// flit_fifo: synchronous first-in first-out buffer with valid/ready on both sides.
//
// Used as the NI's incoming-spike buffer and as the input buffer of every
// router port. Storage is a circular array of DEPTH entries of type T with
// read and write pointers and an occupancy counter. in_ready is high while
// there is room; out_valid while the buffer holds data; out_data is the head
// entry, available in the same cycle (first-word fall-through). A push and a
// pop in the same cycle are both taken, also when the buffer is full;
// in_ready is decided from the registered count only, so in_ready never depends
// combinationally on out_ready. Depth and element type are this design's
// choice; the architecture only says that spikes are buffered on arrival and
// that routers have input buffers.
module flit_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T               mem [DEPTH];
  logic [PW-1:0]  wptr, rptr;
  logic           push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= inc(wptr);
      if (pop)  rptr <= inc(rptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
  end

endmodule
