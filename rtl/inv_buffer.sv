// inv_buffer: small buffer of incoming invalidations.
//
// Invalidations of non-owned (Keeper) copies are acknowledged to the memory
// system at once and queued here; the cache controller applies them, i.e.
// sets the frame's stale bit, when the processor is not using the cache,
// and drains the buffer completely before a lock completes and before it
// sends any request to the memory system. A plain FIFO of block addresses.
// Its size is this design's choice (DEPTH).
//
// Interface: push/push_addr enqueue, pop dequeues head_addr; empty and full
// are registered. A push into a full buffer is forbidden (the controller
// then applies the invalidation directly).
module inv_buffer #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned AW    = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [AW-1:0] push_addr,
  input  logic          pop,
  output logic [AW-1:0] head_addr,
  output logic          empty,
  output logic          full
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [AW-1:0] mem [DEPTH];
  logic [PW-1:0] rd, wr;
  logic [PW:0]   cnt;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd  <= '0;
      wr  <= '0;
      cnt <= '0;
      for (int unsigned k = 0; k < DEPTH; k++) mem[k] <= '0;
    end else begin
      if (push && !full) begin
        mem[wr] <= push_addr;
        wr      <= inc(wr);
      end
      if (pop && !empty) rd <= inc(rd);
      cnt <= cnt + (PW+1)'(push && !full) - (PW+1)'(pop && !empty);
    end
  end

  assign head_addr = mem[rd];
  assign empty     = (cnt == '0);
  assign full      = (cnt == (PW+1)'(DEPTH));

  a_no_overflow  : assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
