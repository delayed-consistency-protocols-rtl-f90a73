// rib_state_array: state bits of all blockframes, including the RIB.
//
// Each blockframe has an S (stale), I (invalid), O (owner) and M (modified)
// bit. The Receive-Invalidation Buffer is held in the S bits: setting a
// frame's S bit inserts an invalidation, clearing it removes one. When the
// processor has acquired a lock, 'lock_flush' ORs every S bit into its I bit
// and clears all S bits in one clock cycle, which empties the RIB at once.
// One write port (we, widx, wdata) updates a single frame; it is ignored in
// a cycle with lock_flush (the controller never asserts both). All states
// are readable at once, combinationally, on 'states'. Reset leaves every
// frame invalid and clean (IXC).
module rib_state_array
  import dc_pkg::*;
#(
  parameter int unsigned NUM_FRAMES = 16,
  parameter int unsigned IDX_W      = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [IDX_W-1:0] widx,
  input  frame_state_t     wdata,
  input  logic             lock_flush,
  output frame_state_t     states [NUM_FRAMES],
  output logic             any_stale
);

  frame_state_t st [NUM_FRAMES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned f = 0; f < NUM_FRAMES; f++) st[f] <= ST_IXC;
    end else if (lock_flush) begin
      for (int unsigned f = 0; f < NUM_FRAMES; f++) begin
        st[f].i <= st[f].i | st[f].s;
        st[f].s <= 1'b0;
      end
    end else if (we) begin
      st[widx] <= wdata;
    end
  end

  always_comb begin
    any_stale = 1'b0;
    for (int unsigned f = 0; f < NUM_FRAMES; f++) begin
      states[f] = st[f];
      any_stale = any_stale | st[f].s;
    end
  end

  a_not_both : assert property (@(posedge clk) disable iff (!rst_n) !(we && lock_flush));

endmodule
