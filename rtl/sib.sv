// sib: Send-Invalidation Buffer.
//
// Holds the blockframe indices of Keeper copies that have been modified and
// whose modification has not yet been propagated. It is a FIFO (insert at
// the tail, remove the oldest entry at the head) that can also remove any
// entry given its frame index, as a replacement requires. Entries are kept
// packed from position 0 (the head) to position count-1; removing the entry
// at position k shifts every younger entry one place towards the head, the
// same shift-on-match structure as an LRU stack. The buffer's full size is
// one entry per blockframe, which never overflows because a frame holds at
// most one entry; a smaller DEPTH gives the finite SIB, and the controller
// then removes the head before inserting into a full buffer.
//
// Interface: 'push' inserts push_idx; 'pop' removes the head; 'rem' removes
// the entry equal to rem_idx if there is one (rem_hit tells). Only one of
// the three may be asserted per cycle. head_idx, empty, full and count are
// registered state, valid in the cycle after an update.
module sib #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned IDX_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [IDX_W-1:0] push_idx,
  input  logic             pop,
  input  logic             rem,
  input  logic [IDX_W-1:0] rem_idx,
  output logic             rem_hit,
  output logic [IDX_W-1:0] head_idx,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [IDX_W-1:0] ent [DEPTH];
  logic [CW-1:0]    cnt;

  // Position of the entry to take out: 0 for pop, the match for rem.
  logic [DEPTH-1:0] match;
  logic [CW-1:0]    kpos;
  logic             take;

  always_comb begin
    for (int unsigned k = 0; k < DEPTH; k++)
      match[k] = (CW'(k) < cnt) && (ent[k] == rem_idx);
    kpos    = '0;
    rem_hit = 1'b0;
    for (int k = DEPTH-1; k >= 0; k--)
      if (match[k]) begin
        kpos    = CW'(k);
        rem_hit = 1'b1;
      end
    take = (pop && !empty) || (rem && rem_hit);
    if (pop) kpos = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int unsigned k = 0; k < DEPTH; k++) ent[k] <= '0;
    end else if (take) begin
      for (int unsigned k = 0; k < DEPTH-1; k++)
        if (CW'(k) >= kpos) ent[k] <= ent[k+1];
      cnt <= cnt - 1'b1;
    end else if (push && !full) begin
      for (int unsigned k = 0; k < DEPTH; k++)
        if (CW'(k) == cnt) ent[k] <= push_idx;
      cnt <= cnt + 1'b1;
    end
  end

  assign head_idx = ent[0];
  assign empty    = (cnt == '0);
  assign full     = (cnt == CW'(DEPTH));
  assign count    = cnt;

  // One operation per cycle; never push into a full buffer.
  a_one_op : assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({push, pop, rem}));
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
      push |-> !full);

endmodule
