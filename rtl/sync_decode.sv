// sync_decode: tells synchronization-variable addresses from the others.
//
// Synchronization variables live in their own region of the address space.
// Accesses to that region bypass the cache and its buffers and are served
// on the fly by the memory system. The region is SYNC_WORDS datoms starting
// at SYNC_BASE; is_sync is set for an address inside it and sync_idx is the
// variable's index in the region. Purely combinational.
module sync_decode #(
  parameter int unsigned PA_W       = 9,
  parameter int unsigned SYNC_BASE  = 256,
  parameter int unsigned SYNC_WORDS = 8,
  parameter int unsigned SI_W       = 3
) (
  input  logic [PA_W-1:0] addr,
  output logic            is_sync,
  output logic [SI_W-1:0] sync_idx
);

  logic [PA_W:0] off;

  always_comb begin
    off      = {1'b0, addr} - (PA_W+1)'(SYNC_BASE);
    is_sync  = ({1'b0, addr} >= (PA_W+1)'(SYNC_BASE)) && (off < (PA_W+1)'(SYNC_WORDS));
    sync_idx = SI_W'(off);
  end

endmodule
