// dc_pkg: types shared by the delayed-consistency cache system.
//
// A blockframe carries four state bits, S (stale), I (invalid), O (owner)
// and M (modified), as proposed for the practical form of the protocol.
// The eight processor-side states are the legal combinations: IXC, IXM,
// VKC, VKM, SKC, SKM, VOC and VOM (X = don't care for the stale bit, which
// is always 0 when I is set). The command codes name the messages of the
// system-level write-invalidate protocol (ReqC, ReqO, Inv&UpdM, UpdM) and
// the uncached accesses to synchronization variables, which bypass all
// buffers. Encodings are this design's choice.
package dc_pkg;

  typedef struct packed {
    logic s;  // stale: an invalidation is pending (the RIB entry)
    logic i;  // invalid
    logic o;  // owner
    logic m;  // modified: at least one dirty bit set
  } frame_state_t;

  localparam frame_state_t ST_IXC = '{s:1'b0, i:1'b1, o:1'b0, m:1'b0};
  localparam frame_state_t ST_IXM = '{s:1'b0, i:1'b1, o:1'b0, m:1'b1};
  localparam frame_state_t ST_VKC = '{s:1'b0, i:1'b0, o:1'b0, m:1'b0};
  localparam frame_state_t ST_VKM = '{s:1'b0, i:1'b0, o:1'b0, m:1'b1};
  localparam frame_state_t ST_SKC = '{s:1'b1, i:1'b0, o:1'b0, m:1'b0};
  localparam frame_state_t ST_SKM = '{s:1'b1, i:1'b0, o:1'b0, m:1'b1};
  localparam frame_state_t ST_VOC = '{s:1'b0, i:1'b0, o:1'b1, m:1'b0};
  localparam frame_state_t ST_VOM = '{s:1'b0, i:1'b0, o:1'b1, m:1'b1};

  // Events seen by one blockframe (columns of the processor-side table).
  typedef enum logic [2:0] {
    EV_READ    = 3'd0,
    EV_WRITE   = 3'd1,
    EV_LOCK    = 3'd2,
    EV_REMSIB  = 3'd3,  // entry removed from the SIB (head removal or unlock)
    EV_REPLACE = 3'd4,
    EV_INV     = 3'd5,  // Invalidate received from the memory system
    EV_RELO    = 3'd6   // Release Ownership received from the memory system
  } frame_ev_e;

  // Commands from a processor node to the memory system.
  typedef enum logic [2:0] {
    MC_NONE     = 3'd0,
    MC_REQC     = 3'd1,  // request a copy (read miss)
    MC_REQO     = 3'd2,  // request ownership
    MC_INV_UPDM = 3'd3,  // invalidate all copies and partially update memory
    MC_UPDM     = 3'd4,  // partial update of memory only
    MC_SYNC_RD  = 3'd5,  // uncached read of a synchronization variable
    MC_SYNC_WR  = 3'd6,  // uncached write (unlock writes 0)
    MC_SYNC_TAS = 3'd7   // test-and-set (lock attempt)
  } mem_cmd_e;

  // Commands from the memory system to a cache.
  typedef enum logic {
    SNP_INV  = 1'b0,
    SNP_RELO = 1'b1
  } snoop_cmd_e;

  // Processor operations.
  typedef enum logic [1:0] {
    OP_READ   = 2'd0,
    OP_WRITE  = 2'd1,
    OP_LOCK   = 2'd2,
    OP_UNLOCK = 2'd3
  } proc_op_e;

  // Output of the per-frame protocol function.
  typedef struct packed {
    mem_cmd_e     cmd;      // memory command to issue (MC_NONE if none)
    frame_state_t next;     // next state (for MC_REQC: depends on 'shared')
    logic         hit;      // the processor access completes now
    logic         ins_sib;  // insert the frame in the SIB
    logic         rem_sib;  // remove the frame's SIB entry (associative)
    logic         fwd;      // forward the block and dirty bits with the ack
    logic         clr_dirty;// clear the dirty bits
  } fsm_out_t;

  // One-cycle event pulses of a processor node, for counting.
  typedef struct packed {
    logic read_miss;
    logic write_miss;
    logic stale_hit;      // access served from a stale copy
    logic sib_insert;
    logic sib_full_evict; // SIB head removed because the SIB was full
    logic unlock_flush;   // SIB entry removed on an unlock
    logic lock_rib_flush; // RIB emptied after an acquired lock
    logic lock_fail;
    logic invb_push;      // invalidation queued in the small buffer
    logic invb_apply;     // queued invalidation applied to the frame
    logic owner_fwd;      // owned, modified copy forwarded on a snoop
    logic replace_flush;  // Inv&UpdM issued for a modified victim
    logic reqo_merge;     // ReqO reply merged with local dirty datoms
    logic periodic_flush; // SIB entry or stale copies flushed by the timer
  } dc_events_t;

endpackage
