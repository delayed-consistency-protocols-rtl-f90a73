// dc_system: multiprocessor memory system with delayed consistency.
//
// NUM_PROCS processor nodes, each with a delayed-consistency cache
// (dc_cache: stale bits for received invalidations, a Send-Invalidation
// Buffer for its own modifications, per-datom dirty bits), share one
// directory-based memory (dir_mem_ctrl). Between caches the protocol is a
// conventional write-invalidate one; the delay lives entirely in the nodes:
// a node's stores to shared blocks become visible at its next unlock at the
// latest, and invalidations it receives take effect at its next lock.
// Programs must be data-race free and synchronize through LOCK/UNLOCK on
// addresses in the synchronization region (the upper half of the address
// space), which bypass the caches.
//
// The interconnect is a set of point-to-point request, reply and snoop
// channels between each cache and the memory controller, which serves one
// transaction at a time.
//
// Ports are one processor port per node, as arrays indexed by node, plus
// the per-node event pulses used to count misses and protocol activity.
// Default sizes: four processors, blocks of four 32-bit datoms, 16
// blockframes per cache, a SIB with one entry per blockframe, 64 memory
// blocks and 8 synchronization variables. SIB_DEPTH=0 builds every cache
// without an SIB (writes need an owned copy; unlocks only write the lock).
// SIB_DEPTH=0 with RIB_DELAY=0 builds the on-the-fly protocol, with no
// delay on either side, for comparison.
module dc_system
  import dc_pkg::*;
#(
  parameter int unsigned NUM_PROCS    = 4,
  parameter int unsigned NUM_FRAMES   = 16,
  parameter int unsigned BLOCK_DATOMS = 4,
  parameter int unsigned DATOM_W      = 32,
  parameter int unsigned MEM_BLOCKS   = 64,
  parameter int unsigned SIB_DEPTH    = NUM_FRAMES,
  parameter int unsigned INVB_DEPTH   = 4,
  parameter int unsigned SYNC_WORDS   = 8,
  parameter int unsigned FLUSH_PERIOD = 0,
  parameter bit          RIB_DELAY    = 1'b1,
  localparam int unsigned OFF_W = (BLOCK_DATOMS > 1) ? $clog2(BLOCK_DATOMS) : 1,
  localparam int unsigned BA_W  = $clog2(MEM_BLOCKS),
  localparam int unsigned PA_W  = BA_W + OFF_W + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               p_req     [NUM_PROCS],
  input  proc_op_e           p_op      [NUM_PROCS],
  input  logic [PA_W-1:0]    p_addr    [NUM_PROCS],
  input  logic [DATOM_W-1:0] p_wdata   [NUM_PROCS],
  output logic               p_done    [NUM_PROCS],
  output logic [DATOM_W-1:0] p_rdata   [NUM_PROCS],
  output logic               p_lock_ok [NUM_PROCS],
  output dc_events_t         p_ev      [NUM_PROCS]
);

  typedef logic [BLOCK_DATOMS-1:0][DATOM_W-1:0] block_t;

  logic                    mreq_valid [NUM_PROCS];
  mem_cmd_e                mreq_cmd   [NUM_PROCS];
  logic [BA_W-1:0]         mreq_addr  [NUM_PROCS];
  block_t                  mreq_data  [NUM_PROCS];
  logic [BLOCK_DATOMS-1:0] mreq_mask  [NUM_PROCS];
  logic                    mreq_gnt   [NUM_PROCS];
  logic                    mresp_valid[NUM_PROCS];
  block_t                  mresp_data;
  logic [BLOCK_DATOMS-1:0] mresp_mask;
  logic                    mresp_shared;
  logic [DATOM_W-1:0]      mresp_word;
  logic                    snp_valid  [NUM_PROCS];
  snoop_cmd_e              snp_cmd;
  logic [BA_W-1:0]         snp_addr;
  logic                    snp_ack    [NUM_PROCS];
  logic                    snp_mod    [NUM_PROCS];
  block_t                  snp_data   [NUM_PROCS];
  logic [BLOCK_DATOMS-1:0] snp_mask   [NUM_PROCS];

  for (genvar n = 0; n < NUM_PROCS; n++) begin : g_node
    dc_cache #(
      .NUM_FRAMES(NUM_FRAMES), .BLOCK_DATOMS(BLOCK_DATOMS), .DATOM_W(DATOM_W),
      .MEM_BLOCKS(MEM_BLOCKS), .SIB_DEPTH(SIB_DEPTH), .INVB_DEPTH(INVB_DEPTH),
      .SYNC_WORDS(SYNC_WORDS), .FLUSH_PERIOD(FLUSH_PERIOD), .RIB_DELAY(RIB_DELAY)
    ) u_cache (
      .clk, .rst_n,
      .proc_req(p_req[n]), .proc_op(p_op[n]), .proc_addr(p_addr[n]),
      .proc_wdata(p_wdata[n]), .proc_done(p_done[n]), .proc_rdata(p_rdata[n]),
      .proc_lock_ok(p_lock_ok[n]),
      .mreq_valid(mreq_valid[n]), .mreq_cmd(mreq_cmd[n]), .mreq_addr(mreq_addr[n]),
      .mreq_data(mreq_data[n]), .mreq_mask(mreq_mask[n]), .mreq_gnt(mreq_gnt[n]),
      .mresp_valid(mresp_valid[n]), .mresp_data, .mresp_mask, .mresp_shared, .mresp_word,
      .snp_valid(snp_valid[n]), .snp_cmd, .snp_addr, .snp_ack(snp_ack[n]),
      .snp_mod(snp_mod[n]), .snp_data(snp_data[n]), .snp_mask(snp_mask[n]),
      .ev(p_ev[n]));
  end

  dir_mem_ctrl #(
    .NUM_PROCS(NUM_PROCS), .BLOCK_DATOMS(BLOCK_DATOMS), .DATOM_W(DATOM_W),
    .MEM_BLOCKS(MEM_BLOCKS), .SYNC_WORDS(SYNC_WORDS)
  ) u_mem (
    .clk, .rst_n,
    .mreq_valid, .mreq_cmd, .mreq_addr, .mreq_data, .mreq_mask, .mreq_gnt,
    .mresp_valid, .mresp_data, .mresp_mask, .mresp_shared, .mresp_word,
    .snp_valid, .snp_cmd, .snp_addr, .snp_ack, .snp_mod, .snp_data, .snp_mask);

endmodule
