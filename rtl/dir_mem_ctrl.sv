// dir_mem_ctrl: shared memory with a full-map directory, system viewpoint.
//
// For every memory block the directory keeps one presence bit per cache and
// the identity of the owner, if any. Seen from the system a cache's copy is
// I (invalid, stale or absent), K (Keeper) or O (Owner), and the controller
// runs a conventional write-invalidate protocol over these states:
//   ReqC  - no valid copy elsewhere: the requester becomes Owner ("ns");
//           otherwise it becomes a Keeper ("s"), after the Owner, if any,
//           has been sent Release Ownership, has updated memory with its
//           dirty datoms and has become a Keeper.
//   ReqO  - every other copy is sent Invalidate; an owned, modified copy
//           first updates memory; the requester becomes the only Owner and
//           receives the block together with the forwarded dirty bits.
//   Inv&UpdM - every other copy is invalidated (an owner updates memory
//           first), then the requester's dirty datoms are written; no copy
//           stays valid in the system.
//   UpdM  - the requester's dirty datoms are written.
// All memory updates are partial: a datom is written only where its dirty
// bit is set. Synchronization variables are a separate small array read,
// written and test-and-set on the fly, bypassing every buffer.
//
// One transaction at a time; caches are served round robin. Timing: grant
// in the cycle a request is seen while idle, one cycle to look up the
// directory, one cycle or more per snooped cache (held until its ack), one
// cycle to finish, and a one-cycle reply pulse to the requester.
// The directory organisation, arbitration and memory size are this
// design's choices. Memory and directory reset to zero.
module dir_mem_ctrl
  import dc_pkg::*;
#(
  parameter int unsigned NUM_PROCS    = 4,
  parameter int unsigned BLOCK_DATOMS = 4,
  parameter int unsigned DATOM_W      = 32,
  parameter int unsigned MEM_BLOCKS   = 64,
  parameter int unsigned SYNC_WORDS   = 8,
  localparam int unsigned BA_W  = $clog2(MEM_BLOCKS),
  localparam int unsigned PID_W = (NUM_PROCS > 1) ? $clog2(NUM_PROCS) : 1,
  localparam int unsigned SI_W  = (SYNC_WORDS > 1) ? $clog2(SYNC_WORDS) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // requests, one port per cache
  input  logic                                  mreq_valid [NUM_PROCS],
  input  mem_cmd_e                              mreq_cmd   [NUM_PROCS],
  input  logic [BA_W-1:0]                       mreq_addr  [NUM_PROCS],
  input  logic [BLOCK_DATOMS-1:0][DATOM_W-1:0]  mreq_data  [NUM_PROCS],
  input  logic [BLOCK_DATOMS-1:0]               mreq_mask  [NUM_PROCS],
  output logic                                  mreq_gnt   [NUM_PROCS],
  // reply (payload shared, valid per cache)
  output logic                                  mresp_valid [NUM_PROCS],
  output logic [BLOCK_DATOMS-1:0][DATOM_W-1:0]  mresp_data,
  output logic [BLOCK_DATOMS-1:0]               mresp_mask,
  output logic                                  mresp_shared,
  output logic [DATOM_W-1:0]                    mresp_word,
  // commands to caches (payload shared, valid per cache)
  output logic                                  snp_valid [NUM_PROCS],
  output snoop_cmd_e                            snp_cmd,
  output logic [BA_W-1:0]                       snp_addr,
  input  logic                                  snp_ack  [NUM_PROCS],
  input  logic                                  snp_mod  [NUM_PROCS],
  input  logic [BLOCK_DATOMS-1:0][DATOM_W-1:0]  snp_data [NUM_PROCS],
  input  logic [BLOCK_DATOMS-1:0]               snp_mask [NUM_PROCS]
);

  typedef logic [BLOCK_DATOMS-1:0][DATOM_W-1:0] block_t;
  typedef enum logic [1:0] {M_IDLE, M_PLAN, M_SNOOP, M_FINISH} mstate_e;

  block_t               mem      [MEM_BLOCKS];
  logic [NUM_PROCS-1:0] presence [MEM_BLOCKS];
  logic                 owner_v  [MEM_BLOCKS];
  logic [PID_W-1:0]     owner    [MEM_BLOCKS];
  logic [DATOM_W-1:0]   syncv    [SYNC_WORDS];

  mstate_e              mst;
  logic [PID_W-1:0]     rr, cur;
  mem_cmd_e             ccmd;
  logic [BA_W-1:0]      caddr;
  block_t               cdata;
  logic [BLOCK_DATOMS-1:0] cmask, fwd_mask;
  logic [NUM_PROCS-1:0] targets;
  logic                 had_owner;

  // ------------------------------------------------------------ arbiter
  logic             any_req;
  logic [PID_W-1:0] pick;

  always_comb begin
    any_req = 1'b0;
    pick    = '0;
    for (int unsigned n = 0; n < NUM_PROCS; n++) begin
      automatic int unsigned c = (int'(rr) + n) % NUM_PROCS;
      if (!any_req && mreq_valid[c]) begin
        any_req = 1'b1;
        pick    = PID_W'(c);
      end
    end
    for (int unsigned n = 0; n < NUM_PROCS; n++)
      mreq_gnt[n] = (mst == M_IDLE) && any_req && (pick == PID_W'(n));
  end

  // ------------------------------------------------------ snoop select
  logic [PID_W-1:0]     tsel;
  logic [NUM_PROCS-1:0] cur_1h, others;

  always_comb begin
    tsel = '0;
    for (int n = NUM_PROCS-1; n >= 0; n--)
      if (targets[n]) tsel = PID_W'(n);
    cur_1h = '0;
    cur_1h[cur] = 1'b1;
    others = presence[caddr] & ~cur_1h;
    for (int unsigned n = 0; n < NUM_PROCS; n++)
      snp_valid[n] = (mst == M_SNOOP) && targets[n] && (tsel == PID_W'(n));
  end

  assign snp_addr = caddr;

  function automatic block_t merge(input block_t base, input block_t upd,
                                   input logic [BLOCK_DATOMS-1:0] mask);
    block_t r = base;
    for (int unsigned d = 0; d < BLOCK_DATOMS; d++)
      if (mask[d]) r[d] = upd[d];
    return r;
  endfunction

  // --------------------------------------------------------- controller
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mst <= M_IDLE; rr <= '0; cur <= '0; ccmd <= MC_NONE; caddr <= '0;
      cdata <= '0; cmask <= '0; fwd_mask <= '0; targets <= '0; had_owner <= 1'b0;
      snp_cmd <= SNP_INV;
      mresp_data <= '0; mresp_mask <= '0; mresp_shared <= 1'b0; mresp_word <= '0;
      for (int unsigned n = 0; n < NUM_PROCS; n++) mresp_valid[n] <= 1'b0;
      for (int unsigned b = 0; b < MEM_BLOCKS; b++) begin
        mem[b] <= '0; presence[b] <= '0; owner_v[b] <= 1'b0; owner[b] <= '0;
      end
      for (int unsigned w = 0; w < SYNC_WORDS; w++) syncv[w] <= '0;
    end else begin
      for (int unsigned n = 0; n < NUM_PROCS; n++) mresp_valid[n] <= 1'b0;
      unique case (mst)
        M_IDLE: if (any_req) begin
          cur   <= pick;
          rr    <= (pick == PID_W'(NUM_PROCS-1)) ? '0 : pick + 1'b1;
          ccmd  <= mreq_cmd[pick];
          caddr <= mreq_addr[pick];
          cdata <= mreq_data[pick];
          cmask <= mreq_mask[pick];
          fwd_mask <= '0;
          mst   <= M_PLAN;
        end
        M_PLAN: begin
          targets   <= '0;
          had_owner <= owner_v[caddr] && (owner[caddr] != cur);
          unique case (ccmd)
            MC_REQC: if (owner_v[caddr] && owner[caddr] != cur) begin
              targets <= presence[caddr] & ~cur_1h & (NUM_PROCS'(1) << owner[caddr]);
              snp_cmd <= SNP_RELO;
            end
            MC_REQO, MC_INV_UPDM: begin
              targets <= others;
              snp_cmd <= SNP_INV;
            end
            default: ;
          endcase
          mst <= M_SNOOP;
        end
        M_SNOOP: begin
          if (targets == '0) begin
            mst <= M_FINISH;
          end else if (snp_ack[tsel]) begin
            if (snp_mod[tsel]) begin
              mem[caddr] <= merge(mem[caddr], snp_data[tsel], snp_mask[tsel]);
              fwd_mask   <= fwd_mask | snp_mask[tsel];
            end
            targets[tsel] <= 1'b0;
          end
        end
        M_FINISH: begin
          mresp_valid[cur] <= 1'b1;
          mresp_data       <= mem[caddr];
          mresp_mask       <= fwd_mask;
          mresp_shared     <= 1'b0;
          mresp_word       <= '0;
          unique case (ccmd)
            MC_REQC: begin
              if (had_owner) owner_v[caddr] <= 1'b0;
              if (others == '0) begin
                owner_v[caddr] <= 1'b1;
                owner[caddr]   <= cur;
              end
              mresp_shared    <= (others != '0);
              presence[caddr] <= presence[caddr] | cur_1h;
            end
            MC_REQO: begin
              presence[caddr] <= cur_1h;
              owner_v[caddr]  <= 1'b1;
              owner[caddr]    <= cur;
            end
            MC_INV_UPDM: begin
              mem[caddr]      <= merge(mem[caddr], cdata, cmask);
              presence[caddr] <= '0;
              owner_v[caddr]  <= 1'b0;
            end
            MC_UPDM: begin
              mem[caddr]      <= merge(mem[caddr], cdata, cmask);
              presence[caddr] <= presence[caddr] & ~cur_1h;
              if (owner[caddr] == cur) owner_v[caddr] <= 1'b0;
            end
            MC_SYNC_RD:  mresp_word <= syncv[SI_W'(caddr)];
            MC_SYNC_WR:  syncv[SI_W'(caddr)] <= cdata[0];
            MC_SYNC_TAS: begin
              mresp_word <= syncv[SI_W'(caddr)];
              syncv[SI_W'(caddr)] <= DATOM_W'(1);
            end
            default: ;
          endcase
          mst <= M_IDLE;
        end
        default: mst <= M_IDLE;
      endcase
    end
  end

  // Snoop handshake: a snoop, once raised, is held until acknowledged.
  for (genvar n = 0; n < NUM_PROCS; n++) begin : g_chk
    a_snp_hold : assert property (@(posedge clk) disable iff (!rst_n)
        snp_valid[n] && !snp_ack[n] |=> snp_valid[n]);
  end

endmodule
