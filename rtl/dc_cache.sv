// dc_cache: processor-node cache of the delayed write-invalidate protocol.
//
// A direct-mapped cache whose blockframes carry S,I,O,M state bits and one
// dirty bit per datom. Stores to a block that is not owned do not acquire a
// unique copy: a clean Keeper copy becomes modified and its frame index is
// entered in the Send-Invalidation Buffer (sib); the modification reaches
// the memory system only when the entry leaves the SIB (ReqO for a still
// valid copy, Inv&UpdM for a stale one), which happens at the latest just
// before an unlock. Invalidations received for a copy make it stale, not
// invalid: the processor keeps reading and writing it until its next lock,
// when all stale bits are ORed into the invalid bits (rib_state_array).
// Owned copies behave as in an on-the-fly protocol: an Invalidate or
// Release Ownership forwards a modified owned copy with its dirty bits.
// Memory updates are partial: only the datoms whose dirty bit is set are
// written. The per-frame decisions come from dc_fsm_table.
//
// Accesses to the synchronization region (sync_decode) bypass the cache:
// LOCK is a test-and-set in memory and, when it acquires the lock, first
// empties the small invalidation buffer and then the RIB; UNLOCK first
// empties the SIB, one entry per memory transaction, then writes 0 to the
// lock. Plain READ/WRITE of a synchronization address are uncached.
//
// Invalidations of non-owned copies are acknowledged at once and queued in
// inv_buffer; they are applied while the processor does not use the cache
// and always before a memory request or a lock completes.
//
// Processor port: hold proc_req with op/addr/wdata until proc_done, a
// one-cycle pulse with proc_rdata and proc_lock_ok; a request asserted in
// the cycle proc_done is high is taken in the following cycle. A hit takes
// one cycle. Memory port: mreq_valid with command, block address, block
// data and dirty mask stays up until mreq_gnt; the request is withdrawn
// (and re-evaluated later) if a snoop arrives before the grant. The reply is
// a one-cycle mresp_valid. Snoop port: snp_valid/snp_cmd/snp_addr are held
// by the memory system until snp_ack, which this cache gives in the same
// cycle, together with the block and dirty mask when snp_mod is set.
//
// Own choices, where the protocol leaves it open: direct mapping; clean
// copies are replaced silently; a modified frame leaving the
// "non-owned and modified" condition always has its SIB entry removed, so a
// frame is in the SIB exactly when O=0 and M=1; a two-message table entry
// is issued as two transactions.
//
// SIB_DEPTH=0 builds the simplified cache without an SIB: the table runs
// with NO_SIB=1, so a write needs an owned copy, and an unlock only writes
// the lock variable. Invalidations are still delayed by the stale bits.
// RIB_DELAY=0, allowed only with SIB_DEPTH=0, applies every incoming
// invalidation at once (no stale copies, no invalidation queue): this is
// the on-the-fly protocol without any delay in the processor.
module dc_cache
  import dc_pkg::*;
#(
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
  localparam int unsigned IDX_W = $clog2(NUM_FRAMES),
  localparam int unsigned TAG_W = BA_W - IDX_W,
  localparam int unsigned PA_W  = BA_W + OFF_W + 1,
  localparam int unsigned SI_W  = (SYNC_WORDS > 1) ? $clog2(SYNC_WORDS) : 1,
  localparam bit          NO_SIB = (SIB_DEPTH == 0)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // processor
  input  logic                                  proc_req,
  input  proc_op_e                              proc_op,
  input  logic [PA_W-1:0]                       proc_addr,
  input  logic [DATOM_W-1:0]                    proc_wdata,
  output logic                                  proc_done,
  output logic [DATOM_W-1:0]                    proc_rdata,
  output logic                                  proc_lock_ok,
  // requests to the memory system
  output logic                                  mreq_valid,
  output mem_cmd_e                              mreq_cmd,
  output logic [BA_W-1:0]                       mreq_addr,
  output logic [BLOCK_DATOMS-1:0][DATOM_W-1:0]  mreq_data,
  output logic [BLOCK_DATOMS-1:0]               mreq_mask,
  input  logic                                  mreq_gnt,
  input  logic                                  mresp_valid,
  input  logic [BLOCK_DATOMS-1:0][DATOM_W-1:0]  mresp_data,
  input  logic [BLOCK_DATOMS-1:0]               mresp_mask,
  input  logic                                  mresp_shared,
  input  logic [DATOM_W-1:0]                    mresp_word,
  // commands from the memory system
  input  logic                                  snp_valid,
  input  snoop_cmd_e                            snp_cmd,
  input  logic [BA_W-1:0]                       snp_addr,
  output logic                                  snp_ack,
  output logic                                  snp_mod,
  output logic [BLOCK_DATOMS-1:0][DATOM_W-1:0]  snp_data,
  output logic [BLOCK_DATOMS-1:0]               snp_mask,
  // event pulses
  output dc_events_t                            ev
);

  typedef logic [BLOCK_DATOMS-1:0][DATOM_W-1:0] block_t;

  typedef enum logic [1:0] {C_IDLE, C_REQ, C_WAIT} cstate_e;
  typedef enum logic [2:0] {K_ACCESS, K_REMSIB, K_SYNC, K_LOCK, K_UNLOCK} kind_e;

  // ---------------------------------------------------------------- arrays
  logic [TAG_W-1:0]        tags  [NUM_FRAMES];
  block_t                  data  [NUM_FRAMES];
  logic [BLOCK_DATOMS-1:0] dirty [NUM_FRAMES];
  frame_state_t            states[NUM_FRAMES];

  cstate_e  cst;
  kind_e    p_kind;
  mem_cmd_e p_cmd;
  logic [IDX_W-1:0] p_frame;
  logic [TAG_W-1:0] p_tag;
  frame_state_t     p_next;
  logic             p_clr, p_rem, p_repl, p_periodic;
  logic             flush_pend;

  // ------------------------------------------------------- sub-blocks
  logic             st_we, lock_flush, any_stale;
  logic [IDX_W-1:0] st_widx;
  frame_state_t     st_wdata;

  rib_state_array #(.NUM_FRAMES(NUM_FRAMES), .IDX_W(IDX_W)) u_state (
    .clk, .rst_n, .we(st_we), .widx(st_widx), .wdata(st_wdata),
    .lock_flush, .states, .any_stale);

  logic             sib_push, sib_pop, sib_rem, sib_rem_hit, sib_empty, sib_full;
  logic [IDX_W-1:0] sib_push_idx, sib_rem_idx, sib_head;

  if (!RIB_DELAY && !NO_SIB) begin : g_bad_delay
    $error("RIB_DELAY=0 requires SIB_DEPTH=0");
  end

  if (NO_SIB) begin : g_no_sib
    // nothing is ever inserted; a removal would fail a_sib_entry_present
    assign sib_rem_hit = 1'b0;
    assign sib_head    = '0;
    assign sib_empty   = 1'b1;
    assign sib_full    = 1'b0;
  end else begin : g_sib
    logic [$clog2(SIB_DEPTH+1)-1:0] sib_count;
    sib #(.DEPTH(SIB_DEPTH), .IDX_W(IDX_W)) u_sib (
      .clk, .rst_n, .push(sib_push), .push_idx(sib_push_idx), .pop(sib_pop),
      .rem(sib_rem), .rem_idx(sib_rem_idx), .rem_hit(sib_rem_hit),
      .head_idx(sib_head), .empty(sib_empty), .full(sib_full), .count(sib_count));
  end

  logic            invb_push, invb_pop, invb_empty, invb_full;
  logic [BA_W-1:0] invb_head;

  inv_buffer #(.DEPTH(INVB_DEPTH), .AW(BA_W)) u_invb (
    .clk, .rst_n, .push(invb_push), .push_addr(snp_addr), .pop(invb_pop),
    .head_addr(invb_head), .empty(invb_empty), .full(invb_full));

  logic            a_sync;
  logic [SI_W-1:0] a_sidx;

  sync_decode #(.PA_W(PA_W), .SYNC_BASE(1 << (PA_W-1)), .SYNC_WORDS(SYNC_WORDS), .SI_W(SI_W))
    u_sync (.addr(proc_addr), .is_sync(a_sync), .sync_idx(a_sidx));

  // --------------------------------------------- processor access decode
  logic [BA_W-1:0]  a_blk;
  logic [OFF_W-1:0] a_off;
  logic [IDX_W-1:0] a_idx;
  logic [TAG_W-1:0] a_tag;
  frame_state_t     a_st;
  logic             a_victim;
  fsm_out_t         tp;

  assign a_blk    = proc_addr[BA_W+OFF_W-1:OFF_W];
  assign a_off    = proc_addr[OFF_W-1:0];
  assign a_idx    = a_blk[IDX_W-1:0];
  assign a_tag    = a_blk[BA_W-1:IDX_W];
  assign a_victim = (tags[a_idx] != a_tag) && (states[a_idx] != ST_IXC);
  assign a_st     = (tags[a_idx] == a_tag) ? states[a_idx] : ST_IXC;

  dc_fsm_table #(.NO_SIB(NO_SIB), .DELAY_INV(RIB_DELAY)) u_tp (
    .st(a_victim ? states[a_idx] : a_st),
    .ev(a_victim ? EV_REPLACE : (proc_op == OP_WRITE ? EV_WRITE : EV_READ)),
    .shared(1'b0), .out(tp));

  // SIB head removal
  fsm_out_t th;
  dc_fsm_table #(.NO_SIB(NO_SIB), .DELAY_INV(RIB_DELAY)) u_th (.st(states[sib_head]), .ev(EV_REMSIB), .shared(1'b0), .out(th));

  // snoop
  logic [IDX_W-1:0] s_idx;
  logic             s_match;
  fsm_out_t         ts;
  assign s_idx   = snp_addr[IDX_W-1:0];
  assign s_match = (tags[s_idx] == snp_addr[BA_W-1:IDX_W]) && !states[s_idx].i;
  dc_fsm_table #(.NO_SIB(NO_SIB), .DELAY_INV(RIB_DELAY)) u_ts (.st(states[s_idx]), .ev(snp_cmd == SNP_INV ? EV_INV : EV_RELO),
                     .shared(1'b0), .out(ts));

  // queued invalidation
  logic [IDX_W-1:0] q_idx;
  logic             q_match;
  fsm_out_t         tq;
  assign q_idx   = invb_head[IDX_W-1:0];
  assign q_match = (tags[q_idx] == invb_head[BA_W-1:IDX_W]);
  dc_fsm_table #(.NO_SIB(NO_SIB), .DELAY_INV(RIB_DELAY)) u_tq (.st(states[q_idx]), .ev(EV_INV), .shared(1'b0), .out(tq));

  // ----------------------------------------------------- action decision
  logic       take_req;     // a processor request may be looked at
  logic       needs_mem;
  logic       do_issue;
  mem_cmd_e   i_cmd;
  logic [BA_W-1:0] i_addr;
  logic [IDX_W-1:0] i_frame;
  logic [TAG_W-1:0] i_tag;
  kind_e      i_kind;
  frame_state_t i_next;
  logic       i_clr, i_rem, i_repl, i_periodic;
  logic       flush_done;

  logic       hit_write, fill_we, merge_we, dirty_clr;
  logic [IDX_W-1:0] dirty_clr_idx;
  logic       done_set, lock_ok_set;
  logic [DATOM_W-1:0] rdata_set;
  cstate_e    cst_n;
  dc_events_t ev_c;

  assign take_req  = proc_req && !proc_done;
  assign needs_mem = (proc_op == OP_LOCK) || (proc_op == OP_UNLOCK) || a_sync ||
                     a_victim || (tp.cmd != MC_NONE) || (tp.ins_sib && sib_full);

  always_comb begin
    st_we = 1'b0; st_widx = '0; st_wdata = ST_IXC; lock_flush = 1'b0;
    sib_push = 1'b0; sib_push_idx = a_idx; sib_pop = 1'b0; sib_rem = 1'b0; sib_rem_idx = p_frame;
    invb_push = 1'b0; invb_pop = 1'b0;
    snp_ack = 1'b0; snp_mod = 1'b0; snp_data = data[s_idx]; snp_mask = dirty[s_idx];
    do_issue = 1'b0; i_cmd = MC_NONE; i_addr = '0; i_frame = a_idx; i_tag = a_tag;
    i_kind = K_ACCESS; i_next = ST_IXC; i_clr = 1'b0; i_rem = 1'b0; i_repl = 1'b0;
    i_periodic = 1'b0; flush_done = 1'b0;
    hit_write = 1'b0; fill_we = 1'b0; merge_we = 1'b0;
    dirty_clr = 1'b0; dirty_clr_idx = p_frame;
    done_set = 1'b0; lock_ok_set = 1'b0; rdata_set = '0;
    cst_n = cst;
    ev_c = '0;

    unique case (cst)
      C_IDLE, C_REQ: begin
        if (snp_valid) begin
          // ---- command from the memory system
          snp_ack = 1'b1;
          if (cst == C_REQ) cst_n = C_IDLE;   // withdraw, re-evaluate later
          if (s_match) begin
            if (RIB_DELAY && snp_cmd == SNP_INV && !states[s_idx].o && !states[s_idx].s && !invb_full) begin
              invb_push = 1'b1;
              ev_c.invb_push = 1'b1;
            end else begin
              st_we = 1'b1; st_widx = s_idx; st_wdata = ts.next;
              snp_mod = ts.fwd;
              ev_c.owner_fwd = ts.fwd;
              dirty_clr = ts.clr_dirty; dirty_clr_idx = s_idx;
            end
          end
        end else if (cst == C_REQ) begin
          if (mreq_gnt) cst_n = C_WAIT;
        end else if (take_req && !(needs_mem && !invb_empty)) begin
          // ---- processor request
          if (proc_op == OP_UNLOCK && !sib_empty) begin
            do_issue = 1'b1; i_kind = K_REMSIB; i_frame = sib_head; i_tag = tags[sib_head];
            i_cmd = th.cmd; i_next = th.next; i_clr = th.clr_dirty;
          end else if (proc_op == OP_UNLOCK) begin
            do_issue = 1'b1; i_kind = K_UNLOCK; i_cmd = MC_SYNC_WR;
            i_addr = BA_W'(a_sidx);
          end else if (proc_op == OP_LOCK) begin
            do_issue = 1'b1; i_kind = K_LOCK; i_cmd = MC_SYNC_TAS;
            i_addr = BA_W'(a_sidx);
          end else if (a_sync) begin
            do_issue = 1'b1; i_kind = K_SYNC;
            i_cmd = (proc_op == OP_WRITE) ? MC_SYNC_WR : MC_SYNC_RD;
            i_addr = BA_W'(a_sidx);
          end else if (a_victim) begin
            if (tp.cmd == MC_NONE) begin        // clean victim: drop silently
              st_we = 1'b1; st_widx = a_idx; st_wdata = ST_IXC;
            end else begin
              do_issue = 1'b1; i_kind = K_ACCESS; i_tag = tags[a_idx];
              i_cmd = tp.cmd; i_next = tp.next; i_clr = tp.clr_dirty; i_rem = tp.rem_sib;
              i_repl = 1'b1;
            end
          end else if (tp.hit) begin
            if (tp.ins_sib && sib_full) begin   // finite SIB: make room first
              do_issue = 1'b1; i_kind = K_REMSIB; i_frame = sib_head; i_tag = tags[sib_head];
              i_cmd = th.cmd; i_next = th.next; i_clr = th.clr_dirty;
            end else begin
              done_set = 1'b1;
              rdata_set = data[a_idx][a_off];
              ev_c.stale_hit = a_st.s;
              if (proc_op == OP_WRITE) begin
                hit_write = 1'b1;
                st_we = 1'b1; st_widx = a_idx; st_wdata = tp.next;
                sib_push = tp.ins_sib;
                ev_c.sib_insert = tp.ins_sib;
              end
            end
          end else begin
            do_issue = 1'b1; i_kind = K_ACCESS;
            i_cmd = tp.cmd; i_next = tp.next; i_clr = tp.clr_dirty; i_rem = tp.rem_sib;
          end
          if (do_issue) cst_n = C_REQ;
        end else if (!invb_empty) begin
          // ---- apply one queued invalidation
          invb_pop = 1'b1;
          ev_c.invb_apply = 1'b1;
          if (q_match) begin
            st_we = 1'b1; st_widx = q_idx; st_wdata = tq.next;
          end
        end else if (flush_pend && !sib_empty) begin
          // ---- periodic flush: propagate the SIB while the processor is idle
          do_issue = 1'b1; i_kind = K_REMSIB; i_frame = sib_head; i_tag = tags[sib_head];
          i_cmd = th.cmd; i_next = th.next; i_clr = th.clr_dirty; i_periodic = 1'b1;
          cst_n = C_REQ;
        end else if (flush_pend) begin
          // ---- periodic flush: then drop the stale copies
          lock_flush = 1'b1;
          flush_done = 1'b1;
          ev_c.periodic_flush = 1'b1;
        end
        if (i_kind == K_ACCESS || i_kind == K_REMSIB) i_addr = {i_tag, i_frame};
      end

      C_WAIT: begin
        if (mresp_valid) begin
          cst_n = C_IDLE;
          unique case (p_kind)
            K_ACCESS: begin
              if (p_cmd == MC_REQC || p_cmd == MC_REQO) begin
                fill_we = 1'b1;
                st_we = 1'b1; st_widx = p_frame;
                if (p_cmd == MC_REQC) begin
                  st_wdata = mresp_shared ? ST_VKC : ST_VOC;
                  ev_c.read_miss = 1'b1;
                end else begin
                  st_wdata = (|mresp_mask) ? ST_VOM : ST_VOC;
                  ev_c.write_miss = 1'b1;
                end
              end else begin
                st_we = 1'b1; st_widx = p_frame; st_wdata = p_next;
                dirty_clr = p_clr;
                sib_rem = p_rem; sib_rem_idx = p_frame;
                ev_c.replace_flush = p_repl;
              end
            end
            K_REMSIB: begin
              sib_pop = 1'b1;
              st_we = 1'b1; st_widx = p_frame; st_wdata = p_next;
              if (p_cmd == MC_REQO) begin
                merge_we = 1'b1;
                ev_c.reqo_merge = 1'b1;
              end else begin
                dirty_clr = p_clr;
              end
              if (p_periodic)                ev_c.periodic_flush = 1'b1;
              else if (proc_op == OP_UNLOCK) ev_c.unlock_flush = 1'b1;
              else                           ev_c.sib_full_evict = 1'b1;
            end
            K_SYNC, K_UNLOCK: begin
              done_set = 1'b1; rdata_set = mresp_word;
            end
            K_LOCK: begin
              done_set = 1'b1; rdata_set = mresp_word;
              if (mresp_word == '0) begin
                lock_ok_set = 1'b1;
                lock_flush = 1'b1;
                ev_c.lock_rib_flush = 1'b1;
              end else begin
                ev_c.lock_fail = 1'b1;
              end
            end
            default: ;
          endcase
        end
      end
      default: cst_n = C_IDLE;
    endcase
  end

  // ---------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cst          <= C_IDLE;
      mreq_valid   <= 1'b0;
      mreq_cmd     <= MC_NONE;
      mreq_addr    <= '0;
      mreq_data    <= '0;
      mreq_mask    <= '0;
      proc_done    <= 1'b0;
      proc_rdata   <= '0;
      proc_lock_ok <= 1'b0;
      p_kind <= K_ACCESS; p_cmd <= MC_NONE; p_frame <= '0; p_tag <= '0;
      p_next <= ST_IXC; p_clr <= 1'b0; p_rem <= 1'b0; p_repl <= 1'b0; p_periodic <= 1'b0;
      ev <= '0;
      for (int unsigned f = 0; f < NUM_FRAMES; f++) begin
        tags[f] <= '0; data[f] <= '0; dirty[f] <= '0;
      end
    end else begin
      cst       <= cst_n;
      ev        <= ev_c;
      proc_done <= done_set;
      if (done_set) begin
        proc_rdata   <= rdata_set;
        proc_lock_ok <= lock_ok_set;
      end
      // memory request
      if (do_issue) begin
        mreq_valid <= 1'b1;
        mreq_cmd   <= i_cmd;
        mreq_addr  <= i_addr;
        mreq_data  <= (i_kind == K_ACCESS || i_kind == K_REMSIB) ? data[i_frame] : block_t'(proc_wdata);
        mreq_mask  <= (i_kind == K_ACCESS || i_kind == K_REMSIB) ? dirty[i_frame] : '0;
        if (i_kind == K_UNLOCK) mreq_data <= '0;
        p_kind <= i_kind; p_cmd <= i_cmd; p_frame <= i_frame; p_tag <= i_tag;
        p_next <= i_next; p_clr <= i_clr; p_rem <= i_rem; p_repl <= i_repl;
        p_periodic <= i_periodic;
      end else if (cst == C_REQ && (mreq_gnt || snp_valid)) begin
        mreq_valid <= 1'b0;
      end
      // data, dirty bits, tags
      if (hit_write) begin
        data[a_idx][a_off]  <= proc_wdata;
        dirty[a_idx][a_off] <= 1'b1;
      end
      if (fill_we) begin
        tags[p_frame]  <= p_tag;
        data[p_frame]  <= mresp_data;
        dirty[p_frame] <= (p_cmd == MC_REQO) ? mresp_mask : '0;
      end
      if (merge_we) begin
        for (int unsigned d = 0; d < BLOCK_DATOMS; d++)
          if (!dirty[p_frame][d]) data[p_frame][d] <= mresp_data[d];
        dirty[p_frame] <= dirty[p_frame] | mresp_mask;
      end
      if (dirty_clr) dirty[dirty_clr_idx] <= '0;
    end
  end

  // Periodic flush timer (FLUSH_PERIOD = 0: none). When it expires, the
  // SIB is emptied and the stale copies are invalidated, in cycles in which
  // the processor does not use the cache.
  if (FLUSH_PERIOD > 0) begin : g_flush
    logic [$clog2(FLUSH_PERIOD+1)-1:0] tmr;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        tmr <= '0; flush_pend <= 1'b0;
      end else begin
        if (flush_done) flush_pend <= 1'b0;
        if (tmr == $bits(tmr)'(FLUSH_PERIOD-1)) begin
          tmr <= '0;
          flush_pend <= 1'b1;
        end else begin
          tmr <= tmr + 1'b1;
        end
      end
    end
  end else begin : g_noflush
    assign flush_pend = 1'b0;
  end

  // ------------------------------------------------------------ checks
  a_sib_entry_present : assert property (@(posedge clk) disable iff (!rst_n)
      sib_rem |-> sib_rem_hit);
  a_no_gnt_and_snoop : assert property (@(posedge clk) disable iff (!rst_n)
      !(mreq_gnt && snp_valid));
  a_req_stable : assert property (@(posedge clk) disable iff (!rst_n)
      mreq_valid && !mreq_gnt && !snp_valid |=> mreq_valid && $stable(mreq_cmd) && $stable(mreq_addr));
  a_resp_expected : assert property (@(posedge clk) disable iff (!rst_n)
      mresp_valid |-> cst == C_WAIT);
  if (NO_SIB) begin : g_no_sib_check
    a_no_sib_keeper_clean : assert property (@(posedge clk) disable iff (!rst_n)
        st_we |-> st_wdata.o || !st_wdata.m);
  end
  a_sync_ops : assert property (@(posedge clk) disable iff (!rst_n)
      proc_req && (proc_op == OP_LOCK || proc_op == OP_UNLOCK) |-> a_sync);

endmodule
