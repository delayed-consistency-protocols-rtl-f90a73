// dc_fsm_table: protocol function of one blockframe, processor viewpoint.
//
// Combinational Mealy function. For the current S,I,O,M bits of a frame and
// one event it gives the memory command to issue, the next state and the
// side actions (SIB insert or associative removal, forwarding the block with
// its dirty bits on a snoop, clearing dirty bits). It follows the
// processor-side protocol with a finite SIB: a write to a clean Keeper copy
// (valid or stale) inserts the frame in the SIB; removing an entry from the
// SIB sends ReqO for a valid copy and Inv&UpdM for a stale or invalidated
// one; a lock turns stale copies into invalid ones; an Invalidate makes a
// copy stale, and an owned modified copy is forwarded to memory.
//
// Where the protocol table combines two messages in one entry (a read of an
// invalid modified frame: Inv&UpdM then ReqC; a write: UpdM then ReqO) this
// function returns the first message with hit=0, and the controller
// re-evaluates the access once the first message has completed. A frame not
// holding the accessed block is presented as IXC (not in cache). For MC_REQC
// the next state is VOC when no other copy exists and VKC otherwise, chosen
// by 'shared', which is the reply's bit. For MC_REQO the next state is
// given with M=0; the controller sets M from the dirty bits it receives.
// States with S and I both set never arise; they are left unchanged.
//
// NO_SIB=1 gives the simplified protocol for a cache without an SIB: a write
// is performed only on an owned copy, so a write to a Keeper copy (valid or
// stale) first sends ReqO, and no frame is ever non-owned and modified.
// DELAY_INV=0 also removes the delay on incoming invalidations: an
// Invalidate makes the copy invalid at once instead of stale. With both,
// the function is the on-the-fly protocol the delayed one is compared with.
module dc_fsm_table
  import dc_pkg::*;
#(
  parameter bit NO_SIB    = 1'b0,
  parameter bit DELAY_INV = 1'b1
)
(
  input  frame_state_t st,
  input  frame_ev_e    ev,
  input  logic         shared,
  output fsm_out_t     out
);

  always_comb begin
    out           = '0;
    out.cmd       = MC_NONE;
    out.next      = st;
    unique case (ev)
      EV_READ: begin
        if (!st.i) begin
          out.hit = 1'b1;
        end else if (st.m) begin          // IXM: flush first
          out.cmd       = MC_INV_UPDM;
          out.next      = ST_IXC;
          out.clr_dirty = 1'b1;
          out.rem_sib   = 1'b1;
        end else begin                    // IXC / not in cache
          out.cmd       = MC_REQC;
          out.next      = shared ? ST_VKC : ST_VOC;
          out.clr_dirty = 1'b1;
        end
      end
      EV_WRITE: begin
        if (!st.i && NO_SIB && !st.o) begin
          out.cmd  = MC_REQO;             // no SIB: acquire a unique copy
          out.next = ST_VOC;
        end else if (!st.i) begin
          out.hit    = 1'b1;
          out.next.m = 1'b1;
          out.ins_sib = !st.o && !st.m;   // clean Keeper copy becomes modified
        end else if (st.m) begin          // IXM: partial update first
          out.cmd       = MC_UPDM;
          out.next      = ST_IXC;
          out.clr_dirty = 1'b1;
          out.rem_sib   = 1'b1;
        end else begin
          out.cmd  = MC_REQO;
          out.next = ST_VOC;
        end
      end
      EV_LOCK: begin
        if (st.s) begin                   // stale -> invalid, dirty bits kept
          out.next.s = 1'b0;
          out.next.i = 1'b1;
        end
      end
      EV_REMSIB: begin
        if (!st.o && st.m) begin
          if (!st.i && !st.s) begin       // VKM: acquire ownership
            out.cmd  = MC_REQO;
            out.next = ST_VOM;
          end else begin                  // SKM, IXM: propagate and invalidate
            out.cmd       = MC_INV_UPDM;
            out.next      = st.i ? ST_IXC : ST_SKC;
            out.clr_dirty = 1'b1;
          end
        end
      end
      EV_REPLACE: begin
        out.next = ST_IXC;
        if (st.m) begin
          out.cmd       = MC_INV_UPDM;
          out.clr_dirty = 1'b1;
          out.rem_sib   = !st.o;
        end
      end
      EV_INV: begin
        if (!DELAY_INV && !st.i && !st.s) begin
          out.next      = st.o ? ST_IXC : (st.m ? ST_IXM : ST_IXC);
          out.fwd       = st.o && st.m;
          out.clr_dirty = st.o && st.m;
        end else if (!st.i && !st.s) begin
          out.next.s = 1'b1;
          if (st.o) begin                 // owner: give up the copy
            out.next      = ST_SKC;
            out.fwd       = st.m;
            out.clr_dirty = st.m;
          end
        end
      end
      EV_RELO: begin
        if (!st.i && !st.s && st.o) begin
          out.next      = ST_VKC;
          out.fwd       = st.m;
          out.clr_dirty = st.m;
        end
      end
      default: ;
    endcase
  end

endmodule
