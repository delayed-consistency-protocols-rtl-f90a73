// tb_dc_fsm_table: exhaustive check of the per-frame protocol function.
//
// The expected behaviour is written out as an explicit table, one entry per
// (state, event) pair, from the processor-side protocol rules: it is not
// derived from the module's bit logic. All eight states, all seven events
// and both values of 'shared' are applied. The NO_SIB=1 build is checked on
// the five states its protocol uses: only a write to a Keeper copy differs.
// The on-the-fly build (NO_SIB=1, DELAY_INV=0) also turns an Invalidate into
// an immediate invalidation.
module tb_dc_fsm_table;
  import dc_pkg::*;

  frame_state_t st;
  frame_ev_e    ev;
  logic         shared;
  fsm_out_t     out;
  int checks = 0, failures = 0;

  fsm_out_t     out_ns;
  dc_fsm_table dut (.st, .ev, .shared, .out);
  dc_fsm_table #(.NO_SIB(1'b1)) dut_ns (.st, .ev, .shared, .out(out_ns));
  fsm_out_t     out_of;
  dc_fsm_table #(.NO_SIB(1'b1), .DELAY_INV(1'b0)) dut_of (.st, .ev, .shared, .out(out_of));

  frame_state_t S [8];
  string        SN[8];
  initial begin
    S[0] = ST_VOM; SN[0] = "VOM"; S[1] = ST_VOC; SN[1] = "VOC";
    S[2] = ST_VKM; SN[2] = "VKM"; S[3] = ST_SKM; SN[3] = "SKM";
    S[4] = ST_VKC; SN[4] = "VKC"; S[5] = ST_SKC; SN[5] = "SKC";
    S[6] = ST_IXM; SN[6] = "IXM"; S[7] = ST_IXC; SN[7] = "IXC";
  end

  // expected entry: cmd, next, hit, ins, rem, fwd, clr
  function automatic fsm_out_t entry(input string s, input frame_ev_e e, input logic sh);
    fsm_out_t r;
    frame_state_t same;
    case (s)
      "VOM": same = ST_VOM; "VOC": same = ST_VOC; "VKM": same = ST_VKM; "SKM": same = ST_SKM;
      "VKC": same = ST_VKC; "SKC": same = ST_SKC; "IXM": same = ST_IXM; default: same = ST_IXC;
    endcase
    r = '0; r.cmd = MC_NONE; r.next = same;
    case ({s, ":", e.name()})
      "VOM:EV_READ", "VOC:EV_READ", "VKM:EV_READ", "SKM:EV_READ",
      "VKC:EV_READ", "SKC:EV_READ":             r.hit = 1;
      "IXM:EV_READ":  begin r.cmd = MC_INV_UPDM; r.next = ST_IXC; r.clr_dirty = 1; r.rem_sib = 1; end
      "IXC:EV_READ":  begin r.cmd = MC_REQC; r.next = sh ? ST_VKC : ST_VOC; r.clr_dirty = 1; end
      "VOM:EV_WRITE", "VKM:EV_WRITE", "SKM:EV_WRITE": r.hit = 1;
      "VOC:EV_WRITE": begin r.hit = 1; r.next = ST_VOM; end
      "VKC:EV_WRITE": begin r.hit = 1; r.next = ST_VKM; r.ins_sib = 1; end
      "SKC:EV_WRITE": begin r.hit = 1; r.next = ST_SKM; r.ins_sib = 1; end
      "IXM:EV_WRITE": begin r.cmd = MC_UPDM; r.next = ST_IXC; r.clr_dirty = 1; r.rem_sib = 1; end
      "IXC:EV_WRITE": begin r.cmd = MC_REQO; r.next = ST_VOC; end
      "SKM:EV_LOCK":  r.next = ST_IXM;
      "SKC:EV_LOCK":  r.next = ST_IXC;
      "VKM:EV_REMSIB": begin r.cmd = MC_REQO; r.next = ST_VOM; end
      "SKM:EV_REMSIB": begin r.cmd = MC_INV_UPDM; r.next = ST_SKC; r.clr_dirty = 1; end
      "IXM:EV_REMSIB": begin r.cmd = MC_INV_UPDM; r.next = ST_IXC; r.clr_dirty = 1; end
      "VOM:EV_REPLACE": begin r.cmd = MC_INV_UPDM; r.next = ST_IXC; r.clr_dirty = 1; end
      "VKM:EV_REPLACE", "SKM:EV_REPLACE", "IXM:EV_REPLACE":
                      begin r.cmd = MC_INV_UPDM; r.next = ST_IXC; r.clr_dirty = 1; r.rem_sib = 1; end
      "VOC:EV_REPLACE", "VKC:EV_REPLACE", "SKC:EV_REPLACE": r.next = ST_IXC;
      "VOM:EV_INV":   begin r.next = ST_SKC; r.fwd = 1; r.clr_dirty = 1; end
      "VOC:EV_INV":   r.next = ST_SKC;
      "VKM:EV_INV":   r.next = ST_SKM;
      "VKC:EV_INV":   r.next = ST_SKC;
      "VOM:EV_RELO":  begin r.next = ST_VKC; r.fwd = 1; r.clr_dirty = 1; end
      "VOC:EV_RELO":  r.next = ST_VKC;
      default: ;
    endcase
    return r;
  endfunction

  function automatic fsm_out_t entry_ns(input string s, input frame_ev_e e, input logic sh);
    fsm_out_t r;
    r = entry(s, e, sh);
    if (e == EV_WRITE && (s == "VKC" || s == "SKC")) begin
      r = '0; r.cmd = MC_REQO; r.next = ST_VOC;
    end
    return r;
  endfunction

  function automatic fsm_out_t entry_of(input string s, input frame_ev_e e, input logic sh);
    fsm_out_t r;
    r = entry_ns(s, e, sh);
    if (e == EV_INV)
      case (s)
        "VOM":        begin r.next = ST_IXC; r.fwd = 1; r.clr_dirty = 1; end
        "VOC", "VKC": r.next = ST_IXC;
        default: ;
      endcase
    return r;
  endfunction

  initial begin
    fsm_out_t exp;
    frame_ev_e e;
    for (int sh = 0; sh < 2; sh++)
      for (int si = 0; si < 8; si++) begin
        e = e.first();
        forever begin
          st = S[si]; ev = e; shared = sh[0];
          #1;
          exp = entry(SN[si], e, sh[0]);
          checks++;
          if (out !== exp) begin
            failures++;
            $display("FAIL %s %s shared=%0d: got %h expected %h", SN[si], e.name(), sh, out, exp);
          end
          if (SN[si] inside {"VOM", "VOC", "VKC", "SKC", "IXC"}) begin
            exp = entry_ns(SN[si], e, sh[0]);
            checks++;
            if (out_ns !== exp) begin
              failures++;
              $display("FAIL no SIB %s %s shared=%0d: got %h expected %h", SN[si], e.name(), sh, out_ns, exp);
            end
            exp = entry_of(SN[si], e, sh[0]);
            checks++;
            if (out_of !== exp) begin
              failures++;
              $display("FAIL on-the-fly %s %s shared=%0d: got %h expected %h", SN[si], e.name(), sh, out_of, exp);
            end
          end
          if (e == e.last()) break;
          e = e.next();
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
