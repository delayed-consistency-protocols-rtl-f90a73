// tb_dc_cache: directed test of one delayed-consistency cache.
//
// The memory side is scripted: each expected request is checked (command,
// block address, data and dirty mask), granted, and answered with a chosen
// reply; snoops are driven directly. The sequence walks through the
// protocol: read miss to an exclusive owner copy, owner write hit without
// traffic, one-cycle hit latency, read miss to a shared Keeper copy, write
// hit on it entering the SIB, an Invalidate making it stale while it stays
// readable, an unlock emptying the SIB with Inv&UpdM of only the dirty
// datom, a lock turning the stale copy invalid, a read of the invalid
// modified copy, an owner snoop forwarding the block, Release Ownership,
// a write miss inheriting remote dirty bits, replacement of a modified
// victim, and an unlock sending ReqO for a valid modified Keeper copy and
// merging the reply. It also checks that no request is made where none is
// due.
module tb_dc_cache;
  import dc_pkg::*;
  localparam int unsigned NF = 4, BD = 4, DW = 32, MB = 16;
  localparam int unsigned PA_W = 7, BA_W = 4;
  localparam int unsigned SYNC0 = 64;
  typedef logic [BD-1:0][DW-1:0] block_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic proc_req = 0; proc_op_e proc_op = OP_READ;
  logic [PA_W-1:0] proc_addr = '0; logic [DW-1:0] proc_wdata = '0;
  logic proc_done, proc_lock_ok; logic [DW-1:0] proc_rdata;
  logic mreq_valid, mreq_gnt = 0; mem_cmd_e mreq_cmd; logic [BA_W-1:0] mreq_addr;
  block_t mreq_data; logic [BD-1:0] mreq_mask;
  logic mresp_valid = 0, mresp_shared = 0; block_t mresp_data = '0;
  logic [BD-1:0] mresp_mask = '0; logic [DW-1:0] mresp_word = '0;
  logic snp_valid = 0; snoop_cmd_e snp_cmd = SNP_INV; logic [BA_W-1:0] snp_addr = '0;
  logic snp_ack, snp_mod; block_t snp_data; logic [BD-1:0] snp_mask;
  dc_events_t ev;

  dc_cache #(.NUM_FRAMES(NF), .BLOCK_DATOMS(BD), .DATOM_W(DW), .MEM_BLOCKS(MB),
             .SIB_DEPTH(NF), .INVB_DEPTH(2), .SYNC_WORDS(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // requests seen while none was expected
  bit serving = 0;
  always @(posedge clk) if (rst_n && mreq_valid && !serving) begin
    failures++; $display("FAIL unexpected request %s addr %0d", mreq_cmd.name(), mreq_addr);
  end

  logic [DW-1:0] rd; logic ok; int lat;

  task automatic access(input proc_op_e op, input int addr, input logic [DW-1:0] wd);
    @(negedge clk);
    proc_req = 1; proc_op = op; proc_addr = PA_W'(addr); proc_wdata = wd;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!proc_done);
    rd = proc_rdata; ok = proc_lock_ok; proc_req = 0;
  endtask

  // wait for a request, check it, grant it and answer it
  task automatic serve(input mem_cmd_e cmd, input int blk, input block_t rdata,
                       input logic [BD-1:0] rmask, input logic sh, input logic [DW-1:0] word,
                       input bit check_data = 0, input block_t xdata = '0,
                       input logic [BD-1:0] xmask = '0);
    serving = 1;
    @(negedge clk);
    while (!mreq_valid) @(negedge clk);
    chk(mreq_cmd == cmd, $sformatf("request %s, expected %s", mreq_cmd.name(), cmd.name()));
    chk(mreq_addr == BA_W'(blk), $sformatf("request address %0d, expected %0d", mreq_addr, blk));
    if (check_data) begin
      chk(mreq_mask == xmask, $sformatf("dirty mask %b, expected %b", mreq_mask, xmask));
      for (int d = 0; d < BD; d++)
        if (xmask[d]) chk(mreq_data[d] == xdata[d], $sformatf("datom %0d of request", d));
    end
    mreq_gnt = 1;
    @(negedge clk);
    mreq_gnt = 0;
    serving = 0;
    @(negedge clk);
    mresp_valid = 1; mresp_data = rdata; mresp_mask = rmask; mresp_shared = sh; mresp_word = word;
    @(negedge clk);
    mresp_valid = 0;
  endtask

  task automatic snoop(input snoop_cmd_e c, input int blk, input logic xmod,
                       input logic [BD-1:0] xmask = '0, input block_t xdata = '0);
    @(negedge clk);
    snp_valid = 1; snp_cmd = c; snp_addr = BA_W'(blk);
    #1;
    chk(snp_ack, "snoop acknowledged in the same cycle");
    chk(snp_mod == xmod, $sformatf("snoop forwards data: %0d expected %0d", snp_mod, xmod));
    if (xmod) begin
      chk(snp_mask == xmask, $sformatf("snoop mask %b expected %b", snp_mask, xmask));
      for (int d = 0; d < BD; d++) if (xmask[d]) chk(snp_data[d] == xdata[d], "snoop datom");
    end
    @(negedge clk);
    snp_valid = 0;
  endtask

  function automatic block_t blk4(input logic [DW-1:0] a, b, c, d);
    block_t r; r[0] = a; r[1] = b; r[2] = c; r[3] = d; return r;
  endfunction

  int stale_hits = 0, sib_ins = 0, invb = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev.stale_hit) stale_hits++;
    if (ev.sib_insert) sib_ins++;
    if (ev.invb_push) invb++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. read miss, no other copy: owner
    fork
      access(OP_READ, 1*BD + 2, '0);
      serve(MC_REQC, 1, blk4(10, 11, 12, 13), '0, 0, '0);
    join
    chk(rd == 12, "read miss data");
    // 2. owner write hit: no request, one-cycle latency
    access(OP_WRITE, 1*BD + 0, 32'hA0);
    chk(lat == 1, $sformatf("write hit latency %0d", lat));
    access(OP_READ, 1*BD + 0, '0);
    chk(rd == 32'hA0 && lat == 1, "read hit latency and data");
    // 3. read miss, shared: Keeper; write hit enters SIB without traffic
    fork
      access(OP_READ, 2*BD + 1, '0);
      serve(MC_REQC, 2, blk4(20, 21, 22, 23), '0, 1, '0);
    join
    chk(rd == 21, "shared read miss data");
    access(OP_WRITE, 2*BD + 3, 32'hB3);
    repeat (2) @(posedge clk); #1;
    chk(sib_ins == 1, "SIB insert on write to clean Keeper copy");
    // 4. Invalidate of the Keeper copy: queued, copy stays readable (stale)
    snoop(SNP_INV, 2, 0);
    repeat (2) @(posedge clk); #1;
    chk(invb == 1, "invalidation queued");
    repeat (3) @(negedge clk);
    access(OP_READ, 2*BD + 3, '0);
    chk(rd == 32'hB3, "stale copy keeps local store");
    access(OP_READ, 2*BD + 0, '0);
    repeat (2) @(posedge clk); #1;
    chk(rd == 20 && stale_hits >= 1, "stale copy readable");
    // 5. unlock: SIB entry is stale -> Inv&UpdM with only datom 3, then the lock write
    fork
      access(OP_UNLOCK, SYNC0 + 1, '0);
      begin
        serve(MC_INV_UPDM, 2, '0, '0, 0, '0, 1, blk4(0, 0, 0, 32'hB3), 4'b1000);
        serve(MC_SYNC_WR, 1, '0, '0, 0, '0);
      end
    join
    // 6. lock acquired: stale copy becomes invalid; a read now misses
    fork
      access(OP_LOCK, SYNC0 + 1, '0);
      serve(MC_SYNC_TAS, 1, '0, '0, 0, 32'd0);
    join
    chk(ok, "lock acquired");
    fork
      access(OP_READ, 2*BD + 0, '0);
      serve(MC_REQC, 2, blk4(40, 21, 22, 32'hB3), '0, 1, '0);
    join
    chk(rd == 40, "stale copy dropped at lock");
    // failed lock: no flush, lock_ok low
    fork
      access(OP_LOCK, SYNC0 + 2, '0);
      serve(MC_SYNC_TAS, 2, '0, '0, 0, 32'd1);
    join
    chk(!ok, "lock busy");
    // 7. Invalidate of the owned modified block 1: forwarded with dirty bits
    snoop(SNP_INV, 1, 1, 4'b0001, blk4(32'hA0, 0, 0, 0));
    access(OP_READ, 1*BD + 1, '0);
    chk(rd == 11, "ex-owner copy is stale but readable");
    // 8. write miss on block 5 (frame 1 holds stale clean block 1): silent replacement,
    //    ReqO reply carries remote dirty bits
    fork
      access(OP_WRITE, 5*BD + 1, 32'hC1);
      serve(MC_REQO, 5, blk4(50, 51, 52, 53), 4'b0100, 0, '0);
    join
    access(OP_READ, 5*BD + 2, '0);
    chk(rd == 52, "ReqO fill data");
    // 9. Release Ownership: owner modified copy forwarded (inherited + own dirty datoms)
    snoop(SNP_RELO, 5, 1, 4'b0110, blk4(0, 32'hC1, 52, 0));
    // snoop for a block not held: plain ack
    snoop(SNP_INV, 9, 0);
    // 10. write to clean Keeper block 5 enters SIB; replacement by block 13 (same frame)
    access(OP_WRITE, 5*BD + 0, 32'hD0);
    fork
      access(OP_READ, 13*BD + 0, '0);
      begin
        serve(MC_INV_UPDM, 5, '0, '0, 0, '0, 1, blk4(32'hD0, 0, 0, 0), 4'b0001);
        serve(MC_REQC, 13, blk4(130, 131, 132, 133), '0, 0, '0);
      end
    join
    chk(rd == 130, "fill after replacement");
    // 11. Keeper copy of block 6, modified, still valid at unlock: ReqO and merge
    fork
      access(OP_READ, 6*BD + 0, '0);
      serve(MC_REQC, 6, blk4(60, 61, 62, 63), '0, 1, '0);
    join
    access(OP_WRITE, 6*BD + 2, 32'hE2);
    fork
      access(OP_UNLOCK, SYNC0 + 1, '0);
      begin
        serve(MC_REQO, 6, blk4(70, 71, 72, 73), '0, 0, '0);
        serve(MC_SYNC_WR, 1, '0, '0, 0, '0);
      end
    join
    access(OP_READ, 6*BD + 2, '0);
    chk(rd == 32'hE2, "local dirty datom kept in merge");
    access(OP_READ, 6*BD + 1, '0);
    chk(rd == 71, "remote datom taken in merge");
    // owned now: a write causes no traffic and no SIB insert
    access(OP_WRITE, 6*BD + 3, 32'hE3);
    repeat (2) @(posedge clk); #1;
    chk(sib_ins == 3, "owner writes do not enter the SIB");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
