// tb_dir_mem_ctrl: directed test of the directory memory controller.
//
// Three scripted caches. Snoops are answered after a random delay with
// data chosen by the test, and every snoop is logged so the test can check
// which caches were asked what. Covered: ReqC to an unshared block (owner
// reply), ReqC to an owned block (Release Ownership, partial update,
// shared reply), ReqO invalidating every other copy, ReqO forwarding an
// owner's dirty bits, Inv&UpdM merging owner and requester datoms, UpdM,
// test-and-set, unlock write and read of synchronization variables, and two
// simultaneous requests.
module tb_dir_mem_ctrl;
  import dc_pkg::*;
  localparam int unsigned NP = 3, BD = 4, DW = 32, MB = 16, BA_W = 4;
  typedef logic [BD-1:0][DW-1:0] block_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mreq_valid [NP]; mem_cmd_e mreq_cmd [NP]; logic [BA_W-1:0] mreq_addr [NP];
  block_t mreq_data [NP]; logic [BD-1:0] mreq_mask [NP]; logic mreq_gnt [NP];
  logic mresp_valid [NP]; block_t mresp_data; logic [BD-1:0] mresp_mask;
  logic mresp_shared; logic [DW-1:0] mresp_word;
  logic snp_valid [NP]; snoop_cmd_e snp_cmd; logic [BA_W-1:0] snp_addr;
  logic snp_ack [NP], snp_mod [NP]; block_t snp_data [NP]; logic [BD-1:0] snp_mask [NP];

  dir_mem_ctrl #(.NUM_PROCS(NP), .BLOCK_DATOMS(BD), .DATOM_W(DW), .MEM_BLOCKS(MB),
                 .SYNC_WORDS(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // snoop responders
  logic   c_mod  [NP];
  logic [BD-1:0] c_mask [NP];
  block_t c_data [NP];
  string  snoop_log;
  for (genvar p = 0; p < NP; p++) begin : g_c
    initial begin
      snp_ack[p] = 0; snp_mod[p] = 0; snp_data[p] = '0; snp_mask[p] = '0;
      c_mod[p] = 0; c_mask[p] = '0; c_data[p] = '0;
      forever begin
        @(negedge clk);
        if (snp_valid[p]) begin
          repeat ($urandom_range(2, 0)) @(negedge clk);
          snoop_log = {snoop_log, $sformatf("%0d%s%0d ", p, snp_cmd == SNP_INV ? "I" : "R", snp_addr)};
          snp_ack[p] = 1; snp_mod[p] = c_mod[p]; snp_mask[p] = c_mask[p]; snp_data[p] = c_data[p];
          @(negedge clk);
          snp_ack[p] = 0; snp_mod[p] = 0;
        end
      end
    end
  end

  block_t r_data; logic [BD-1:0] r_mask; logic r_shared; logic [DW-1:0] r_word;

  task automatic req(input int p, input mem_cmd_e cmd, input int addr,
                     input block_t d = '0, input logic [BD-1:0] m = '0);
    @(negedge clk);
    mreq_valid[p] = 1; mreq_cmd[p] = cmd; mreq_addr[p] = BA_W'(addr);
    mreq_data[p] = d; mreq_mask[p] = m;
    #1 while (!mreq_gnt[p]) begin @(negedge clk); #1; end
    @(negedge clk);
    mreq_valid[p] = 0;
    #1 while (!mresp_valid[p]) begin @(negedge clk); #1; end
    r_data = mresp_data; r_mask = mresp_mask; r_shared = mresp_shared; r_word = mresp_word;
  endtask

  function automatic block_t blk4(input logic [DW-1:0] a, b, c, d);
    block_t r; r[0] = a; r[1] = b; r[2] = c; r[3] = d; return r;
  endfunction

  initial begin
    for (int p = 0; p < NP; p++) begin
      mreq_valid[p] = 0; mreq_cmd[p] = MC_NONE; mreq_addr[p] = '0; mreq_data[p] = '0; mreq_mask[p] = '0;
    end
    snoop_log = "";
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. ReqC with no copy: owner, memory data (reset value 0)
    req(0, MC_REQC, 3);
    chk(!r_shared && r_data == '0 && snoop_log == "", "ReqC to unshared block");
    // 2. ReqC by 1: owner 0 gets Release Ownership and forwards datom 1
    c_mod[0] = 1; c_mask[0] = 4'b0010; c_data[0] = blk4(0, 32'h11, 0, 0);
    req(1, MC_REQC, 3);
    chk(snoop_log == "0R3 ", {"Release Ownership sent to owner: ", snoop_log});
    chk(r_shared && r_data == blk4(0, 32'h11, 0, 0), "shared reply with forwarded datom");
    c_mod[0] = 0; snoop_log = "";
    // 3. ReqO by 2: both Keepers invalidated, no dirty bits forwarded
    req(2, MC_REQO, 3);
    chk(snoop_log == "0I3 1I3 ", {"Invalidate to both Keepers: ", snoop_log});
    chk(r_mask == '0 && r_data == blk4(0, 32'h11, 0, 0), "ReqO reply");
    snoop_log = "";
    // 4. ReqO by 0: owner 2 forwards datom 3; reply carries its dirty bit
    c_mod[2] = 1; c_mask[2] = 4'b1000; c_data[2] = blk4(0, 0, 0, 32'h33);
    req(0, MC_REQO, 3);
    chk(snoop_log == "2I3 ", {"Invalidate to owner: ", snoop_log});
    chk(r_mask == 4'b1000 && r_data == blk4(0, 32'h11, 0, 32'h33), "dirty bits forwarded with ReqO");
    c_mod[2] = 0; snoop_log = "";
    // 5. Inv&UpdM by 1 (stale copy, datom 0): owner 0 forwards datom 2 first
    c_mod[0] = 1; c_mask[0] = 4'b0100; c_data[0] = blk4(0, 0, 32'h22, 0);
    req(1, MC_INV_UPDM, 3, blk4(32'h00AA, 32'hBAD, 32'hBAD, 32'hBAD), 4'b0001);
    chk(snoop_log == "0I3 ", {"Invalidate to owner on Inv: ", snoop_log});
    c_mod[0] = 0; snoop_log = "";
    // 6. no valid copy left: ReqC gives an owner copy with all merged datoms, no snoop
    req(2, MC_REQC, 3);
    chk(snoop_log == "" && !r_shared, "no copy after Inv&UpdM");
    chk(r_data == blk4(32'h00AA, 32'h11, 32'h22, 32'h33), "partial updates merged in memory");
    // 7. UpdM of another block, then read it back
    req(1, MC_UPDM, 7, blk4(0, 0, 32'h77, 0), 4'b0100);
    req(1, MC_REQC, 7);
    chk(r_data == blk4(0, 0, 32'h77, 0) && !r_shared, "UpdM partial write");
    // 8. synchronization variables
    req(0, MC_SYNC_TAS, 2);
    chk(r_word == 0, "test-and-set of a free lock returns 0");
    req(1, MC_SYNC_TAS, 2);
    chk(r_word == 1, "test-and-set of a held lock returns 1");
    req(0, MC_SYNC_WR, 2, '0);
    req(1, MC_SYNC_RD, 2);
    chk(r_word == 0, "unlock wrote 0");
    req(2, MC_SYNC_WR, 1, blk4(32'h5, 0, 0, 0));
    req(0, MC_SYNC_RD, 1);
    chk(r_word == 5, "sync write/read");
    // 9. two requests at once: both served
    snoop_log = "";
    fork
      req(0, MC_REQC, 9);
      req(1, MC_REQC, 10);
    join
    chk(snoop_log == "", "independent requests");
    checks++;

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
