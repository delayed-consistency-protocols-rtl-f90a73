// tb_dc_system: end-to-end test of the delayed-consistency system.
//
// Runs the dc_sys_driver workload on a dc_system whose SIB holds only
// four entries, whose invalidation buffer holds two and whose caches flush
// their buffers every 300 cycles, so that SIB overflow, a full invalidation
// buffer and the periodic flush occur besides every other protocol
// mechanism. Every load is checked against the reference model;
// then each mechanism's event count must be non-zero.
module tb_dc_system;
  import dc_pkg::*;

  localparam int unsigned NP = 4, BD = 4, DW = 32, MB = 64;
  localparam int unsigned PA_W = $clog2(MB) + $clog2(BD) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            p_req [NP];
  proc_op_e        p_op  [NP];
  logic [PA_W-1:0] p_addr[NP];
  logic [DW-1:0]   p_wdata[NP];
  logic            p_done[NP];
  logic [DW-1:0]   p_rdata[NP];
  logic            p_lock_ok[NP];
  dc_events_t      p_ev  [NP];
  logic            finished;
  int              checks, failures;

  dc_system #(.NUM_PROCS(NP), .BLOCK_DATOMS(BD), .DATOM_W(DW), .MEM_BLOCKS(MB),
              .NUM_FRAMES(16), .SIB_DEPTH(4), .INVB_DEPTH(2), .FLUSH_PERIOD(300)) dut (
    .clk, .rst_n, .p_req, .p_op, .p_addr, .p_wdata, .p_done, .p_rdata, .p_lock_ok, .p_ev);

  dc_sys_driver #(.NP(NP), .BD(BD), .DW(DW), .PA_W(PA_W), .N_ITER(400), .SEED(3))
    drv (.clk, .p_req, .p_op, .p_addr, .p_wdata, .p_done, .p_rdata, .p_lock_ok,
         .finished, .checks, .failures);

  // event counters
  localparam int NEV = $bits(dc_events_t);
  int evcnt [NEV];
  initial for (int e = 0; e < NEV; e++) evcnt[e] = 0;
  always @(posedge clk) if (rst_n)
    for (int n = 0; n < int'(NP); n++)
      for (int e = 0; e < NEV; e++) if (p_ev[n][e]) evcnt[e]++;

  string evname [NEV];
  initial begin
    // bit order of dc_events_t, least significant first
    evname[13] = "read_miss";      evname[12] = "write_miss";   evname[11] = "stale_hit";
    evname[10] = "sib_insert";     evname[9]  = "sib_full_evict"; evname[8] = "unlock_flush";
    evname[7]  = "lock_rib_flush"; evname[6]  = "lock_fail";    evname[5]  = "invb_push";
    evname[4]  = "invb_apply";     evname[3]  = "owner_fwd";    evname[2]  = "replace_flush";
    evname[1]  = "reqo_merge";     evname[0]  = "periodic_flush";
  end

  int cycles = 0;
  always @(posedge clk) cycles++;

  int fails_total;
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (finished);
    repeat (5) @(posedge clk);
    fails_total = failures;
    for (int e = 0; e < NEV; e++) begin
      $display("event %-15s %0d", evname[e], evcnt[e]);
      if (evcnt[e] == 0) begin
        fails_total++;
        $display("FAIL mechanism %s never happened", evname[e]);
      end
    end
    $display("cycles %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks + NEV, fails_total);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
