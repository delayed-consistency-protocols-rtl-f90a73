// dc_sys_driver: data-race-free random workload for dc_system.
//
// Drives every processor port of a dc_system with its own process and
// checks every load against a reference model kept in the testbench.
//  - Private region: blocks 0..PRIV_BLOCKS-1. Datom d of a block belongs to
//    processor d % NP, so with four processors every block is falsely shared
//    by all of them. Each processor reads and writes only its own datoms,
//    at any time, and a load must return its own latest store.
//  - Critical sections: lock 0 guards datoms 0..BD/2-1 and lock 1 guards
//    datoms BD/2..BD-1 of blocks CS_BASE..CS_BASE+CS_BLOCKS-1, so two
//    critical sections write different datoms of the same blocks at the
//    same time. Inside a section every load must return the value the last
//    holder of that lock stored; this holds only if the holder's stores were
//    propagated at its unlock and stale copies were dropped at the lock.
//  - At the end every processor takes and releases lock 2 (which empties its
//    SIB); then processor 0 takes lock 3 and reads back every datom.
// Requests are applied on the falling clock edge; a request is dropped on
// the falling edge at which p_done is seen.
module dc_sys_driver
  import dc_pkg::*;
#(
  parameter int unsigned NP          = 4,
  parameter int unsigned BD          = 4,
  parameter int unsigned DW          = 32,
  parameter int unsigned PA_W        = 9,
  parameter int unsigned N_ITER      = 200,
  parameter int unsigned PRIV_BLOCKS = 24,
  parameter int unsigned CS_BASE     = 40,
  parameter int unsigned CS_BLOCKS   = 4,
  parameter int unsigned SEED        = 1
) (
  input  logic          clk,
  output logic          p_req     [NP],
  output proc_op_e      p_op      [NP],
  output logic [PA_W-1:0] p_addr  [NP],
  output logic [DW-1:0] p_wdata   [NP],
  input  logic          p_done    [NP],
  input  logic [DW-1:0] p_rdata   [NP],
  input  logic          p_lock_ok [NP],
  output logic          finished,
  output int            checks,
  output int            failures
);

  localparam int unsigned SYNC0 = 1 << (PA_W-1);
  localparam int unsigned HALF  = (BD > 1) ? BD/2 : 1;

  logic [DW-1:0] priv_model [PRIV_BLOCKS*BD];
  logic [DW-1:0] cs_model   [CS_BLOCKS*BD];
  int            n_finished;

  initial begin
    checks = 0; failures = 0; finished = 1'b0; n_finished = 0;
    for (int i = 0; i < PRIV_BLOCKS*BD; i++) priv_model[i] = '0;
    for (int i = 0; i < CS_BLOCKS*BD; i++)   cs_model[i]   = '0;
    for (int p = 0; p < NP; p++) begin
      p_req[p] = 1'b0; p_op[p] = OP_READ; p_addr[p] = '0; p_wdata[p] = '0;
    end
  end

  task automatic access(input int p, input proc_op_e op, input int addr,
                        input logic [DW-1:0] wd, output logic [DW-1:0] rd,
                        output logic ok);
    @(negedge clk);
    p_req[p] = 1'b1; p_op[p] = op; p_addr[p] = PA_W'(addr); p_wdata[p] = wd;
    do @(negedge clk); while (!p_done[p]);
    rd = p_rdata[p]; ok = p_lock_ok[p];
    p_req[p] = 1'b0;
  endtask

  task automatic check(input string what, input int p, input int addr,
                       input logic [DW-1:0] got, input logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: proc %0d addr %0d got %h expected %h", what, p, addr, got, exp);
    end
  endtask

  task automatic lock(input int p, input int l);
    logic [DW-1:0] rd; logic ok;
    do begin
      access(p, OP_LOCK, SYNC0 + l, '0, rd, ok);
      if (!ok) repeat ($urandom_range(4, 0)) @(negedge clk);
    end while (!ok);
  endtask

  task automatic unlock(input int p, input int l);
    logic [DW-1:0] rd; logic ok;
    access(p, OP_UNLOCK, SYNC0 + l, '0, rd, ok);
  endtask

  for (genvar gp = 0; gp < NP; gp++) begin : g_proc
    initial begin : run
      automatic int p = gp;
      automatic logic [DW-1:0] rd, wd;
      automatic logic ok;
      automatic int a, b, d, l, r;
      void'($urandom(SEED * 97 + p * 13 + 5));
      repeat (3) @(negedge clk);
      for (int it = 0; it < int'(N_ITER); it++) begin
        r = $urandom_range(99, 0);
        if (r < 85) begin
          // private datom of this processor
          b = $urandom_range(PRIV_BLOCKS-1, 0);
          d = (($urandom_range(BD-1, 0) / NP) * NP + p) % BD;
          if (d % NP != p) d = p % BD;
          a = b*BD + d;
          if ((d % NP) == p) begin
            if ($urandom_range(1, 0)) begin
              wd = $urandom;
              access(p, OP_WRITE, a, wd, rd, ok);
              priv_model[a] = wd;
            end else begin
              access(p, OP_READ, a, '0, rd, ok);
              check("private load", p, a, rd, priv_model[a]);
            end
          end
        end else begin
          // critical section under lock 0 or 1
          l = $urandom_range(1, 0);
          lock(p, l);
          repeat ($urandom_range(6, 1)) begin
            b = $urandom_range(CS_BLOCKS-1, 0);
            d = l*HALF + $urandom_range(HALF-1, 0);
            a = b*BD + d;
            access(p, OP_READ, (CS_BASE*BD) + a, '0, rd, ok);
            check("critical-section load", p, CS_BASE*BD + a, rd, cs_model[a]);
            if ($urandom_range(2, 0) != 0) begin
              wd = rd + DW'(p + 1);
              access(p, OP_WRITE, (CS_BASE*BD) + a, wd, rd, ok);
              cs_model[a] = wd;
            end
          end
          unlock(p, l);
        end
      end
      lock(p, 2);
      unlock(p, 2);
      n_finished++;
      if (p == 0) begin
        wait (n_finished == int'(NP));
        lock(0, 3);
        for (int i = 0; i < int'(PRIV_BLOCKS*BD); i++) begin
          access(0, OP_READ, i, '0, rd, ok);
          check("final load", 0, i, rd, priv_model[i]);
        end
        for (int i = 0; i < int'(CS_BLOCKS*BD); i++) begin
          access(0, OP_READ, CS_BASE*BD + i, '0, rd, ok);
          check("final load", 0, CS_BASE*BD + i, rd, cs_model[i]);
        end
        unlock(0, 3);
        finished = 1'b1;
      end
    end
  end

endmodule
