// sor_run: a small S.O.R.-style grid relaxation on four processors, on
// either the delayed system at its default sizes or the on-the-fly system.
//
// A 10 x 10 grid of 32-bit values, stored row-wise in two arrays A and B
// (Jacobi form: each sweep reads one array and writes the other). The 8 x 8
// interior is split into four 4 x 4 quadrants, one per processor, and the
// border stays fixed. Rows of 10 datoms do not align with 4-datom blocks, so
// blocks are falsely shared along every quadrant edge. Each sweep computes
//     new = (up + down + left + right + 4*centre) >> 3
// for the processor's own cells and ends with a barrier.
//
// The barrier is built from the processor port: release the processor's
// own lock (which empties its SIB), take the barrier lock and count in,
// release it, wait for the generation word to change (uncached reads), and
// take the own lock again (which drops stale copies). Every load is checked
// against a grid computed in the testbench, and after the last sweep
// processor 0 reads back the whole result.
//
// The grid size, the number of sweeps, the integer relaxation and the
// barrier are this testbench's own choices; the partitioning into four
// quadrants and the row-wise storage follow the usual S.O.R. setting.
// Interface: clk in; finished rises once the run is over, and checks,
// failures, misses (read and write misses of all caches) and stale (hits on
// stale copies) are valid from then on. Processor requests are driven at
// the falling clock edge and held until the completion pulse.
module sor_run #(
  parameter bit OTF = 1'b0      // 1: the on-the-fly protocol, 0: the delayed one
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   misses,
  output int   stale
);
  import dc_pkg::*;
  localparam int unsigned NP = 4, DW = 32;
  localparam int unsigned PA_W = 9;
  localparam int unsigned SYNC0 = 1 << (PA_W-1);
  localparam int G = 10, T = 4;
  localparam int A_BASE = 0, B_BASE = 100;
  localparam int L_BAR = 0, V_CNT = 1, V_GEN = 2, L_OWN = 4;

  logic rst_n = 1'b0;
  initial begin finished = 1'b0; checks = 0; failures = 0; misses = 0; stale = 0; end

  logic            p_req [NP];
  proc_op_e        p_op  [NP];
  logic [PA_W-1:0] p_addr[NP];
  logic [DW-1:0]   p_wdata[NP];
  logic            p_done[NP];
  logic [DW-1:0]   p_rdata[NP];
  logic            p_lock_ok[NP];
  dc_events_t      p_ev  [NP];

  if (OTF) begin : g_otf
    dc_system #(.SIB_DEPTH(0), .RIB_DELAY(1'b0)) dut (
      .clk, .rst_n, .p_req, .p_op, .p_addr, .p_wdata, .p_done, .p_rdata, .p_lock_ok, .p_ev);
  end else begin : g_delayed
    dc_system dut (
      .clk, .rst_n, .p_req, .p_op, .p_addr, .p_wdata, .p_done, .p_rdata, .p_lock_ok, .p_ev);
  end

  logic [DW-1:0] M [T+1][G*G];     // grid after t sweeps
  int invq = 0;
  int n_done = 0;

  always @(posedge clk) if (rst_n)
    for (int n = 0; n < int'(NP); n++) begin
      if (p_ev[n].read_miss || p_ev[n].write_miss) misses++;
      if (p_ev[n].stale_hit) stale++;
      if (p_ev[n].invb_push) invq++;
    end

  function automatic logic [DW-1:0] relax(input logic [DW-1:0] u, d, l, r, c);
    return (u + d + l + r + (c << 2)) >> 3;
  endfunction

  initial begin
    for (int k = 0; k < G*G; k++) M[0][k] = DW'((k / G) * 1000 + (k % G) * 37 + 5);
    for (int t = 0; t < T; t++)
      for (int i = 0; i < G; i++)
        for (int j = 0; j < G; j++)
          if (i == 0 || j == 0 || i == G-1 || j == G-1) M[t+1][i*G+j] = M[t][i*G+j];
          else M[t+1][i*G+j] = relax(M[t][(i-1)*G+j], M[t][(i+1)*G+j],
                                     M[t][i*G+j-1], M[t][i*G+j+1], M[t][i*G+j]);
  end

  task automatic acc(input int n, input proc_op_e op, input int addr,
                     input logic [DW-1:0] wd, output logic [DW-1:0] rd, output logic ok);
    @(negedge clk);
    p_req[n] = 1'b1; p_op[n] = op; p_addr[n] = PA_W'(addr); p_wdata[n] = wd;
    do @(negedge clk); while (!p_done[n]);
    rd = p_rdata[n]; ok = p_lock_ok[n];
    p_req[n] = 1'b0;
  endtask

  task automatic lock(input int n, input int l);
    logic [DW-1:0] rd; logic ok;
    do begin
      acc(n, OP_LOCK, SYNC0 + l, '0, rd, ok);
      if (!ok) repeat (n + 1) @(negedge clk);
    end while (!ok);
  endtask

  task automatic barrier(input int n);
    logic [DW-1:0] gen, c, g2; logic ok;
    acc(n, OP_UNLOCK, SYNC0 + L_OWN + n, '0, gen, ok);       // empties the SIB
    lock(n, L_BAR);
    acc(n, OP_READ, SYNC0 + V_GEN, '0, gen, ok);
    acc(n, OP_READ, SYNC0 + V_CNT, '0, c, ok);
    if (c == DW'(NP - 1)) begin
      acc(n, OP_WRITE, SYNC0 + V_CNT, '0, c, ok);
      acc(n, OP_WRITE, SYNC0 + V_GEN, gen + 1, c, ok);
    end else begin
      acc(n, OP_WRITE, SYNC0 + V_CNT, c + 1, c, ok);
    end
    acc(n, OP_UNLOCK, SYNC0 + L_BAR, '0, c, ok);
    do begin
      repeat (4) @(negedge clk);
      acc(n, OP_READ, SYNC0 + V_GEN, '0, g2, ok);
    end while (g2 == gen);
    lock(n, L_OWN + n);                                      // drops stale copies
  endtask

  task automatic chk(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  for (genvar gp = 0; gp < NP; gp++) begin : g_proc
    initial begin : run
      automatic int n = gp;
      automatic int r0 = 1 + (gp / 2) * 4, c0 = 1 + (gp % 2) * 4;
      automatic logic [DW-1:0] u, d, l, r, c, rd;
      automatic logic ok;
      automatic int src, dst;
      p_req[n] = 1'b0; p_op[n] = OP_READ; p_addr[n] = '0; p_wdata[n] = '0;
      wait (rst_n);
      lock(n, L_OWN + n);
      // initial values: own quadrant in both arrays, processor 0 also the border
      for (int i = 0; i < G; i++)
        for (int j = 0; j < G; j++) begin
          automatic bit mine = (i >= r0 && i < r0 + 4 && j >= c0 && j < c0 + 4);
          automatic bit border = (i == 0 || j == 0 || i == G-1 || j == G-1);
          if (mine || (n == 0 && border)) begin
            acc(n, OP_WRITE, A_BASE + i*G + j, M[0][i*G+j], rd, ok);
            acc(n, OP_WRITE, B_BASE + i*G + j, M[0][i*G+j], rd, ok);
          end
        end
      barrier(n);
      for (int t = 0; t < T; t++) begin
        src = (t % 2 == 0) ? A_BASE : B_BASE;
        dst = (t % 2 == 0) ? B_BASE : A_BASE;
        for (int i = r0; i < r0 + 4; i++)
          for (int j = c0; j < c0 + 4; j++) begin
            acc(n, OP_READ, src + (i-1)*G + j, '0, u, ok); chk(u, M[t][(i-1)*G+j], "up");
            acc(n, OP_READ, src + (i+1)*G + j, '0, d, ok); chk(d, M[t][(i+1)*G+j], "down");
            acc(n, OP_READ, src + i*G + j-1,   '0, l, ok); chk(l, M[t][i*G+j-1], "left");
            acc(n, OP_READ, src + i*G + j+1,   '0, r, ok); chk(r, M[t][i*G+j+1], "right");
            acc(n, OP_READ, src + i*G + j,     '0, c, ok); chk(c, M[t][i*G+j], "centre");
            acc(n, OP_WRITE, dst + i*G + j, relax(u, d, l, r, c), rd, ok);
          end
        barrier(n);
      end
      n_done++;
      if (n == 0) begin
        wait (n_done == int'(NP));
        for (int k = 0; k < G*G; k++) begin
          acc(0, OP_READ, ((T % 2 == 0) ? A_BASE : B_BASE) + k, '0, rd, ok);
          chk(rd, M[T][k], "result");
        end
        $display("%s: sweeps %0d: misses %0d, stale hits %0d, queued invalidations %0d",
                 OTF ? "on-the-fly" : "delayed", T, misses, stale, invq);
        checks++;
        if ((stale == 0) != OTF) begin failures++; $display("FAIL stale hits %0d", stale); end
        finished = 1'b1;
      end
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
  end
endmodule
