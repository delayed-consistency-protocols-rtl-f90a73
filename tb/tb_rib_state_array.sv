// tb_rib_state_array: test of the frame state bits and the lock flush.
//
// Random single-frame writes interleaved with lock flushes. The model
// applies the flush rule bit by bit: I becomes I OR S and S becomes 0 in
// every frame, in the same cycle. All states and any_stale are compared
// with the model after every cycle, and reset must leave every frame IXC.
module tb_rib_state_array;
  import dc_pkg::*;
  localparam int unsigned NF = 8, IW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we = 0, lock_flush = 0, any_stale;
  logic [IW-1:0] widx = '0;
  frame_state_t wdata = ST_IXC;
  frame_state_t states [NF];
  int checks = 0, failures = 0, flushes = 0;

  rib_state_array #(.NUM_FRAMES(NF), .IDX_W(IW)) dut (.*);

  logic [3:0] model [NF];

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic compare();
    bit st;
    st = 0;
    for (int f = 0; f < NF; f++) begin
      chk(states[f] == model[f], $sformatf("frame %0d", f));
      st |= model[f][3];
    end
    chk(any_stale == st, "any_stale");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) model[f] = 4'b0100;   // IXC
    #1 compare();
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      we = 0; lock_flush = 0;
      if ($urandom_range(5, 0) == 0) begin
        lock_flush = 1; flushes++;
        for (int f = 0; f < NF; f++) begin
          model[f][2] = model[f][2] | model[f][3];
          model[f][3] = 1'b0;
        end
      end else begin
        we = 1; widx = IW'($urandom); wdata = frame_state_t'($urandom);
        model[widx] = wdata;
      end
      @(posedge clk); #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
