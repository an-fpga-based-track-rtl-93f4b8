// tb_hand_shake: checks the readout ordering of one Bin that is not the
// first of the chain. A behavioural Track Builder answers tb_start with a
// few candidates and a done pulse. Case 1: the request arrives, upstream
// candidates pass through one clock later, the phi58 Buffer still holds
// stubs, then the own readout follows and ends with 'done'. Case 2: the Bin
// has no marked rows and forwards the upstream 'done' in one clock.
module tb_hand_shake;
  import ht_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic start, start_par, tb_done, tb_start, tb_par;
  logic [1:0] pend, tb_has;
  cand_t up, tb_cand, down;
  int checks = 0, failures = 0;

  hand_shake #(.FIRST(1'b0)) dut (.clk, .rst, .start, .start_par, .pend, .up,
    .tb_cand, .tb_done, .tb_has, .tb_start, .tb_par, .down);

  // behavioural Track Builder: 3 candidates starting 3 clocks after tb_start
  int tb_starts = 0;
  initial begin
    tb_cand = '0; tb_done = 1'b0;
    forever begin
      @(posedge clk);
      if (tb_start && !rst) begin
        tb_starts++;
        repeat (2) @(posedge clk);
        for (int i = 0; i < 3; i++) begin
          tb_cand <= '{valid: 1'b1, done: 1'b0, ptr: PTR_W'(100 + i), row: ROW_W'(i), col: COL_W'(9)};
          @(posedge clk);
        end
        tb_cand <= '0;
        @(posedge clk);
        tb_done <= 1'b1;
        @(posedge clk);
        tb_done <= 1'b0;
      end
    end
  end

  // record everything that leaves
  int got_ptr [$];
  int got_done [$];
  int tstart_cyc = -1;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (down.valid && !rst) got_ptr.push_back(int'(down.ptr));
    if (down.done && !rst) got_done.push_back(cyc);
    if (tb_start && !rst && tstart_cyc < 0) tstart_cyc = cyc;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(negedge clk); endtask

  initial begin
    int c_updone;
    start = 0; start_par = 0; pend = 2'b00; tb_has = 2'b00; up = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // case 1: parity 1, own candidates, buffer busy for a while
    tb_has = 2'b10; pend = 2'b10;
    start = 1; start_par = 1; tick(); start = 0;
    for (int i = 0; i < 4; i++) begin
      up = '{valid: 1'b1, done: 1'b0, ptr: PTR_W'(10 + i), row: '0, col: COL_W'(8)};
      tick();
    end
    up = '0; up.done = 1'b1; c_updone = cyc; tick(); up = '0;
    repeat (4) tick();
    checks++;
    if (tstart_cyc >= 0) begin failures++; $display("FAIL: started while buffer busy"); end
    pend = 2'b00;
    repeat (15) tick();
    checks++;
    if (tb_par !== 1'b1) begin failures++; $display("FAIL: parity"); end
    checks++;
    if (got_ptr.size() != 7) begin failures++; $display("FAIL: %0d words", got_ptr.size()); end
    else begin
      for (int i = 0; i < 4; i++) begin
        checks++; if (got_ptr[i] != 10 + i) begin failures++; $display("FAIL: up order"); end
      end
      for (int i = 0; i < 3; i++) begin
        checks++; if (got_ptr[4 + i] != 100 + i) begin failures++; $display("FAIL: own order"); end
      end
    end
    checks++;
    if (got_done.size() != 1) begin failures++; $display("FAIL: %0d done words", got_done.size()); end
    // case 2: nothing of its own: done goes on one clock after upstream done
    got_ptr = {}; got_done = {};
    tb_has = 2'b00;
    start = 1; start_par = 0; tick(); start = 0;
    repeat (2) tick();
    up = '0; up.done = 1'b1; c_updone = cyc; tick(); up = '0;
    repeat (3) tick();
    checks++;
    if (got_done.size() != 1 || got_done[0] != c_updone + 1) begin
      failures++; $display("FAIL: pass-through done");
    end
    checks++;
    if (got_ptr.size() != 0) begin failures++; $display("FAIL: unexpected words"); end
    checks++;
    if (tb_starts != 2) begin failures++; $display("FAIL: Track Builder started %0d times", tb_starts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
