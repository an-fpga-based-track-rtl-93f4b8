// tb_book_keeper: checks the Book Keeper on its own, with a behavioural Bin
// chain. Events arrive on both links at once; the test checks that every
// stub goes down the chain exactly once with its fields and a pointer of
// the right parity, that a readout request of the right parity follows the
// end of each event and that a second request waits for the 'done' of the
// first, that candidates come back out with the full stub word, row and
// column, alternately on the two links, and that a third event arriving
// while two await readout raises 'overrun'.
module tb_book_keeper;
  import ht_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  link_in_t  link_in  [2];
  link_out_t link_out [2];
  chain_stub_t s_out;
  cand_t c_in;
  logic ev_closed, ro_start, ro_queued, drop, overrun;
  int checks = 0, failures = 0, cyc = 0;

  book_keeper dut (.clk, .rst, .link_in, .link_out, .s_out, .c_in, .ev_closed,
                   .ro_start, .ro_queued, .drop, .overrun);

  stub_t sent [int];            // by id (extra field)
  int    ptr_of [int];          // id -> pointer seen on the chain
  int    seen_ev [int];         // id -> parity seen
  int    starts [$];            // parity of each readout request
  int    start_cyc [$];
  int    n_ovr = 0, n_both = 0, n_out [2] = '{0, 0}, n_eoe = 0;
  int    done_cyc [$];

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (s_out.valid) begin
      int id;
      id = int'(sent_lookup(s_out));
      checks++;
      if (id < 0) begin failures++; $display("FAIL: unknown stub on the chain"); end
      else if (ptr_of.exists(id)) begin failures++; $display("FAIL: stub %0d twice", id); end
      else ptr_of[id] = int'(s_out.ptr);
    end
    if (s_out.start) begin starts.push_back(int'(s_out.start_par)); start_cyc.push_back(cyc); end
    if (overrun) n_ovr++;
    if (link_in[0].valid && link_in[1].valid) n_both++;
    for (int l = 0; l < 2; l++) if (link_out[l].valid) n_out[l]++;
    if (link_out[0].eoe) n_eoe++;
  end

  // find the stub by its r58/phi/layer/q fields (ids are unique in phi)
  function automatic int sent_lookup(chain_stub_t c);
    foreach (sent[id])
      if (sent[id].phi == c.phi && sent[id].r58 == c.r58 && sent[id].layer == c.layer &&
          sent[id].qmin == c.qmin && sent[id].qmax == c.qmax) return id;
    return -1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int next_id = 0;
  int ev_ids [3][$];
  task automatic send_event(int e, int n);
    for (int i = 0; i < n; i += 2) begin
      for (int l = 0; l < 2; l++) begin
        stub_t s;
        s.phi = PHI_W'(next_id);
        s.r58 = R58_W'($urandom); s.layer = LAYER_W'($urandom);
        s.qmin = COL_W'($urandom); s.qmax = COL_W'($urandom);
        s.extra = EXTRA_W'(next_id);
        sent[next_id] = s; ev_ids[e].push_back(next_id); next_id++;
        link_in[l] = '{valid: 1'b1, eop: 1'b0, stub: s};
      end
      @(negedge clk);
      link_in[0] = '0; link_in[1] = '0;
      @(negedge clk);
    end
    link_in[0] = '{valid: 1'b0, eop: 1'b1, stub: '0};
    link_in[1] = '{valid: 1'b0, eop: 1'b1, stub: '0};
    @(negedge clk);
    link_in[0] = '0; link_in[1] = '0;
  endtask

  // behavioural Bin chain: return every third stub of event e as candidate
  task automatic answer(int e, bit with_cands);
    repeat (40) @(negedge clk);
    foreach (ev_ids[e][k]) if (with_cands && k % 3 == 0) begin
      int id = ev_ids[e][k];
      c_in = '{valid: 1'b1, done: 1'b0, ptr: PTR_W'(ptr_of[id]), row: ROW_W'(id), col: COL_W'(id + 7)};
      @(negedge clk);
      // check the output one clock after the lookup
      checks++;
      if (!((link_out[0].valid && link_out[0].stub == sent[id] && link_out[0].row == ROW_W'(id) &&
             link_out[0].col == COL_W'(id + 7)) ||
            (link_out[1].valid && link_out[1].stub == sent[id] && link_out[1].row == ROW_W'(id) &&
             link_out[1].col == COL_W'(id + 7)))) begin
        failures++; $display("FAIL: output for stub %0d", id);
      end
    end
    c_in = '0; c_in.done = 1'b1; done_cyc.push_back(cyc);
    @(negedge clk);
    c_in = '0;
    checks++;
    if (!(link_out[0].eoe && link_out[1].eoe)) begin failures++; $display("FAIL: eoe"); end
  endtask

  initial begin
    link_in[0] = '0; link_in[1] = '0; c_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    send_event(0, 30);
    send_event(1, 20);       // closes while event 0 waits for its readout
    repeat (5) @(negedge clk);
    checks++;
    if (starts.size() != 1 || !ro_queued) begin failures++; $display("FAIL: second request not queued"); end
    send_event(2, 4);        // both halves in use: overrun
    checks++;
    if (n_ovr == 0) begin failures++; $display("FAIL: no overrun"); end
    answer(0, 1);
    repeat (5) @(negedge clk);
    checks++;
    if (starts.size() != 2 || start_cyc[1] <= done_cyc[0]) begin
      failures++; $display("FAIL: second request not after first done");
    end
    answer(1, 1);
    repeat (5) @(negedge clk);
    answer(2, 0);           // the overrun event's stubs were not stored
    checks++;
    foreach (ev_ids[2][k]) if (ptr_of.exists(ev_ids[2][k])) begin
      failures++; $display("FAIL: overrun stub sent down the chain");
    end
    repeat (5) @(negedge clk);
    checks++;
    if (starts.size() != 3 || starts[0] != 0 || starts[1] != 1 || starts[2] != 0) begin
      failures++; $display("FAIL: request parities");
    end
    // pointers: parity and index
    for (int e = 0; e < 2; e++) foreach (ev_ids[e][k]) begin
      int id;
      id = ev_ids[e][k];
      checks++;
      if (!ptr_of.exists(id) || (ptr_of[id] >> IDX_W) != e % 2 || (ptr_of[id] & 8'hff) >= ev_ids[e].size()) begin
        failures++; $display("FAIL: pointer of stub %0d", id);
      end
    end
    checks++;
    if (n_both == 0 || n_out[0] == 0 || n_out[1] == 0 || n_out[0] - n_out[1] > 1 || n_out[1] - n_out[0] > 1 || n_eoe != 3) begin
      failures++; $display("FAIL: link use both %0d out %0d/%0d eoe %0d", n_both, n_out[0], n_out[1], n_eoe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
