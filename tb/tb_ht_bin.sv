// tb_ht_bin: one Bin (column 2) between a driven stub chain and a driven
// candidate chain. Sends an event of random stubs plus two five-layer cells
// whose lines cross a row boundary (so that stubs are duplicated), then the
// readout request followed by an upstream 'done'. Checks the outgoing stub
// words (phi moved by r58, one clock later), the set of candidates against a
// model of the column (rows crossed, five-layer rule), their row order and
// column tag, that upstream candidates are forwarded first and that the
// stream ends with 'done'.
module tb_ht_bin;
  import ht_pkg::*;
  localparam int BIN = 2;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  chain_stub_t s_in, s_out, prev;
  cand_t c_in, c_out;
  logic dup, fifo_ovf, page_full;
  int checks = 0, failures = 0, n_dup = 0;

  ht_bin #(.BIN(BIN)) dut (.clk, .rst, .s_in, .s_out, .c_in, .c_out, .dup, .fifo_ovf, .page_full);

  int cnt [NROWS], pat [NROWS];
  int exp_ptr [NROWS][$];
  bit expset [int];
  int ncand = 0, nup = 0, ndone = 0, last_row = -1;
  bit prev_ok = 0;

  always @(posedge clk) if (!rst && dup) n_dup++;
  // the word the Bin took in at the last clock edge
  chain_stub_t taken;
  always @(posedge clk) taken <= s_in;

  always @(negedge clk) if (!rst) begin
    if (prev_ok) begin
      checks++;
      if (s_out.valid !== taken.valid || s_out.start !== taken.start ||
          (taken.valid && (s_out.ptr !== taken.ptr ||
          s_out.phi !== PHI_W'(int'(taken.phi) + int'(taken.r58))))) begin
        failures++; $display("FAIL: stub path");
      end
    end
    if (c_out.valid) begin
      checks++;
      if (int'(c_out.col) == 30) begin
        nup++;
        if (ncand != 0) begin failures++; $display("FAIL: upstream after own"); end
      end else begin
        int key;
        key = int'(c_out.ptr) * 64 + int'(c_out.row);
        if (!expset.exists(key) || int'(c_out.col) != BIN || int'(c_out.row) < last_row) begin
          failures++; $display("FAIL: candidate ptr %0d row %0d col %0d", c_out.ptr, c_out.row, c_out.col);
        end else expset.delete(key);
        last_row = int'(c_out.row);
        ncand++;
      end
    end
    if (c_out.done) ndone++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(chain_stub_t w);
    @(negedge clk);
    s_in = w; prev = w; prev_ok = 1;
  endtask

  task automatic stub(int ptr, int phi, int r58, int layer, int qmin, int qmax);
    chain_stub_t w;
    int L, R, rl, rr;
    bit vl, vr;
    w = '0;
    w.valid = 1; w.ptr = PTR_W'(ptr); w.phi = PHI_W'(phi); w.r58 = R58_W'(r58);
    w.layer = LAYER_W'(layer); w.qmin = COL_W'(qmin); w.qmax = COL_W'(qmax);
    // the stub reaches this Bin with phi at the left edge of column BIN
    if (qmin <= BIN && BIN <= qmax) begin
      L = phi; R = phi + r58; rl = L >>> PHI_FRAC; rr = R >>> PHI_FRAC;
      vl = rl >= 0 && rl < NROWS; vr = rr >= 0 && rr < NROWS;
      if (vl) begin cnt[rl]++; pat[rl] |= 1 << layer; exp_ptr[rl].push_back(ptr); end
      if (vr && (!vl || rr != rl)) begin cnt[rr]++; pat[rr] |= 1 << layer; exp_ptr[rr].push_back(ptr); end
    end
    drive(w);
  endtask

  initial begin
    chain_stub_t w;
    s_in = '0; c_in = '0;
    for (int r = 0; r < NROWS; r++) begin cnt[r] = 0; pat[r] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    // two cells crossing from row 6 to row 7 and from row 20 to row 19
    for (int l = 0; l < 5; l++) stub(l, 7 * 64 - 10, 20, l, 0, 5);
    for (int l = 0; l < 5; l++) stub(10 + l, 20 * 64 + 5, -15, l, 1, 2);
    for (int i = 0; i < 60; i++) begin
      if ($urandom_range(0, 2) == 0) drive('0);
      stub(20 + i, int'($urandom_range(0, 32 * 64)), int'($urandom_range(0, 100)) - 50,
           int'($urandom_range(0, 5)), int'($urandom_range(0, 2)), int'($urandom_range(2, 6)));
    end
    for (int r = 0; r < NROWS; r++)
      if ($countones(pat[r]) >= MIN_LAYERS)
        foreach (exp_ptr[r][k]) expset[exp_ptr[r][k] * 64 + r] = 1;
    w = '0; w.start = 1; w.start_par = 0;
    drive(w);
    drive('0);
    // upstream candidates (column 30 as a marker), then upstream done
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); c_in = '{valid: 1'b1, done: 1'b0, ptr: PTR_W'(i), row: '0, col: COL_W'(30)};
    end
    @(negedge clk); c_in = '0; c_in.done = 1'b1;
    @(negedge clk); c_in = '0;
    repeat (300) @(negedge clk);
    checks++;
    if (expset.size() != 0) begin failures++; $display("FAIL: %0d candidates missing", expset.size()); end
    checks++;
    if (nup != 3 || ndone != 1 || ncand < 10 || n_dup == 0) begin
      failures++; $display("FAIL: up %0d done %0d own %0d dup %0d", nup, ndone, ncand, n_dup);
    end
    $display("own candidates %0d duplications %0d", ncand, n_dup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
