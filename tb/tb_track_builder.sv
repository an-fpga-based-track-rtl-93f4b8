// tb_track_builder: fills the pages of one column (BIN = 3) and checks the
// readout. Parity 0 gets a row with five layers, a row with four layers
// (not reported), a row with eight layers and 40 stubs (only the first 32
// are kept) and a six-layer row; parity 1 gets its own five-layer row while
// parity 0 is read out. Checks the exact candidate sequence (rows in
// increasing order, pointers oldest first, one per clock), the column tag,
// the full-page flag, the readout time of N + M + 3 clocks from request to
// done (N pointers in M marked rows) and that a readout clears its half.
module tb_track_builder;
  import ht_pkg::*;
  localparam int BIN = 3;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  row_stub_t wr;
  logic rd_start, rd_par, rd_done, page_full;
  logic [1:0] has;
  cand_t cand;
  int checks = 0, failures = 0, n_full = 0;

  track_builder #(.BIN(BIN)) dut (.clk, .rst, .wr, .rd_start, .rd_par, .cand, .rd_done, .has, .page_full);

  typedef struct { int ptr; int row; } exp_t;
  exp_t exp_q [2][$];
  int got [$];
  int ptr_n = 0;

  always @(posedge clk) if (!rst && page_full) n_full++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int par, int row, int layer, bit keep);
    int p = (par << 8) | (ptr_n & 8'hff);
    ptr_n++;
    @(negedge clk);
    wr = '{valid: 1'b1, ptr: PTR_W'(p), layer: LAYER_W'(layer), row: ROW_W'(row)};
    if (keep) exp_q[par].push_back('{ptr: p, row: row});
  endtask

  // Request a readout of parity par and check the stream against exp_q.
  task automatic readout(int par, int nrows, bit fill_other);
    int t0, n, k;
    exp_t e;
    n = exp_q[par].size();
    @(negedge clk);
    wr = '0;
    rd_start = 1'b1; rd_par = 1'(par);
    @(negedge clk);
    rd_start = 1'b0;
    t0 = 1; k = 0;
    if (fill_other)
      // fill the other half while this one is read out
      fork
        begin
          for (int l = 0; l < 5; l++) begin
            wr = '{valid: 1'b1, ptr: PTR_W'((1 << 8) | (200 + l)), layer: LAYER_W'(l), row: ROW_W'(9)};
            exp_q[1].push_back('{ptr: (1 << 8) | (200 + l), row: 9});
            @(negedge clk);
          end
          wr = '0;
        end
      join_none
    while (!rd_done) begin
      if (cand.valid) begin
        checks++;
        if (k >= n) begin failures++; $display("FAIL: extra candidate"); end
        else begin
          e = exp_q[par][k];
          if (int'(cand.ptr) != e.ptr || int'(cand.row) != e.row || int'(cand.col) != BIN) begin
            failures++;
            $display("FAIL cand %0d: ptr %0d row %0d col %0d, exp ptr %0d row %0d", k,
                     cand.ptr, cand.row, cand.col, e.ptr, e.row);
          end
        end
        k++;
      end
      @(negedge clk);
      t0++;
    end
    checks++;
    if (k != n) begin failures++; $display("FAIL: %0d of %0d candidates", k, n); end
    if (!fill_other) begin
      checks++;
      if (t0 != n + nrows + 3) begin
        failures++; $display("FAIL: readout took %0d, expected %0d", t0, n + nrows + 3);
      end
    end
    exp_q[par] = {};
  endtask

  initial begin
    wr = '0; rd_start = 1'b0; rd_par = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // parity 0: row 4 with layers 0..4 (reported, kept in write order)
    for (int l = 0; l < 5; l++) put(0, 4, l, 1);
    // row 7: four layers, twice each: not reported
    for (int l = 0; l < 8; l++) put(0, 7, l % 4, 0);
    @(negedge clk); wr = '0;
    checks++;
    if (has !== 2'b01) begin failures++; $display("FAIL has %b", has); end
    // row 20: 40 stubs over eight layers, only 32 kept
    for (int i = 0; i < 40; i++) put(0, 20, i % 8, i < 32);
    // row 2: six layers, written last but read first
    for (int l = 0; l < 6; l++) put(0, 2, l, 1);
    begin
      exp_t a [$];
      exp_t b [$];
      a = exp_q[0];
      b = {};
      for (int r = 0; r < NROWS; r++) foreach (a[i]) if (a[i].row == r) b.push_back(a[i]);
      exp_q[0] = b;
    end
    checks++;
    if (n_full != 8) begin failures++; $display("FAIL: %0d full-page pulses", n_full); end
    readout(0, 3, 0);
    // the half is cleared: a second readout returns nothing
    checks++;
    if (has[0] !== 1'b0) begin failures++; $display("FAIL: not cleared"); end
    readout(0, 0, 0);
    // parity 1 filled while parity 0 (new data) is read out
    for (int l = 0; l < 5; l++) put(0, 30, l, 1);
    readout(0, 1, 1);
    readout(1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
