// tb_phi58_buffer: drives stubs through a Hough Transform model into the
// phi58 Buffer (FIFO depth 8) and compares every output word with a model
// of the routing rule: one row sent at once, the second row of a crossing
// stub queued and sent in the next clock without a new stub. Also checks
// the per-parity pending flags and the overflow flag, with bursts long
// enough to fill the FIFO.
module tb_phi58_buffer;
  import ht_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  chain_stub_t left, right;
  logic active;
  row_stub_t out;
  logic [1:0] pend;
  logic dup, ovf;
  int checks = 0, failures = 0, n_dup = 0, n_ovf = 0, n_drain = 0;

  phi58_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst, .left, .right, .active, .out, .pend, .dup, .ovf);

  row_stub_t fifo [$];
  row_stub_t exp_out;
  logic exp_ovf;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int frow(int phi); return phi >>> PHI_FRAC; endfunction

  initial begin
    chain_stub_t nxt;
    int lphi, rphi, rl, rr;
    bit vl, vr, sent;
    left = '0; right = '0; active = 1'b0; exp_out = '0; exp_ovf = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // check the output of the previous decision
      checks++;
      if (out !== exp_out) begin
        failures++;
        $display("FAIL %0d: out v%0d ptr %0d row %0d, exp v%0d ptr %0d row %0d", i,
                 out.valid, out.ptr, out.row, exp_out.valid, exp_out.ptr, exp_out.row);
      end
      checks++;
      if (ovf !== exp_ovf) begin failures++; $display("FAIL ovf"); end
      begin
        bit p0, p1;
        p0 = 0; p1 = 0;
        foreach (fifo[k]) if (fifo[k].ptr[PTR_W-1]) p1 = 1; else p0 = 1;
        if (out.valid) begin if (out.ptr[PTR_W-1]) p1 = 1; else p0 = 1; end
        checks++;
        if (pend !== {p1, p0}) begin failures++; $display("FAIL pend %b exp %b", pend, {p1, p0}); end
      end
      if (ovf) n_ovf++;
      // the stub now at 'left' moves to 'right' (Hough Transform model)
      right     = left;
      right.phi = PHI_W'(int'(left.phi) + int'(left.r58));
      active    = left.valid && (left.qmin <= 7) && (7 <= left.qmax);
      // model decision for this clock
      lphi = int'(left.phi); rphi = int'(right.phi);
      rl = frow(lphi); rr = frow(rphi);
      vl = rl >= 0 && rl < NROWS; vr = rr >= 0 && rr < NROWS;
      exp_out = '0; exp_ovf = 1'b0; sent = 0;
      if (active && (vl || vr)) begin
        exp_out = '{valid: 1'b1, ptr: right.ptr, layer: right.layer,
                    row: ROW_W'(vl ? rl : rr)};
        sent = 1;
      end else if (fifo.size() > 0) begin
        exp_out = fifo.pop_front();
        n_drain++;
      end
      if (active && vl && vr && rl != rr) begin
        if (fifo.size() < DEPTH + (sent ? 0 : 0) && !(fifo.size() == DEPTH)) begin
          fifo.push_back('{valid: 1'b1, ptr: right.ptr, layer: right.layer, row: ROW_W'(rr)});
          n_dup++;
        end else exp_ovf = 1'b1;
      end
      // new stub at the Bin input; bursts of 40 busy clocks, then gaps
      nxt = '0;
      nxt.valid = ((i / 40) % 2 == 0) ? 1'b1 : ($urandom_range(0, 3) == 0);
      nxt.ptr   = PTR_W'({1'((i / 97) % 2), 8'(i)});
      nxt.layer = LAYER_W'($urandom);
      nxt.r58   = R58_W'(int'($urandom_range(0, 120)) - 60);
      nxt.phi   = PHI_W'(int'($urandom_range(0, 36 * 64)) - 2 * 64);
      nxt.qmin  = COL_W'($urandom_range(0, 7));
      nxt.qmax  = COL_W'($urandom_range(6, 31));
      left = nxt;
    end
    checks++;
    if (n_dup == 0 || n_ovf == 0 || n_drain == 0) begin
      failures++; $display("FAIL: dup %0d ovf %0d drain %0d", n_dup, n_ovf, n_drain);
    end
    $display("dup %0d ovf %0d drain %0d", n_dup, n_ovf, n_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
