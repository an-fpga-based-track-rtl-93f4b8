// tb_hough_segment: end-to-end test of a full-size Hough Segment.
//
// Generates events of tracker stubs (straight-line tracks in the Hough
// parameter plane plus random hits), sends them on the two input links with
// random gaps, and checks every output word against a behavioural model that
// bins each stub into the rows its line crosses in each compatible column,
// keeps at most 32 stubs per cell and reports the cells with five or more
// layers. Checked: the set of (stub, row, column) triples per event, the full
// stub word returned with each candidate, the column/row order of the
// readout, the latency from readout request to first output word on an
// event with one candidate cell in column 0 (NBINS + 7 clocks) and that its
// candidates leave on consecutive clocks. Counts how often each mechanism
// occurs (row duplication, full page, four-layer cell not reported, both
// links busy, readout request queued behind a running readout) and fails
// if one never does. A last run sends pileup-200-sized events (88 stubs)
// at the time-multiplexing period of 216 clocks and checks that the segment
// keeps up. Runs with the top's default parameters.
module tb_hough_segment;
  import ht_pkg::*;

  localparam int NB = NCOLS;
  localparam int N_RANDOM = 24;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  link_in_t  link_in  [2];
  link_out_t link_out [2];
  logic ev_closed, ro_start, ro_queued, drop, overrun;
  logic [NB-1:0] dup, fifo_ovf, page_full;

  hough_segment dut (
    .clk, .rst, .link_in, .link_out, .ev_closed, .ro_start, .ro_queued,
    .drop, .overrun, .dup, .fifo_ovf, .page_full
  );

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- mechanism counters ----------------
  int n_dup = 0, n_full = 0, n_both = 0, n_queued = 0, n_four = 0, n_five = 0;
  int n_cand = 0, n_drop = 0, n_ovr = 0, n_ovf = 0;
  int ro_active = 0;
  int n_wait = 0;
  always @(posedge clk) if (!rst) begin
    n_dup  <= n_dup  + $countones(dup);
    n_full <= n_full + $countones(page_full);
    n_ovf  <= n_ovf  + $countones(fifo_ovf);
    if (link_in[0].valid && link_in[1].valid) n_both <= n_both + 1;
    if (drop) n_drop <= n_drop + 1;
    if (overrun) n_ovr <= n_ovr + 1;
  end

  // ---------------- stimulus storage ----------------
  stub_t ev_stub [$];   // stubs of the event being built
  int    ev_link [$];
  stub_t by_id [int];   // all stubs by id
  typedef logic [EXTRA_W+ROW_W+COL_W-1:0] key_t;
  int exp_q [$][key_t];  // not used directly; see exp_ev

  // expected candidates per event number
  bit    exp_ev [int][key_t];
  int    ev_sent = 0, ev_done = 0;

  function automatic int frow(int phi);
    return phi >>> PHI_FRAC;
  endfunction

  // Model of one event: returns the expected candidate keys.
  task automatic model_event(int e);
    int cnt [NB][NROWS];
    int pat [NB][NROWS];
    int ids [NB][NROWS][$];
    for (int c = 0; c < NB; c++)
      for (int r = 0; r < NROWS; r++) begin cnt[c][r] = 0; pat[c][r] = 0; end
    foreach (ev_stub[i]) begin
      stub_t s = ev_stub[i];
      int id = int'(s.extra);
      for (int c = int'(s.qmin); c <= int'(s.qmax); c++) begin
        int L = int'(s.phi) + c * int'(s.r58);
        int R = L + int'(s.r58);
        int rl = frow(L), rr = frow(R);
        bit vl = (rl >= 0 && rl < NROWS), vr = (rr >= 0 && rr < NROWS);
        int rows [$];
        rows = {};
        if (vl) rows.push_back(rl);
        if (vr && (!vl || rr != rl)) rows.push_back(rr);
        foreach (rows[k]) begin
          int r = rows[k];
          if (cnt[c][r] < PAGE_DEPTH) begin
            cnt[c][r]++;
            pat[c][r] |= (1 << int'(s.layer));
            ids[c][r].push_back(id);
          end
        end
      end
    end
    for (int c = 0; c < NB; c++)
      for (int r = 0; r < NROWS; r++) begin
        int nl = $countones(pat[c][r]);
        if (nl == 4) n_four++;
        if (nl == 5) n_five++;
        if (nl >= MIN_LAYERS)
          foreach (ids[c][r][k]) exp_ev[e][{EXTRA_W'(ids[c][r][k]), ROW_W'(r), COL_W'(c)}] = 1'b1;
      end
  endtask

  // ---------------- event builders ----------------
  int next_id = 0;
  function automatic stub_t mk(int phi, int r58, int layer, int qmin, int qmax);
    stub_t s;
    s.r58   = R58_W'(r58);
    s.phi   = PHI_W'(phi);
    s.layer = LAYER_W'(layer);
    s.qmin  = COL_W'(qmin);
    s.qmax  = COL_W'(qmax);
    s.extra = EXTRA_W'(next_id);
    next_id++;
    return s;
  endfunction

  task automatic add(stub_t s, int link);
    ev_stub.push_back(s);
    ev_link.push_back(link);
    by_id[int'(s.extra)] = s;
  endtask

  int lay_r58 [6] = '{-40, -27, -12, 8, 28, 50};

  task automatic add_track(int c0, int P, int nlay, int width);
    int skip = (nlay < 6) ? int'($urandom_range(0, 5)) : -1;
    int dropped = 0;
    for (int l = 0; l < 6; l++) begin
      int noise = int'($urandom_range(0, 16)) - 8;
      if (dropped < 6 - nlay && (l == skip || (nlay < 5 && l == (skip + 1) % 6))) begin
        dropped++;
        continue;
      end
      add(mk(P - c0 * lay_r58[l] + noise, lay_r58[l], l,
             (c0 - width < 0) ? 0 : c0 - width, (c0 + width > 31) ? 31 : c0 + width),
          int'($urandom_range(0, 1)));
    end
  endtask

  task automatic add_noise(int n);
    for (int i = 0; i < n; i++) begin
      int qmin = int'($urandom_range(0, 31));
      int qmax = qmin + int'($urandom_range(0, 6));
      if (qmax > 31) qmax = 31;
      add(mk(int'($urandom_range(0, 40 * 64)) - 4 * 64, int'($urandom_range(0, 120)) - 60,
             int'($urandom_range(0, 5)), qmin, qmax), int'($urandom_range(0, 1)));
    end
  endtask

  // Send the built event on the links; returns when both links sent eop.
  task automatic send_event(int pct);
    int q0 [$], q1 [$];
    int e = ev_sent;
    model_event(e);
    foreach (ev_stub[i]) if (ev_link[i] == 0) q0.push_back(i); else q1.push_back(i);
    // keep at most one earlier event waiting for its readout
    if (ev_sent - ev_done > 1) n_wait++;
    while (ev_sent - ev_done > 1) @(posedge clk);
    ev_sent++;
    while (q0.size() > 0 || q1.size() > 0) begin
      link_in[0] <= '0; link_in[1] <= '0;
      if (q0.size() > 0 && int'($urandom_range(1, 100)) <= pct) begin
        link_in[0] <= '{valid: 1'b1, eop: 1'b0, stub: ev_stub[q0.pop_front()]};
      end
      if (q1.size() > 0 && int'($urandom_range(1, 100)) <= pct) begin
        link_in[1] <= '{valid: 1'b1, eop: 1'b0, stub: ev_stub[q1.pop_front()]};
      end
      @(posedge clk);
    end
    link_in[0] <= '{valid: 1'b0, eop: 1'b1, stub: '0};
    link_in[1] <= '{valid: 1'b0, eop: 1'b1, stub: '0};
    @(posedge clk);
    link_in[0] <= '0; link_in[1] <= '0;
    ev_stub = {}; ev_link = {};
  endtask

  // ---------------- output checking ----------------
  int out_ev = 0;
  int last_col = -1, last_row = -1;
  int got_in_ev = 0;
  int first_out_cyc [int];
  int ro_cyc [int];
  int n_ro = 0;
  int lat_consec_ok = 1, lat_prev = -1;

  always @(posedge clk) if (!rst) begin
    if (ro_start) begin
      ro_cyc[n_ro] = int'(cyc);
      n_ro++;
      if (ro_active > 0) ; // cannot happen: one readout at a time
    end
    if (ev_closed && (n_ro > out_ev)) n_queued++;
    for (int l = 0; l < 2; l++) begin
      if (link_out[l].valid) begin
        key_t k;
        int id;
        k  = {link_out[l].stub.extra, link_out[l].row, link_out[l].col};
        id = int'(link_out[l].stub.extra);
        checks++;
        if (!first_out_cyc.exists(out_ev)) first_out_cyc[out_ev] = int'(cyc);
        if (out_ev == 0) begin
          if (lat_prev >= 0 && int'(cyc) != lat_prev + 1) lat_consec_ok = 0;
          lat_prev = int'(cyc);
        end
        if (!exp_ev.exists(out_ev) || !exp_ev[out_ev].exists(k)) begin
          failures++;
          $display("FAIL ev %0d: unexpected candidate id %0d row %0d col %0d",
                   out_ev, id, link_out[l].row, link_out[l].col);
        end else begin
          exp_ev[out_ev].delete(k);
        end
        checks++;
        if (!by_id.exists(id) || by_id[id] != link_out[l].stub) begin
          failures++;
          $display("FAIL ev %0d: stub word mismatch for id %0d", out_ev, id);
        end
        checks++;
        if (int'(link_out[l].col) < last_col ||
            (int'(link_out[l].col) == last_col && int'(link_out[l].row) < last_row)) begin
          failures++;
          $display("FAIL ev %0d: readout order", out_ev);
        end
        last_col = int'(link_out[l].col);
        last_row = int'(link_out[l].row);
        got_in_ev++;
        n_cand++;
      end
    end
    if (link_out[0].eoe) begin
      checks++;
      if (!link_out[1].eoe) begin failures++; $display("FAIL: eoe not on both links"); end
      checks++;
      if (exp_ev.exists(out_ev) && exp_ev[out_ev].size() != 0) begin
        failures++;
        $display("FAIL ev %0d: %0d expected candidates missing", out_ev, exp_ev[out_ev].size());
      end
      out_ev++;
      ev_done++;
      last_col = -1; last_row = -1; got_in_ev = 0;
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link_in[0] = '0; link_in[1] = '0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);

    // event 0: one six-layer cell in column 0, row 10, no duplication
    for (int l = 0; l < 6; l++) add(mk(10 * 64 + 32, 0, l, 0, 0), 0);
    send_event(100);
    while (ev_done < 1) @(posedge clk);
    checks++;
    if (first_out_cyc[0] - ro_cyc[0] != NB + 7) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", first_out_cyc[0] - ro_cyc[0], NB + 7);
    end
    checks++;
    if (!lat_consec_ok) begin failures++; $display("FAIL: candidates not back to back"); end

    // event 1: a four-layer cell only (must not be reported) and a five-layer one
    add_track(12, 15 * 64 + 32, 4, 1);
    add_track(20, 5 * 64 + 32, 5, 1);
    send_event(45);

    // event 2: 40 stubs in one row of every column, five layers: pages overflow
    for (int i = 0; i < 40; i++) add(mk(20 * 64 + 10, 0, i % 5, 0, 31), 0);
    send_event(100);

    // random events at the average segment occupancies of pileup 140 and 200
    for (int e = 0; e < N_RANDOM; e++) begin
      int nt;
      nt = int'($urandom_range(1, 4));
      for (int t = 0; t < nt; t++)
        add_track(int'($urandom_range(0, 31)), int'($urandom_range(3 * 64, 29 * 64)),
                  int'($urandom_range(5, 6)), 2);
      // about 55 stubs per event for pileup 140, 88 for pileup 200
      add_noise(((e % 2) ? 88 : 55) - 6 * nt);
      // short events sometimes, so that a readout request has to wait
      send_event((e % 3 == 0) ? 48 : 35);
      if (e % 5 == 4) repeat (int'($urandom_range(0, 200))) @(posedge clk);
    end
    while (ev_done < ev_sent) @(posedge clk);
    repeat (20) @(posedge clk);

    // time-multiplexed operation: one event every 36 bunch crossings, i.e.
    // every 216 clocks at 240 MHz, at the pileup-200 occupancy of 88 stubs;
    // the segment must keep up without the source ever having to wait
    n_wait = 0;
    for (int e = 0; e < 12; e++) begin
      int t0;
      t0 = int'(cyc);
      add_track(int'($urandom_range(0, 31)), int'($urandom_range(3 * 64, 29 * 64)), 6, 2);
      add_track(int'($urandom_range(0, 31)), int'($urandom_range(3 * 64, 29 * 64)), 5, 2);
      add_noise(88 - 11);
      send_event(48);
      while (int'(cyc) < t0 + 216) @(posedge clk);
    end
    while (ev_done < ev_sent) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (n_wait != 0) begin failures++; $display("FAIL: %0d events had to wait at the 216-clock period", n_wait); end

    // mechanisms
    checks++; if (n_dup   == 0) begin failures++; $display("FAIL: no row duplication seen"); end
    checks++; if (n_full  == 0) begin failures++; $display("FAIL: no full page seen"); end
    checks++; if (n_four  == 0) begin failures++; $display("FAIL: no four-layer cell seen"); end
    checks++; if (n_five  == 0) begin failures++; $display("FAIL: no five-layer cell seen"); end
    checks++; if (n_both  == 0) begin failures++; $display("FAIL: links never busy together"); end
    checks++; if (n_queued == 0) begin failures++; $display("FAIL: no queued readout request"); end
    checks++; if (n_drop != 0 || n_ovr != 0 || n_ovf != 0) begin
      failures++; $display("FAIL: drop %0d overrun %0d fifo overflow %0d", n_drop, n_ovr, n_ovf);
    end
    checks++; if (out_ev != ev_sent) begin failures++; $display("FAIL: events %0d of %0d", out_ev, ev_sent); end
    $display("events %0d candidates %0d duplications %0d full-page drops %0d four-layer cells %0d five-layer cells %0d both-links %0d queued %0d",
             out_ev, n_cand, n_dup, n_full, n_four, n_five, n_both, n_queued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
