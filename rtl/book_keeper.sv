// book_keeper: input and output of a Hough Segment.
//
// Input side: stubs arrive on NLINKS input links, each with an end-of-packet
// word closing every event. Each link has a small FIFO; the Book Keeper takes
// one stub per clock from them (round robin when both hold stubs) and writes
// it into the stub store, a 512 x 64 bit (36 Kb) memory whose upper and lower
// halves hold the odd and even events. The store address (the stub pointer,
// parity in the MSB) goes down the Bin chain together with phi, r58, layer
// and the compatible column range. When every link has delivered its
// end-of-packet word the event is closed and its parity flips.
//
// Readout: a closed event gets a readout request that travels down the chain
// behind its stubs; the next request waits until the last Bin has sent the
// 'done' of the previous readout. The candidates that come back (pointer, row,
// column) are looked up in the stub store (one clock) and sent out with their
// track parameters, alternately on the output links; the end of each event's
// readout is marked by an end-of-event word on every output link.
//
// Flags: 'drop' pulses when a stub is lost (link FIFO full, or over 256 stubs
// in an event); 'overrun' when a stub arrives while both halves still await
// readout. The 36 Kb store, the pointer, the readout initiation at the end of
// an event and the lookup of the full stub follow the design description;
// the link format, FIFOs, round robin and output link assignment are this
// design's own choices.
module book_keeper
  import ht_pkg::*;
#(
  parameter int unsigned NLINKS     = 2,
  parameter int unsigned LINK_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  link_in_t    link_in  [NLINKS],
  output link_out_t   link_out [NLINKS],
  output chain_stub_t s_out,     // to the first Bin
  input  cand_t       c_in,      // from the last Bin
  output logic        ev_closed, // pulse: an input event was closed
  output logic        ro_start,  // pulse: a readout request was issued
  output logic        ro_queued, // a closed event waits for its readout
  output logic        drop,
  output logic        overrun
);

  localparam int unsigned LW = $bits(link_in_t);

  // ---------------- link FIFOs ----------------
  link_in_t    head  [NLINKS];
  logic [LW-1:0] head_bits [NLINKS];
  logic [NLINKS-1:0] empty, full, pop, push;

  for (genvar l = 0; l < NLINKS; l++) begin : g_link
    assign push[l] = link_in[l].valid || link_in[l].eop;
    sync_fifo #(.WIDTH(LW), .DEPTH(LINK_DEPTH)) u_fifo (
      .clk, .rst, .push(push[l]), .din(link_in[l]), .pop(pop[l]),
      .dout(head_bits[l]), .empty(empty[l]), .full(full[l])
    );
    assign head[l] = link_in_t'(head_bits[l]);
  end

  // ---------------- merge ----------------
  logic [NLINKS-1:0] is_stub, is_eop;
  logic              all_eop, take;
  localparam int unsigned SW = (NLINKS > 1) ? $clog2(NLINKS) : 1;
  logic [SW-1:0]     sel, rr;
  stub_t             st;

  always_comb begin
    for (int l = 0; l < NLINKS; l++) begin
      is_stub[l] = !empty[l] && head[l].valid;
      is_eop[l]  = !empty[l] && !head[l].valid && head[l].eop;
    end
    all_eop = &is_eop;
    // round robin: first link holding a stub, starting at rr
    take = 1'b0;
    sel  = rr;
    for (int k = 0; k < NLINKS; k++) begin
      logic [SW-1:0] l;
      l = SW'((int'(rr) + k) % NLINKS);
      if (!take && is_stub[l]) begin
        take = 1'b1;
        sel  = l;
      end
    end
    pop = '0;
    if (take) pop[sel] = 1'b1;
    else if (all_eop) pop = '1;
    // a FIFO head that is neither stub nor marker cannot occur (only
    // stub or marker words are pushed)
    st = head[sel].stub;
  end

  // ---------------- stub store ----------------
  stub_t            smem [2**PTR_W];
  logic             par;          // parity of the event being filled
  logic [IDX_W:0]   idx;          // stubs stored in this event
  logic [1:0]       outstanding;  // closed events not yet read out, plus open
  logic [1:0]       queued;       // closed events without a readout request
  logic             ro_busy, ro_par;
  logic             store;

  assign store = take && !idx[IDX_W] && (outstanding < 2'd2);

  always_ff @(posedge clk) begin
    if (store) smem[{par, idx[IDX_W-1:0]}] <= st;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      par <= 1'b0; idx <= '0; rr <= '0;
      outstanding <= '0; queued <= '0; ro_busy <= 1'b0; ro_par <= 1'b0;
      s_out <= '0; ev_closed <= 1'b0; ro_start <= 1'b0;
      drop <= 1'b0; overrun <= 1'b0;
    end else begin
      s_out     <= '0;
      ev_closed <= 1'b0;
      ro_start  <= 1'b0;
      drop      <= (|(push & full)) || (take && idx[IDX_W]);
      overrun   <= take && (outstanding == 2'd2);
      if (take) rr <= (sel == $bits(sel)'(NLINKS-1)) ? '0 : sel + 1'b1;
      if (store) begin
        idx <= idx + 1'b1;
        s_out.valid <= 1'b1;
        s_out.ptr   <= {par, idx[IDX_W-1:0]};
        s_out.r58   <= st.r58;
        s_out.phi   <= st.phi;
        s_out.layer <= st.layer;
        s_out.qmin  <= st.qmin;
        s_out.qmax  <= st.qmax;
      end
      // close the event
      if (!take && all_eop) begin
        par       <= !par;
        idx       <= '0;
        ev_closed <= 1'b1;
      end
      // readout requests, one event along the chain at a time
      if (!ro_busy && queued != '0) begin
        s_out.start     <= 1'b1;
        s_out.start_par <= ro_par;
        ro_par          <= !ro_par;
        ro_busy         <= 1'b1;
        ro_start        <= 1'b1;
      end
      if (c_in.done) ro_busy <= 1'b0;
      queued <= queued + 2'((!take && all_eop))
                       - 2'((!ro_busy && queued != '0));
      outstanding <= outstanding + 2'((!take && all_eop))
                                 - 2'(c_in.done);
    end
  end

  assign ro_queued = (queued != '0);

  // ---------------- output ----------------
  stub_t            rd_stub;
  logic             o_valid, o_eoe;
  logic [ROW_W-1:0] o_row;
  logic [COL_W-1:0] o_col;
  logic [SW-1:0]    osel;

  always_ff @(posedge clk) rd_stub <= smem[c_in.ptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      o_valid <= 1'b0; o_eoe <= 1'b0; o_row <= '0; o_col <= '0; osel <= '0;
    end else begin
      o_valid <= c_in.valid;
      o_eoe   <= c_in.done;
      o_row   <= c_in.row;
      o_col   <= c_in.col;
      if (o_valid) osel <= (osel == $bits(osel)'(NLINKS-1)) ? '0 : osel + 1'b1;
      if (o_eoe)   osel <= '0;
    end
  end

  always_comb begin
    for (int l = 0; l < NLINKS; l++) begin
      link_out[l]       = '0;
      link_out[l].eoe   = o_eoe;
      link_out[l].row   = o_row;
      link_out[l].col   = o_col;
      link_out[l].stub  = rd_stub;
      link_out[l].valid = o_valid && (osel == $bits(osel)'(l));
    end
  end

endmodule
