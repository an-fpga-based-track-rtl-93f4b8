// hough_segment: one Hough Segment of the track finder.
//
// The tracker is divided into regions (32 in phi by 9 in eta); each is
// handled by one Hough Segment, which finds track candidates in a 32 x 32
// array of phi58 rows by q/pT columns. A Book Keeper takes stubs from two
// input links at one stub per clock, stores them and sends them down a
// daisy chain of NCOLS Bins, one Bin per q/pT column. Each Bin computes the
// stub's line in its column by one addition, sorts the stub into the one or
// two rows the line crosses and marks rows that collect stubs from at least
// five detector layers. At the end of an event the Book Keeper sends a
// readout request down the chain; the Bins, in column order, read out the
// stub pointers of their marked rows, and the candidate stream comes back
// to the Book Keeper, which adds the full stub to each pointer and sends
// the result out on two output links.
//
// Timing: one stub per clock in, one clock per Bin on both chains; the
// first candidate of an event leaves about NCOLS clocks after its readout
// request. Even and odd events use separate halves of every memory so an
// event can be filled while the previous one is read out.
//
// The structure (Book Keeper plus 32 daisy-chained Bins, two links each way)
// follows the block diagram of the Hough Segment in the design description.
module hough_segment
  import ht_pkg::*;
#(
  parameter int unsigned NBINS      = NCOLS,
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned LINK_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  link_in_t    link_in  [2],
  output link_out_t   link_out [2],
  // monitoring pulses
  output logic        ev_closed,
  output logic        ro_start,
  output logic        ro_queued,
  output logic        drop,
  output logic        overrun,
  output logic [NBINS-1:0] dup,
  output logic [NBINS-1:0] fifo_ovf,
  output logic [NBINS-1:0] page_full
);

  chain_stub_t s_chain [NBINS+1];
  cand_t       c_chain [NBINS+1];

  assign c_chain[0] = '0;

  book_keeper #(.NLINKS(2), .LINK_DEPTH(LINK_DEPTH)) u_bk (
    .clk, .rst, .link_in, .link_out,
    .s_out(s_chain[0]), .c_in(c_chain[NBINS]),
    .ev_closed, .ro_start, .ro_queued, .drop, .overrun
  );

  for (genvar b = 0; b < NBINS; b++) begin : g_bin
    ht_bin #(.BIN(b), .FIFO_DEPTH(FIFO_DEPTH)) u_bin (
      .clk, .rst,
      .s_in(s_chain[b]), .s_out(s_chain[b+1]),
      .c_in(c_chain[b]), .c_out(c_chain[b+1]),
      .dup(dup[b]), .fifo_ovf(fifo_ovf[b]), .page_full(page_full[b])
    );
  end

endmodule
