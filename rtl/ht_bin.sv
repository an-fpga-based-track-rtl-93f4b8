// ht_bin: one q/pT column of the Hough Transform array.
//
// A Bin is a link in a daisy chain. On the stub path a word enters from the
// previous Bin (or the Book Keeper), passes the Hough Transform register and
// leaves for the next Bin one clock later with phi58 moved to the right edge
// of this column. The phi58 Buffer taps the word before and after the Hough
// Transform, turns each compatible stub into one or two row entries and
// hands them to the Track Builder, which stores them in pages and marks
// rows with stubs in at least five layers. On the candidate path the Hand
// Shake forwards the upstream Bins' candidates, then this Bin's own, when a
// readout request arrives along the stub path.
//
// Latency: one clock per Bin on both paths. Structure and connections follow
// the block diagram of a Bin in the design description.
module ht_bin
  import ht_pkg::*;
#(
  parameter int unsigned BIN        = 0,
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  chain_stub_t s_in,
  output chain_stub_t s_out,
  input  cand_t       c_in,
  output cand_t       c_out,
  // event flags, one-clock pulses, for monitoring
  output logic        dup,        // stub written to two rows
  output logic        fifo_ovf,   // duplicate lost
  output logic        page_full   // stub lost, page already full
);

  logic      active;
  row_stub_t rs;
  logic [1:0] pend;
  cand_t     tb_cand;
  logic      tb_done, tb_start, tb_par;
  logic [1:0] tb_has;

  hough_transform #(.BIN(BIN)) u_ht (
    .clk, .rst, .s_in, .s_out, .active
  );

  phi58_buffer #(.DEPTH(FIFO_DEPTH)) u_buf (
    .clk, .rst, .left(s_in), .right(s_out), .active,
    .out(rs), .pend, .dup, .ovf(fifo_ovf)
  );

  track_builder #(.BIN(BIN)) u_tb (
    .clk, .rst, .wr(rs), .rd_start(tb_start), .rd_par(tb_par),
    .cand(tb_cand), .rd_done(tb_done), .has(tb_has), .page_full
  );

  hand_shake #(.FIRST(BIN == 0)) u_hs (
    .clk, .rst, .start(s_out.start), .start_par(s_out.start_par), .pend,
    .up(c_in), .tb_cand, .tb_done, .tb_has, .tb_start, .tb_par, .down(c_out)
  );

endmodule
