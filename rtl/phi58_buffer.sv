// phi58_buffer: sorts the stubs of one q/pT column into phi58 rows.
//
// Each clock it sees a stub twice: at the Bin input, with phi58 at the left
// edge of the column, and one clock later at the Hough Transform output,
// with phi58 at the right edge and the column compatibility flag. A stub
// whose line stays in one row (or has only one edge inside the segment) is
// sent straight to the Track Builder with that row. A stub that crosses
// from one row into another is sent with its left-edge row, and a copy with
// the right-edge row is written into a FIFO. Whenever no new stub is sent
// in a clock (a gap in the data stream), the oldest FIFO entry is sent
// instead. The FIFO counts its entries per event parity so that the readout
// of an event can wait until none of its stubs is still queued.
//
// Interface: 'left' is the Bin input word, 'right'/'active' the Hough
// Transform output of the same stub one clock later; 'out' is registered
// (one clock after 'right'). Default FIFO depth 1024 x 17 bits matches one
// 18 Kb block memory. The routing rule follows the design description; the
// FIFO overflow behaviour (the copy is dropped and 'ovf' pulses) is this
// design's own choice.
module phi58_buffer
  import ht_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  chain_stub_t left,
  input  chain_stub_t right,
  input  logic        active,
  output row_stub_t   out,
  output logic [1:0]  pend,     // stubs of parity 0 / 1 still on their way
  output logic        dup,      // a stub was duplicated this clock
  output logic        ovf       // a duplicate was lost, FIFO full
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    logic [PTR_W-1:0]   ptr;
    logic [LAYER_W-1:0] layer;
    logic [ROW_W-1:0]   row;
  } entry_t;

  entry_t          mem [DEPTH];
  logic [AW-1:0]   wp, rp;
  logic [AW:0]     count;
  logic [AW:0]     pcnt [2];

  logic signed [PHI_W-1:0] phi_l_q;   // left-edge phi of the stub now at 'right'
  logic vl, vr, two, send_new, push, pop, full, empty;
  logic [ROW_W-1:0] rl, rr;
  entry_t head;

  always_ff @(posedge clk) phi_l_q <= left.phi;

  always_comb begin
    vl    = phi_row_ok(phi_l_q);
    vr    = phi_row_ok(right.phi);
    rl    = phi_row(phi_l_q);
    rr    = phi_row(right.phi);
    two   = active && vl && vr && (rl != rr);
    send_new = active && (vl || vr);
    full  = (count == (AW+1)'(DEPTH));
    empty = (count == '0);
    push  = two && !full;
    pop   = !send_new && !empty;
    head  = mem[rp];
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= '{ptr: right.ptr, layer: right.layer, row: rr};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
      pcnt[0] <= '0; pcnt[1] <= '0;
      out <= '0; dup <= 1'b0; ovf <= 1'b0;
    end else begin
      dup <= push;
      ovf <= two && full;
      if (push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      for (int p = 0; p < 2; p++)
        pcnt[p] <= pcnt[p]
                 + (AW+1)'(push && (right.ptr[PTR_W-1] == 1'(p)))
                 - (AW+1)'(pop  && (head.ptr[PTR_W-1]  == 1'(p)));
      if (send_new)
        out <= '{valid: 1'b1, ptr: right.ptr, layer: right.layer,
                 row: vl ? rl : rr};
      else if (pop)
        out <= '{valid: 1'b1, ptr: head.ptr, layer: head.layer, row: head.row};
      else
        out <= '0;
    end
  end

  // An entry counts as pending until it has left the output register.
  assign pend = {(pcnt[1] != '0) || (out.valid &&  out.ptr[PTR_W-1]),
                 (pcnt[0] != '0) || (out.valid && !out.ptr[PTR_W-1])};

endmodule
