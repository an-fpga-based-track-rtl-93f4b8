// hough_transform: the arithmetic stage of one Bin (one q/pT column).
//
// A stub enters with phi58 at the left edge of this column in its 'phi'
// field and leaves one clock later with phi58 at the right edge of the
// column, computed by a single addition, phi58(n) = phi58(n-1) + r58, as the
// r58 field is already scaled to the width of a q/pT column. The same clock
// compares the stub's precomputed range of compatible columns [qmin, qmax]
// with this Bin's constant column number BIN and flags the stub 'active'
// when the column is inside it. The outgoing word feeds both the next Bin
// and this Bin's phi58 Buffer. The readout request (start) passes through
// unchanged with the same one-clock delay. The addition and the range check
// follow the design description; wrap-around of phi on overflow is not
// guarded, the upstream formatter keeps phi within range. For BIN = 0 (and
// BIN = 31) one of the two range comparisons is constant; lint reports it.
module hough_transform
  import ht_pkg::*;
#(
  parameter int unsigned BIN = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  chain_stub_t s_in,
  output chain_stub_t s_out,
  output logic        active   // s_out is a valid stub compatible with BIN
);

  localparam logic [COL_W-1:0] COL = COL_W'(BIN);

  always_ff @(posedge clk) begin
    if (rst) begin
      s_out  <= '0;
      active <= 1'b0;
    end else begin
      s_out     <= s_in;
      s_out.phi <= s_in.phi + PHI_W'(s_in.r58);
      active    <= s_in.valid && (s_in.qmin <= COL) && (COL <= s_in.qmax);
    end
  end

endmodule
