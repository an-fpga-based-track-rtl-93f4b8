// ht_pkg: types and constants shared by the Hough Segment track finder.
//
// A Hough Segment fills a 32 x 32 track parameter array (32 phi58 rows by
// 32 q/pT columns) with tracker stubs, one stub per clock, and reads out the
// stubs of every array cell that holds stubs from at least five detector
// layers. The array size, the five-layer threshold, the 8-bit layer pattern,
// the 64-bit stub word and the memory sizes (36 Kb stub store, 18 Kb page
// memory of 64 pages x 32 pointers, 18 Kb duplication FIFO) follow the
// design description. The layout of the 64-bit stub word and the fixed-point
// format of phi and r58 are this design's own choice:
//
//   [63:52] r58    signed, phi58 change across one q/pT column, in phi units
//   [51:38] phi    signed, phi58 at the left edge of column 0; the integer
//                  part (phi >>> PHI_FRAC) is the phi58 row number
//   [37:35] layer  detector layer identifier 0..7
//   [34:30] qmax   last q/pT column compatible with the stub bend
//   [29:25] qmin   first q/pT column compatible with the stub bend
//   [24:0]  extra  remaining stub information (e.g. z, bend), carried along
//
// The pointer to a stored stub is 9 bits: the event parity (even/odd event)
// in the MSB and the stub index within the event below it.
package ht_pkg;

  localparam int unsigned NCOLS      = 32;   // q/pT columns (Bins) per segment
  localparam int unsigned NROWS      = 32;   // phi58 rows per segment
  localparam int unsigned ROW_W      = 5;
  localparam int unsigned COL_W      = 5;
  localparam int unsigned NLAYERS    = 8;    // bits in the layer pattern word
  localparam int unsigned LAYER_W    = 3;
  localparam int unsigned MIN_LAYERS = 5;    // layers needed for a candidate
  localparam int unsigned PTR_W      = 9;    // 512 x 64 bit stub store = 36 Kb
  localparam int unsigned IDX_W      = PTR_W - 1;
  localparam int unsigned PAGE_DEPTH = 32;   // stub pointers per page
  localparam int unsigned SLOT_W     = 5;
  localparam int unsigned CNT_W      = 6;    // 0..32 stubs in a page
  localparam int unsigned PHI_W      = 14;
  localparam int unsigned PHI_FRAC   = 6;
  localparam int unsigned R58_W      = 12;
  localparam int unsigned EXTRA_W    = 25;
  localparam int unsigned STUB_W     = 64;

  // Full stub word as delivered by the upstream geometric processor.
  typedef struct packed {
    logic signed [R58_W-1:0] r58;
    logic signed [PHI_W-1:0] phi;
    logic [LAYER_W-1:0]      layer;
    logic [COL_W-1:0]        qmax;
    logic [COL_W-1:0]        qmin;
    logic [EXTRA_W-1:0]      extra;
  } stub_t;

  // One word on an input link: a stub, or an end-of-packet marker.
  typedef struct packed {
    logic  valid;   // stub word
    logic  eop;     // end of the current event's packet on this link
    stub_t stub;
  } link_in_t;

  // Word that travels down the Bin chain on the stub path. 'start' is the
  // readout request for the event of parity 'start_par'; it travels with
  // the stubs, one Bin per clock, independently of 'valid'.
  typedef struct packed {
    logic                    valid;
    logic [PTR_W-1:0]        ptr;
    logic signed [R58_W-1:0] r58;
    logic signed [PHI_W-1:0] phi;
    logic [LAYER_W-1:0]      layer;
    logic [COL_W-1:0]        qmin;
    logic [COL_W-1:0]        qmax;
    logic                    start;
    logic                    start_par;
  } chain_stub_t;

  // Stub pointer sorted into one row of one column (phi58 Buffer output).
  typedef struct packed {
    logic               valid;
    logic [PTR_W-1:0]   ptr;
    logic [LAYER_W-1:0] layer;
    logic [ROW_W-1:0]   row;
  } row_stub_t;

  // Track candidate stub on the readout chain. 'done' marks the end of the
  // readout stream of all Bins up to and including the sender.
  typedef struct packed {
    logic             valid;
    logic             done;
    logic [PTR_W-1:0] ptr;
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
  } cand_t;

  // One word on an output link: a full stub with its track parameters, or
  // an end-of-event marker.
  typedef struct packed {
    logic             valid;
    logic             eoe;
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
    stub_t            stub;
  } link_out_t;

  // phi58 row of a phi value, and whether it lies inside the segment.
  function automatic logic phi_row_ok(input logic signed [PHI_W-1:0] phi);
    logic signed [PHI_W-PHI_FRAC-1:0] i;
    i = phi[PHI_W-1:PHI_FRAC];
    return (i >= 0) && (i < (PHI_W-PHI_FRAC)'(NROWS));
  endfunction

  function automatic logic [ROW_W-1:0] phi_row(input logic signed [PHI_W-1:0] phi);
    return phi[PHI_FRAC +: ROW_W];
  endfunction

endpackage
