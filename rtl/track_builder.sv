// track_builder: the phi58 rows of one q/pT column, held in memory.
//
// Fill side: every valid stub pointer from the phi58 Buffer is written into
// the page of its row, in the half of the page memory that belongs to its
// event parity (pointer MSB), at the slot given by the page's stub count.
// The page memory has 64 pages (32 rows x even/odd event) of 32 pointers of
// 9 bits: one 18 Kb block memory, written on one port and read on the other.
// Beside it, per page, the stub count and an 8-bit pattern of the detector
// layers seen are kept; a page whose pattern has at least MIN_LAYERS bits set
// is marked as a track candidate. A page that already holds 32 pointers
// drops further stubs and pulses 'page_full'.
//
// Readout side: after a one-clock 'rd_start' the builder walks the marked rows of
// parity 'rd_par' in increasing row order and emits every pointer of each
// marked page, oldest first, tagged with its row and this Bin's column, one
// per clock (the memory read takes one clock). When no marked row is left it
// clears the counts, patterns and marks of that parity and pulses 'rd_done'.
// With N pointers in M marked rows, rd_done rises N + M + 3 clocks after
// rd_start, the first candidate 3 clocks after it. The page organisation, counts, layer
// patterns and five-layer rule follow the design description; the row order
// of the readout and the clearing of a half after its readout are this
// design's own choices. Counts and patterns are register arrays here. The
// 'done' bit and the column of 'cand' are constant; the Hand Shake sets
// 'done' further on.
module track_builder
  import ht_pkg::*;
#(
  parameter int unsigned BIN        = 0,
  parameter int unsigned MIN_LAYERS_P = MIN_LAYERS
) (
  input  logic      clk,
  input  logic      rst,
  input  row_stub_t wr,
  input  logic      rd_start,   // one-clock request to read out parity rd_par
  input  logic      rd_par,
  output cand_t     cand,       // candidate pointer (done unused, 0)
  output logic      rd_done,
  output logic [1:0] has,       // marked rows exist, per parity
  output logic      page_full
);

  localparam logic [COL_W-1:0] COL = COL_W'(BIN);

  logic [PTR_W-1:0]   pages [2*NROWS*PAGE_DEPTH];
  logic [CNT_W-1:0]   cnt   [2][NROWS];
  logic [NLAYERS-1:0] pat   [2][NROWS];
  logic [NROWS-1:0]   marked [2];

  // ---------------- fill ----------------
  logic               wpar;
  logic [CNT_W-1:0]   wcnt;
  logic [NLAYERS-1:0] wpat;
  logic               wok;

  always_comb begin
    wpar = wr.ptr[PTR_W-1];
    wcnt = cnt[wpar][wr.row];
    wpat = pat[wpar][wr.row] | (NLAYERS'(1) << wr.layer);
    wok  = wr.valid && (wcnt < CNT_W'(PAGE_DEPTH));
  end

  always_ff @(posedge clk) begin
    if (wok) pages[{wpar, wr.row, wcnt[SLOT_W-1:0]}] <= wr.ptr;
  end

  // ---------------- readout ----------------
  typedef enum logic [1:0] {R_IDLE, R_FIND, R_READ, R_CLEAR} rstate_t;
  rstate_t          rs;
  logic [NROWS-1:0] todo;
  logic [ROW_W-1:0] rrow;
  logic [SLOT_W-1:0] rslot;
  logic             rvalid_q;
  logic             par;
  logic [ROW_W-1:0] rrow_q;
  logic [PTR_W-1:0] rdata;
  logic [ROW_W-1:0] first_row;

  always_comb begin
    first_row = '0;
    for (int i = NROWS-1; i >= 0; i--)
      if (todo[i]) first_row = ROW_W'(i);
  end

  always_ff @(posedge clk) rdata <= pages[{par, rrow, rslot}];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < 2; p++) begin
        marked[p] <= '0;
        for (int r = 0; r < NROWS; r++) begin
          cnt[p][r] <= '0;
          pat[p][r] <= '0;
        end
      end
      rs <= R_IDLE; todo <= '0; par <= 1'b0; rrow <= '0; rslot <= '0;
      rvalid_q <= 1'b0; rrow_q <= '0; rd_done <= 1'b0; page_full <= 1'b0;
    end else begin
      rd_done   <= 1'b0;
      page_full <= wr.valid && !wok;
      rvalid_q  <= 1'b0;
      rrow_q    <= rrow;
      // fill bookkeeping
      if (wok) begin
        cnt[wpar][wr.row] <= wcnt + 1'b1;
        pat[wpar][wr.row] <= wpat;
        if ($countones(wpat) >= MIN_LAYERS_P) marked[wpar][wr.row] <= 1'b1;
      end
      // readout walk
      unique case (rs)
        R_IDLE: if (rd_start) begin
          todo <= marked[rd_par];
          par  <= rd_par;
          rs   <= R_FIND;
        end
        R_FIND: begin
          if (todo == '0) rs <= R_CLEAR;
          else begin
            rrow  <= first_row;
            rslot <= '0;
            rs    <= R_READ;
          end
        end
        R_READ: begin
          rvalid_q <= 1'b1;
          if (CNT_W'(rslot) + 1'b1 == cnt[par][rrow]) begin
            todo[rrow] <= 1'b0;
            rs <= R_FIND;
          end else begin
            rslot <= rslot + 1'b1;
          end
        end
        R_CLEAR: begin
          marked[par] <= '0;
          for (int r = 0; r < NROWS; r++) begin
            cnt[par][r] <= '0;
            pat[par][r] <= '0;
          end
          rd_done <= 1'b1;
          rs <= R_IDLE;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  assign has  = {|marked[1], |marked[0]};
  assign cand = '{valid: rvalid_q, done: 1'b0, ptr: rdata, row: rrow_q, col: COL};

endmodule
