// hand_shake: orders the track candidate readout along the Bin chain.
//
// Candidates flow through the Bins in the same direction as the stubs and
// end at the Book Keeper. When the readout request of an event reaches this
// Bin, the Hand Shake first forwards the candidates of the upstream Bins
// until the upstream stream ends (a 'done' word from the previous Bin) and
// the phi58 Buffer holds no stub of that event any more. Then, if its Track
// Builder has marked rows, it starts the Track Builder readout, forwards
// what it reads out and sends 'done' downstream when it has finished;
// otherwise it sends 'done' at once, so that a Bin without candidates adds
// only one clock to the readout (the Track Builder is started anyway, to
// clear its half of the memory for the event after next). The result is one contiguous
// block of candidates per event, ordered by column. The first Bin of the
// chain (FIRST = 1) has no upstream and skips the first step.
//
// Timing: every word is registered once, one clock per Bin. From the
// request at the Hough Transform output to the first own candidate at
// 'down' takes 6 clocks when nothing is upstream. Only one event
// is read out along the chain at a time (the Book Keeper issues the next
// request only after the last Bin's 'done'). Forwarding then own readout
// follows the design description; the 'done' word and the wait for the
// phi58 Buffer are this design's own means of knowing when each step ends.
module hand_shake
  import ht_pkg::*;
#(
  parameter bit FIRST = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,       // readout request for parity start_par
  input  logic       start_par,
  input  logic [1:0] pend,        // phi58 Buffer still holds stubs of parity
  input  cand_t      up,          // from the previous Bin
  input  cand_t      tb_cand,     // from this Bin's Track Builder
  input  logic       tb_done,
  input  logic [1:0] tb_has,      // Track Builder has marked rows, per parity
  output logic       tb_start,    // enable for the Track Builder readout
  output logic       tb_par,
  output cand_t      down         // to the next Bin / the Book Keeper
);

  typedef enum logic [1:0] {H_IDLE, H_WAIT, H_OWN} hstate_t;
  hstate_t st;
  logic    par;
  logic    up_done;   // upstream 'done' seen since the request
  logic    up_end;

  assign tb_par = par;
  assign up_end = FIRST || up_done || up.done;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= H_IDLE; par <= 1'b0; up_done <= 1'b0;
      down <= '0; tb_start <= 1'b0;
    end else begin
      tb_start <= 1'b0;
      down     <= '0;
      if (up.valid) down <= '{valid: 1'b1, done: 1'b0, ptr: up.ptr, row: up.row, col: up.col};
      if (up.done)  up_done <= 1'b1;
      unique case (st)
        H_IDLE: if (start) begin
          par <= start_par;
          st  <= H_WAIT;
        end
        H_WAIT: if (up_end && !pend[par]) begin
          // the Track Builder is always started, as its readout also
          // clears the event's half of its memory
          tb_start <= 1'b1;
          if (tb_has[par]) begin
            st <= H_OWN;
          end else begin
            // nothing of our own: pass the end of the stream straight on
            down.done <= 1'b1;
            up_done   <= 1'b0;
            st        <= H_IDLE;
          end
        end
        H_OWN: begin
          if (tb_cand.valid) down <= tb_cand;
          if (tb_done) begin
            down.done <= 1'b1;
            up_done   <= 1'b0;
            st        <= H_IDLE;
          end
        end
        default: st <= H_IDLE;
      endcase
    end
  end

  // Upstream candidates must not collide with this Bin's own readout.
  a_no_collision: assert property (@(posedge clk) disable iff (rst)
    !(st == H_OWN && tb_cand.valid && up.valid));

endmodule
