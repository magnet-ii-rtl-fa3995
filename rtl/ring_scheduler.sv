// ring_scheduler: maximum-length moveable-boundary subcycle scheduler.
//
// The stream of cells is divided into cycles, each split into subcycles I,
// II and III. MAX_I is the maximum length of subcycle I, MAX_II that of
// subcycles I and II together and MAX_III that of the whole cycle, all in
// cells (MAX_I <= MAX_II <= MAX_III is expected). With MAX_I=5, MAX_II=9,
// MAX_III=15 a cycle is 5 class-I cells, 4 class-II cells and 6 class-III
// cells. These rules are the MAGNET II Ring scheduling policy.
//
// Moveable boundary: when `skip` is pulsed (a returning cell of the current
// subcycle came back unused, BR=0) and `moveable_en` is set, the scheduler
// jumps to the start of the next subcycle; from subcycle III that is the start
// of the next cycle. Empty subcycles (equal MAX values) are passed over.
//
// Timing: on each `next` pulse the scheduler assigns the cell being generated
// and presents its subcycle (`subcycle`, 0..2) and `cs` (first cell of a
// subcycle) in the same cycle, combinationally; the position advances on the
// clock edge. `skip` takes effect for the next assigned cell (a skip that
// coincides with `next` is held for one clock). Register widths
// (8 bits) are this design's choice.
module ring_scheduler #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] max_i,
  input  logic [W-1:0] max_ii,
  input  logic [W-1:0] max_iii,
  input  logic         moveable_en,
  input  logic         next,        // a new cell is generated now
  input  logic         skip,        // unused cell of the current subcycle returned
  input  logic [1:0]   skip_subcycle,
  output logic [1:0]   subcycle,    // subcycle of the cell generated now
  output logic         cs,          // first cell of a subcycle
  output logic         cycle_start, // first cell of a cycle
  output logic [1:0]   cur_subcycle // subcycle the scheduler is in
);
  logic [W-1:0] pos;          // position of the next cell in the cycle
  logic [1:0]   last_sub;     // subcycle of the previously generated cell
  logic         first;        // no cell generated since reset
  logic         skip_pend;    // skip request waiting for a cycle without `next`
  logic [1:0]   skip_sub_q;

  function automatic logic [1:0] sub_of(input logic [W-1:0] p, input logic [W-1:0] m1,
                                        input logic [W-1:0] m2);
    if (p < m1)      return 2'd0;
    else if (p < m2) return 2'd1;
    else             return 2'd2;
  endfunction

  // Position at which the next cell will actually be generated (wrap at MAX_III)
  logic [W-1:0] pos_eff;
  assign pos_eff = (pos >= max_iii) ? '0 : pos;

  assign subcycle     = sub_of(pos_eff, max_i, max_ii);
  assign cur_subcycle = first ? 2'd0 : last_sub;
  assign cycle_start  = (pos_eff == '0);
  assign cs           = first || cycle_start || (subcycle != last_sub);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos      <= '0;
      last_sub <= 2'd0;
      first    <= 1'b1;
      skip_pend <= 1'b0;
      skip_sub_q <= 2'd0;
    end else begin
      if (skip && next) begin
        skip_pend  <= 1'b1;
        skip_sub_q <= skip_subcycle;
      end else if (!next) begin
        skip_pend  <= 1'b0;
      end
      if (next) begin
        pos      <= pos_eff + 1'b1;
        last_sub <= subcycle;
        first    <= 1'b0;
      end
      if (!next && moveable_en && !first &&
          ((skip && skip_subcycle == last_sub) || (skip_pend && skip_sub_q == last_sub))) begin
        case (last_sub)
          2'd0:    pos <= max_i;
          2'd1:    pos <= max_ii;
          default: pos <= max_iii;
        endcase
      end
    end
  end
endmodule
