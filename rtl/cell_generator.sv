// cell_generator: the Headend Station's Cell Generator (CG).
//
// The CG owns the Ring's cell timing. Every 16 clocks it emits one 16-bit word
// of a continuous stream of 64-word (1024-bit) cells. At the first word of
// each new cell it asks the ring_scheduler for the cell's subcycle and writes
// the 12-bit cell header: the SYNC pattern, an access code naming the single
// class allowed to use the cell, and CS on the first cell of a subcycle.
//
// Cells that have travelled round the Ring come back through the Headend's
// own IOB to `in_*`. For each returning cell:
//   * BC=1, T=0: the packet is copied into the Transfer Buffer (a three-packet
//     packet_buffer) and put into the next new cell with BC=BR=T=1,
//     whatever that cell's subcycle;
//   * BC=1, T=1: the packet has already passed the Headend once and is
//     discarded (`discard` pulses);
//   * BR=0: the cell went round unused; if the scheduler is still in that
//     cell's subcycle, the moveable-boundary procedure ends the subcycle
//     early (when `moveable_en`).
// New empty cells carry BC=BR=T=0 and zero data. These rules are those of
// MAGNET II; the three-packet Transfer Buffer depth and the AC encoding are
// this design's own. Returning cells are not aligned with new cells, so with
// back-to-back full-size packets one packet is still being read into a new
// cell, one waits, and the next is arriving.
//
// Timing: `out_word_en` pulses every 16 clocks; `out_idx` is the word index.
// Input words may arrive with any phase relative to the output cells.
module cell_generator
  import magnet_pkg::*;
#(
  parameter int PKT_BITS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  max_i,
  input  logic [7:0]  max_ii,
  input  logic [7:0]  max_iii,
  input  logic        moveable_en,
  // returning cells (from the Headend's IOB)
  input  logic        in_word_en,
  input  logic [15:0] in_word,
  input  logic [5:0]  in_idx,
  // new cells (to the MIU transmitter)
  output logic        out_word_en,
  output logic [15:0] out_word,
  output logic [5:0]  out_idx,
  // status
  output logic        transfer,    // a packet was put into a new cell
  output logic        discard,     // a packet with T=1 was discarded
  output logic        boundary_moved,
  output logic [1:0]  subcycle_now
);
  // ---------------- scheduler ----------------
  logic       sch_next, sch_cs, sch_cycle_start, skip;
  logic [1:0] sch_sub, skip_sub;

  ring_scheduler #(.W(8)) u_sched (
    .clk, .rst_n, .max_i, .max_ii, .max_iii, .moveable_en,
    .next(sch_next), .skip(skip), .skip_subcycle(skip_sub),
    .subcycle(sch_sub), .cs(sch_cs), .cycle_start(sch_cycle_start),
    .cur_subcycle(subcycle_now));

  // ---------------- transfer buffer ----------------
  logic        tb_wr_en, tb_wr_last, tb_full, tb_avail, tb_rd_en, tb_rd_done;
  logic [15:0] tb_rd_data;
  logic [1:0]  tb_count;  // up to 3
  logic        tb_arr, tb_dep;

  packet_buffer #(.DEPTH(3), .PKT_BITS(PKT_BITS), .WR_W(16), .RD_W(16)) u_tb (
    .clk, .rst_n, .threshold(2'd1),
    .wr_en(tb_wr_en), .wr_last(tb_wr_last), .wr_data(in_word), .full(tb_full),
    .pkt_avail(tb_avail), .rd_data(tb_rd_data), .rd_en(tb_rd_en), .rd_done(tb_rd_done),
    .count(tb_count), .arrival(tb_arr), .departure(tb_dep));

  // ---------------- input side ----------------
  word0_t     iw0;
  logic       in_head;
  logic       cap_act;
  logic [6:0] cap_words;
  assign iw0     = word0_t'(in_word);
  assign in_head = in_word_en && (in_idx == 6'd0);

  always_comb begin
    tb_wr_en   = 1'b0;
    tb_wr_last = 1'b0;
    if (in_head) begin
      tb_wr_en   = iw0.mac.bc && !iw0.mac.t && !tb_full;
      tb_wr_last = (size_words(iw0.size) == 7'd1);
    end else if (in_word_en && cap_act && {1'b0, in_idx} < cap_words) begin
      tb_wr_en   = 1'b1;
      tb_wr_last = ({1'b0, in_idx} == cap_words - 1'b1);
    end
    skip     = in_head && !iw0.mac.br;
    skip_sub = iw0.mac.ac[0] ? 2'd0 : (iw0.mac.ac[1] ? 2'd1 : 2'd2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cap_act <= 1'b0; cap_words <= '0; discard <= 1'b0; boundary_moved <= 1'b0;
    end else begin
      discard        <= in_head && iw0.mac.bc && iw0.mac.t;
      boundary_moved <= skip && moveable_en && (skip_sub == subcycle_now);
      if (in_head) begin
        cap_act   <= iw0.mac.bc && !iw0.mac.t && !tb_full;
        cap_words <= size_words(iw0.size);
      end
    end
  end

  // ---------------- output side ----------------
  logic [3:0] phase;
  logic [5:0] widx;
  logic       word_tick, out_head;
  logic       fill_act;
  logic [6:0] fill_words;

  assign word_tick = (phase == 4'd15);
  assign out_head  = word_tick && (widx == 6'd0);
  assign sch_next  = out_head;

  always_comb begin
    tb_rd_en   = 1'b0;
    tb_rd_done = 1'b0;
    if (out_head && tb_avail) begin
      tb_rd_done = (size_words(tb_rd_data[1:0]) == 7'd1);
      tb_rd_en   = !tb_rd_done;
    end else if (word_tick && fill_act && {1'b0, widx} < fill_words) begin
      tb_rd_done = ({1'b0, widx} == fill_words - 1'b1);
      tb_rd_en   = !tb_rd_done;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0; widx <= '0; fill_act <= 1'b0; fill_words <= '0;
      out_word_en <= 1'b0; out_word <= '0; out_idx <= '0; transfer <= 1'b0;
    end else begin
      phase       <= phase + 1'b1;
      out_word_en <= word_tick;
      transfer    <= 1'b0;
      if (word_tick) begin
        widx    <= widx + 1'b1;
        out_idx <= widx;
        if (out_head) begin
          fill_act   <= tb_avail;
          fill_words <= size_words(tb_rd_data[1:0]);
          transfer   <= tb_avail;
          if (tb_avail)
            out_word <= {SYNC_PATTERN, 1'b0, 3'b001 << sch_sub, sch_cs, 1'b1, 1'b1, 1'b1,
                         tb_rd_data[3:0]};
          else
            out_word <= {SYNC_PATTERN, 1'b0, 3'b001 << sch_sub, sch_cs, 3'b000, 4'b0000};
        end else if (fill_act && {1'b0, widx} < fill_words) begin
          out_word <= tb_rd_data;
        end else begin
          out_word <= 16'h0000;
        end
      end
    end
  end

  logic unused;
  assign unused = ^{sch_cycle_start, tb_count, tb_arr, tb_dep, iw0.sync, iw0.mode};

endmodule
