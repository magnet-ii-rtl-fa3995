// iob: Input/Output Buffer, a station's access point to the Ring.
//
// The IOB sits in the ring data path between the receiving and transmitting
// halves of the MIU and holds four packet buffers: the Input Buffer (Ring to
// Bus) and one Output Buffer per traffic class (Bus to Ring). Cells pass
// through a three-word delay line; when word 0 of a cell leaves the delay
// line, words 1 and 2 (destination, source, class) are already known and the
// IOB decides, for the whole cell:
//   * receive: a busy normal packet addressed to this station, or a busy
//     multicast packet whose multicast number is enabled in the 256-entry
//     multicast table, is copied into the Input Buffer (if the Input Buffer
//     is at its THRESHOLD the packet is lost and `rx_lost` pulses);
//   * remove: a normal packet for this station, and a multicast packet that
//     this station sent, is taken off the Ring by clearing BC;
//   * transmit: if the cell is now empty, the lowest class enabled by the
//     cell's access code whose Output Buffer holds a packet and whose LIMIT
//     is not used up in this cycle places its packet in the cell and sets
//     BC=1, BR=1, T=0. Only as many words as the packet's size field gives are
//     read; the rest of the cell is sent as zeros.
// LIMIT (0..255, or NOLIMIT when bit 8 is set) caps the packets of one class
// the station sends per cycle; the counters restart at a cell with CS=1 whose
// subcycle is not later than the previous subcycle start seen, i.e. at the
// first subcycle of a new cycle.
// The buffers, MAC rules, LIMITs and multicast table follow MAGNET II; the
// delay-line structure, the choice of lowest class first, dropping a packet
// when the Input Buffer is full and the counter restart rule are this
// design's own.
//
// Ring side: one word per `in_word_en` (every 16 clocks from the MIU); the
// output word for the word received three words earlier is presented on
// `out_word` with `out_word_en` one clock after the input strobe.
// Bus side: 32-bit Output Buffer writes and Input Buffer reads
// (see packet_buffer for the handshake). Buffer index 0 is the Input Buffer,
// 1..3 the class I..III Output Buffers, in `buf_count`, `arrival` and
// `departure`.
module iob
  import magnet_pkg::*;
#(
  parameter int DEPTH    = 16,
  parameter int PKT_BITS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // control variables
  input  logic [7:0]  my_addr,
  input  logic [LIMIT_BITS-1:0] limit [3],
  input  logic [1:0]  thr_out [3],
  input  logic [1:0]  thr_in,
  input  logic        mc_we,
  input  logic [7:0]  mc_addr,
  input  logic        mc_wdata,
  // ring side
  input  logic        in_word_en,
  input  logic [15:0] in_word,
  input  logic [5:0]  in_idx,
  output logic        out_word_en,
  output logic [15:0] out_word,
  output logic [5:0]  out_idx,
  // bus side
  input  logic [2:0]  ob_wr_en,
  input  logic        ob_wr_last,
  input  logic [31:0] ob_wr_data,
  output logic [2:0]  ob_full,
  output logic        ib_avail,
  output logic [31:0] ib_rd_data,
  input  logic        ib_rd_en,
  input  logic        ib_rd_done,
  // observation
  output logic [4:0]  buf_count [4],
  output logic [3:0]  arrival,
  output logic [3:0]  departure,
  output logic        rx_lost,
  output logic        tx_pkt,
  output logic        rx_pkt
);
  // ---------------- buffers ----------------
  logic        ib_wr_en, ib_wr_last, ib_full;
  logic [15:0] ib_wr_data;
  logic [2:0]  ob_avail, ob_rd_en, ob_rd_done;
  logic [15:0] ob_rd_data [3];

  packet_buffer #(.DEPTH(DEPTH), .PKT_BITS(PKT_BITS), .WR_W(16), .RD_W(32)) u_ib (
    .clk, .rst_n, .threshold(thr_in),
    .wr_en(ib_wr_en), .wr_last(ib_wr_last), .wr_data(ib_wr_data), .full(ib_full),
    .pkt_avail(ib_avail), .rd_data(ib_rd_data), .rd_en(ib_rd_en), .rd_done(ib_rd_done),
    .count(buf_count[0]), .arrival(arrival[0]), .departure(departure[0]));

  for (genvar c = 0; c < 3; c++) begin : g_ob
    packet_buffer #(.DEPTH(DEPTH), .PKT_BITS(PKT_BITS), .WR_W(32), .RD_W(16)) u_ob (
      .clk, .rst_n, .threshold(thr_out[c]),
      .wr_en(ob_wr_en[c]), .wr_last(ob_wr_last), .wr_data(ob_wr_data), .full(ob_full[c]),
      .pkt_avail(ob_avail[c]), .rd_data(ob_rd_data[c]), .rd_en(ob_rd_en[c]),
      .rd_done(ob_rd_done[c]),
      .count(buf_count[c+1]), .arrival(arrival[c+1]), .departure(departure[c+1]));
  end

  // ---------------- multicast address table ----------------
  logic [255:0] mc_table;
  always_ff @(posedge clk) begin
    if (!rst_n)     mc_table <= '0;
    else if (mc_we) mc_table[mc_addr] <= mc_wdata;
  end

  // ---------------- three-word delay line ----------------
  logic [15:0] d0, d1, d2;
  logic [5:0]  i0, i1, i2;
  logic        v0, v1, v2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {d0, d1, d2} <= '0; {i0, i1, i2} <= '0; {v0, v1, v2} <= '0;
    end else if (in_word_en) begin
      d0 <= in_word; i0 <= in_idx; v0 <= 1'b1;
      d1 <= d0;      i1 <= i0;     v1 <= v0;
      d2 <= d1;      i2 <= i1;     v2 <= v1;
    end
  end

  // ---------------- per-cell decision ----------------
  word0_t     w0;
  logic [7:0] dest, src;
  assign w0     = word0_t'(d2);
  assign dest   = d1[7:0];
  assign src    = d0[15:8];

  logic       head;                // word 0 of a cell is leaving the delay line
  assign head = in_word_en && v2 && (i2 == 6'd0);

  logic       is_mc, want_rx, do_rx, do_remove, empty_now, do_tx, lost;
  logic [1:0] tx_class, subc;
  logic       new_cycle;
  logic [7:0] sent [3];
  logic [1:0] last_cs_sub;
  logic       seen_cs;
  logic [2:0] can_send;

  always_comb begin
    is_mc     = (w0.mode == MODE_MC);
    want_rx   = 1'b0;
    do_remove = 1'b0;
    if (w0.mac.bc) begin
      if (!is_mc && dest == my_addr) begin
        want_rx   = 1'b1;
        do_remove = 1'b1;
      end else if (is_mc && src == my_addr) begin
        do_remove = 1'b1;
      end else if (is_mc && mc_table[dest]) begin
        want_rx   = 1'b1;
      end
    end
    do_rx     = want_rx && !ib_full;
    lost      = want_rx && ib_full;
    empty_now = !w0.mac.bc || do_remove;

    subc = w0.mac.ac[0] ? 2'd0 : (w0.mac.ac[1] ? 2'd1 : 2'd2);
    new_cycle = w0.mac.cs && (!seen_cs || subc <= last_cs_sub);

    for (int c = 0; c < 3; c++) begin
      can_send[c] = w0.mac.ac[c] && ob_avail[c] &&
                    (limit[c][8] || (new_cycle ? (limit[c][7:0] != 8'd0)
                                                : (sent[c] < limit[c][7:0])));
    end
    do_tx    = empty_now && (can_send != 3'b000);
    tx_class = can_send[0] ? 2'd0 : (can_send[1] ? 2'd1 : 2'd2);
  end

  // ---------------- cell state ----------------
  logic       rx_act, tx_act;
  logic [6:0] rx_words, tx_words;
  logic [1:0] tx_c;
  logic       ob_rd_fin;
  logic [15:0] ob_word;
  logic [6:0] k;
  assign k = {1'b0, i2};

  always_comb begin
    ob_rd_en   = '0;
    ob_rd_done = '0;
    ib_wr_en   = 1'b0;
    ib_wr_last = 1'b0;
    ib_wr_data = d2;
    ob_word    = ob_rd_data[head ? tx_class : tx_c];
    ob_rd_fin  = 1'b0;
    if (head) begin
      if (do_rx) begin
        ib_wr_en   = 1'b1;
        ib_wr_last = (size_words(w0.size) == 7'd1);
      end
      if (do_tx) begin
        ob_rd_fin = (size_words(ob_rd_data[tx_class][1:0]) == 7'd1);
        ob_rd_en[tx_class]   = !ob_rd_fin;
        ob_rd_done[tx_class] = ob_rd_fin;
      end
    end else if (in_word_en && v2) begin
      if (rx_act && k < rx_words) begin
        ib_wr_en   = 1'b1;
        ib_wr_last = (k == rx_words - 1'b1);
      end
      if (tx_act && k < tx_words) begin
        ob_rd_fin = (k == tx_words - 1'b1);
        ob_rd_en[tx_c]   = !ob_rd_fin;
        ob_rd_done[tx_c] = ob_rd_fin;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_act <= 1'b0; tx_act <= 1'b0; rx_words <= '0; tx_words <= '0; tx_c <= '0;
      sent <= '{default: '0}; last_cs_sub <= '0; seen_cs <= 1'b0;
      out_word_en <= 1'b0; out_word <= '0; out_idx <= '0;
      rx_lost <= 1'b0; tx_pkt <= 1'b0; rx_pkt <= 1'b0;
    end else begin
      out_word_en <= in_word_en && v2;
      rx_lost <= 1'b0; tx_pkt <= 1'b0; rx_pkt <= 1'b0;
      if (head) begin
        rx_act   <= do_rx;
        rx_words <= size_words(w0.size);
        tx_act   <= do_tx;
        tx_c     <= tx_class;
        tx_words <= size_words(ob_rd_data[tx_class][1:0]);
        rx_lost  <= lost;
        rx_pkt   <= do_rx;
        tx_pkt   <= do_tx;
        if (w0.mac.cs) begin
          last_cs_sub <= subc;
          seen_cs     <= 1'b1;
        end
        for (int c = 0; c < 3; c++) begin
          if (new_cycle) sent[c] <= (do_tx && tx_class == 2'(c)) ? 8'd1 : 8'd0;
          else if (do_tx && tx_class == 2'(c) && sent[c] != 8'hFF) sent[c] <= sent[c] + 1'b1;
        end
      end
      if (in_word_en && v2) begin
        out_idx <= i2;
        if (head) begin
          if (do_tx)
            out_word <= {w0.sync, w0.mac.ac, w0.mac.cs, 1'b1, 1'b1, 1'b0, ob_word[3:0]};
          else if (do_remove)
            out_word <= {w0.sync, w0.mac.ac, w0.mac.cs, 1'b0, w0.mac.br, w0.mac.t,
                         w0.mode, w0.size};
          else
            out_word <= d2;
        end else if (tx_act) begin
          out_word <= (k < tx_words) ? ob_word : 16'h0000;
        end else begin
          out_word <= d2;
        end
      end
    end
  end

endmodule
