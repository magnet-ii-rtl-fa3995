// router: the Router module that joins a station's VMEbus to its T3 Interface.
//
// It holds two packet buffers of 1024-bit packets, each with a THRESHOLD:
// the Input Buffer (T3 link to Bus, B_IN) and the Output Buffer (Bus to T3
// link, B_OUT), served first-in first-out with no scheduling between the
// traffic classes. Packets arriving from the link pass through the
// addr_translator, which rewrites the destination and source fields of the
// header, before they enter the Input Buffer. A packet that arrives while the
// Input Buffer is at its threshold is dropped whole (`rx_lost`), and the
// Input Buffer state is reported to the far end as RNR (active low).
// The buffers, thresholds and translation follow MAGNET II; dropping on a
// full buffer and the use of RNR are this design's choices.
//
// Interfaces: bus side 32 bits (packet_buffer handshake), link side 8 bits
// (bytes from t3_rx, byte reads by t3_tx).
module router
  import magnet_pkg::*;
#(
  parameter int DEPTH    = 16,
  parameter int PKT_BITS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  my_addr,
  input  logic [1:0]  thr_in,
  input  logic [1:0]  thr_out,
  input  logic        tbl_we,
  input  logic [1:0]  tbl_sel,
  input  logic [7:0]  tbl_addr,
  input  logic [7:0]  tbl_wdata,
  // link side: from t3_rx
  input  logic        rx_valid,
  input  logic        rx_sop,
  input  logic        rx_eop,
  input  logic [7:0]  rx_byte,
  // link side: to t3_tx
  output logic        tx_avail,
  output logic [7:0]  tx_data,
  input  logic        tx_rd_en,
  input  logic        tx_rd_done,
  output logic        rnr_n,
  output logic        tnr_n,
  // bus side
  input  logic        ob_wr_en,
  input  logic        ob_wr_last,
  input  logic [31:0] ob_wr_data,
  output logic        ob_full,
  output logic        ib_avail,
  output logic [31:0] ib_rd_data,
  input  logic        ib_rd_en,
  input  logic        ib_rd_done,
  // observation
  output logic [4:0]  ib_count,
  output logic [4:0]  ob_count,
  output logic [1:0]  arrival,    // [0] Input Buffer, [1] Output Buffer
  output logic [1:0]  departure,
  output logic        rx_lost,
  output logic        translated
);
  logic       t_valid, t_sop;
  logic [7:0] t_byte;
  logic       ib_full, accepting;

  addr_translator u_xlat (
    .clk, .rst_n, .my_addr, .tbl_we, .tbl_sel, .tbl_addr, .tbl_wdata,
    .in_valid(rx_valid), .in_sop(rx_sop), .in_byte(rx_byte),
    .out_valid(t_valid), .out_sop(t_sop), .out_byte(t_byte), .translated(translated));

  // whole-packet accept/drop decision at the first byte
  logic accept_now;
  assign accept_now = t_sop ? !ib_full : accepting;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      accepting <= 1'b0;
      rx_lost   <= 1'b0;
    end else begin
      rx_lost <= t_valid && t_sop && ib_full;
      if (t_valid && t_sop) accepting <= !ib_full;
      if (t_valid && rx_eop) accepting <= 1'b0;
    end
  end

  packet_buffer #(.DEPTH(DEPTH), .PKT_BITS(PKT_BITS), .WR_W(8), .RD_W(32)) u_ib (
    .clk, .rst_n, .threshold(thr_in),
    .wr_en(t_valid && accept_now), .wr_last(rx_eop), .wr_data(t_byte), .full(ib_full),
    .pkt_avail(ib_avail), .rd_data(ib_rd_data), .rd_en(ib_rd_en), .rd_done(ib_rd_done),
    .count(ib_count), .arrival(arrival[0]), .departure(departure[0]));

  packet_buffer #(.DEPTH(DEPTH), .PKT_BITS(PKT_BITS), .WR_W(32), .RD_W(8)) u_ob (
    .clk, .rst_n, .threshold(thr_out),
    .wr_en(ob_wr_en), .wr_last(ob_wr_last), .wr_data(ob_wr_data), .full(ob_full),
    .pkt_avail(tx_avail), .rd_data(tx_data), .rd_en(tx_rd_en), .rd_done(tx_rd_done),
    .count(ob_count), .arrival(arrival[1]), .departure(departure[1]));

  assign rnr_n = !ib_full;
  assign tnr_n = tx_avail;

endmodule
