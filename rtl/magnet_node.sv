// magnet_node: one MAGNET II switching node, a Headend Station and
// N_STATIONS-1 Network Stations joined by the unidirectional Ring Switch
// Fabric.
//
// Station 0 is the Headend Station: its Cell Generator creates the Ring's
// cells and runs the subcycle scheduling, and every cell that returns to it is
// terminated there. Stations 1..N-1 are Network Stations. The ring output of
// station i feeds the ring input of station i+1, and the last station feeds
// the Headend, so cells travel HS -> NS1 -> ... -> NS(N-1) -> HS. The optical
// transmitter/receiver pairs (and their line coding) between stations are
// not part of the RTL: the 100 Mb/s serial bit streams are wired directly.
//
// Every station exposes its VMEbus user side, its resource-manager control
// port, its HOU read port and its T3 line (bit stream plus Short Frame marker),
// so several nodes can be joined through their T3 lines into a mesh. Station
// addresses after reset are 0 (Headend) to N_STATIONS-1. The control port is
// shared: `cfg_station` selects the station that takes a cfg_we write.
// The number of stations is this design's choice; MAGNET II allows up to 256
// stations on one Ring.
//
// Timing: one clock is one ring bit (100 MHz); t3_bit_en marks the T3 line
// bit times (44.736 Mb/s) in the same clock domain.
module magnet_node
  import magnet_pkg::*;
#(
  parameter int N_STATIONS = 4,
  parameter int N_USERS    = 4,
  parameter int DEPTH      = 16,
  parameter int PKT_BITS   = 1024,
  parameter int REC_DEPTH  = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        t3_bit_en,
  // control variables
  input  logic        cfg_we,
  input  logic [7:0]  cfg_station,
  input  logic [11:0] cfg_addr,
  input  logic [15:0] cfg_wdata,
  // per-station bus user side
  input  logic [N_USERS-1:0] usr_bus_req [N_STATIONS],
  output logic [N_USERS-1:0] usr_bus_gnt [N_STATIONS],
  input  logic [N_USERS-1:0] usr_dst_req [N_STATIONS][4],
  output logic [N_USERS-1:0] usr_dst_gnt [N_STATIONS][4],
  output logic [N_USERS-1:0] usr_dst_irq [N_STATIONS][4],
  input  logic        bus_valid  [N_STATIONS],
  input  logic [2:0]  bus_target [N_STATIONS],
  input  logic        bus_last   [N_STATIONS],
  input  logic [31:0] bus_wdata  [N_STATIONS],
  output logic [31:0] bus_rdata  [N_STATIONS],
  output logic        bus_err    [N_STATIONS],
  output logic [3:0]  ob_full    [N_STATIONS],
  output logic [1:0]  ib_avail   [N_STATIONS],
  // per-station T3 lines
  output logic        t3_tx_bit      [N_STATIONS],
  output logic        t3_tx_sf_start [N_STATIONS],
  input  logic        t3_rx_bit      [N_STATIONS],
  input  logic        t3_rx_sf_start [N_STATIONS],
  // per-station HOU read port
  input  logic [$clog2(REC_DEPTH)-1:0] hou_rd_addr [N_STATIONS],
  output logic [63:0] hou_rd_data   [N_STATIONS],
  output logic [31:0] hou_rec_count [N_STATIONS],
  // status
  output logic        locked         [N_STATIONS],
  output logic        ev_rx_pkt      [N_STATIONS],
  output logic        ev_tx_pkt      [N_STATIONS],
  output logic        ev_rx_lost     [N_STATIONS],
  output logic        ev_link_tx     [N_STATIONS],
  output logic        ev_link_rx     [N_STATIONS],
  output logic        ev_link_lost   [N_STATIONS],
  output logic [4:0]  iob_count      [N_STATIONS][4],
  output logic        ev_cg_transfer,
  output logic        ev_cg_discard,
  output logic        ev_cg_boundary
);
  logic ring [N_STATIONS];   // ring[i] is the output of station i
  logic cg_transfer [N_STATIONS];
  logic cg_discard  [N_STATIONS];
  logic cg_boundary [N_STATIONS];

  for (genvar i = 0; i < N_STATIONS; i++) begin : g_st
    station #(
      .IS_HEADEND(i == 0), .ADDR(8'(i)), .N_USERS(N_USERS), .DEPTH(DEPTH),
      .PKT_BITS(PKT_BITS), .REC_DEPTH(REC_DEPTH)
    ) u_station (
      .clk, .rst_n, .t3_bit_en,
      .ring_in(ring[(i + N_STATIONS - 1) % N_STATIONS]), .ring_out(ring[i]),
      .cfg_we(cfg_we && cfg_station == 8'(i)), .cfg_addr, .cfg_wdata,
      .usr_bus_req(usr_bus_req[i]), .usr_bus_gnt(usr_bus_gnt[i]),
      .usr_dst_req(usr_dst_req[i]), .usr_dst_gnt(usr_dst_gnt[i]),
      .usr_dst_irq(usr_dst_irq[i]),
      .bus_valid(bus_valid[i]), .bus_target(bus_target[i]), .bus_last(bus_last[i]),
      .bus_wdata(bus_wdata[i]), .bus_rdata(bus_rdata[i]), .bus_err(bus_err[i]),
      .ob_full(ob_full[i]), .ib_avail(ib_avail[i]),
      .t3_tx_bit(t3_tx_bit[i]), .t3_tx_sf_start(t3_tx_sf_start[i]),
      .t3_rx_bit(t3_rx_bit[i]), .t3_rx_sf_start(t3_rx_sf_start[i]),
      .hou_rd_addr(hou_rd_addr[i]), .hou_rd_data(hou_rd_data[i]),
      .hou_rec_count(hou_rec_count[i]),
      .locked(locked[i]), .ev_rx_pkt(ev_rx_pkt[i]), .ev_tx_pkt(ev_tx_pkt[i]),
      .ev_rx_lost(ev_rx_lost[i]), .ev_cg_transfer(cg_transfer[i]),
      .ev_cg_discard(cg_discard[i]), .ev_cg_boundary(cg_boundary[i]),
      .ev_link_tx(ev_link_tx[i]), .ev_link_rx(ev_link_rx[i]),
      .ev_link_lost(ev_link_lost[i]), .iob_count(iob_count[i]));
  end

  assign ev_cg_transfer = cg_transfer[0];
  assign ev_cg_discard  = cg_discard[0];
  assign ev_cg_boundary = cg_boundary[0];

  logic unused;
  always_comb begin
    unused = 1'b0;
    for (int i = 1; i < N_STATIONS; i++) unused ^= cg_transfer[i] ^ cg_discard[i] ^ cg_boundary[i];
  end

endmodule
