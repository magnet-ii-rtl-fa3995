// station: a MAGNET II Network Station, or with IS_HEADEND=1 the Headend
// Station.
//
// Ring path. The serial ring input enters the MIU, is cut into 16-bit words
// and passes through the IOB, which receives, removes and inserts packets.
// In a Network Station the IOB output goes straight back to the MIU
// transmitter. In the Headend Station it goes to the Cell Generator, which
// terminates the returning cells and sends new ones at its own cell timing
// (the Headend's clock is the Ring master clock). The HOU watches the IOB
// input and output words and the IOB buffer events.
//
// Bus path (the station's VMEbus, Bus Switch Fabric). Local users request
// the bus from the bus_arbiter and, before writing a packet into an Output
// Buffer, request that buffer from its dest_scheduler (three IOB class
// buffers and the Router Output Buffer). The user holding the bus drives a
// shared data lane: a write to an Output Buffer is taken only from the user
// that holds both the bus and that buffer (otherwise `bus_err` pulses);
// reads of the IOB and Router Input Buffers need only the bus.
//   bus_target: 0..2 IOB Output Buffer class I..III, 3 Router Output Buffer,
//               4 IOB Input Buffer (read), 5 Router Input Buffer (read)
//
// Link path. The Router and the T3 Interface (t3_tx, t3_rx) join the bus to
// a T3 line; the DS3 line framer that fills the control bits is outside.
//
// Control variables (written by the station's resource manager over the
// bus, here through the cfg_* port, 12-bit address, 16-bit data):
//   0x000-0x0FF multicast table entry (bit 0)
//   0x100-0x102 LIMIT I..III (bit 8 = NOLIMIT, bits 7:0 = limit)
//   0x103 IOB THRESHOLD codes {B_IN, B_III, B_II, B_I}, 2 bits each
//   0x104 station address          0x105 Router THRESHOLD codes {B_OUT, B_IN}
//   0x106 HOU {mode, enable}       0x107 arbiter round-robin enable
//   0x110-0x112 MAX I, MAX II, MAX III   0x113 moveable boundary enable
//   0x400-0x4FF DG table, 0x500-0x5FF VC table, 0x600-0x6FF MC table
// The blocks and their connections follow the MAGNET II station diagrams;
// the address map and reset values (NOLIMIT, thresholds of 16, MAX 5/9/15,
// moveable boundary on, HOU in continuous mode) are this design's own.
//
// Timing: one 100 MHz clock; ring words every 16 clocks; a bus beat moves
// 32 bits per clock; the T3 side advances on t3_bit_en. In a Network Station
// (IS_HEADEND=0) the ev_cg_* outputs are constant 0, since there is no Cell
// Generator.
module station
  import magnet_pkg::*;
#(
  parameter bit          IS_HEADEND = 1'b0,
  parameter logic [7:0]  ADDR       = 8'd1,
  parameter int          N_USERS    = 4,
  parameter int          DEPTH      = 16,
  parameter int          PKT_BITS   = 1024,
  parameter int          REC_DEPTH  = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        t3_bit_en,
  // ring
  input  logic        ring_in,
  output logic        ring_out,
  // control variables
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [15:0] cfg_wdata,
  // bus
  input  logic [N_USERS-1:0] usr_bus_req,
  output logic [N_USERS-1:0] usr_bus_gnt,
  input  logic [N_USERS-1:0] usr_dst_req [4],
  output logic [N_USERS-1:0] usr_dst_gnt [4],
  output logic [N_USERS-1:0] usr_dst_irq [4],
  input  logic        bus_valid,
  input  logic [2:0]  bus_target,
  input  logic        bus_last,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_err,
  output logic [3:0]  ob_full,     // IOB I, II, III, Router
  output logic [1:0]  ib_avail,    // IOB, Router
  // T3 line
  output logic        t3_tx_bit,
  output logic        t3_tx_sf_start,
  input  logic        t3_rx_bit,
  input  logic        t3_rx_sf_start,
  // HOU Processing Unit port
  input  logic [$clog2(REC_DEPTH)-1:0] hou_rd_addr,
  output logic [63:0] hou_rd_data,
  output logic [31:0] hou_rec_count,
  // status
  output logic        locked,
  output logic        ev_rx_pkt,
  output logic        ev_tx_pkt,
  output logic        ev_rx_lost,
  output logic        ev_cg_transfer,
  output logic        ev_cg_discard,
  output logic        ev_cg_boundary,
  output logic        ev_link_tx,
  output logic        ev_link_rx,
  output logic        ev_link_lost,
  output logic [4:0]  iob_count [4]
);
  // ---------------- control registers ----------------
  logic [LIMIT_BITS-1:0] limit [3];
  logic [1:0]  thr_out [3];
  logic [1:0]  thr_in, rtr_thr_in, rtr_thr_out;
  logic [7:0]  my_addr, max_i, max_ii, max_iii;
  logic        moveable_en, hou_en, hou_mode, rr_mode;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      limit   <= '{default: 9'h100};
      thr_out <= '{default: 2'd3};
      thr_in  <= 2'd3; rtr_thr_in <= 2'd3; rtr_thr_out <= 2'd3;
      my_addr <= ADDR;
      max_i <= 8'd5; max_ii <= 8'd9; max_iii <= 8'd15; moveable_en <= 1'b1;
      hou_en <= 1'b1; hou_mode <= 1'b0; rr_mode <= 1'b0;
    end else if (cfg_we) begin
      case (cfg_addr)
        12'h100: limit[0] <= cfg_wdata[8:0];
        12'h101: limit[1] <= cfg_wdata[8:0];
        12'h102: limit[2] <= cfg_wdata[8:0];
        12'h103: begin
          thr_out[0] <= cfg_wdata[1:0]; thr_out[1] <= cfg_wdata[3:2];
          thr_out[2] <= cfg_wdata[5:4]; thr_in     <= cfg_wdata[7:6];
        end
        12'h104: my_addr <= cfg_wdata[7:0];
        12'h105: begin rtr_thr_in <= cfg_wdata[1:0]; rtr_thr_out <= cfg_wdata[3:2]; end
        12'h106: begin hou_en <= cfg_wdata[0]; hou_mode <= cfg_wdata[1]; end
        12'h107: rr_mode <= cfg_wdata[0];
        12'h110: max_i   <= cfg_wdata[7:0];
        12'h111: max_ii  <= cfg_wdata[7:0];
        12'h112: max_iii <= cfg_wdata[7:0];
        12'h113: moveable_en <= cfg_wdata[0];
        default: ;
      endcase
    end
  end

  logic mc_we, tbl_we;
  assign mc_we  = cfg_we && (cfg_addr[11:8] == 4'h0);
  assign tbl_we = cfg_we && (cfg_addr[11:10] == 2'b01) && (cfg_addr[9:8] != 2'b11);

  // ---------------- ring path ----------------
  logic        rx_word_en, rx_cell_start;
  logic [15:0] rx_word;
  logic [5:0]  rx_idx;
  logic        iob_out_en;
  logic [15:0] iob_out_word;
  logic [5:0]  iob_out_idx;
  logic        tx_word_en;
  logic [15:0] tx_word;

  miu u_miu (
    .clk, .rst_n, .ser_in(ring_in),
    .rx_word_en, .rx_word, .rx_idx, .rx_cell_start, .locked,
    .tx_word_en, .tx_word, .ser_out(ring_out));

  logic [2:0]  iob_ob_wr_en, iob_ob_full;
  logic        iob_ib_avail, iob_ib_rd_en, iob_ib_rd_done;
  logic [31:0] iob_ib_rd_data;
  logic [3:0]  iob_arr, iob_dep;

  iob #(.DEPTH(DEPTH), .PKT_BITS(PKT_BITS)) u_iob (
    .clk, .rst_n, .my_addr, .limit, .thr_out, .thr_in,
    .mc_we, .mc_addr(cfg_addr[7:0]), .mc_wdata(cfg_wdata[0]),
    .in_word_en(rx_word_en), .in_word(rx_word), .in_idx(rx_idx),
    .out_word_en(iob_out_en), .out_word(iob_out_word), .out_idx(iob_out_idx),
    .ob_wr_en(iob_ob_wr_en), .ob_wr_last(bus_last), .ob_wr_data(bus_wdata),
    .ob_full(iob_ob_full),
    .ib_avail(iob_ib_avail), .ib_rd_data(iob_ib_rd_data), .ib_rd_en(iob_ib_rd_en),
    .ib_rd_done(iob_ib_rd_done),
    .buf_count(iob_count), .arrival(iob_arr), .departure(iob_dep),
    .rx_lost(ev_rx_lost), .tx_pkt(ev_tx_pkt), .rx_pkt(ev_rx_pkt));

  if (IS_HEADEND) begin : g_hs
    logic [5:0] cg_idx;
    logic [1:0] cg_sub;
    cell_generator #(.PKT_BITS(PKT_BITS)) u_cg (
      .clk, .rst_n, .max_i, .max_ii, .max_iii, .moveable_en,
      .in_word_en(iob_out_en), .in_word(iob_out_word), .in_idx(iob_out_idx),
      .out_word_en(tx_word_en), .out_word(tx_word), .out_idx(cg_idx),
      .transfer(ev_cg_transfer), .discard(ev_cg_discard),
      .boundary_moved(ev_cg_boundary), .subcycle_now(cg_sub));
    logic unused_hs;
    assign unused_hs = ^{cg_idx, cg_sub};
  end else begin : g_ns
    assign tx_word_en     = iob_out_en;
    assign tx_word        = iob_out_word;
    assign ev_cg_transfer = 1'b0;
    assign ev_cg_discard  = 1'b0;
    assign ev_cg_boundary = 1'b0;
    logic unused_ns;
    assign unused_ns = ^{max_i, max_ii, max_iii, moveable_en};
  end

  logic [$clog2(REC_DEPTH)-1:0] hou_wr_ptr;
  hou #(.REC_DEPTH(REC_DEPTH)) u_hou (
    .clk, .rst_n, .enable(hou_en), .mode(hou_mode),
    .in_word_en(rx_word_en), .in_word(rx_word), .in_idx(rx_idx),
    .out_word_en(iob_out_en), .out_word(iob_out_word), .out_idx(iob_out_idx),
    .arrival(iob_arr), .departure(iob_dep),
    .rd_addr(hou_rd_addr), .rd_data(hou_rd_data), .wr_ptr(hou_wr_ptr), .rec_count(hou_rec_count));

  // ---------------- bus switch fabric ----------------
  localparam int UW = (N_USERS > 1) ? $clog2(N_USERS) : 1;
  logic [3:0] dst_done;
  logic [UW-1:0] bus_owner;
  logic [1:0] rtr_arr, rtr_dep;
  logic [3:0] dst_busy;
  logic [UW-1:0] dst_owner [4];

  bus_arbiter #(.N_USERS(N_USERS)) u_arb (
    .clk, .rst_n, .round_robin(rr_mode), .req(usr_bus_req), .grant(usr_bus_gnt));

  always_comb begin
    bus_owner = '0;
    for (int u = 0; u < N_USERS; u++) if (usr_bus_gnt[u]) bus_owner = UW'(u);
  end

  assign dst_done = {rtr_arr[1], iob_arr[3:1]};

  for (genvar t = 0; t < 4; t++) begin : g_dst
    dest_scheduler #(.N_USERS(N_USERS)) u_dst (
      .clk, .rst_n, .req(usr_dst_req[t]), .done(dst_done[t]),
      .grant(usr_dst_gnt[t]), .irq(usr_dst_irq[t]), .busy(dst_busy[t]), .owner(dst_owner[t]));
  end

  logic        wr_ok, rtr_ob_wr_en;
  logic        rtr_ib_rd_en, rtr_ib_rd_done, rtr_ob_full, rtr_ib_avail;
  logic [31:0] rtr_ib_rd_data;
  always_comb begin
    wr_ok          = (|usr_bus_gnt) && (bus_target < 3'd4) &&
                     usr_dst_gnt[bus_target[1:0]][bus_owner];
    iob_ob_wr_en   = '0;
    rtr_ob_wr_en   = 1'b0;
    iob_ib_rd_en   = 1'b0;
    iob_ib_rd_done = 1'b0;
    bus_rdata      = 32'h0;
    if (bus_valid && wr_ok) begin
      if (bus_target == 3'd3) rtr_ob_wr_en = 1'b1;
      else                    iob_ob_wr_en[bus_target[1:0]] = 1'b1;
    end
    if (bus_target == 3'd4) bus_rdata = iob_ib_rd_data;
    if (bus_target == 3'd5) bus_rdata = rtr_ib_rd_data;
    if (bus_valid && (|usr_bus_gnt) && bus_target == 3'd4) begin
      iob_ib_rd_en   = !bus_last;
      iob_ib_rd_done = bus_last;
    end
  end

  always_comb begin
    rtr_ib_rd_en   = bus_valid && (|usr_bus_gnt) && bus_target == 3'd5 && !bus_last;
    rtr_ib_rd_done = bus_valid && (|usr_bus_gnt) && bus_target == 3'd5 && bus_last;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) bus_err <= 1'b0;
    else        bus_err <= bus_valid && (bus_target < 3'd4) && !wr_ok;
  end

  assign ob_full  = {rtr_ob_full, iob_ob_full};
  assign ib_avail = {rtr_ib_avail, iob_ib_avail};

  // ---------------- link ----------------
  logic        l_rx_valid, l_rx_sop, l_rx_eop;
  logic [7:0]  l_rx_byte, l_tx_data;
  logic        l_tx_avail, l_tx_rd_en, l_tx_rd_done, rnr_n, tnr_n, peer_rnr_n, peer_tnr_n;
  logic [4:0]  rtr_ib_count, rtr_ob_count;
  logic [5:0]  mf_pos;
  logic        xlated;

  router #(.DEPTH(DEPTH), .PKT_BITS(PKT_BITS)) u_rtr (
    .clk, .rst_n, .my_addr, .thr_in(rtr_thr_in), .thr_out(rtr_thr_out),
    .tbl_we, .tbl_sel(cfg_addr[9:8]), .tbl_addr(cfg_addr[7:0]), .tbl_wdata(cfg_wdata[7:0]),
    .rx_valid(l_rx_valid), .rx_sop(l_rx_sop), .rx_eop(l_rx_eop), .rx_byte(l_rx_byte),
    .tx_avail(l_tx_avail), .tx_data(l_tx_data), .tx_rd_en(l_tx_rd_en),
    .tx_rd_done(l_tx_rd_done), .rnr_n, .tnr_n,
    .ob_wr_en(rtr_ob_wr_en), .ob_wr_last(bus_last), .ob_wr_data(bus_wdata),
    .ob_full(rtr_ob_full), .ib_avail(rtr_ib_avail), .ib_rd_data(rtr_ib_rd_data),
    .ib_rd_en(rtr_ib_rd_en), .ib_rd_done(rtr_ib_rd_done),
    .ib_count(rtr_ib_count), .ob_count(rtr_ob_count), .arrival(rtr_arr),
    .departure(rtr_dep), .rx_lost(ev_link_lost), .translated(xlated));

  t3_tx u_t3tx (
    .clk, .rst_n, .bit_en(t3_bit_en),
    .pkt_avail(l_tx_avail), .rd_data(l_tx_data), .rd_en(l_tx_rd_en), .rd_done(l_tx_rd_done),
    .tnr_n, .rnr_n, .peer_rnr_n,
    .ser_out(t3_tx_bit), .sf_start(t3_tx_sf_start), .mf_pos, .pkt_start(ev_link_tx));

  t3_rx u_t3rx (
    .clk, .rst_n, .bit_en(t3_bit_en), .ser_in(t3_rx_bit), .sf_start(t3_rx_sf_start),
    .byte_valid(l_rx_valid), .byte_sop(l_rx_sop), .byte_eop(l_rx_eop), .byte_data(l_rx_byte),
    .peer_tnr_n, .peer_rnr_n, .pkt_start(ev_link_rx));

  logic unused;
  assign unused = ^{rx_cell_start, rtr_ib_count, rtr_ob_count, rtr_dep, mf_pos, xlated,
                    peer_tnr_n, hou_wr_ptr, dst_busy, dst_owner[0], dst_owner[1],
                    dst_owner[2], dst_owner[3], rtr_arr[0], cfg_wdata[15:9]};

endmodule
