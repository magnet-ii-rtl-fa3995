// packet_buffer: a FIFO of whole packets with a programmable THRESHOLD.
//
// Every buffer in the IOB, the Router and the Cell Generator's Transfer
// Buffer is one of these. It holds up to DEPTH packets (16 in MAGNET II), each
// in a slot of PKT_BITS bits. The THRESHOLD code (0..3 -> 2, 4, 8, 16
// packets) sets the effective size: once that many packets are stored the
// buffer reports full and a writer must not start another packet. The
// threshold semantics follow the MAGNET II description; the slot layout and
// handshake are this design's own.
//
// The two sides may differ in width (16-bit ring side, 32-bit bus side,
// 8-bit T3 side). Storage words are max(WR_W, RD_W) bits; the narrower side
// addresses lanes inside a word, most significant lane first, so a packet
// keeps its big-endian bit order whatever the widths.
//
// Write side: wr_en stores wr_data at the next position of the packet being
// written; wr_en with wr_last also commits the packet (arrival pulse).
// Starting a packet while full is a protocol error (asserted).
// Read side: rd_data shows, combinationally, the current word of the oldest
// packet (valid when pkt_avail). rd_en advances to the next word; rd_done
// releases the packet (departure pulse) and rewinds to its first word.
// Packets may be shorter than a slot: the reader decides how many words to
// read from the size field.
module packet_buffer
  import magnet_pkg::*;
#(
  parameter int DEPTH    = 16,
  parameter int PKT_BITS = 1024,
  parameter int WR_W     = 16,
  parameter int RD_W     = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [1:0]      threshold,
  // write side
  input  logic            wr_en,
  input  logic            wr_last,
  input  logic [WR_W-1:0] wr_data,
  output logic            full,
  // read side
  output logic            pkt_avail,
  output logic [RD_W-1:0] rd_data,
  input  logic            rd_en,
  input  logic            rd_done,
  // status for observation
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic            arrival,
  output logic            departure
);
  localparam int MW     = (WR_W > RD_W) ? WR_W : RD_W;
  localparam int WLANES = MW / WR_W;
  localparam int RLANES = MW / RD_W;
  localparam int WPS    = PKT_BITS / MW;          // storage words per slot
  localparam int AW     = $clog2(DEPTH * WPS);
  localparam int SW     = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int PW     = $clog2(PKT_BITS / ((WR_W < RD_W) ? WR_W : RD_W) + 1);
  localparam int CW     = $clog2(DEPTH + 1);

  logic [MW-1:0] mem [DEPTH * WPS];

  logic [SW-1:0] wslot, rslot;
  logic [PW-1:0] wpos, rpos;      // position in units of the port width
  logic [CW-1:0] limit;

  always_comb begin
    if (int'(threshold_packets(threshold)) > DEPTH) limit = CW'(DEPTH);
    else                                      limit = CW'(threshold_packets(threshold));
  end

  assign full      = (count >= limit);
  assign pkt_avail = (count != '0);
  assign arrival   = wr_en && wr_last;
  assign departure = rd_done && pkt_avail;


  // write address and lane
  logic [AW-1:0] waddr, raddr;
  logic [$clog2(WLANES+1)-1:0] wlane;
  logic [$clog2(RLANES+1)-1:0] rlane;
  always_comb begin
    waddr = AW'(wslot) * AW'(WPS) + AW'(wpos / PW'(WLANES));
    wlane = ($clog2(WLANES+1))'(wpos % PW'(WLANES));
    raddr = AW'(rslot) * AW'(WPS) + AW'(rpos / PW'(RLANES));
    rlane = ($clog2(RLANES+1))'(rpos % PW'(RLANES));
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[waddr][(WLANES-1-int'(wlane))*WR_W +: WR_W] <= wr_data;
  end

  assign rd_data = mem[raddr][(RLANES-1-int'(rlane))*RD_W +: RD_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wslot <= '0; rslot <= '0; wpos <= '0; rpos <= '0; count <= '0;
    end else begin
      if (wr_en) begin
        if (wr_last) begin
          wpos  <= '0;
          wslot <= (int'(wslot) == DEPTH-1) ? '0 : wslot + 1'b1;
        end else if (int'(wpos) < PKT_BITS/WR_W - 1) begin
          wpos <= wpos + 1'b1;
        end
      end
      if (rd_done && pkt_avail) begin
        rpos  <= '0;
        rslot <= (int'(rslot) == DEPTH-1) ? '0 : rslot + 1'b1;
      end else if (rd_en && pkt_avail && int'(rpos) < PKT_BITS/RD_W - 1) begin
        rpos <= rpos + 1'b1;
      end
      count <= count + CW'(arrival) - CW'(departure);
    end
  end

  // A packet may only be started while the buffer is below its threshold.
  a_no_start_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en && wpos == '0) |-> (!full || count < CW'(DEPTH)));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en && wpos == '0) |-> count < CW'(DEPTH));

endmodule
