// addr_translator: the Router's address translation for packets entering the
// Ring from a T3 link.
//
// The Router holds three 256-entry look-up tables, one per routing method:
//   Datagram       : final destination address  -> next destination address
//   Virtual Circuit: virtual circuit number     -> next destination address
//   Multicast      : global multicast number    -> local multicast number
// As a packet's bytes stream past, the routing mode (header byte 1) and
// the key (ROUTE, byte 2) are latched, byte 3 (DEST) is replaced with the
// table entry and byte 4 (SRC) with this station's address, so the header
// names the current source and the next destination. Other bytes and
// reserved modes pass unchanged. The three tables and what they map follow
// MAGNET II; the byte positions follow the header layout of magnet_pkg and
// the 8-bit virtual circuit number is this design's choice.
//
// Timing: combinational from `in_*` to `out_*` (no added latency); the
// tables are written through `tbl_we` and read asynchronously. The strobes
// `out_valid` and `out_sop` are `in_valid` and `in_sop` passed along with the
// rewritten byte.
module addr_translator
  import magnet_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] my_addr,
  input  logic       tbl_we,
  input  logic [1:0] tbl_sel,     // 0 = DG, 1 = VC, 2 = MC
  input  logic [7:0] tbl_addr,
  input  logic [7:0] tbl_wdata,
  input  logic       in_valid,
  input  logic       in_sop,      // first byte of a packet
  input  logic [7:0] in_byte,
  output logic       out_valid,
  output logic       out_sop,
  output logic [7:0] out_byte,
  output logic       translated   // pulses when DEST is replaced
);
  logic [7:0] dg_tbl [256];
  logic [7:0] vc_tbl [256];
  logic [7:0] mc_tbl [256];

  always_ff @(posedge clk) begin
    if (tbl_we) begin
      case (tbl_sel)
        2'd0:    dg_tbl[tbl_addr] <= tbl_wdata;
        2'd1:    vc_tbl[tbl_addr] <= tbl_wdata;
        2'd2:    mc_tbl[tbl_addr] <= tbl_wdata;
        default: ;
      endcase
    end
  end

  logic [2:0]  bidx;          // byte index within the header, saturating at 7
  logic [1:0]  mode_q;
  logic [7:0]  route_q;
  logic [2:0]  cur_idx;
  logic [7:0]  lookup;

  assign cur_idx = in_sop ? 3'd0 : bidx;

  always_comb begin
    case (route_mode_e'(mode_q))
      MODE_DG: lookup = dg_tbl[route_q];
      MODE_VC: lookup = vc_tbl[route_q];
      MODE_MC: lookup = mc_tbl[route_q];
      default: lookup = 8'h00;
    endcase
    out_valid  = in_valid;
    out_sop    = in_sop;
    out_byte   = in_byte;
    translated = 1'b0;
    if (in_valid && mode_q != MODE_RSV) begin
      if (cur_idx == 3'd3) begin
        out_byte   = lookup;
        translated = 1'b1;
      end else if (cur_idx == 3'd4) begin
        out_byte = my_addr;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bidx <= 3'd7; mode_q <= MODE_RSV; route_q <= '0;
    end else if (in_valid) begin
      if (cur_idx != 3'd7) bidx <= cur_idx + 1'b1;
      if (cur_idx == 3'd1) mode_q  <= in_byte[3:2];
      if (cur_idx == 3'd2) route_q <= in_byte;
    end
  end

endmodule
