// t3_rx: T3 Interface receiver, recovering MAGNET II packets from DS3 Short
// Frames.
//
// `sf_start` marks the control bit of each 85-bit Short Frame (Short Frame
// alignment is provided by the DS3 line framer). When no packet is being
// received, bits 1..8 of a Short Frame are a Link Header: a Packet Start Flag
// of 0000 opens a 13-frame envelope (76 packet bits in this frame, 84 in each
// of the next 11, 24 in the 13th), any other flag means no packet. The TNR
// and RNR status bits of every Link Header are kept as the far end's status.
// The envelope format follows MAGNET II; the byte interface is this design's.
//
// Output: the 128 bytes of each packet, MSB first, one `byte_valid` pulse
// per byte, `byte_sop` on the first and `byte_eop` on the last.
module t3_rx
  import magnet_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_en,
  input  logic       ser_in,
  input  logic       sf_start,
  output logic       byte_valid,
  output logic       byte_sop,
  output logic       byte_eop,
  output logic [7:0] byte_data,
  output logic       peer_tnr_n,
  output logic       peer_rnr_n,
  output logic       pkt_start
);
  logic [6:0] bitpos;
  logic [3:0] sfn;
  logic       in_pkt;
  logic [9:0] pbit;
  logic [7:0] lh_sr, byte_sr;
  logic [6:0] pos;
  logic [7:0] lh_next;

  assign pos     = sf_start ? 7'd0 : bitpos;
  assign lh_next = {lh_sr[6:0], ser_in};

  logic is_lh, is_pkt;
  always_comb begin
    is_lh  = 1'b0;
    is_pkt = 1'b0;
    if (pos != 7'd0) begin
      if (!in_pkt || sfn == 4'd0) begin
        is_lh  = (pos <= 7'd8);
        is_pkt = in_pkt && (pos > 7'd8);
      end else if (sfn == 4'd12) begin
        is_pkt = (pos <= 7'd24);
      end else begin
        is_pkt = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bitpos <= '0; sfn <= '0; in_pkt <= 1'b0; pbit <= '0; lh_sr <= '0; byte_sr <= '0;
      byte_valid <= 1'b0; byte_sop <= 1'b0; byte_eop <= 1'b0; byte_data <= '0;
      peer_tnr_n <= 1'b1; peer_rnr_n <= 1'b1; pkt_start <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      byte_sop   <= 1'b0;
      byte_eop   <= 1'b0;
      pkt_start  <= 1'b0;
      if (bit_en) begin
        bitpos <= (pos == 7'(SF_BITS - 1)) ? '0 : pos + 1'b1;
        if (is_lh) begin
          lh_sr <= lh_next;
          if (pos == 7'd8) begin
            peer_tnr_n <= lh_next[3];
            peer_rnr_n <= lh_next[2];
            if (!in_pkt && lh_next[7:4] == PSF_START) begin
              in_pkt    <= 1'b1;
              sfn       <= 4'd0;
              pbit      <= '0;
              pkt_start <= 1'b1;
            end
          end
        end else if (is_pkt) begin
          byte_sr <= {byte_sr[6:0], ser_in};
          pbit    <= pbit + 1'b1;
          if (pbit[2:0] == 3'd7) begin
            byte_valid <= 1'b1;
            byte_data  <= {byte_sr[6:0], ser_in};
            byte_sop   <= (pbit == 10'd7);
            byte_eop   <= (pbit == 10'd1023);
          end
        end
        if (pos == 7'(SF_BITS - 1) && in_pkt) begin
          if (sfn == 4'(SF_PER_PKT - 1)) in_pkt <= 1'b0;
          else                           sfn    <= sfn + 1'b1;
        end
      end
    end
  end

  // the oldest bits of the shift registers are only ever shifted out
  logic unused;
  assign unused = lh_sr[7] ^ byte_sr[7];

endmodule
