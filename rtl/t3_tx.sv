// t3_tx: T3 Interface transmitter, enveloping MAGNET II packets in DS3
// Short Frames.
//
// The DS3 stream is cut into 85-bit Short Frames: one DS3 control bit, then
// 84 data bits. A 1024-bit packet occupies 13 consecutive Short Frames:
//   SF1     : 8-bit Link Header with Packet Start Flag 0000, 76 packet bits
//   SF2-SF12: 84 packet bits each
//   SF13    : the last 24 packet bits, 60 unused bits
// A Short Frame that carries no packet holds a Link Header with PSF 1111
// (any XX11 means "no packet start") and 76 vacant bits. The Link Header is
// PSF[3:0], TNR, RNR (both active low) and two reserved bits. A packet may
// start in any Short Frame, independent of the 56-frame Multiframe.
// This format follows MAGNET II. The control-bit position is sent as 0 and
// marked by `sf_start`: the DS3 overhead bits (P, F, C, M, X) are filled in by
// the DS3 line framer, which is outside this block. Holding a new packet back
// while the far end reports RNR low (its input buffer full) is this design's
// reading of the status bits.
//
// Timing: one bit per `bit_en` (the 44.736 MHz line rate), MSB of each byte
// first. Packet bytes come from the Router Output Buffer (packet_buffer read
// side): `rd_en` after each byte, `rd_done` after the 128th.
module t3_tx
  import magnet_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_en,
  // Router Output Buffer
  input  logic       pkt_avail,
  input  logic [7:0] rd_data,
  output logic       rd_en,
  output logic       rd_done,
  // Link Header status
  input  logic       tnr_n,       // local transmit status sent to the far end
  input  logic       rnr_n,       // local receive status sent to the far end
  input  logic       peer_rnr_n,  // far end's receive status (from t3_rx)
  // line
  output logic       ser_out,
  output logic       sf_start,    // this bit is the DS3 control-bit slot
  output logic [5:0] mf_pos,      // Short Frame number within the Multiframe
  output logic       pkt_start    // pulses when a packet envelope starts
);
  logic [6:0]  bitpos;     // 0..84
  logic [3:0]  sfn;        // Short Frame of the envelope, 0..12
  logic        in_pkt;
  logic [9:0]  pbit;       // packet bit 0..1023
  logic [7:0]  lh;
  logic        start_now;

  assign start_now = (bitpos == 7'd0) && !in_pkt && pkt_avail && peer_rnr_n;
  assign lh        = {((in_pkt || start_now) && sfn == 4'd0) ? PSF_START : PSF_IDLE,
                      tnr_n, rnr_n, 2'b00};

  // what the current bit is
  logic is_lh, is_pkt;
  always_comb begin
    is_lh  = 1'b0;
    is_pkt = 1'b0;
    if (bitpos != 7'd0) begin
      if (!in_pkt || sfn == 4'd0) begin
        is_lh  = (bitpos <= 7'd8);
        is_pkt = in_pkt && (bitpos > 7'd8);
      end else if (sfn == 4'd12) begin
        is_pkt = (bitpos <= 7'd24);
      end else begin
        is_pkt = 1'b1;
      end
    end
    rd_en   = bit_en && is_pkt && (pbit[2:0] == 3'd7) && (pbit != 10'd1023);
    rd_done = bit_en && is_pkt && (pbit == 10'd1023);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bitpos <= '0; sfn <= '0; in_pkt <= 1'b0; pbit <= '0; mf_pos <= '0;
      ser_out <= 1'b0; sf_start <= 1'b0; pkt_start <= 1'b0;
    end else begin
      pkt_start <= 1'b0;
      if (bit_en) begin
        sf_start <= (bitpos == 7'd0);
        if (bitpos == 7'd0) begin
          ser_out <= 1'b0;
          if (start_now) begin
            in_pkt    <= 1'b1;
            sfn       <= 4'd0;
            pbit      <= '0;
            pkt_start <= 1'b1;
          end
        end else if (is_lh) begin
          ser_out <= lh[3'(7'd8 - bitpos)];
        end else if (is_pkt) begin
          ser_out <= rd_data[3'd7 - pbit[2:0]];
          pbit    <= pbit + 1'b1;
        end else begin
          ser_out <= 1'b0;
        end
        if (bitpos == 7'(SF_BITS - 1)) begin
          bitpos <= '0;
          mf_pos <= (mf_pos == 6'(SF_PER_MF - 1)) ? '0 : mf_pos + 1'b1;
          if (in_pkt) begin
            if (sfn == 4'(SF_PER_PKT - 1)) in_pkt <= 1'b0;
            else                           sfn    <= sfn + 1'b1;
          end
        end else begin
          bitpos <= bitpos + 1'b1;
        end
      end
    end
  end

endmodule
