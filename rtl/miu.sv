// miu: Magnet Interface Unit, the ring's serial/parallel converter.
//
// Receive: the 100 Mb/s serial stream from the optical receiver (one bit per
// clock, most significant bit of each 16-bit word first) is cut into 16-bit
// words. Cell boundaries are found from the 4-bit SYNC pattern that starts
// every 1024-bit cell: in HUNT the converter looks for SYNC at any bit; a
// candidate is accepted (LOCKED) when SYNC appears again exactly one cell
// later, and a missing SYNC at a cell start sends it back to HUNT. While
// LOCKED it emits each word with a one-clock `rx_word_en`, the word's index
// in the cell (`rx_idx`, 0..63) and `rx_cell_start` on word 0: these are the
// timing and control signals of the IOB.
// Transmit: each `tx_word_en` loads a 16-bit word that is shifted out MSB
// first on `ser_out`, one bit per clock; with no word loaded it sends zeros.
// The conversion between 100 Mb/s serial data and 16-bit words is the MIU's
// documented function; the hunt/confirm lock procedure and the SYNC value are
// this design's own choices.
module miu
  import magnet_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ser_in,
  output logic        rx_word_en,
  output logic [15:0] rx_word,
  output logic [5:0]  rx_idx,
  output logic        rx_cell_start,
  output logic        locked,
  input  logic        tx_word_en,
  input  logic [15:0] tx_word,
  output logic        ser_out
);
  typedef enum logic [1:0] {HUNT, CONFIRM, LOCK} sync_state_e;
  sync_state_e state;

  logic [15:0] sr, sr_next;
  logic [3:0]  bitcnt;
  logic [5:0]  widx;
  logic        cand_seen;
  logic [15:0] tx_sr;

  assign sr_next = {sr[14:0], ser_in};
  assign locked  = (state == LOCK);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= HUNT; sr <= '0; bitcnt <= '0; widx <= '0; cand_seen <= 1'b0;
      rx_word_en <= 1'b0; rx_word <= '0; rx_idx <= '0; rx_cell_start <= 1'b0;
    end else begin
      sr <= sr_next;
      rx_word_en    <= 1'b0;
      rx_cell_start <= 1'b0;
      case (state)
        HUNT: begin
          if (sr_next[3:0] == SYNC_PATTERN) begin
            state     <= CONFIRM;
            bitcnt    <= 4'd4;
            widx      <= '0;
            cand_seen <= 1'b0;
          end
        end
        default: begin
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 4'd15) begin
            widx <= widx + 1'b1;
            if (widx == '0 && sr_next[15:12] != SYNC_PATTERN) begin
              state <= HUNT;
            end else if (state == CONFIRM) begin
              if (widx == '0) begin
                if (cand_seen) begin
                  state         <= LOCK;
                  rx_word_en    <= 1'b1;
                  rx_word       <= sr_next;
                  rx_idx        <= widx;
                  rx_cell_start <= 1'b1;
                end
                cand_seen <= 1'b1;
              end
            end else begin
              rx_word_en    <= 1'b1;
              rx_word       <= sr_next;
              rx_idx        <= widx;
              rx_cell_start <= (widx == '0);
            end
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          tx_sr <= '0;
    else if (tx_word_en) tx_sr <= tx_word;
    else                 tx_sr <= {tx_sr[14:0], 1'b0};
  end
  assign ser_out = tx_sr[15];

  // the oldest bit of the shift register is only ever shifted out
  logic unused;
  assign unused = sr[15];

endmodule
