// hou: Hardware Observation Unit, Acquisition Unit and Storage Unit.
//
// The HOU watches a station's ring data path as it enters and leaves the
// IOB (the MIU 16-bit interfaces) and the arrival and departure signals of
// the four IOB buffers. Its Acquisition Unit packs what it sees into one
// I-Record per cell and writes the records into the dual-ported Storage
// Unit, a circular History Buffer that the Processing Unit (a Transputer, not
// part of this RTL) reads through the second port at the same time.
//   Continuous Mode (mode=0): a record for every cell passing the station.
//   Event Mode      (mode=1): a record only when some IOB buffer had an
//                             arrival or a departure since the last cell
//                             start.
// Each record carries the cell number modulo 65536.
// The two modes, the modulo-64K cell number, the dual-ported store and the
// header contents (source, destination, type, size, class) follow MAGNET II.
// The 64-bit I-Record layout, the History Buffer size and
// recording one record per cell, whose event flags are the buffer events
// seen since the previous record (ORed), are this design's own:
//   [63:48] cell number   [47:40] MAC in    [39:32] MAC out
//   [31:24] DEST in       [23:16] SRC in
//   [15:12] MODE/SIZE in  [11:8] arrivals (IN, I, II, III at bits 8..11)
//   [7:4]   departures    [3:2] CLASS in     [1] 0    [0] acquisition mode
//
// Timing: a record is written one clock after word 0 of a cell leaves the
// IOB; the read port returns `rd_data` one clock after `rd_addr`.
module hou #(
  parameter int REC_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        mode,         // 0 = continuous, 1 = event
  // ring data path at the IOB input and output
  input  logic        in_word_en,
  input  logic [15:0] in_word,
  input  logic [5:0]  in_idx,
  input  logic        out_word_en,
  input  logic [15:0] out_word,
  input  logic [5:0]  out_idx,
  // IOB buffer state transitions
  input  logic [3:0]  arrival,
  input  logic [3:0]  departure,
  // Processing Unit port
  input  logic [$clog2(REC_DEPTH)-1:0] rd_addr,
  output logic [63:0] rd_data,
  output logic [$clog2(REC_DEPTH)-1:0] wr_ptr,
  output logic [31:0] rec_count
);
  logic [63:0] store [REC_DEPTH];

  // header words seen on the input side (three words ahead of the output)
  logic [15:0] in_w0_q, in_w1_q, in_w2_q;
  logic [15:0] cell_no;
  logic [3:0]  arr_acc, dep_acc;
  logic        rec_we;
  logic [63:0] rec;
  logic        out_head;

  assign out_head = out_word_en && (out_idx == 6'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_w0_q <= '0; in_w1_q <= '0; in_w2_q <= '0; cell_no <= '0; arr_acc <= '0; dep_acc <= '0;
      rec_we <= 1'b0; rec <= '0; wr_ptr <= '0; rec_count <= '0;
    end else begin
      rec_we <= 1'b0;
      if (in_word_en && in_idx == 6'd0) in_w0_q <= in_word;
      if (in_word_en && in_idx == 6'd1) in_w1_q <= in_word;
      if (in_word_en && in_idx == 6'd2) in_w2_q <= in_word;
      if (out_head) begin
        rec <= {cell_no, in_w0_q[11:4], out_word[11:4], in_w1_q[7:0], in_w2_q[15:8],
                in_w0_q[3:0], arr_acc | arrival, dep_acc | departure, in_w2_q[7:6], 1'b0,
                mode};
        rec_we  <= enable && (!mode || |{arr_acc, dep_acc, arrival, departure});
        cell_no <= cell_no + 1'b1;
        arr_acc <= '0;
        dep_acc <= '0;
      end else begin
        arr_acc <= arr_acc | arrival;
        dep_acc <= dep_acc | departure;
      end
      if (rec_we) begin
        wr_ptr    <= (int'(wr_ptr) == REC_DEPTH-1) ? '0 : wr_ptr + 1'b1;
        rec_count <= rec_count + 1'b1;
      end
    end
  end

  // Storage Unit: dual-ported History Buffer
  always_ff @(posedge clk) begin
    if (rec_we) store[wr_ptr] <= rec;
  end
  always_ff @(posedge clk) begin
    rd_data <= store[rd_addr];
  end

  logic unused;
  assign unused = ^{out_word[15:12], out_word[3:0], in_w0_q[15:12], in_w1_q[15:8],
                    in_w2_q[5:0]};

endmodule
