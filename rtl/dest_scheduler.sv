// dest_scheduler: per-Output-Buffer destination scheduler of the Bus.
//
// Bus users that want to put a packet into an Output Buffer first request it.
// Requests are queued first-in first-out; the user at the head of the queue
// is notified (a one-clock `irq` pulse, standing for the VME interrupt) and
// owns the buffer (`grant`, level) for exactly one packet transfer. When the
// packet is complete (`done`, the buffer's arrival pulse) the next queued
// request is served. This queueing discipline is the one MAGNET II gives.
// This design's own choices: `req` is a level that a user holds until it is
// granted; a user is queued at most once (a held request is not queued
// again), and requests that appear in the same clock are queued one per
// clock, lowest index first.
//
// Timing: a request is queued on the clock edge it is seen; grant and irq
// follow one clock after it reaches the head of an idle queue.
module dest_scheduler #(
  parameter int N_USERS = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_USERS-1:0] req,
  input  logic               done,
  output logic [N_USERS-1:0] grant,
  output logic [N_USERS-1:0] irq,
  output logic               busy,
  output logic [$clog2(N_USERS)-1:0] owner
);
  localparam int IW = (N_USERS > 1) ? $clog2(N_USERS) : 1;
  localparam int CW = $clog2(N_USERS + 1);

  logic [IW-1:0]      q [N_USERS];
  logic [IW-1:0]      rd_ptr, wr_ptr;
  logic [CW-1:0]      qcount;
  logic [N_USERS-1:0] pending;     // queued or owning
  logic               own_valid;
  logic [IW-1:0]      own_id;

  // pick one new request per clock (lowest index first)
  logic               new_req;
  logic [IW-1:0]      new_id;
  always_comb begin
    new_req = 1'b0;
    new_id  = '0;
    for (int u = N_USERS-1; u >= 0; u--) begin
      if (req[u] && !pending[u]) begin
        new_req = 1'b1;
        new_id  = IW'(u);
      end
    end
  end

  logic pop;
  assign pop = (!own_valid || done) && (qcount != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0; wr_ptr <= '0; qcount <= '0; pending <= '0;
      own_valid <= 1'b0; own_id <= '0; irq <= '0;
    end else begin
      irq <= '0;
      if (new_req) begin
        q[wr_ptr]       <= new_id;
        wr_ptr          <= (int'(wr_ptr) == N_USERS-1) ? '0 : wr_ptr + 1'b1;
        pending[new_id] <= 1'b1;
      end
      if (own_valid && done) begin
        pending[own_id] <= 1'b0;
        own_valid       <= 1'b0;
      end
      if (pop) begin
        own_valid   <= 1'b1;
        own_id      <= q[rd_ptr];
        irq[q[rd_ptr]] <= 1'b1;
        rd_ptr      <= (int'(rd_ptr) == N_USERS-1) ? '0 : rd_ptr + 1'b1;
      end
      qcount <= qcount + CW'(new_req) - CW'(pop);
    end
  end

  always_comb begin
    grant = '0;
    if (own_valid) grant[own_id] = 1'b1;
  end
  assign busy  = own_valid;
  assign owner = own_id;

endmodule
