// bus_arbiter: the Bus Switch Fabric's arbiter.
//
// Gives the bus to one requesting user at a time. With `round_robin` low the
// lowest-numbered requester wins (prioritized); with it high the search starts
// after the user that had the bus last (round-robin). A grant is held while
// its user keeps requesting, and moves on when the request drops. The
// function (one user at a time, prioritized or round-robin) follows MAGNET
// II, which uses the standard VMEbus arbitration; this implementation is a
// generic single-level arbiter of this design's own.
//
// Timing: grants change on the clock edge after requests change.
module bus_arbiter #(
  parameter int N_USERS = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               round_robin,
  input  logic [N_USERS-1:0] req,
  output logic [N_USERS-1:0] grant
);
  localparam int IW = (N_USERS > 1) ? $clog2(N_USERS) : 1;
  logic [IW-1:0] last;
  logic          found;
  logic [IW-1:0] pick;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    if (round_robin) begin
      for (int k = 1; k <= N_USERS; k++) begin
        if (!found && req[(int'(last) + k) % N_USERS]) begin
          found = 1'b1;
          pick  = IW'((int'(last) + k) % N_USERS);
        end
      end
    end else begin
      for (int u = 0; u < N_USERS; u++) begin
        if (!found && req[u]) begin
          found = 1'b1;
          pick  = IW'(u);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grant <= '0;
      last  <= IW'(N_USERS - 1);
    end else if (!(|(grant & req))) begin
      grant <= '0;
      if (found) begin
        grant[pick] <= 1'b1;
        last        <= pick;
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
