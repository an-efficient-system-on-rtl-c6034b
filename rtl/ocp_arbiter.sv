// ocp_arbiter -- the arbiter in front of one slave.
//
// Each slave has its own arbiter, so masters that target different slaves
// proceed at the same time; contention exists only between masters that
// target the same slave. req[i] is master i's request (MReq), grant[i] its
// MGrant. The choice among requesters is fixed priority, master 0 highest;
// the priority order is this design's choice.
//
// The grant goes to a master in the same cycle it requests (combinational
// grant) and is then kept, as owner, for as long as that master keeps
// requesting, so a transfer that has started is never taken away. When the
// slave accepts a transfer (xfer_done, the slave's SCmdAccept) the owner is
// released unless its lock[i] is high: a locked master keeps the slave for
// its next transfer, so a burst of a low-priority master cannot be
// interrupted by a higher-priority one (a lock transaction).
// `ce` is a synchronous clock enable, reset is active-low and synchronous.
module ocp_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic [N-1:0] req,
  input  logic [N-1:0] lock,
  input  logic         xfer_done,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          owned;
  logic [IW-1:0] owner;
  logic [IW-1:0] gidx;
  logic          gvalid;

  always_comb begin
    grant  = '0;
    gidx   = '0;
    gvalid = 1'b0;
    if (owned && req[owner]) begin
      gidx   = owner;
      gvalid = 1'b1;
    end else begin
      for (int i = N - 1; i >= 0; i--) begin
        if (req[i]) begin
          gidx   = IW'(i);
          gvalid = 1'b1;
        end
      end
    end
    if (gvalid) grant[gidx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      owned <= 1'b0;
      owner <= '0;
    end else if (ce) begin
      if (gvalid && !(xfer_done && !lock[gidx])) begin
        owned <= 1'b1;
        owner <= gidx;
      end else begin
        owned <= 1'b0;
      end
    end
  end

  // at most one master holds the slave
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
