// ocp_wdata_mux -- write data multiplexer in front of one slave.
//
// Forwards the write data part of the request (MData, and MDataValid of a
// single-request write burst's data phase) of the master whose grant bit is
// set (one-hot or zero grant from the slave's arbiter); zero with no grant.
// Combinational.
module ocp_wdata_mux
  import ocp_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] grant,
  input  ocp_wdat_t    mwd [N],
  output ocp_wdat_t    wd_o
);

  always_comb begin
    wd_o = '{mdata: '0, mdatavalid: 1'b0};
    for (int i = 0; i < N; i++) begin
      if (grant[i]) wd_o = mwd[i];
    end
  end

endmodule
