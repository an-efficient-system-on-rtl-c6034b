// ocp_addr_mux -- address and control multiplexer in front of one slave.
//
// Forwards the address and control part of the request (MCmd, MAddr and the
// burst fields) of the master whose grant bit is set; the grant comes from
// the slave's arbiter and is one-hot or zero. With no grant the slave sees
// MCmd=IDLE and all other fields zero. Combinational.
module ocp_addr_mux
  import ocp_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] grant,
  input  ocp_ctrl_t    mctrl [N],
  output ocp_ctrl_t    ctrl_o
);

  always_comb begin
    ctrl_o = '{mcmd: MCMD_IDLE, maddr: '0, mburstlength: '0,
               mburstseq: SEQ_SINGLE, mburstsinglereq: 1'b0};
    for (int i = 0; i < N; i++) begin
      if (grant[i]) ctrl_o = mctrl[i];
    end
  end

endmodule
