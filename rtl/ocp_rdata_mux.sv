// ocp_rdata_mux -- read data (response) multiplexer in front of one master.
//
// Returns SCmdAccept, SDataAccept, SResp and SData to the master from the slave it is
// connected to: sel[j] is high when the master's decoder selects slave j and
// that slave's arbiter grants the master. When err_sel is high (the decoder
// found the address illegal) the error responder's answer is returned
// instead. With nothing selected the master sees no accept, SResp=NULL and
// zero data. Combinational.
module ocp_rdata_mux
  import ocp_pkg::*;
#(
  parameter int unsigned N_SLAVES = 4
) (
  input  logic [N_SLAVES-1:0] sel,
  input  logic                err_sel,
  input  ocp_rsp_t            srsp [N_SLAVES],
  input  ocp_rsp_t            err_rsp,
  output ocp_rsp_t            rsp
);

  always_comb begin
    rsp = '{scmdaccept: 1'b0, sdataaccept: 1'b0, sresp: SRESP_NULL, sdata: '0};
    if (err_sel) rsp = err_rsp;
    else begin
      for (int j = 0; j < N_SLAVES; j++) begin
        if (sel[j]) rsp = srsp[j];
      end
    end
  end

endmodule
