// ocp_err_slave -- error responder of the address decoder.
//
// A request whose address the decoder finds illegal reaches this responder
// instead of a slave. It accepts the request and answers it with SResp=ERR:
//   write: SCmdAccept=1 with SResp=ERR in the cycle after the request;
//   read : SCmdAccept=1 with SResp=NULL, then SResp=ERR one cycle later.
// A write's data is dropped. The read's split answer takes the master through
// its WAIT state. The exact timing is this design's choice; the decoder is
// only required to respond with an error. `ce` is a synchronous clock
// enable, reset is active-low and synchronous.
module ocp_err_slave
  import ocp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ce,
  input  ocp_req_t req,
  output ocp_rsp_t rsp
);

  typedef enum logic [1:0] {S_IDLE, S_ACC_WR, S_ACC_RD, S_RESP} state_e;

  state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_IDLE;
    else if (ce) begin
      unique case (state)
        S_IDLE:
          if (req.ctrl.mcmd == MCMD_WR)      state <= S_ACC_WR;
          else if (req.ctrl.mcmd == MCMD_RD) state <= S_ACC_RD;
        S_ACC_WR: state <= S_IDLE;
        S_ACC_RD: state <= S_RESP;
        default:  state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rsp.scmdaccept = (state == S_ACC_WR) || (state == S_ACC_RD);
    rsp.sresp      = ((state == S_ACC_WR) || (state == S_RESP)) ? SRESP_ERR : SRESP_NULL;
    rsp.sdataaccept = 1'b0;
    rsp.sdata      = '0;
  end

endmodule
