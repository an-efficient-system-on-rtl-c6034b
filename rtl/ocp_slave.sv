// ocp_slave -- FSM-S, an OCP memory slave with its internal store.
//
// The basic states follow the slave state diagram: IDLE, WRITE and READ.
//   IDLE : SCmdAccept=0, SResp=NULL. MCmd=WR -> WRITE, MCmd=RD -> READ; the
//          request (address, data, burst fields) is captured on the way.
//   WRITE: SCmdAccept=1, SResp=NULL; the captured data is stored on the way
//          out.
//   READ : SCmdAccept=1, SResp=DVA and SData = the stored word.
// A single transfer, and every beat of a multi-request burst, therefore takes
// two cycles, and the read response comes with the accept.
//
// A single-request burst (MBurstSingleReq=1, MBurstLength=n) is served by
// two further states, in which the slave generates the addresses itself
// (step 1 for MBurstSeq=INCR, 2 for the alternate sequence):
//   BURST_RD: after the READ beat, one DVA word per cycle for n-1 cycles.
//   BURST_WR: after the WRITE beat, stores one word per MDataValid and
//             answers it with SDataAccept in the same cycle, n-1 times.
// A single-request burst of n beats thus takes n+1 cycles instead of 2n.
//
// The store holds 2**MEM_AW words of DATA_W bits, addressed by the low MEM_AW
// bits of MAddr; its depth is this design's choice (the decoder gives each
// slave a larger address window and flags the unused part as illegal). The
// store is not reset. `ce` is a synchronous clock enable, reset is active-low
// and synchronous.
module ocp_slave
  import ocp_pkg::*;
#(
  parameter int unsigned MEM_AW = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ce,
  input  ocp_req_t req,
  output ocp_rsp_t rsp
);

  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_READ, S_BURST_WR, S_BURST_RD} state_e;

  state_e             state;
  logic [MEM_AW-1:0]  addr_q;
  logic [MEM_AW-1:0]  next_addr;
  logic [DATA_W-1:0]  wdata_q;
  logic [DATA_W-1:0]  rdata_q;
  seq_e               seq_q;
  logic [BLEN_W-1:0]  left_q;     // beats still to come after the current one
  logic [DATA_W-1:0]  store [2**MEM_AW];

  assign next_addr = addr_q + ((seq_q == SEQ_ALT) ? MEM_AW'(2) : MEM_AW'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      addr_q  <= '0;
      wdata_q <= '0;
      rdata_q <= '0;
      seq_q   <= SEQ_SINGLE;
      left_q  <= '0;
    end else if (ce) begin
      unique case (state)
        S_IDLE: begin
          addr_q  <= req.ctrl.maddr[MEM_AW-1:0];
          wdata_q <= req.wd.mdata;
          seq_q   <= req.ctrl.mburstseq;
          left_q  <= (req.ctrl.mburstsinglereq && req.ctrl.mburstlength != '0)
                     ? req.ctrl.mburstlength - 1'b1 : '0;
          if (req.ctrl.mcmd == MCMD_WR) state <= S_WRITE;
          else if (req.ctrl.mcmd == MCMD_RD) begin
            rdata_q <= store[req.ctrl.maddr[MEM_AW-1:0]];
            state   <= S_READ;
          end
        end
        S_WRITE: begin
          if (left_q != '0) begin
            addr_q <= next_addr;
            state  <= S_BURST_WR;
          end else state <= S_IDLE;
        end
        S_BURST_WR: begin
          if (req.wd.mdatavalid) begin
            addr_q <= next_addr;
            left_q <= left_q - 1'b1;
            if (left_q == BLEN_W'(1)) state <= S_IDLE;
          end
        end
        S_READ: begin
          if (left_q != '0) begin
            addr_q  <= next_addr;
            rdata_q <= store[next_addr];
            state   <= S_BURST_RD;
          end else state <= S_IDLE;
        end
        S_BURST_RD: begin
          left_q <= left_q - 1'b1;
          if (left_q == BLEN_W'(1)) state <= S_IDLE;
          else begin
            addr_q  <= next_addr;
            rdata_q <= store[next_addr];
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // store writes: the WRITE beat on its way out, burst words as they come
  always_ff @(posedge clk) begin
    if (rst_n && ce) begin
      if (state == S_WRITE)
        store[addr_q] <= wdata_q;
      else if (state == S_BURST_WR && req.wd.mdatavalid)
        store[addr_q] <= req.wd.mdata;
    end
  end

  always_comb begin
    rsp.scmdaccept  = (state == S_WRITE) || (state == S_READ);
    rsp.sdataaccept = (state == S_BURST_WR) && req.wd.mdatavalid;
    rsp.sresp       = ((state == S_READ) || (state == S_BURST_RD)) ? SRESP_DVA : SRESP_NULL;
    rsp.sdata       = ((state == S_READ) || (state == S_BURST_RD)) ? rdata_q : '0;
  end

endmodule
