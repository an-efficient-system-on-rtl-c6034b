// ocp_master -- FSM-M, the OCP master of one IP port.
//
// The system hands the master a command on Control/addr/data_in/size while
// `en` is high and the master is idle. The master turns it into OCP requests:
// MCmd, MAddr, MData and the burst fields are held until SCmdAccept.
//
// States follow the master state diagram: IDLE, WRITE, READ and WAIT.
//   IDLE  -> WRITE on a write command, -> READ on a read command.
//   WRITE stays while SCmdAccept=0; on SCmdAccept=1 the beat is done.
//   READ  stays while SCmdAccept=0; SCmdAccept=1 with SResp!=DVA -> WAIT.
//   WAIT  holds MCmd idle and waits for SResp; SData is latched on DVA.
// This design adds: a READ beat that gets SCmdAccept=1 together with DVA
// completes at once (the memory slaves answer in the accept cycle); WAIT also
// ends on ERR/FAIL, which aborts the command and raises `error`; and a WDATA
// state for the data phase of a single-request write burst.
//
// Burst and alternate ("out-of-order") commands have size+1 beats (size =
// 0..7, so 1..8). The beat count encoding (size+1) is this design's choice.
// The burst type is a property of the IP core, set by SINGLE_REQ:
//   SINGLE_REQ=0, multi-request burst: every beat is a request of its own; a
//     beat counter `count` generates the address, base+count for bursts and
//     base+2*count for alternate commands.
//   SINGLE_REQ=1, single-request burst: one request carries the start
//     address, MBurstLength and MBurstSeq and the slave generates the rest.
//     A read then collects one DVA word per cycle in WAIT; a write hands its
//     further words over in WDATA with MDataValid/SDataAccept.
// While more beats follow, `mlock` is high so the slave's arbiter keeps the
// grant (a lock transaction); in WAIT and WDATA `mhold` keeps the master's
// request to that arbiter alive although MCmd is idle.
//
// Write data: data_in is sampled at the command edge and whenever a write
// beat that is followed by another one is accepted; `data_take` is high in
// the cycle whose clock edge samples data_in. Read data appears on data_out
// with a one-cycle `data_valid` pulse per beat. `ce` is a synchronous clock
// enable; reset is active-low and synchronous.
module ocp_master
  import ocp_pkg::*;
#(
  parameter bit SINGLE_REQ = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  // system side
  input  logic              en,
  input  logic [2:0]        control,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data_in,
  input  logic [SIZE_W-1:0] size,
  output logic [DATA_W-1:0] data_out,
  output logic              data_valid,
  output logic              data_take,
  output logic              busy,
  output logic              error,
  // OCP side
  output ocp_req_t          req,
  output logic              mlock,
  output logic              mhold,
  input  ocp_rsp_t          rsp
);

  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_READ, S_WAIT, S_WDATA} state_e;

  state_e              state;
  seq_e                seq;
  logic [ADDR_W-1:0]   base;
  logic [SIZE_W-1:0]   count;
  logic [SIZE_W-1:0]   last;
  logic [DATA_W-1:0]   wdata;
  logic [ADDR_W-1:0]   cur_addr;
  logic                last_beat;
  logic                start_wr;
  logic                single;     // this command is a single-request burst

  ctrl_e ctrl;
  assign ctrl = ctrl_e'(control);

  assign cur_addr  = (seq == SEQ_ALT) ? base + ADDR_W'({count, 1'b0}) : base + ADDR_W'(count);
  assign last_beat = (count == last);
  assign start_wr  = (ctrl == CTRL_WR) || (ctrl == CTRL_BURST_WR) || (ctrl == CTRL_OOO_WR);
  assign single    = SINGLE_REQ && (seq != SEQ_SINGLE);

  always_comb begin
    req.ctrl.mcmd            = MCMD_IDLE;
    req.ctrl.maddr           = cur_addr;
    req.ctrl.mburstlength    = BLEN_W'(last) + 1'b1;
    req.ctrl.mburstseq       = seq;
    req.ctrl.mburstsinglereq = single;
    req.wd.mdata             = wdata;
    req.wd.mdatavalid        = (state == S_WDATA);
    unique case (state)
      S_WRITE: req.ctrl.mcmd = MCMD_WR;
      S_READ:  req.ctrl.mcmd = MCMD_RD;
      default: req.ctrl.mcmd = MCMD_IDLE;
    endcase
  end

  assign mhold = (state == S_WAIT) || (state == S_WDATA);
  assign mlock = (((state == S_WRITE) || (state == S_READ)) && !last_beat) || mhold;
  assign busy  = (state != S_IDLE);

  always_comb begin
    data_take = 1'b0;
    if (ce) begin
      if (state == S_IDLE && en && start_wr)
        data_take = 1'b1;
      else if (state == S_WRITE && rsp.scmdaccept && rsp.sresp != SRESP_ERR && !last_beat)
        data_take = 1'b1;
      else if (state == S_WDATA && rsp.sdataaccept && !last_beat)
        data_take = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      seq        <= SEQ_SINGLE;
      base       <= '0;
      count      <= '0;
      last       <= '0;
      wdata      <= '0;
      data_out   <= '0;
      data_valid <= 1'b0;
      error      <= 1'b0;
    end else if (ce) begin
      data_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          count <= '0;
          if (en && ctrl != CTRL_IDLE && ctrl != CTRL_RSVD) begin
            base  <= addr;
            error <= 1'b0;
            wdata <= data_in;
            unique case (ctrl)
              CTRL_BURST_WR, CTRL_BURST_RD: begin seq <= SEQ_INCR;   last <= size; end
              CTRL_OOO_WR,   CTRL_OOO_RD:   begin seq <= SEQ_ALT;    last <= size; end
              default:                      begin seq <= SEQ_SINGLE; last <= '0;   end
            endcase
            state <= start_wr ? S_WRITE : S_READ;
          end
        end
        S_WRITE: begin
          if (rsp.scmdaccept) begin
            if (rsp.sresp == SRESP_ERR) begin
              error <= 1'b1;
              state <= S_IDLE;
            end else if (last_beat) begin
              state <= S_IDLE;
            end else begin
              count <= count + 1'b1;
              wdata <= data_in;
              if (single) state <= S_WDATA;
            end
          end
        end
        S_WDATA: begin
          if (rsp.sdataaccept) begin
            if (last_beat) state <= S_IDLE;
            else begin
              count <= count + 1'b1;
              wdata <= data_in;
            end
          end
        end
        S_READ: begin
          if (rsp.scmdaccept) begin
            if (rsp.sresp == SRESP_DVA) begin
              data_out   <= rsp.sdata;
              data_valid <= 1'b1;
              if (last_beat) state <= S_IDLE;
              else begin
                count <= count + 1'b1;
                if (single) state <= S_WAIT;
              end
            end else begin
              state <= S_WAIT;
            end
          end
        end
        S_WAIT: begin
          if (rsp.sresp == SRESP_DVA) begin
            data_out   <= rsp.sdata;
            data_valid <= 1'b1;
            if (last_beat) state <= S_IDLE;
            else begin
              count <= count + 1'b1;
              if (!single) state <= S_READ;
            end
          end else if (rsp.sresp != SRESP_NULL) begin
            error <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
