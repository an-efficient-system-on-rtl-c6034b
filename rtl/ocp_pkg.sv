// ocp_pkg -- shared types and encodings of the OCP crossbar bus.
//
// The bus carries OCP (Open Core Protocol) signals between masters and
// slaves: MCmd, MAddr, MData and the burst fields MBurstLength, MBurstSeq,
// MBurstSingleReq (plus MDataValid for the data phase of a single-request
// write burst) from a master; SCmdAccept, SDataAccept, SResp and SData from a
// slave. Address and data widths are 13 and 8 bits, as in the top-level port
// list of the design. MCmd and SResp use the standard OCP encodings
// (IDLE=000, WR=001, RD=010; NULL=00, DVA=01, FAIL=10, ERR=11).
//
// The 3-bit Control command the system gives a master has six commands. Idle,
// simple write and simple read are 000, 001 and 010 as the design defines them;
// the codes of burst write/read (011/100) and alternate-address ("out-of-order")
// write/read (101/110) are this implementation's choice. 111 is ignored.
package ocp_pkg;

  localparam int unsigned ADDR_W = 13;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned SIZE_W = 3;

  // OCP master command
  typedef enum logic [2:0] {
    MCMD_IDLE = 3'b000,
    MCMD_WR   = 3'b001,
    MCMD_RD   = 3'b010
  } mcmd_e;

  // OCP slave response
  typedef enum logic [1:0] {
    SRESP_NULL = 2'b00,
    SRESP_DVA  = 2'b01,
    SRESP_FAIL = 2'b10,
    SRESP_ERR  = 2'b11
  } sresp_e;

  // System command to a master (the Control input)
  typedef enum logic [2:0] {
    CTRL_IDLE     = 3'b000,
    CTRL_WR       = 3'b001,
    CTRL_RD       = 3'b010,
    CTRL_BURST_WR = 3'b011,
    CTRL_BURST_RD = 3'b100,
    CTRL_OOO_WR   = 3'b101,
    CTRL_OOO_RD   = 3'b110,
    CTRL_RSVD     = 3'b111
  } ctrl_e;

  // Address sequence of a multi-beat command
  typedef enum logic [1:0] {
    SEQ_SINGLE = 2'b00,  // one transfer
    SEQ_INCR   = 2'b01,  // burst: addr, addr+1, addr+2, ...
    SEQ_ALT    = 2'b10   // out-of-order: addr, addr+2, addr+4, ... (alternate locations)
  } seq_e;

  // Burst length field: number of transfers, 1..2**SIZE_W
  localparam int unsigned BLEN_W = SIZE_W + 1;

  // Address and control part of a request, master -> slave (request phase).
  // For a multi-request burst every request carries the burst fields; for a
  // single-request burst (mburstsinglereq=1) only the first one is sent.
  typedef struct packed {
    mcmd_e              mcmd;
    logic [ADDR_W-1:0]  maddr;
    logic [BLEN_W-1:0]  mburstlength;
    seq_e               mburstseq;
    logic               mburstsinglereq;
  } ocp_ctrl_t;

  // Write data part of a request, master -> slave. MData travels with the
  // request; the further words of a single-request write burst are handed
  // over in a data phase of their own (mdatavalid / sdataaccept).
  typedef struct packed {
    logic [DATA_W-1:0]  mdata;
    logic               mdatavalid;
  } ocp_wdat_t;

  typedef struct packed {
    ocp_ctrl_t          ctrl;
    ocp_wdat_t          wd;
  } ocp_req_t;

  // Response bundle, slave -> master
  typedef struct packed {
    logic               scmdaccept;
    logic               sdataaccept;
    sresp_e             sresp;
    logic [DATA_W-1:0]  sdata;
  } ocp_rsp_t;

endpackage
