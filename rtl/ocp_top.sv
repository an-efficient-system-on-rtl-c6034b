// ocp_top -- OCP crossbar bus with four masters and four memory slaves.
//
// Every master (FSM-M) turns a system command into OCP requests. A decoder per
// master maps the request address to a slave, or flags it illegal. Every slave
// has its own arbiter, address/control mux and write-data mux, so masters that
// target different slaves transfer at the same time (crossbar); masters that
// target the same slave are served one after another, fixed priority, master
// 0 first, with a locked burst keeping its slave until its last beat. A
// read-data mux per master returns the selected slave's SCmdAccept/SResp/SData,
// or the answer of the master's error responder for an illegal address.
// CONNECT removes paths for a partial crossbar: bit m*N_SLAVES+s set means
// master m can reach slave s; a missing path decodes as illegal.
// SINGLE_REQ sets the burst type of each master's IP core: bit m set makes
// master m issue single-request bursts (one request, the slave generates the
// addresses), clear makes it issue multi-request bursts (one request per
// beat). The bus carries both kinds. The default, masters 0-1 multi-request
// and masters 2-3 single-request, is this implementation's choice.
//
// System interface: addr, Control and data_in are shared by all masters;
// enable[m] delivers the command to master m (taken only when it is idle),
// size[m] is its burst size (size+1 beats). data_out[m] holds the last read
// word, marked by a one-cycle data_valid[m]; data_take[m] is high in the cycle
// whose clock edge samples data_in for master m; busy[m] and error[m] give the
// master's state. EnableClk is a synchronous clock enable for the whole bus.
// The port names Clk, EnableClk, addr, Control, data_in, size, enable and
// data_out follow the design's top-level port list (size1..size4 become
// size[0..3], and so on); rst_n (active-low, synchronous) and the status
// outputs are additions of this implementation.
//
// Address map (this design's choice): addr[12:11] selects the slave,
// addr[MEM_AW-1:0] the word in its store, addr[10:MEM_AW] must be zero.
// A single transfer takes two cycles at the slave, so a multi-request burst of
// n beats occupies its slave for 2n cycles, a single-request one n+1 cycles.
module ocp_top
  import ocp_pkg::*;
#(
  parameter int unsigned                       N_MASTERS = 4,
  parameter int unsigned                       N_SLAVES  = 4,
  parameter int unsigned                       MEM_AW    = 8,
  parameter logic [N_MASTERS*N_SLAVES-1:0]     CONNECT   = '1,
  parameter logic [N_MASTERS-1:0]              SINGLE_REQ = N_MASTERS'(4'b1100)
) (
  input  logic                                 Clk,
  input  logic                                 rst_n,
  input  logic                                 EnableClk,
  input  logic [ADDR_W-1:0]                    addr,
  input  logic [2:0]                           Control,
  input  logic [DATA_W-1:0]                    data_in,
  input  logic [N_MASTERS-1:0][SIZE_W-1:0]     size,
  input  logic [N_MASTERS-1:0]                 enable,
  output logic [N_MASTERS-1:0][DATA_W-1:0]     data_out,
  output logic [N_MASTERS-1:0]                 data_valid,
  output logic [N_MASTERS-1:0]                 data_take,
  output logic [N_MASTERS-1:0]                 busy,
  output logic [N_MASTERS-1:0]                 error
);

  ocp_req_t                m_req     [N_MASTERS];
  ocp_rsp_t                m_rsp     [N_MASTERS];
  logic [N_MASTERS-1:0]    m_lock;
  logic [N_SLAVES-1:0]     m_ssel    [N_MASTERS];
  logic [N_MASTERS-1:0]    m_illegal;
  ocp_req_t                e_req     [N_MASTERS];
  ocp_rsp_t                e_rsp     [N_MASTERS];

  logic [N_MASTERS-1:0]    m_hold;
  ocp_ctrl_t               m_ctrl    [N_MASTERS];
  ocp_wdat_t               m_wd      [N_MASTERS];

  logic [N_MASTERS-1:0]    s_mreq    [N_SLAVES];   // MReq per slave, one bit per master
  logic [N_MASTERS-1:0]    s_grant   [N_SLAVES];   // MGrant per slave, one bit per master
  ocp_req_t                s_req     [N_SLAVES];
  ocp_rsp_t                s_rsp     [N_SLAVES];

  // ---------------- masters, decoders, error responders ----------------
  for (genvar m = 0; m < N_MASTERS; m++) begin : g_master
    logic [N_SLAVES-1:0] rsel;

    ocp_master #(.SINGLE_REQ(SINGLE_REQ[m])) u_master (
      .clk        (Clk),
      .rst_n      (rst_n),
      .ce         (EnableClk),
      .en         (enable[m]),
      .control    (Control),
      .addr       (addr),
      .data_in    (data_in),
      .size       (size[m]),
      .data_out   (data_out[m]),
      .data_valid (data_valid[m]),
      .data_take  (data_take[m]),
      .busy       (busy[m]),
      .error      (error[m]),
      .req        (m_req[m]),
      .mlock      (m_lock[m]),
      .mhold      (m_hold[m]),
      .rsp        (m_rsp[m])
    );

    assign m_ctrl[m] = m_req[m].ctrl;
    assign m_wd[m]   = m_req[m].wd;

    ocp_decoder #(
      .N_SLAVES (N_SLAVES),
      .MEM_AW   (MEM_AW),
      .CONNECT  (CONNECT[m*N_SLAVES +: N_SLAVES])
    ) u_decoder (
      .maddr   (m_req[m].ctrl.maddr),
      .ssel    (m_ssel[m]),
      .illegal (m_illegal[m])
    );

    always_comb begin
      e_req[m] = m_req[m];
      if (!m_illegal[m]) e_req[m].ctrl.mcmd = MCMD_IDLE;
    end

    ocp_err_slave u_err (
      .clk   (Clk),
      .rst_n (rst_n),
      .ce    (EnableClk),
      .req   (e_req[m]),
      .rsp   (e_rsp[m])
    );

    for (genvar s = 0; s < N_SLAVES; s++) begin : g_rsel
      assign rsel[s] = m_ssel[m][s] & s_grant[s][m];
    end

    ocp_rdata_mux #(.N_SLAVES(N_SLAVES)) u_rdata_mux (
      .sel     (rsel),
      .err_sel (m_illegal[m]),
      .srsp    (s_rsp),
      .err_rsp (e_rsp[m]),
      .rsp     (m_rsp[m])
    );
  end

  // ---------------- slaves with their arbiter and muxes ----------------
  for (genvar s = 0; s < N_SLAVES; s++) begin : g_slave
    for (genvar m = 0; m < N_MASTERS; m++) begin : g_req
      assign s_mreq[s][m] = ((m_req[m].ctrl.mcmd != MCMD_IDLE) || m_hold[m]) && m_ssel[m][s];
    end

    ocp_arbiter #(.N(N_MASTERS)) u_arbiter (
      .clk       (Clk),
      .rst_n     (rst_n),
      .ce        (EnableClk),
      .req       (s_mreq[s]),
      .lock      (m_lock),
      .xfer_done (s_rsp[s].scmdaccept),
      .grant     (s_grant[s])
    );

    ocp_addr_mux #(.N(N_MASTERS)) u_addr_mux (
      .grant  (s_grant[s]),
      .mctrl  (m_ctrl),
      .ctrl_o (s_req[s].ctrl)
    );

    ocp_wdata_mux #(.N(N_MASTERS)) u_wdata_mux (
      .grant (s_grant[s]),
      .mwd   (m_wd),
      .wd_o  (s_req[s].wd)
    );

    ocp_slave #(.MEM_AW(MEM_AW)) u_slave (
      .clk   (Clk),
      .rst_n (rst_n),
      .ce    (EnableClk),
      .req   (s_req[s]),
      .rsp   (s_rsp[s])
    );
  end

endmodule
