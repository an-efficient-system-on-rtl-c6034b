// tb_ocp_master -- self-checking test of FSM-M issuing multi-request bursts.
// (tb_ocp_master_single runs the same test with SINGLE_REQ=1.)
// A responder in the testbench plays the slave side. It accepts each request
// after a random delay and answers reads either in the accept cycle
// (SResp=DVA) or split (accept with SResp=NULL, DVA some cycles later, which
// takes the master through WAIT). For a single-request burst it generates
// the further addresses itself from MBurstLength/MBurstSeq, returns one DVA
// word per cycle (with random gaps) for a read, and takes the write words of
// the data phase with SDataAccept (with random gaps).
// Random single, burst and alternate-address commands are checked beat by
// beat against independently computed addresses, write data and read data.
// Directed cases check the cycle count with a zero-wait responder (one
// cycle per beat at the master), the lock signal, and ERR responses, which
// must abort the command and set `error`.
module tb_ocp_master;
  import ocp_pkg::*;
  localparam bit SINGLE = 1'b0;
  int checks = 0, failures = 0;
  int n_wait = 0, n_single_req = 0;
  logic              clk = 0, rst_n = 0;
  logic              en;
  logic [2:0]        control;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] data_in, data_out;
  logic [SIZE_W-1:0] size;
  logic              data_valid, data_take, busy, error, mlock, mhold;
  ocp_req_t          req;
  ocp_rsp_t          rsp;

  ocp_master #(.SINGLE_REQ(SINGLE)) dut (
    .clk, .rst_n, .ce(1'b1), .en, .control, .addr, .data_in, .size,
    .data_out, .data_valid, .data_take, .busy, .error, .req, .mlock, .mhold, .rsp);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] rd_val(logic [ADDR_W-1:0] a);
    return a[7:0] ^ 8'hA5 ^ {3'b0, a[12:8]};
  endfunction

  localparam ocp_rsp_t RSP_IDLE = '{scmdaccept: 1'b0, sdataaccept: 1'b0, sresp: SRESP_NULL, sdata: '0};

  // responder configuration
  int  max_delay = 2;
  bit  allow_split = 1;
  bit  err_mode = 0;

  // what the responder saw
  logic [ADDR_W-1:0] seen_addr [$];
  logic [DATA_W-1:0] seen_wdata [$];
  bit                seen_lock [$];
  logic [DATA_W-1:0] got_rdata [$];

  // write data source: data_in always shows the next byte to be taken
  logic [DATA_W-1:0] wsrc [$];
  int                wsrc_idx;
  always @(posedge clk) begin
    if (data_take) wsrc_idx <= wsrc_idx + 1;
    if (data_valid) got_rdata.push_back(data_out);
  end
  assign data_in = (wsrc_idx < wsrc.size()) ? wsrc[wsrc_idx] : 8'h00;

  task automatic gap();
    if (max_delay > 0) repeat ($urandom % 2) begin
      rsp = RSP_IDLE;
      @(negedge clk);
    end
  endtask

  initial begin : responder
    rsp = RSP_IDLE;
    forever begin
      @(negedge clk);
      rsp = RSP_IDLE;
      if (rst_n && req.ctrl.mcmd != MCMD_IDLE) begin
        int d, n, stride;
        logic [ADDR_W-1:0] a;
        bit sreq;
        d = (max_delay > 0) ? $urandom % (max_delay + 1) : 0;
        repeat (d) begin
          @(negedge clk);
          checks++;
          if (req.ctrl.mcmd == MCMD_IDLE) begin failures++; $display("request dropped before accept"); end
        end
        a      = req.ctrl.maddr;
        sreq   = req.ctrl.mburstsinglereq;
        n      = sreq ? int'(req.ctrl.mburstlength) : 1;
        stride = (req.ctrl.mburstseq == SEQ_ALT) ? 2 : 1;
        if (sreq) n_single_req++;
        seen_addr.push_back(a);
        seen_lock.push_back(mlock);
        if (req.ctrl.mcmd == MCMD_WR) begin
          seen_wdata.push_back(req.wd.mdata);
          rsp = '{scmdaccept: 1'b1, sdataaccept: 1'b0, sresp: err_mode ? SRESP_ERR : SRESP_NULL, sdata: '0};
          if (!err_mode) begin
            for (int k = 1; k < n; k++) begin
              @(negedge clk);
              gap();
              checks++;
              if (req.ctrl.mcmd != MCMD_IDLE || !req.wd.mdatavalid || !mhold) begin
                failures++; $display("data phase: MCmd %s MDataValid %b", req.ctrl.mcmd.name(), req.wd.mdatavalid);
              end
              seen_addr.push_back(a + ADDR_W'(k * stride));
              seen_wdata.push_back(req.wd.mdata);
              rsp = '{scmdaccept: 1'b0, sdataaccept: 1'b1, sresp: SRESP_NULL, sdata: '0};
            end
          end
        end else begin
          if (err_mode || (allow_split && $urandom % 2)) begin
            rsp = '{scmdaccept: 1'b1, sdataaccept: 1'b0, sresp: SRESP_NULL, sdata: '0};
            @(negedge clk);
            rsp = RSP_IDLE;
            checks++;
            if (req.ctrl.mcmd != MCMD_IDLE || !mhold) begin failures++; $display("MCmd not idle in WAIT"); end
            n_wait++;
            repeat ($urandom % 3) @(negedge clk);
            rsp = '{scmdaccept: 1'b0, sdataaccept: 1'b0, sresp: err_mode ? SRESP_ERR : SRESP_DVA, sdata: rd_val(a)};
          end else begin
            rsp = '{scmdaccept: 1'b1, sdataaccept: 1'b0, sresp: SRESP_DVA, sdata: rd_val(a)};
          end
          if (!err_mode) begin
            for (int k = 1; k < n; k++) begin
              logic [ADDR_W-1:0] ak;
              @(negedge clk);
              gap();
              ak = a + ADDR_W'(k * stride);
              seen_addr.push_back(ak);
              rsp = '{scmdaccept: 1'b0, sdataaccept: 1'b0, sresp: SRESP_DVA, sdata: rd_val(ak)};
            end
          end
        end
      end
    end
  end

  // issue one command and wait for its end; returns cycles the master was busy
  task automatic run(ctrl_e c, logic [ADDR_W-1:0] a, logic [SIZE_W-1:0] s, output int cycles);
    @(negedge clk);
    en = 1; control = c; addr = a; size = s;
    @(negedge clk);
    en = 0; control = 3'b000;
    cycles = 0;
    while (busy && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
  endtask

  task automatic check_cmd(ctrl_e c, logic [ADDR_W-1:0] a, logic [SIZE_W-1:0] s);
    int beats, stride, cyc;
    bit is_wr;
    beats  = (c == CTRL_WR || c == CTRL_RD) ? 1 : int'(s) + 1;
    stride = (c == CTRL_OOO_WR || c == CTRL_OOO_RD) ? 2 : 1;
    is_wr  = (c == CTRL_WR || c == CTRL_BURST_WR || c == CTRL_OOO_WR);
    seen_addr.delete(); seen_wdata.delete(); seen_lock.delete(); got_rdata.delete();
    wsrc.delete(); wsrc_idx = 0;
    for (int k = 0; k < beats; k++) wsrc.push_back(DATA_W'($urandom));
    run(c, a, s, cyc);
    checks++;
    if (seen_addr.size() != beats) begin
      failures++; $display("%s: %0d beats, want %0d", c.name(), seen_addr.size(), beats);
      return;
    end
    checks++;
    if (seen_lock.size() != (SINGLE ? 1 : beats)) begin
      failures++; $display("%s: %0d requests, want %0d", c.name(), seen_lock.size(), SINGLE ? 1 : beats);
      return;
    end
    for (int k = 0; k < beats; k++) begin
      logic [ADDR_W-1:0] ea;
      ea = a + ADDR_W'(k * stride);
      checks++;
      if (seen_addr[k] !== ea) begin failures++; $display("%s beat %0d addr %h want %h", c.name(), k, seen_addr[k], ea); end
      if (k < seen_lock.size()) begin
        checks++;
        if (seen_lock[k] !== (SINGLE ? beats > 1 : k != beats - 1)) begin failures++; $display("%s beat %0d lock %b", c.name(), k, seen_lock[k]); end
      end
      checks++;
      if (is_wr) begin
        if (seen_wdata[k] !== wsrc[k]) begin failures++; $display("%s beat %0d data %h want %h", c.name(), k, seen_wdata[k], wsrc[k]); end
      end else begin
        if (k >= got_rdata.size() || got_rdata[k] !== rd_val(ea)) begin failures++; $display("%s beat %0d read data wrong", c.name(), k); end
      end
    end
    checks++;
    if (!is_wr && got_rdata.size() != beats) begin failures++; $display("%s: %0d read words", c.name(), got_rdata.size()); end
    checks++;
    if (error) begin failures++; $display("%s: error set", c.name()); end
  endtask

  initial begin
    int cyc;
    en = 0; control = 0; addr = 0; size = 0; wsrc_idx = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // timing with a zero-wait responder: one cycle per beat
    max_delay = 0; allow_split = 0;
    run(CTRL_WR, 13'h0010, 3'd0, cyc);
    checks++; if (cyc != 1) begin failures++; $display("single write busy %0d cycles, want 1", cyc); end
    run(CTRL_BURST_RD, 13'h0020, 3'd7, cyc);
    checks++; if (cyc != 8) begin failures++; $display("8-beat burst read busy %0d cycles, want 8", cyc); end
    run(CTRL_BURST_WR, 13'h0020, 3'd7, cyc);
    checks++; if (cyc != 8) begin failures++; $display("8-beat burst write busy %0d cycles, want 8", cyc); end

    // random commands, random waits, split reads
    max_delay = 2; allow_split = 1;
    for (int t = 0; t < 400; t++) begin
      ctrl_e c;
      c = ctrl_e'(3'd1 + 3'($urandom % 6));
      check_cmd(c, ADDR_W'($urandom), SIZE_W'($urandom));
    end
    checks++;
    if (n_wait == 0) begin failures++; $display("WAIT state never used"); end
    checks++;
    if ((n_single_req != 0) != SINGLE) begin failures++; $display("single-request bursts seen: %0d", n_single_req); end

    // error responses abort the command
    err_mode = 1; max_delay = 0;
    seen_addr.delete();
    run(CTRL_BURST_WR, 13'h0100, 3'd3, cyc);
    checks++; if (!error || seen_addr.size() != 1) begin failures++; $display("write ERR: error %b beats %0d", error, seen_addr.size()); end
    seen_addr.delete();
    run(CTRL_BURST_RD, 13'h0100, 3'd3, cyc);
    checks++; if (!error || seen_addr.size() != 1) begin failures++; $display("read ERR: error %b beats %0d", error, seen_addr.size()); end
    err_mode = 0;
    check_cmd(CTRL_RD, 13'h0042, 3'd0);   // error clears on the next command

    $display("split reads (WAIT): %0d, single-request bursts: %0d", n_wait, n_single_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
