// tb_ocp_slave -- self-checking test of FSM-S and its store.
// Acts as a master and checks against a reference copy of the store:
//  - single transfers (and multi-request burst beats, which carry burst
//    fields with MBurstSingleReq=0): the accept comes exactly one cycle after
//    the request (two-cycle transfer), writes answer SResp=NULL, reads answer
//    SResp=DVA with the stored word in the accept cycle;
//  - single-request read bursts: after the accepted first word, one DVA word
//    per cycle from the addresses the slave generates (step 1 or 2), then
//    nothing more;
//  - single-request write bursts: after the accepted first word, every
//    MDataValid cycle is answered with SDataAccept and stored at the next
//    generated address; cycles without MDataValid are not accepted;
//  - idle cycles give no accept and SResp=NULL.
module tb_ocp_slave;
  import ocp_pkg::*;
  localparam int MEM_AW = 8;
  int checks = 0, failures = 0;
  int n_srb = 0, n_swb = 0;
  logic     clk = 0, rst_n = 0;
  ocp_req_t req;
  ocp_rsp_t rsp;
  logic [DATA_W-1:0] model [2**MEM_AW];

  ocp_slave #(.MEM_AW(MEM_AW)) dut (.clk, .rst_n, .ce(1'b1), .req, .rsp);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  task automatic set_idle();
    req.ctrl.mcmd = MCMD_IDLE;
    req.wd.mdatavalid = 1'b0;
  endtask

  // one request; n > 1 with sreq=1 makes it a single-request burst
  task automatic xfer(mcmd_e cmd, logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d,
                      int n = 1, bit sreq = 0, seq_e seq = SEQ_INCR);
    int wait_cycles = 0;
    int stride;
    stride = (seq == SEQ_ALT) ? 2 : 1;
    @(negedge clk);
    checks++;
    if (rsp.scmdaccept !== 1'b0 || rsp.sresp !== SRESP_NULL) fail("accept/response while idle");
    req.ctrl = '{mcmd: cmd, maddr: a, mburstlength: BLEN_W'(n), mburstseq: seq, mburstsinglereq: sreq};
    req.wd   = '{mdata: d, mdatavalid: 1'b0};
    do begin
      @(negedge clk);
      wait_cycles++;
    end while (!rsp.scmdaccept && wait_cycles < 10);
    checks++;
    if (wait_cycles != 1) fail($sformatf("accept after %0d cycles", wait_cycles));
    checks++;
    if (cmd == MCMD_WR) begin
      if (rsp.sresp !== SRESP_NULL) fail($sformatf("write sresp %s", rsp.sresp.name()));
      model[a[MEM_AW-1:0]] = d;
    end else begin
      if (rsp.sresp !== SRESP_DVA || rsp.sdata !== model[a[MEM_AW-1:0]])
        fail($sformatf("read %h: %s %h want DVA %h", a, rsp.sresp.name(), rsp.sdata, model[a[MEM_AW-1:0]]));
    end
    set_idle();
    if (sreq && n > 1) begin
      if (cmd == MCMD_RD) n_srb++; else n_swb++;
      for (int k = 1; k < n; k++) begin
        logic [MEM_AW-1:0] ak;
        ak = MEM_AW'(a + ADDR_W'(k * stride));
        if (cmd == MCMD_WR) begin
          logic [DATA_W-1:0] dk;
          @(negedge clk);
          req.wd.mdatavalid = 1'b0;
          // a random pause in the data phase must not be accepted
          while ($urandom % 3 == 0) begin
            #1;
            checks++;
            if (rsp.sdataaccept) fail("SDataAccept without MDataValid");
            @(negedge clk);
          end
          dk = DATA_W'($urandom);
          req.wd = '{mdata: dk, mdatavalid: 1'b1};
          #1;
          checks++;
          if (!rsp.sdataaccept) fail($sformatf("write burst word %0d not accepted", k));
          model[ak] = dk;
          if (k == n - 1) begin
            @(negedge clk);
            req.wd.mdatavalid = 1'b0;
          end
        end else begin
          @(negedge clk);
          checks++;
          if (rsp.scmdaccept || rsp.sresp !== SRESP_DVA || rsp.sdata !== model[ak])
            fail($sformatf("read burst word %0d: %s %h want DVA %h", k, rsp.sresp.name(), rsp.sdata, model[ak]));
        end
      end
    end
  endtask

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // fill the store so every read has a known value
    for (int a = 0; a < 2**MEM_AW; a++) xfer(MCMD_WR, ADDR_W'(a), DATA_W'($urandom));
    for (int t = 0; t < 3000; t++) begin
      logic [ADDR_W-1:0] a;
      int   n;
      bit   sreq;
      seq_e seq;
      a    = ADDR_W'($urandom);
      n    = 1 + $urandom % 8;
      sreq = ($urandom % 2) == 1;
      seq  = ($urandom % 2) ? SEQ_ALT : SEQ_INCR;
      if ($urandom % 2) xfer(MCMD_WR, a, DATA_W'($urandom), n, sreq, seq);
      else              xfer(MCMD_RD, a, '0, n, sreq, seq);
      if ($urandom % 3 == 0) @(negedge clk);
    end
    // the store must hold exactly the reference contents
    for (int a = 0; a < 2**MEM_AW; a++) xfer(MCMD_RD, ADDR_W'(a), '0);
    $display("single-request read bursts %0d, write bursts %0d", n_srb, n_swb);
    checks++;
    if (n_srb == 0 || n_swb == 0) fail("no single-request bursts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
