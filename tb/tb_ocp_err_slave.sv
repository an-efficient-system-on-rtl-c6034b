// tb_ocp_err_slave -- self-checking test of the decoder's error responder.
// A write must be answered one cycle later with SCmdAccept=1 and SResp=ERR;
// a read with SCmdAccept=1/SResp=NULL one cycle later and SResp=ERR the
// cycle after. Idle cycles must give no accept and SResp=NULL.
module tb_ocp_err_slave;
  import ocp_pkg::*;
  int checks = 0, failures = 0;
  logic     clk = 0, rst_n = 0;
  ocp_req_t req;
  ocp_rsp_t rsp;

  ocp_err_slave dut (.clk, .rst_n, .ce(1'b1), .req, .rsp);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rsp(logic acc, sresp_e r, string what);
    checks++;
    if (rsp.scmdaccept !== acc || rsp.sresp !== r || rsp.sdataaccept !== 1'b0) begin
      failures++;
      $display("%s: accept %b sresp %s, want %b %s", what, rsp.scmdaccept, rsp.sresp.name(), acc, r.name());
    end
  endtask

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      expect_rsp(1'b0, SRESP_NULL, "idle");
      if (t % 2 == 0) begin
        req = '0; req.ctrl.mcmd = MCMD_WR; req.ctrl.maddr = 13'h0700; req.wd.mdata = 8'h5a;
        @(negedge clk);
        expect_rsp(1'b1, SRESP_ERR, "write accept");
        req.ctrl.mcmd = MCMD_IDLE;
      end else begin
        req = '0; req.ctrl.mcmd = MCMD_RD; req.ctrl.maddr = 13'h0300;
        @(negedge clk);
        expect_rsp(1'b1, SRESP_NULL, "read accept");
        req.ctrl.mcmd = MCMD_IDLE;
        @(negedge clk);
        expect_rsp(1'b0, SRESP_ERR, "read response");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
