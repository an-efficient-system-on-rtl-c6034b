// tb_ocp_rdata_mux -- self-checking test of the read data (response) mux.
// Checks that the selected slave's SCmdAccept/SDataAccept/SResp/SData reach
// the master,
// that err_sel returns the error responder's answer instead, and that with
// nothing selected the master sees no accept and SResp=NULL.
module tb_ocp_rdata_mux;
  import ocp_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] sel;
  logic       err_sel;
  ocp_rsp_t   srsp [4];
  ocp_rsp_t   err_rsp;
  ocp_rsp_t   rsp;

  ocp_rdata_mux #(.N_SLAVES(4)) dut (.*);

  function automatic ocp_rsp_t rnd_rsp();
    ocp_rsp_t r;
    r.scmdaccept  = 1'b1;
    r.sdataaccept = 1'($urandom);
    r.sresp      = sresp_e'($urandom % 4);
    r.sdata      = DATA_W'($urandom);
    return r;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int j = 0; j < 4; j++) srsp[j] = rnd_rsp();
      err_rsp = rnd_rsp();
      sel = '0; err_sel = 1'b0;
      #1;
      checks++;
      if (rsp !== '0) failures++;
      for (int j = 0; j < 4; j++) begin
        sel = 4'(1 << j);
        #1;
        checks++;
        if (rsp !== srsp[j]) begin
          failures++;
          $display("sel %b: got %h want %h", sel, rsp, srsp[j]);
        end
      end
      err_sel = 1'b1;
      #1;
      checks++;
      if (rsp !== err_rsp) begin
        failures++;
        $display("err_sel: got %h want %h", rsp, err_rsp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
