// tb_ocp_addr_mux -- self-checking test of the address/control mux.
// Drives distinct address/control fields (MCmd, MAddr, burst fields) per
// master and checks that each one-hot grant forwards that master's fields
// and that no grant forwards MCmd=IDLE with zero fields.
module tb_ocp_addr_mux;
  import ocp_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] grant;
  ocp_ctrl_t  mctrl [4];
  ocp_ctrl_t  ctrl_o;

  ocp_addr_mux #(.N(4)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 4; i++) begin
        mctrl[i].mcmd            = ($urandom % 2) ? MCMD_WR : MCMD_RD;
        mctrl[i].maddr           = ADDR_W'($urandom);
        mctrl[i].mburstlength    = BLEN_W'($urandom);
        mctrl[i].mburstseq       = ($urandom % 2) ? SEQ_ALT : SEQ_INCR;
        mctrl[i].mburstsinglereq = 1'($urandom);
      end
      grant = 4'b0;
      #1;
      checks++;
      if (ctrl_o.mcmd !== MCMD_IDLE || ctrl_o.maddr !== '0 || ctrl_o.mburstsinglereq !== 1'b0) failures++;
      for (int i = 0; i < 4; i++) begin
        grant = 4'(1 << i);
        #1;
        checks++;
        if (ctrl_o !== mctrl[i]) begin
          failures++;
          $display("grant %b: got %h want %h", grant, ctrl_o, mctrl[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
