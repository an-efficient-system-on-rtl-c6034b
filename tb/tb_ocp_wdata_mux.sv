// tb_ocp_wdata_mux -- self-checking test of the write data mux.
// Drives distinct MData/MDataValid per master and checks that each one-hot
// grant forwards that master's data and that no grant forwards zero.
module tb_ocp_wdata_mux;
  import ocp_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] grant;
  ocp_wdat_t  mwd [4];
  ocp_wdat_t  wd_o;

  ocp_wdata_mux #(.N(4)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 4; i++) mwd[i] = '{mdata: DATA_W'($urandom), mdatavalid: 1'($urandom)};
      grant = 4'b0;
      #1;
      checks++;
      if (wd_o !== '0) failures++;
      for (int i = 0; i < 4; i++) begin
        grant = 4'(1 << i);
        #1;
        checks++;
        if (wd_o !== mwd[i]) begin
          failures++;
          $display("grant %b: got %h want %h", grant, wd_o, mwd[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
