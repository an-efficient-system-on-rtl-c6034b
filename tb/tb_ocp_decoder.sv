// tb_ocp_decoder -- self-checking test of the address decoder.
// Sweeps every 13-bit address for a full and a partial connection mask and
// compares SSEL/illegal with a reference computed from the address fields
// (slave = addr[12:11], addr[10:8] must be zero, path must exist).
module tb_ocp_decoder;
  import ocp_pkg::*;
  int checks = 0, failures = 0;
  logic [ADDR_W-1:0] a;
  logic [3:0] ssel_f, ssel_p;
  logic       ill_f, ill_p;

  ocp_decoder #(.N_SLAVES(4), .MEM_AW(8))                     dut_f (.maddr(a), .ssel(ssel_f), .illegal(ill_f));
  ocp_decoder #(.N_SLAVES(4), .MEM_AW(8), .CONNECT(4'b0101))  dut_p (.maddr(a), .ssel(ssel_p), .illegal(ill_p));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**ADDR_W; v++) begin
      int s; bit hole; logic [3:0] exp_f, exp_p;
      a = ADDR_W'(v);
      #1;
      s    = v >> 11;
      hole = ((v >> 8) & 3'h7) != 0;
      exp_f = hole ? 4'b0 : 4'(1 << s);
      exp_p = (hole || (s % 2 == 1)) ? 4'b0 : 4'(1 << s);
      checks++;
      if (ssel_f !== exp_f || ill_f !== (exp_f == 0)) begin
        failures++;
        if (failures < 10) $display("full: addr %h ssel %b/%b ill %b", a, ssel_f, exp_f, ill_f);
      end
      checks++;
      if (ssel_p !== exp_p || ill_p !== (exp_p == 0)) begin
        failures++;
        if (failures < 10) $display("partial: addr %h ssel %b/%b ill %b", a, ssel_p, exp_p, ill_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
