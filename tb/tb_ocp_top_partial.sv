// tb_ocp_top_partial -- the bus built as a partial crossbar.
// Master 0 has no path to slave 3 and master 2 none to slave 1 (CONNECT bits
// 3 and 9 cleared). Every master writes one word to every slave and reads it
// back: where the path exists the word must come back without error, where
// it does not the write and the read must both end with `error` and the
// word in the store must keep its old value.
module tb_ocp_top_partial;
  import ocp_pkg::*;
  localparam int NM = 4, NS = 4;
  localparam logic [15:0] CONN = 16'hFFFF & ~16'h0208;

  int checks = 0, failures = 0;
  logic                      Clk = 0, rst_n = 0, EnableClk = 1;
  logic [ADDR_W-1:0]         addr;
  logic [2:0]                Control;
  logic [DATA_W-1:0]         data_in;
  logic [NM-1:0][SIZE_W-1:0] size;
  logic [NM-1:0]             enable;
  logic [NM-1:0][DATA_W-1:0] data_out;
  logic [NM-1:0]             data_valid, data_take, busy, error;

  ocp_top #(.CONNECT(CONN)) dut (.*);

  always #5 Clk = ~Clk;

  initial begin
    repeat (20000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmd(int m, ctrl_e c, logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d);
    int t = 0;
    @(negedge Clk);
    enable = '0; enable[m] = 1'b1; Control = c; addr = a; data_in = d;
    @(negedge Clk);
    enable = '0; Control = CTRL_IDLE;
    while (busy[m] && t < 100) begin @(negedge Clk); t++; end
  endtask

  initial begin
    enable = 0; Control = 0; addr = 0; data_in = 0; size = '0;
    repeat (3) @(posedge Clk);
    rst_n <= 1;
    // known contents at the probed words, written through master 1 (full paths)
    for (int s = 0; s < NS; s++)
      for (int m = 0; m < NM; m++)
        cmd(1, CTRL_WR, ADDR_W'((s << 11) | m), 8'hEE);
    for (int m = 0; m < NM; m++)
      for (int s = 0; s < NS; s++) begin
        logic [ADDR_W-1:0] a;
        logic [DATA_W-1:0] d;
        bit path;
        a = ADDR_W'((s << 11) | m);
        d = DATA_W'(8'h10 * m + s + 1);
        path = CONN[m * NS + s];
        cmd(m, CTRL_WR, a, d);
        checks++;
        if (error[m] !== !path) begin failures++; $display("m%0d s%0d write error %b", m, s, error[m]); end
        cmd(m, CTRL_RD, a, 8'h00);
        checks++;
        if (error[m] !== !path) begin failures++; $display("m%0d s%0d read error %b", m, s, error[m]); end
        checks++;
        if (path && data_out[m] !== d) begin failures++; $display("m%0d s%0d read %h want %h", m, s, data_out[m], d); end
      end
    // read every probed word back through master 1
    for (int s = 0; s < NS; s++)
      for (int m = 0; m < NM; m++) begin
        logic [DATA_W-1:0] e;
        e = CONN[m * NS + s] ? DATA_W'(8'h10 * m + s + 1) : 8'hEE;
        cmd(1, CTRL_RD, ADDR_W'((s << 11) | m), 8'h00);
        checks++;
        if (error[1] || data_out[1] !== e) begin
          failures++; $display("slave %0d word %0d = %h want %h", s, m, data_out[1], e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
