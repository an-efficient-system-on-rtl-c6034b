// tb_ocp_top -- end-to-end test of the OCP crossbar bus at its default size
// (4 masters, 4 slaves, 256-word stores).
//
// Masters 0-1 issue multi-request bursts, masters 2-3 single-request bursts
// (the top's default SINGLE_REQ).
// Directed part: the burst and alternate-address transfers of the reference
// waveforms (four bytes 15, F5, A1, 37 written as a burst at word 0 and as an
// alternate sequence at words 0, 2, 4, 6, then read back), a check of the
// store contents, and cycle counts after the command edge: a solo n-beat
// multi-request burst keeps its master busy 2n cycles, a single-request one
// n+1 cycles.
// Random part: commands of all six kinds are issued to random idle masters,
// so several masters run at once on different or the same slaves. Every
// master works in its own part of each store (word address bits 7:6 equal
// its index), so a reference model of the stores is exact whatever the
// arbitration order; some commands use illegal addresses and must end with
// `error`. Read words are compared as they arrive.
// Only one multi-beat write is in flight at a time, and no other write is
// issued meanwhile, because data_in is shared by all masters.
// Mechanism counters (each must be non-zero): parallel accepts on different
// slaves, arbitration contention, lock holding off a higher-priority master,
// master WAIT state, error responses, burst/alternate commands, the data
// phases of single-request bursts, and an EnableClk pause during which
// nothing advances.
module tb_ocp_top;
  import ocp_pkg::*;
  localparam int NM = 4, NS = 4;

  int checks = 0, failures = 0;
  logic                     Clk = 0, rst_n = 0, EnableClk = 1;
  logic [ADDR_W-1:0]        addr;
  logic [2:0]               Control;
  logic [DATA_W-1:0]        data_in;
  logic [NM-1:0][SIZE_W-1:0] size;
  logic [NM-1:0]            enable;
  logic [NM-1:0][DATA_W-1:0] data_out;
  logic [NM-1:0]            data_valid, data_take, busy, error;

  ocp_top dut (.*);

  always #5 Clk = ~Clk;

  initial begin
    repeat (400000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // ------------------------------------------------------------ reference
  logic [DATA_W-1:0] model [NS][256];
  bit                known [NS][256];
  logic [DATA_W-1:0] exp_rd [NM][$];
  bit                exp_err [NM];
  bit                inflight [NM];

  // ------------------------------------------------------------ write data
  logic [DATA_W-1:0] issue_data;
  bit                issuing;
  logic [DATA_W-1:0] bw_q [$];
  int                bw_idx;
  int                bw_master = -1;
  assign data_in = issuing ? issue_data : ((bw_idx < bw_q.size()) ? bw_q[bw_idx] : 8'h00);

  always @(posedge Clk) begin
    if (!issuing && bw_master >= 0 && data_take[bw_master]) bw_idx <= bw_idx + 1;
  end

  // ------------------------------------------------------------ monitors
  logic arb_owned [NS];
  int   arb_owner [NS];
  for (genvar g = 0; g < NS; g++) begin : g_peek
    assign arb_owned[g] = dut.g_slave[g].u_arbiter.owned;
    assign arb_owner[g] = int'(dut.g_slave[g].u_arbiter.owner);
  end
  int n_parallel = 0, n_contend = 0, n_lockhold = 0, n_wait = 0, n_err = 0;
  int n_burst = 0, n_alt = 0, n_single = 0, n_pause = 0;
  int n_rd_words = 0, n_srb_words = 0, n_swb_words = 0;
  logic [NM-1:0] busy_d = '0;

  always @(posedge Clk) begin
    if (rst_n && EnableClk) begin
      int acc;
      acc = 0;
      for (int s = 0; s < NS; s++) begin
        if (dut.s_rsp[s].scmdaccept) acc++;
        if ($countones(dut.s_mreq[s]) > 1) n_contend++;
        if (dut.s_rsp[s].sdataaccept) n_swb_words++;
        if (dut.s_rsp[s].sresp == SRESP_DVA && !dut.s_rsp[s].scmdaccept) n_srb_words++;
      end
      if (acc > 1) n_parallel++;
      for (int s = 0; s < NS; s++) begin
        if (arb_owned[s]) begin
          int o;
          o = arb_owner[s];
          if (dut.s_mreq[s][o] && o > 0 && (dut.s_mreq[s] & ((4'b1 << o) - 4'b1)) != 0) n_lockhold++;
        end
      end
      for (int m = 0; m < NM; m++) begin
        if (busy[m] && dut.m_req[m].ctrl.mcmd == MCMD_IDLE) n_wait++;
        if (data_valid[m]) begin
          checks++;
          n_rd_words++;
          if (exp_rd[m].size() == 0) fail($sformatf("master %0d: unexpected read word %h", m, data_out[m]));
          else begin
            logic [DATA_W-1:0] e;
            e = exp_rd[m].pop_front();
            if (data_out[m] !== e) fail($sformatf("master %0d: read %h want %h", m, data_out[m], e));
          end
        end
      end
    end
    // completion check, after this edge's read word: when a master goes idle
    busy_d <= busy;
    for (int m = 0; m < NM; m++) begin
      if (rst_n && busy_d[m] && !busy[m] && inflight[m]) begin
        checks++;
        if (error[m] !== exp_err[m]) fail($sformatf("master %0d: error %b want %b", m, error[m], exp_err[m]));
        if (error[m]) n_err++;
        checks++;
        if (exp_rd[m].size() != 0) fail($sformatf("master %0d: %0d read words missing", m, exp_rd[m].size()));
        inflight[m] = 0;
        if (bw_master == m) bw_master = -1;
      end
    end
  end

  // ------------------------------------------------------------ issuing
  function automatic bit is_write(ctrl_e c);
    return c == CTRL_WR || c == CTRL_BURST_WR || c == CTRL_OOO_WR;
  endfunction

  // issue command c to master m; wdata gives the words of a write
  task automatic issue(int m, ctrl_e c, logic [ADDR_W-1:0] a, logic [SIZE_W-1:0] s,
                       logic [DATA_W-1:0] wdata [$]);
    int beats, stride, sl;
    bit bad;
    beats  = (c == CTRL_WR || c == CTRL_RD) ? 1 : int'(s) + 1;
    stride = (c == CTRL_OOO_WR || c == CTRL_OOO_RD) ? 2 : 1;
    if (beats == 1) n_single++; else if (stride == 2) n_alt++; else n_burst++;
    sl  = int'(a[12:11]);
    bad = (a[10:8] != 0);
    exp_err[m]  = bad;
    inflight[m] = 1;
    if (!bad) begin
      for (int k = 0; k < beats; k++) begin
        int w;
        w = int'(a[7:0]) + k * stride;
        if (is_write(c)) begin
          model[sl][w] = wdata[k];
          known[sl][w] = 1;
        end else begin
          if (!known[sl][w]) fail("test bug: read of unwritten word");
          exp_rd[m].push_back(model[sl][w]);
        end
      end
    end
    if (is_write(c) && beats > 1) begin
      bw_q = wdata; bw_idx = 1; bw_master = m;
    end
    @(negedge Clk);
    issuing = is_write(c); issue_data = is_write(c) ? wdata[0] : 8'h00;
    enable = '0; enable[m] = 1'b1; Control = c; addr = a; size[m] = s;
    @(negedge Clk);
    issuing = 0; enable = '0; Control = CTRL_IDLE;
  endtask

  task automatic wait_idle();
    int t = 0;
    while ((busy != 0 || inflight.or() != 0) && t < 5000) begin
      @(negedge Clk);
      t++;
    end
    if (t >= 5000) fail("bus did not go idle");
  endtask

  task automatic busy_cycles(int m, output int n);
    n = 0;
    while (busy[m]) begin @(negedge Clk); n++; end
  endtask

  // ------------------------------------------------------------ test
  initial begin
    logic [DATA_W-1:0] wd [$];
    int n;
    issuing = 0; issue_data = 0; enable = 0; Control = 0; addr = 0; size = '0;
    for (int s = 0; s < NS; s++) for (int w = 0; w < 256; w++) known[s][w] = 0;
    for (int m = 0; m < NM; m++) begin exp_err[m] = 0; inflight[m] = 0; end
    repeat (3) @(posedge Clk);
    rst_n <= 1;
    @(negedge Clk);

    // --- reference waveform: burst write of four words at slave 0, word 0
    wd = '{8'h15, 8'hF5, 8'hA1, 8'h37};
    issue(0, CTRL_BURST_WR, 13'h0000, 3'd3, wd);
    busy_cycles(0, n);
    checks++;
    if (n != 2 * 4) fail($sformatf("4-beat burst write: busy %0d cycles after issue, want %0d", n, 2 * 4));
    wait_idle();
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (dut.g_slave[0].u_slave.store[w] !== wd[w]) fail($sformatf("store[%0d] = %h want %h", w, dut.g_slave[0].u_slave.store[w], wd[w]));
    end
    issue(0, CTRL_BURST_RD, 13'h0000, 3'd3, wd);
    busy_cycles(0, n);
    checks++;
    if (n != 2 * 4) fail($sformatf("4-beat burst read: busy %0d cycles after issue, want %0d", n, 2 * 4));
    wait_idle();

    // --- reference waveform: alternate write at words 0,2,4,6 of slave 1, read back
    issue(0, CTRL_OOO_WR, 13'h0800, 3'd3, wd);
    wait_idle();
    for (int w = 0; w < 8; w++) begin
      checks++;
      if (w % 2 == 0 && dut.g_slave[1].u_slave.store[w] !== wd[w / 2]) fail($sformatf("slave 1 store[%0d] wrong", w));
    end
    issue(0, CTRL_OOO_RD, 13'h0800, 3'd3, wd);
    wait_idle();

    // --- full-length burst (8 beats): solo timing
    wd.delete();
    for (int k = 0; k < 8; k++) wd.push_back(DATA_W'($urandom));
    issue(1, CTRL_BURST_WR, 13'h1040, 3'd7, wd);
    busy_cycles(1, n);
    checks++;
    if (n != 2 * 8) fail($sformatf("8-beat burst write: busy %0d cycles after issue, want %0d", n, 2 * 8));
    wait_idle();

    // --- single-request bursts (master 2): 8 beats in n+1 = 9 cycles
    wd.delete();
    for (int k = 0; k < 8; k++) wd.push_back(DATA_W'($urandom));
    issue(2, CTRL_BURST_WR, 13'h1880, 3'd7, wd);
    busy_cycles(2, n);
    checks++;
    if (n != 8 + 1) fail($sformatf("8-beat single-request burst write: busy %0d cycles, want 9", n));
    wait_idle();
    issue(2, CTRL_BURST_RD, 13'h1880, 3'd7, wd);
    busy_cycles(2, n);
    checks++;
    if (n != 8 + 1) fail($sformatf("8-beat single-request burst read: busy %0d cycles, want 9", n));
    wait_idle();
    issue(3, CTRL_OOO_WR, 13'h18C0, 3'd3, wd);
    wait_idle();
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (dut.g_slave[3].u_slave.store[8'hC0 + 2 * w] !== wd[w]) fail($sformatf("slave 3 store[%0h] wrong", 8'hC0 + 2 * w));
    end
    issue(3, CTRL_OOO_RD, 13'h18C0, 3'd3, wd);
    wait_idle();

    // --- EnableClk pause: a running burst read must freeze
    issue(1, CTRL_BURST_RD, 13'h1040, 3'd7, wd);
    @(negedge Clk);
    EnableClk = 0;
    begin
      logic [ADDR_W-1:0] a0;
      a0 = dut.m_req[1].ctrl.maddr;
      repeat (5) begin
        @(negedge Clk);
        checks++;
        if (dut.m_req[1].ctrl.maddr !== a0 || data_valid[1]) fail("bus advanced with EnableClk low");
        n_pause++;
      end
    end
    EnableClk = 1;
    wait_idle();

    // --- fill each master's region of every slave so random reads are known
    for (int m = 0; m < NM; m++)
      for (int s = 0; s < NS; s++)
        for (int blk = 0; blk < 8; blk++) begin
          wd.delete();
          for (int k = 0; k < 8; k++) wd.push_back(DATA_W'($urandom));
          issue(m, CTRL_BURST_WR, ADDR_W'((s << 11) | (m << 6) | (blk * 8)), 3'd7, wd);
          wait_idle();
        end

    // --- random concurrent traffic
    for (int t = 0; t < 20000; t++) begin
      int m;
      ctrl_e c;
      logic [SIZE_W-1:0] s;
      int beats, stride, off, sl;
      logic [ADDR_W-1:0] a;
      @(negedge Clk);
      m = $urandom % NM;
      if (busy[m] || inflight[m]) continue;
      c = ctrl_e'(3'd1 + 3'($urandom % 6));
      if (is_write(c) && bw_master >= 0) continue;      // data_in is busy
      s      = SIZE_W'($urandom);
      beats  = (c == CTRL_WR || c == CTRL_RD) ? 1 : int'(s) + 1;
      stride = (c == CTRL_OOO_WR || c == CTRL_OOO_RD) ? 2 : 1;
      off    = $urandom % (64 - (beats - 1) * stride);
      sl     = $urandom % NS;
      a      = ADDR_W'((sl << 11) | (m << 6) | off);
      if ($urandom % 16 == 0) a[10:8] = 3'($urandom % 7 + 1);  // illegal address
      wd.delete();
      for (int k = 0; k < beats; k++) wd.push_back(DATA_W'($urandom));
      issue(m, c, a, s, wd);
    end
    wait_idle();

    $display("parallel accepts %0d, contention %0d, lock holds %0d, WAIT %0d, errors %0d",
             n_parallel, n_contend, n_lockhold, n_wait, n_err);
    $display("single %0d, burst %0d, alternate %0d, pause %0d, read words %0d",
             n_single, n_burst, n_alt, n_pause, n_rd_words);
    $display("single-request burst words after the first: read %0d, write %0d", n_srb_words, n_swb_words);
    checks++; if (n_parallel == 0) fail("no parallel transfers on different slaves");
    checks++; if (n_contend  == 0) fail("no arbitration contention");
    checks++; if (n_lockhold == 0) fail("lock never held off a higher-priority master");
    checks++; if (n_wait     == 0) fail("master WAIT state never used");
    checks++; if (n_err      == 0) fail("no error response");
    checks++; if (n_burst == 0 || n_alt == 0 || n_single == 0) fail("a command kind never ran");
    checks++; if (n_pause    == 0) fail("EnableClk pause never tested");
    checks++; if (n_srb_words == 0 || n_swb_words == 0) fail("no single-request burst data phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
