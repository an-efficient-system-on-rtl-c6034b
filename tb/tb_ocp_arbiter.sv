// tb_ocp_arbiter -- self-checking test of the per-slave arbiter.
// Runs random req/lock/xfer_done stimulus against a reference model of the
// arbitration rules: fixed priority (master 0 first) when the slave is free,
// the owner keeps the grant while it requests, and a completed transfer
// releases the owner unless its lock is set. Also counts directed events:
// a locked owner holding off a higher-priority requester, and an unlocked
// owner losing the slave to one.
module tb_ocp_arbiter;
  int checks = 0, failures = 0;
  int lock_holds = 0, preempts = 0;
  logic       clk = 0, rst_n = 0;
  logic [3:0] req, lock, grant;
  logic       xfer_done;

  ocp_arbiter #(.N(4)) dut (.clk, .rst_n, .ce(1'b1), .req, .lock, .xfer_done, .grant);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  bit       m_owned;
  int       m_owner;
  logic [3:0] exp_grant;
  int       g;

  function automatic int prio(logic [3:0] r);
    for (int i = 0; i < 4; i++) if (r[i]) return i;
    return -1;
  endfunction

  initial begin
    req = 0; lock = 0; xfer_done = 0;
    m_owned = 0; m_owner = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // keep the owner requesting most of the time so ownership lasts
      req       = 4'($urandom);
      if (m_owned && ($urandom % 4 != 0)) req[m_owner] = 1'b1;
      lock      = 4'($urandom);
      xfer_done = ($urandom % 2) == 1;
      #1;
      if (m_owned && req[m_owner]) g = m_owner;
      else g = prio(req);
      exp_grant = (g >= 0) ? 4'(1 << g) : 4'b0;
      checks++;
      if (grant !== exp_grant) begin
        failures++;
        if (failures < 10) $display("t=%0d req %b lock %b owned %0d owner %0d: grant %b want %b",
                                    t, req, lock, m_owned, m_owner, grant, exp_grant);
      end
      if (m_owned && req[m_owner] && prio(req) < m_owner) lock_holds++;
      @(posedge clk);
      if (g >= 0 && !(xfer_done && !lock[g])) begin m_owned = 1; m_owner = g; end
      else m_owned = 0;
      if (g >= 0 && xfer_done && !lock[g] && prio(req) >= 0 && prio(req) < g) preempts++;
    end
    $display("owner held against higher priority: %0d, released to higher priority: %0d", lock_holds, preempts);
    checks++;
    if (lock_holds == 0 || preempts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
