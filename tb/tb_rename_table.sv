// tb_rename_table: self-checking test of the Level-2 rename table.
//
// First replays a reference example (AR 2 written twice in a
// trace: versions land in PRs 9 and 10, and after the trace the live-in of AR 2
// is PR 10). Then runs random legal sequences of trace begin, writes, issue,
// commit and abort against a reference model that copies index values instead
// of flipping ping-pong bits (LLW := GLW at begin, GLW := LLW at issue,
// Commit-GLW := the oldest issued trace's final LLW at commit, GLW := Commit-GLW
// at abort). Every cycle all read ports, write-port PRs and conflict flags are
// compared with the model. Four ARs are used so that versions collide often.
module tb_rename_table;
  localparam int NAR = 4, POOL = 4, NRD = 4, NWR = 2;
  localparam int AW = 2, IW = 2, PW = 4;

  logic clk = 0, rst_n = 0;
  logic [NRD-1:0][AW-1:0] rd_ar;
  logic [NRD-1:0][IW-1:0] rd_suf;
  logic [NRD-1:0][PW-1:0] rd_pr;
  logic [NWR-1:0]         wr_valid, wr_conflict;
  logic [NWR-1:0][AW-1:0] wr_ar;
  logic [NWR-1:0][IW-1:0] wr_suf;
  logic [NWR-1:0][PW-1:0] wr_pr;
  logic wr_fire, trace_begin, trace_issued, commit, abort;
  logic [1:0] n_issued;

  rename_table #(.NUM_AR(NAR), .POOL(POOL), .NRD(NRD), .NWR(NWR)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int glw_r[NAR], llw_r[NAR], cglw_r[NAR];
  int pend[$][NAR];
  bit issuing;
  int n_conf = 0, n_abort = 0, n_two = 0;

  function automatic int exp_pr(int ar, int s);
    return ar*POOL + (glw_r[ar] + s) % POOL;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic idle();
    wr_valid = '0; wr_fire = 0; trace_begin = 0; trace_issued = 0; commit = 0; abort = 0;
    rd_ar = '0; rd_suf = '0; wr_ar = '0; wr_suf = '0;
  endtask

  task automatic compare_all();
    for (int r = 0; r < NRD; r++)
      check(int'(rd_pr[r]) == exp_pr(int'(rd_ar[r]), int'(rd_suf[r])), "read PR");
    for (int w = 0; w < NWR; w++) begin
      int slot;
      slot = (glw_r[wr_ar[w]] + wr_suf[w]) % POOL;
      check(int'(wr_pr[w]) == exp_pr(int'(wr_ar[w]), int'(wr_suf[w])), "write PR");
      check(wr_conflict[w] == (wr_valid[w] && pend.size() > 0 && slot == cglw_r[wr_ar[w]]),
            "conflict flag");
    end
    check(int'(n_issued) == pend.size(), "issued count");
  endtask

  // model update, applied with the clock edge
  task automatic model_step();
    if (abort) begin
      foreach (glw_r[a]) glw_r[a] = cglw_r[a];
      pend.delete();
      n_abort++;
      issuing = 0;
      return;
    end
    if (trace_begin) foreach (llw_r[a]) llw_r[a] = glw_r[a];
    if (wr_fire) for (int w = 0; w < NWR; w++) if (wr_valid[w]) llw_r[wr_ar[w]] = (llw_r[wr_ar[w]] + 1) % POOL;
    if (commit) begin
      foreach (cglw_r[a]) cglw_r[a] = pend[0][a];
      void'(pend.pop_front());
    end
    if (trace_issued) begin
      int snap[NAR];
      foreach (snap[a]) snap[a] = llw_r[a];
      pend.push_back(snap);
      foreach (glw_r[a]) glw_r[a] = llw_r[a];
    end
  endtask

  task automatic cycle();
    #1 compare_all();
    @(posedge clk);
    model_step();
    #1 idle();
  endtask

  initial begin
    foreach (glw_r[a]) begin glw_r[a] = 0; llw_r[a] = 0; cglw_r[a] = 0; end
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // Reference example on AR 2: R2.1 then R2.2 written.
    trace_begin = 1; issuing = 1; cycle();
    wr_valid = 2'b01; wr_ar[0] = 2; wr_suf[0] = 1; wr_fire = 1;
    #1 check(wr_pr[0] == 4'd9, "ex R2.1 -> PR 9"); cycle();
    wr_valid = 2'b01; wr_ar[0] = 2; wr_suf[0] = 2; wr_fire = 1;
    rd_ar[0] = 2; rd_suf[0] = 1;
    #1 check(wr_pr[0] == 4'd10 && rd_pr[0] == 4'd9, "ex R2.2 -> PR 10"); cycle();
    trace_issued = 1; issuing = 0; cycle();
    rd_ar[0] = 2; rd_suf[0] = 0;
    #1 check(rd_pr[0] == 4'd10, "ex live-out becomes live-in"); cycle();
    commit = 1; cycle();

    // random legal sequences
    for (int n = 0; n < 4000; n++) begin
      int r;
      r = $urandom_range(0, 99);
      if (pend.size() == 2) n_two++;
      for (int i = 0; i < NRD; i++) begin rd_ar[i] = AW'($urandom); rd_suf[i] = IW'($urandom); end
      if (!issuing) begin
        if (pend.size() < 2 && r < 40) begin trace_begin = 1; issuing = 1; end
        if (pend.size() > 0 && r >= 60) commit = 1;
      end else begin
        if (r < 60) begin
          // up to two writes to distinct ARs, next version each
          for (int w = 0; w < NWR; w++) begin
            wr_ar[w]  = AW'($urandom);
            wr_suf[w] = IW'((llw_r[wr_ar[w]] - glw_r[wr_ar[w]] + POOL + 1) % POOL);
            wr_valid[w] = ((llw_r[wr_ar[w]] - glw_r[wr_ar[w]] + POOL) % POOL) < POOL-1 &&
                          !(w == 1 && wr_valid[0] && wr_ar[0] == wr_ar[1]);
          end
          #1;
          if (wr_conflict != '0) n_conf++;
          wr_fire = (wr_conflict == '0);
          if (!wr_fire) wr_valid = wr_valid & ~wr_conflict;
        end else if (r < 75) begin
          if (pend.size() < 2) begin trace_issued = 1; issuing = 0; end
        end else if (r < 80) begin
          abort = 1;
        end else if (r < 95 && pend.size() > 0) begin
          commit = 1;
        end
      end
      if (trace_issued && commit && pend.size() == 2) trace_issued = 0;
      cycle();
    end
    check(n_conf > 0 && n_abort > 0 && n_two > 0, "random run reached conflicts, aborts and two issued traces");
    $display("conflicts=%0d aborts=%0d two_issued_cycles=%0d", n_conf, n_abort, n_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
