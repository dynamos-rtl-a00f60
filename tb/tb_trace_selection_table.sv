// tb_trace_selection_table: self-checking test of the trace selection table.
//
// A directed part follows one trace through its life: allocation with
// confidence 3, five schedule repeats to confidence 8 (the first value above
// the threshold 7, where the table asks for the schedule to be stored), a
// changed schedule that leaves the counter alone, installation in the STC
// (lookups now hit with the set-ID), and an abort that takes 3 off and, below
// the threshold, drops the In-STC bit. A random part then issues one operation
// per cycle (learn, abort, install, evict, lookup) on a few header PCs that
// share table indices, against a reference model of the entries.
module tb_trace_selection_table;
  localparam int ENT = 256;
  logic clk = 0, rst_n = 0;
  logic [31:0] lk_pc, learn_pc, abort_pc, install_pc;
  logic lk_hit, learn_valid, learn_store, abort_valid, install_valid, evict_valid;
  logic [7:0] lk_set_id, install_set_id, evict_index;
  logic [15:0] learn_id, learn_sig;
  logic [3:0] learn_conf;

  trace_selection_table dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference entries
  bit m_v[ENT]; logic [31:0] m_tag[ENT]; logic [15:0] m_id[ENT], m_sig[ENT];
  int m_conf[ENT]; bit m_in[ENT]; logic [7:0] m_set[ENT];

  function automatic int idx(logic [31:0] pc); return int'(pc[9:2]); endfunction

  task automatic idle();
    learn_valid = 0; abort_valid = 0; install_valid = 0; evict_valid = 0;
    learn_pc = '0; abort_pc = '0; install_pc = '0; lk_pc = '0;
    learn_id = '0; learn_sig = '0; install_set_id = '0; evict_index = '0;
  endtask

  // learn with model check
  task automatic do_learn(logic [31:0] pc, logic [15:0] id, logic [15:0] sg);
    int i, nc;
    bit known, exp_store;
    @(negedge clk);
    idle();
    learn_valid = 1; learn_pc = pc; learn_id = id; learn_sig = sg;
    i = idx(pc);
    known = m_v[i] && m_tag[i] == pc && m_id[i] == id;
    nc = !known ? 3 : (m_sig[i] == sg ? (m_conf[i] == 15 ? 15 : m_conf[i] + 1) : m_conf[i]);
    exp_store = nc > 7 && !(known && m_in[i]);
    #1 check(learn_store == exp_store && int'(learn_conf) == nc, "learn response");
    @(posedge clk);
    m_v[i] = 1; m_tag[i] = pc; m_id[i] = id; m_conf[i] = nc; m_sig[i] = sg;
    if (!known) m_in[i] = 0;
  endtask

  task automatic do_abort(logic [31:0] pc);
    int i;
    @(negedge clk);
    idle();
    abort_valid = 1; abort_pc = pc;
    i = idx(pc);
    @(posedge clk);
    if (m_v[i] && m_tag[i] == pc) begin
      if (m_conf[i] <= 10) m_in[i] = 0;
      m_conf[i] = m_conf[i] > 3 ? m_conf[i] - 3 : 0;
    end
  endtask

  task automatic do_install(logic [31:0] pc, logic [7:0] s);
    @(negedge clk);
    idle();
    install_valid = 1; install_pc = pc; install_set_id = s;
    @(posedge clk);
    m_in[idx(pc)] = 1; m_set[idx(pc)] = s;
  endtask

  task automatic do_evict(int i);
    @(negedge clk);
    idle();
    evict_valid = 1; evict_index = 8'(i);
    @(posedge clk);
    m_in[i] = 0;
  endtask

  task automatic do_lookup(logic [31:0] pc, output bit hit);
    int i;
    @(negedge clk);
    idle();
    lk_pc = pc;
    i = idx(pc);
    hit = m_v[i] && m_tag[i] == pc && m_in[i];
    #1 check(lk_hit == hit && (!hit || lk_set_id == m_set[i]), "lookup");
  endtask

  logic [31:0] pcs [6] = '{32'h0000_1000, 32'h0000_1400, 32'h0000_1004, 32'h0000_2000, 32'h0000_3000, 32'h0000_1008};
  int n_store = 0, n_hit = 0;

  initial begin
    bit h;
    foreach (m_v[i]) begin m_v[i] = 0; m_conf[i] = 0; m_in[i] = 0; m_tag[i] = '0; m_id[i] = '0; m_sig[i] = '0; m_set[i] = '0; end
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;

    // directed life of one trace
    do_learn(32'h400, 16'h1234, 16'h55);
    for (int r = 0; r < 5; r++) do_learn(32'h400, 16'h1234, 16'h55);
    check(m_conf[idx(32'h400)] == 8, "five repeats reach 8");
    do_learn(32'h400, 16'h1234, 16'h66);      // schedule changed: counter unchanged
    check(m_conf[idx(32'h400)] == 8, "changed schedule keeps the counter");
    do_install(32'h400, 8'd17);
    do_lookup(32'h400, h);
    check(h, "installed trace hits");
    do_abort(32'h400);                        // 8 -> 5, below threshold
    do_lookup(32'h400, h);
    check(!h, "abort below threshold drops In-STC");

    for (int n = 0; n < 3000; n++) begin
      logic [31:0] pc;
      int r;
      pc = pcs[$urandom_range(0, 5)];
      r = $urandom_range(0, 99);
      if (r < 45)      do_learn(pc, 16'($urandom_range(0, 1)), 16'($urandom_range(0, 3) == 0));
      else if (r < 55) do_abort(pc);
      else if (r < 65) do_install(pc, 8'($urandom));
      else if (r < 70) do_evict(idx(pc));
      else begin do_lookup(pc, h); if (h) n_hit++; end
      if (learn_valid && learn_store) n_store++;
    end
    check(n_hit > 0, "random lookups hit");
    $display("hits=%0d", n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
