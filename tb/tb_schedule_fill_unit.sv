// tb_schedule_fill_unit: self-checking test of the big-side fill unit.
//
// Part 1 commits a reference loop (ten instructions, issued
// by the 3-wide big core in four cycles). One iteration is shorter than the
// 20-instruction minimum, so the trace spans two iterations; the second
// iteration would need a fifth version of r2, so the trace must be discarded
// (ev_discard) and nothing written to the STC.
//
// Part 2 builds random loop traces (20 to 45 instructions, random operations,
// registers, branch directions and a random 3-wide issue schedule), commits
// each several times, and lets the stand-in selection table answer "store" on
// the last instance. The blocks written to the STC (starting at an alloc_base
// near the end so the addresses wrap) are compared with an independent
// encoding: Level-1 suffixes per register and for the flags, issue groups in
// issue-cycle order with empty cycles removed, instructions of one cycle in
// program order, the End-of-Trace marker on the last group, and the meta-block
// listing the memory operations' program sequence numbers in issue order. The
// signature must repeat for repeated instances, and the install request must
// carry the header PC and alloc_base.
module tb_schedule_fill_unit
  import dynamos_pkg::*;
;
  localparam int NBLK = 204;
  logic clk = 0, rst_n = 0;
  logic c_valid, c_ready, c_taken;
  logic [31:0] c_pc, c_target;
  op_e c_op;
  logic [AR_W-1:0] c_rd, c_rs1, c_rs2;
  logic [15:0] c_imm;
  bcond_e c_bcond;
  logic [6:0] c_icyc;
  logic learn_valid, learn_store, install_valid, stc_wr_en, alloc_done, ev_discard;
  logic [31:0] learn_pc, install_pc;
  logic [15:0] learn_id, learn_sig;
  logic [7:0] install_set_id, stc_wr_addr, alloc_base;
  logic [BLK_BITS-1:0] stc_wr_data;
  logic [8:0] alloc_len;

  schedule_fill_unit dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_discard = 0, n_stored = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // captured STC contents
  logic [BLK_BITS-1:0] stc [NBLK];
  int                  n_writes;
  always @(posedge clk) if (stc_wr_en) begin stc[stc_wr_addr] <= stc_wr_data; n_writes++; end

  // one trace
  typedef struct {
    op_e op; int rd, rs1, rs2; logic [15:0] imm; bcond_e bc; bit tk; int cyc;
  } ins_t;
  ins_t tr[$];
  logic [15:0] last_sig;
  bit          sig_ok;

  task automatic commit_trace(logic [31:0] head, bit store_it);
    for (int i = 0; i < tr.size(); i++) begin
      @(negedge clk);
      c_valid = 1;
      c_pc = head + 4 * i;
      c_op = tr[i].op; c_rd = AR_W'(tr[i].rd); c_rs1 = AR_W'(tr[i].rs1); c_rs2 = AR_W'(tr[i].rs2);
      c_imm = tr[i].imm; c_bcond = tr[i].bc; c_taken = tr[i].tk; c_icyc = 7'(tr[i].cyc);
      c_target = (i == tr.size() - 1) ? head : c_pc + 8;
      learn_store = store_it;
      #1;
      while (!c_ready) begin @(negedge clk); #1; end
      if (learn_valid) begin
        check(i == tr.size() - 1, "learn only at the trace's last instruction");
        if (last_sig !== 16'hxxxx && sig_ok) check(learn_sig == last_sig, "signature repeats");
        last_sig = learn_sig;
        sig_ok = 1;
        if (ev_discard) n_discard++;
      end
      @(posedge clk);
    end
    @(negedge clk);
    c_valid = 0;
    learn_store = 0;
  endtask

  // expected encoding
  task automatic check_stored(logic [31:0] head, int base);
    int sfx[NUM_AR];
    int ccs, memc, maxc, nb, k;
    slot_t enc[$];
    int seqn[$];
    logic [LSQ_DEPTH-1:0][SEQ_W-1:0] meta;
    foreach (sfx[a]) sfx[a] = 0;
    ccs = 0; memc = 0; maxc = 0;
    for (int i = 0; i < tr.size(); i++) begin
      slot_t s;
      bit w;
      s = '0;
      s.valid = 1; s.op = tr[i].op; s.imm = tr[i].imm; s.bcond = tr[i].bc; s.taken = tr[i].tk;
      s.rs1 = '{ar: AR_W'(tr[i].rs1), suf: SUF_W'(sfx[tr[i].rs1])};
      s.rs2 = '{ar: AR_W'(tr[i].rs2), suf: SUF_W'(sfx[tr[i].rs2])};
      w = tr[i].op inside {OP_ADD, OP_SUB, OP_ADDI, OP_LD};
      if (w) sfx[tr[i].rd]++;
      s.rd = '{ar: AR_W'(tr[i].rd), suf: SUF_W'(sfx[tr[i].rd])};
      if (tr[i].op == OP_CMP) ccs++;
      s.ccsuf = CC_SUF_W'(ccs);
      enc.push_back(s);
      seqn.push_back(memc);
      if (tr[i].op inside {OP_LD, OP_ST}) memc++;
      if (tr[i].cyc > maxc) maxc = tr[i].cyc;
    end
    nb = 0; k = 0; meta = '0;
    for (int c = 0; c <= maxc; c++) begin
      group_t g;
      int l;
      g = '0; l = 0;
      for (int i = 0; i < tr.size(); i++) if (tr[i].cyc == c) begin
        g.slot[l] = enc[i];
        l++;
        if (tr[i].op inside {OP_LD, OP_ST}) begin meta[k] = SEQ_W'(seqn[i]); k++; end
      end
      if (l > 0) begin
        g.eot = (c == maxc);
        nb++;
        check(stc[(base + nb) % NBLK] == BLK_BITS'(g), "issue group block");
      end
    end
    check(stc[base] == BLK_BITS'(meta), "meta-block");
    check(n_writes == nb + 1, "number of STC writes");
  endtask

  // install/alloc monitor
  logic [31:0] inst_pc_seen; logic [7:0] inst_set_seen; int alloc_len_seen;
  always @(posedge clk) if (install_valid) begin
    inst_pc_seen <= install_pc; inst_set_seen <= install_set_id; alloc_len_seen <= int'(alloc_len);
    check(alloc_done, "alloc_done with install");
  end

  function automatic ins_t mk(op_e op, int rd, int rs1, int rs2, int imm, int cyc);
    ins_t x;
    x.op = op; x.rd = rd; x.rs1 = rs1; x.rs2 = rs2; x.imm = 16'(imm); x.bc = BC_NE; x.tk = 0; x.cyc = cyc;
    return x;
  endfunction

  initial begin
    c_valid = 0; c_pc = '0; c_op = OP_NOP; c_rd = '0; c_rs1 = '0; c_rs2 = '0; c_imm = '0;
    c_bcond = BC_EQ; c_taken = 0; c_target = '0; c_icyc = '0; learn_store = 0;
    alloc_base = 8'd0; n_writes = 0; last_sig = 'x; sig_ok = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Part 1: reference loop, two iterations -> r2 needs version 4 -> discarded
    for (int it = 0; it < 2; it++) begin
      int o;
      o = 4 * it;
      tr.push_back(mk(OP_LD,   2, 5, 0, 0, o + 0));
      tr.push_back(mk(OP_ST,   0, 4, 2, 0, o + 1));
      tr.push_back(mk(OP_ADDI, 5, 2, 0, 4, o + 1));
      tr.push_back(mk(OP_LD,   2, 3, 0, 0, o + 0));
      tr.push_back(mk(OP_ST,   0, 4, 2, 4, o + 1));
      tr.push_back(mk(OP_ADDI, 3, 2, 0, 4, o + 2));
      tr.push_back(mk(OP_ADDI, 4, 4, 0, 4, o + 2));
      tr.push_back(mk(OP_ADDI, 1, 1, 0, 1, o + 0));
      tr.push_back(mk(OP_CMP,  0, 1, 6, 0, o + 2));
      tr.push_back(mk(OP_BR,   0, 0, 0, 0, o + 3));
      tr[$].tk = 1;
    end
    commit_trace(32'h8000, 1);
    check(n_discard == 1 && n_writes == 0, "reference loop over two iterations is discarded");

    // Part 2: random traces
    for (int t = 0; t < 25; t++) begin
      int n, cnt[64], wr[NUM_AR], ncmp, inst;
      logic [31:0] head;
      tr.delete();
      n = $urandom_range(20, 45);
      foreach (cnt[c]) cnt[c] = 0;
      foreach (wr[a]) wr[a] = 0;
      ncmp = 0;
      for (int i = 0; i < n; i++) begin
        ins_t x;
        int c;
        x.op = op_e'($urandom_range(1, 7));
        if (i == n - 1) x.op = OP_BR;
        if (x.op == OP_CMP && ncmp >= 15) x.op = OP_ADD;
        if (x.op == OP_CMP) ncmp++;
        x.rd = $urandom_range(0, NUM_AR - 1);
        while (wr[x.rd] >= 3) x.rd = (x.rd + 1) % NUM_AR;
        if (x.op inside {OP_ADD, OP_SUB, OP_ADDI, OP_LD}) wr[x.rd]++;
        x.rs1 = $urandom_range(0, NUM_AR - 1);
        x.rs2 = $urandom_range(0, NUM_AR - 1);
        x.imm = 16'($urandom);
        x.bc  = bcond_e'($urandom_range(0, 3));
        x.tk  = (i == n - 1) ? 1'b1 : 1'b0;
        c = $urandom_range(0, n / 2);
        while (cnt[c] >= WIDTH) c = (c + 1) % 64;
        cnt[c]++;
        x.cyc = c;
        tr.push_back(x);
      end
      head = 32'h1_0000 + 32'h100 * t;
      inst = $urandom_range(2, 4);
      sig_ok = 0;
      for (int r = 0; r < inst - 1; r++) commit_trace(head, 0);
      check(n_writes == 0 || t > 0, "nothing written before the table asks");
      alloc_base = 8'($urandom_range(150, 203));
      n_writes = 0;
      commit_trace(head, 1);
      repeat (2 * n + 4) @(posedge clk);
      check_stored(head, int'(alloc_base));
      check(inst_pc_seen == head && int'(inst_set_seen) == int'(alloc_base) &&
            alloc_len_seen == n_writes, "install request");
      n_stored++;
    end
    $display("stored=%0d discarded=%0d", n_stored, n_discard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
