// tb_strand_core: end-to-end test of the strand core at its default sizes.
//
// A random program is generated: register initialisation, single ALU
// instructions, prefixed strands of 2..MAX_STRAND_LEN instructions, strands
// whose prefix is too long for the hardware (which must fall back to plain
// execution) and stray no-ops. Two cores run it side by side: `dut` receives
// the annotated program, `base` receives the same instructions without any
// prefix, i.e. it behaves as the unmodified machine. After both drain, every
// non-scratch register of both is compared with a sequential reference
// execution, and both must have retired every instruction.
//
// The driver offers two instructions per cycle. The test counts how often each
// mechanism happened in `dut` and fails if one never did: strand collapse,
// dropped prefix, closed-loop spinning, reorder-buffer full, WAW and WAR
// dispatch holds, dual dispatch, a younger macro-op held by the older one of
// its dispatch pair, dual issue, an ALU busy with a strand while a ready entry
// waits, and dual retirement. Issue-queue full is counted but not required:
// with equal issue-queue and reorder-buffer sizes the reorder buffer, whose
// entries live until retirement, always fills first. The test also reports the
// activity counts the design is meant to reduce (tag broadcasts, wakeup
// comparisons, active select cycles, register reads, writebacks) for both
// cores and checks that collapsing reduced broadcasts, writebacks and register
// reads.
module tb_strand_core;
  import strand_pkg::*;
  import tb_strand_pkg::*;

  localparam int NGROUPS = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  d_in_ready, d_idle, b_in_ready, b_idle;
  logic [1:0]            d_in_valid, b_in_valid;
  instr_t [1:0]          d_in, b_in;
  logic [1:0]            d_cv, b_cv;
  logic [1:0][LEN_W-1:0] d_cn, b_cn;
  tag_t                  dbg_addr;
  word_t                 d_dbg, b_dbg;

  strand_core dut (.clk(clk), .rst_n(rst_n), .in_valid(d_in_valid), .in_instr(d_in),
    .in_ready(d_in_ready), .commit_valid(d_cv), .commit_ninstr(d_cn), .dbg_addr(dbg_addr),
    .dbg_data(d_dbg), .idle(d_idle));
  strand_core base (.clk(clk), .rst_n(rst_n), .in_valid(b_in_valid), .in_instr(b_in),
    .in_ready(b_in_ready), .commit_valid(b_cv), .commit_ninstr(b_cn), .dbg_addr(dbg_addr),
    .dbg_data(b_dbg), .idle(b_idle));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t prog_a[$], prog_b[$];
  bit     interm[$];                 // per prog_b entry: intermediate of a collapsed strand
  logic [31:0] gold[64];
  logic [31:0] exp_d[64][$], exp_b[64][$];  // per-register write sequences
  int n_alu = 0, n_valid_strands = 0;

  // ---------------- activity and mechanism counters ----------------
  typedef struct {
    longint cycles, bcasts, wakeups, selects, rdreads, writebacks, retired;
  } act_t;
  act_t da, ba;
  int c_strand = 0, c_single = 0, c_pfx_drop = 0, c_loop = 0, c_iq_full = 0, c_rob_full = 0,
      c_waw = 0, c_war = 0, c_dual_issue = 0, c_alu_busy = 0, c_dual_commit = 0,
      c_dual_disp = 0, c_pair_hold = 0;
  bit counting = 0;

  function automatic int popc2(logic [1:0] v); return int'(v[0]) + int'(v[1]); endfunction

  always @(posedge clk) if (counting) begin
    // dut mechanisms
    for (int d = 0; d < 2; d++) begin
      if (dut.disp_fire[d] && dut.stab_op[d].strand)  c_strand++;
      if (dut.disp_fire[d] && !dut.stab_op[d].strand) c_single++;
    end
    if (dut.stab_pfx_ignored) c_pfx_drop++;
    c_loop += popc2(dut.alu_loop);
    if (dut.stab_valid[0] && !dut.iq_alloc_ready[0]) c_iq_full++;
    if (dut.stab_valid[0] && !dut.rob_alloc_ready[0]) c_rob_full++;
    if (dut.stab_valid[0] && dut.stab_op[0].dest_valid && dut.waw_hit[0]) c_waw++;
    if (dut.stab_valid[0] && dut.stab_op[0].dest_valid && dut.war_hit[0]) c_war++;
    if (dut.disp_fire == 2'b11) c_dual_disp++;
    // the younger macro-op is held only by the older one of its pair
    if (dut.disp_fire[0] && dut.stab_valid[1] && dut.iq_alloc_ready[1] && dut.rob_alloc_ready[1] &&
        !(dut.stab_op[1].dest_valid && (dut.waw_hit[1] || dut.war_hit[1])) && !dut.disp_fire[1])
      c_pair_hold++;
    if (dut.iss_valid == 2'b11) c_dual_issue++;
    if ((dut.alu_loop != 0) && (dut.u_iq.req & ~dut.u_iq.grant) != 0) c_alu_busy++;
    if (dut.commit_valid == 2'b11) c_dual_commit++;
  end

  task automatic tally(ref act_t a, input logic [1:0] wbv, input logic [5:0] iqv,
                       input logic [5:0][1:0] waiting, input logic [1:0] iv,
                       input macro_op_t [1:0] iop, input logic [1:0] cv,
                       input logic [1:0][LEN_W-1:0] cn);
    int nb, nw;
    a.cycles++;
    nb = popc2(wbv);
    a.bcasts += nb;
    a.writebacks += nb;
    nw = 0;
    for (int s = 0; s < 6; s++) nw += popc2(waiting[s]);
    a.wakeups += nw * nb;
    if (iqv != 0) a.selects++;
    for (int p = 0; p < 2; p++) if (iv[p]) a.rdreads += popc2(iop[p].src_valid);
    for (int c = 0; c < 2; c++) if (cv[c]) a.retired += cn[c];
  endtask

  always @(posedge clk) if (counting) begin
    if (!d_idle || d_in_valid != 0)
      tally(da, dut.wb_dest_valid, dut.iq_valid, dut.iq_waiting, dut.iss_valid, dut.iss_op,
            dut.commit_valid, dut.commit_ninstr);
    if (!b_idle || b_in_valid != 0)
      tally(ba, base.wb_dest_valid, base.iq_valid, base.iq_waiting, base.iss_valid, base.iss_op,
            base.commit_valid, base.commit_ninstr);
  end

  // ---------------- program ----------------
  initial begin
    instr_t g[$];
    int kind, len;
    for (int r = 1; r <= GEN_REGS; r++) begin
      prog_a.push_back(mk(0, r, 0, 0, 1'b1, $urandom));
      prog_b.push_back(prog_a[$]);
      interm.push_back(1'b0);
    end
    for (int n = 0; n < NGROUPS; n++) begin
      g.delete();
      kind = $urandom % 20;
      if (kind < 7) begin
        gen_group(1, 1'b1, g);
      end else if (kind < 17) begin
        gen_group(2 + $urandom % (MAX_STRAND_LEN - 1), 1'b1, g);
        n_valid_strands++;
      end else if (kind < 19) begin
        gen_group(MAX_STRAND_LEN + 1, 1'b1, g);
      end else begin
        instr_t nop;
        nop = '0; nop.kind = INS_NOP;
        g.push_back(nop);
      end
      foreach (g[i]) begin
        prog_a.push_back(g[i]);
        if (g[i].kind == INS_ALU) begin
          prog_b.push_back(g[i]);
          // inside a collapsed strand every component but the last is never written back
          interm.push_back(g[0].kind == INS_PREFIX && int'(g[0].pfx_len) <= MAX_STRAND_LEN &&
                           i < g.size() - 1);
        end
      end
    end
    for (int i = 0; i < 64; i++) gold[i] = 0;
    foreach (prog_b[i]) begin
      exec_instr(gold, prog_b[i]);
      if (prog_b[i].rd != 0) begin
        exp_b[prog_b[i].rd].push_back(gold[prog_b[i].rd]);
        if (!interm[i]) exp_d[prog_b[i].rd].push_back(gold[prog_b[i].rd]);
      end
      n_alu++;
    end
  end

  // ---------------- writeback checker ----------------
  // Registers are written in program order per register, so each writeback
  // must carry the next value of that register's expected write sequence.
  always @(posedge clk) if (counting) begin
    for (int a = 0; a < 2; a++) begin
      if (dut.wb_dest_valid[a]) begin
        if (exp_d[dut.wb_tag[a]].size() == 0) check(0, $sformatf("strand core: extra write r%0d", dut.wb_tag[a]));
        else check(dut.wb_val[a] == exp_d[dut.wb_tag[a]].pop_front(),
                   $sformatf("strand core: write r%0d = %h", dut.wb_tag[a], dut.wb_val[a]));
      end
      if (base.wb_dest_valid[a]) begin
        if (exp_b[base.wb_tag[a]].size() == 0) check(0, $sformatf("baseline: extra write r%0d", base.wb_tag[a]));
        else check(base.wb_val[a] == exp_b[base.wb_tag[a]].pop_front(),
                   $sformatf("baseline: write r%0d = %h", base.wb_tag[a], base.wb_val[a]));
      end
    end
  end

  // ---------------- drivers ----------------
  int ia = 0, ib = 0;
  always @(posedge clk) begin
    if (d_in_valid[0] && d_in_ready) ia <= ia + popc2(d_in_valid);
    if (b_in_valid[0] && b_in_ready) ib <= ib + popc2(b_in_valid);
  end
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      d_in_valid[k] = rst_n && counting && (ia + k < prog_a.size());
      d_in[k]       = (ia + k < prog_a.size()) ? prog_a[ia + k] : '0;
      b_in_valid[k] = rst_n && counting && (ib + k < prog_b.size());
      b_in[k]       = (ib + k < prog_b.size()) ? prog_b[ib + k] : '0;
    end
  end

  initial begin
    dbg_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    counting = 1;
    wait (ia == prog_a.size() && ib == prog_b.size());
    @(negedge clk);
    wait (d_idle && b_idle);
    @(negedge clk);
    counting = 0;
    for (int r = 0; r < 64; r++) begin
      if (r >= SCRATCH_BASE && r < SCRATCH_BASE + 8) continue;
      dbg_addr = tag_t'(r);
      #1;
      check(d_dbg == gold[r], $sformatf("strand core r%0d = %h expected %h", r, d_dbg, gold[r]));
      check(b_dbg == gold[r], $sformatf("baseline r%0d = %h expected %h", r, b_dbg, gold[r]));
    end
    for (int r = 0; r < 64; r++)
      check(exp_d[r].size() == 0 && exp_b[r].size() == 0, $sformatf("missing writes to r%0d", r));
    check(da.retired == n_alu, $sformatf("strand core retired %0d of %0d", da.retired, n_alu));
    check(ba.retired == n_alu, $sformatf("baseline retired %0d of %0d", ba.retired, n_alu));
    check(c_strand == n_valid_strands, $sformatf("collapsed %0d of %0d strands", c_strand, n_valid_strands));
    $display("mechanisms: strands=%0d singles=%0d dropped_prefix=%0d loop_cycles=%0d iq_full=%0d rob_full=%0d waw_hold=%0d war_hold=%0d dual_dispatch=%0d pair_hold=%0d dual_issue=%0d alu_busy_with_strand=%0d dual_retire=%0d",
             c_strand, c_single, c_pfx_drop, c_loop, c_iq_full, c_rob_full, c_waw, c_war,
             c_dual_disp, c_pair_hold, c_dual_issue, c_alu_busy, c_dual_commit);
    check(c_strand > 0,      "strand collapse happened");
    check(c_pfx_drop > 0,    "dropped prefix happened");
    check(c_loop > 0,        "closed-loop spinning happened");
    check(c_rob_full > 0,    "reorder buffer full happened");
    check(c_waw > 0,         "WAW hold happened");
    check(c_war > 0,         "WAR hold happened");
    check(c_dual_disp > 0,   "dual dispatch happened");
    check(c_pair_hold > 0,   "hold by the older macro-op of a pair happened");
    check(c_dual_issue > 0,  "dual issue happened");
    check(c_alu_busy > 0,    "ALU busy with a strand happened");
    check(c_dual_commit > 0, "dual retirement happened");
    $display("activity        cycles  broadcasts  wakeups  select_cycles  reg_reads  writebacks");
    $display("baseline  %10d %10d %10d %10d %10d %10d", ba.cycles, ba.bcasts, ba.wakeups, ba.selects, ba.rdreads, ba.writebacks);
    $display("strands   %10d %10d %10d %10d %10d %10d", da.cycles, da.bcasts, da.wakeups, da.selects, da.rdreads, da.writebacks);
    $display("IPC baseline %0.3f  strands %0.3f", real'(n_alu) / real'(ba.cycles), real'(n_alu) / real'(da.cycles));
    check(da.bcasts < ba.bcasts && da.writebacks < ba.writebacks, "fewer broadcasts and writebacks");
    check(da.rdreads < ba.rdreads, "fewer register reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
