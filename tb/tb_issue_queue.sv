// tb_issue_queue: self-checking test of the six-entry issue queue.
//
// Up to two macro-ops per cycle, with random sources and initial readiness,
// are allocated while random result tags are broadcast and random issue ports are free. A
// reference model here tracks, per outstanding macro-op, whether each source
// has been woken. Checks: only macro-ops whose sources are all ready issue,
// each issues exactly once and unchanged, a free port is never left idle
// while a ready macro-op waits, no port issues while busy, the queue accepts
// exactly as many macro-ops as there are free entries, and the WAR queries
// report exactly the registers that waiting macro-ops still read.
module tb_issue_queue;
  import strand_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 6, W = 2, NB = 2, DA = 2;
  logic [DA-1:0]             alloc_valid, alloc_ready, war_hit;
  macro_op_t [DA-1:0]        alloc_op;
  logic [DA-1:0][1:0]        alloc_src_ready;
  logic [NB-1:0]             bv;
  tag_t [NB-1:0]             bt;
  logic [W-1:0]              port_free, issue_valid, issue_bcast;
  macro_op_t [W-1:0]         issue_op;
  logic [W-1:0][2:0]         issue_slot;
  tag_t [DA-1:0]             war_tag;
  logic [N-1:0]              slot_valid;
  logic [N-1:0][1:0]         waiting;

  issue_queue #(.N(N), .W(W), .NB(NB), .DA(DA)) dut (.clk(clk), .rst_n(rst_n),
    .alloc_valid(alloc_valid), .alloc_op(alloc_op), .alloc_src_ready(alloc_src_ready),
    .alloc_ready(alloc_ready), .bcast_valid(bv), .bcast_tag(bt), .port_free(port_free),
    .issue_valid(issue_valid), .issue_op(issue_op), .issue_bcast(issue_bcast),
    .issue_slot(issue_slot), .op_done('0), .war_tag(war_tag), .war_hit(war_hit),
    .slot_valid(slot_valid), .slot_waiting_srcs(waiting));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: outstanding macro-ops keyed by an id carried in the first immediate
  macro_op_t m_op[int];
  bit        m_rdy[int][2];
  int issued = 0, full_cycles = 0, dual = 0;

  function automatic int id_of(macro_op_t m);
    return int'(m.ops[0].imm);
  endfunction

  initial begin
    int next_id = 0;
    alloc_valid = '0; alloc_op = '0; alloc_src_ready = '0; bv = 0; bt = '0; port_free = 0; war_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int nready;
      bit exp_war;
      @(negedge clk);
      // drive this cycle
      port_free = 2'($urandom);
      bv = 2'($urandom);
      bt[0] = tag_t'(1 + $urandom % 12); bt[1] = tag_t'(1 + $urandom % 12);
      for (int p = 0; p < DA; p++) begin
        war_tag[p] = tag_t'(1 + $urandom % 12);
        alloc_op[p] = '0;
        alloc_op[p].len = LEN_W'(1 + $urandom % MAX_STRAND_LEN);
        alloc_op[p].src_valid = 2'($urandom);
        alloc_op[p].src_tag[0] = tag_t'(1 + $urandom % 12);
        alloc_op[p].src_tag[1] = tag_t'(1 + $urandom % 12);
        alloc_op[p].dest_valid = 1;
        alloc_op[p].dest_tag = tag_t'($urandom);
        alloc_op[p].ops[0].imm = IMM_W'(next_id + p);
        alloc_src_ready[p] = 2'($urandom);
      end
      case ($urandom % 3)
        0: alloc_valid = 2'b00;
        1: alloc_valid = 2'b01;
        default: alloc_valid = 2'b11;
      endcase
      alloc_valid &= alloc_ready;
      if (alloc_valid[0] == 0) alloc_valid = 0;
      #1;
      // checks on the combinational outputs
      check(alloc_ready[0] == (m_op.size() < N) && alloc_ready[1] == (m_op.size() < N - 1),
            $sformatf("accepts exactly as many as free entries: ready %b held %0d valid %b", alloc_ready, m_op.size(), slot_valid));
      if (m_op.size() == N) full_cycles++;
      nready = 0;
      for (int p = 0; p < DA; p++) begin
        exp_war = 0;
        foreach (m_op[k])
          for (int i = 0; i < 2; i++) if (m_op[k].src_valid[i] && m_op[k].src_tag[i] == war_tag[p]) exp_war = 1;
        check(war_hit[p] == exp_war, "WAR query");
      end
      foreach (m_op[k]) begin
        if ((!m_op[k].src_valid[0] || m_rdy[k][0]) && (!m_op[k].src_valid[1] || m_rdy[k][1])) nready++;
      end
      check(($countones(issue_valid & ~port_free)) == 0, "no issue to a busy port");
      check($countones(issue_valid) == ((nready < $countones(port_free)) ? nready : $countones(port_free)),
            $sformatf("issue count %b ready %0d free %b", issue_valid, nready, port_free));
      for (int p = 0; p < W; p++) begin
        if (issue_valid[p]) begin
          int k;
          k = id_of(issue_op[p]);
          check(m_op.exists(k) && issue_op[p] == m_op[k], "issued op is an outstanding one, unchanged");
          if (m_op.exists(k))
            check((!m_op[k].src_valid[0] || m_rdy[k][0]) && (!m_op[k].src_valid[1] || m_rdy[k][1]),
                  "issued op was ready");
          check(issue_bcast[p], "single op broadcasts");
        end
      end
      if (issue_valid == 2'b11) dual++;
      @(posedge clk);
      // model update
      for (int p = 0; p < W; p++) if (issue_valid[p]) begin m_op.delete(id_of(issue_op[p])); issued++; end
      foreach (m_op[k]) for (int i = 0; i < 2; i++)
        for (int b = 0; b < NB; b++) if (bv[b] && bt[b] == m_op[k].src_tag[i]) m_rdy[k][i] = 1;
      for (int p = 0; p < DA; p++) begin
        if (alloc_valid[p]) begin
          int k;
          k = id_of(alloc_op[p]);
          m_op[k] = alloc_op[p];
          for (int i = 0; i < 2; i++) begin
            m_rdy[k][i] = alloc_src_ready[p][i];
            for (int b = 0; b < NB; b++) if (bv[b] && bt[b] == alloc_op[p].src_tag[i]) m_rdy[k][i] = 1;
          end
          next_id = (next_id + 1) % 65536;
        end
      end
    end
    $display("issued=%0d full_cycles=%0d dual_issue=%0d", issued, full_cycles, dual);
    check(issued > 500 && full_cycles > 0 && dual > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
