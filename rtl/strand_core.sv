// strand_core: back end of an embedded out-of-order core with static-strand
// collapsing.
//
// Decoded instructions enter up to two per cycle. The strand accumulation buffer
// (stab) turns each prefix-annotated strand into one macro-op and passes other
// instructions through as one-op macro-ops. The dispatch stage gives each
// macro-op, up to two per cycle in program order, one reorder-buffer entry and
// one issue-queue entry. The issue queue
// wakes entries from the result tag bus and grants ready entries to two
// closed-loop ALUs; the granted entries read their external sources from the
// register file in the issue cycle. An ALU runs a strand one operation per
// cycle on its own loop latch and only the final result is written back,
// broadcast on the tag bus and marked complete in the reorder buffer, which
// retires in order, up to two entries per cycle.
//
// Registers are not renamed. The dispatch stage therefore keeps a pending-
// write bit per register (the scoreboard) and holds a macro-op back when its
// destination is still to be written by an older macro-op (WAW) or still to be
// read by a waiting issue-queue entry (WAR), and the younger of two macro-ops
// dispatched together when it writes a register the older one reads or
// writes. A source whose pending bit is clear (or whose tag is on the tag bus
// in the dispatch cycle) and that the older macro-op of the pair does not
// write enters the queue ready.
//
// Timing: an instruction accepted at edge E is in the stab output register
// after E and can be dispatched in that cycle; issue happens no earlier than
// the cycle after dispatch; an issued macro-op of L operations writes back at
// the L-th edge after issue; a dependent macro-op can issue in the cycle after
// the writeback edge.
//
// Follows the document: the three additions (accumulation buffer, closed-loop
// ALUs, strand-aware issue entries), two integer ALUs, six issue-queue and six
// reorder-buffer entries, a 64-entry register file with four read and two write
// ports, a result tag bus of two tags, dispatch width two. This design's own
// choices: no renaming (scoreboard hazards instead), no bypass network
// (wakeup at writeback), and an extra register-file read port (dbg_addr /
// dbg_data) that exposes architectural state. Memory, branch, multiply and
// floating-point units, and with them mixed strands, are not part of this
// core, so the oper-counters of the issue entries are never advanced here.
module strand_core
  import strand_pkg::*;
#(
  parameter int NUM_ALUS = 2,
  parameter int IQ_N     = IQ_ENTRIES,
  parameter int ROB_N    = ROB_ENTRIES,
  parameter int DW       = 2            // dispatch width
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // decoded instruction stream, program order in slots 0..DW-1
  input  logic [DW-1:0]                     in_valid,
  input  instr_t [DW-1:0]                   in_instr,
  output logic                              in_ready,
  // retirement
  output logic [1:0]                        commit_valid,
  output logic [1:0][LEN_W-1:0]             commit_ninstr,
  // architectural state inspection
  input  tag_t                              dbg_addr,
  output word_t                             dbg_data,
  output logic                              idle
);

  // ---------------- dispatch: strand accumulation buffer ----------------
  logic [DW-1:0]      stab_valid, stab_ready;
  macro_op_t [DW-1:0] stab_op;
  logic               stab_acc, stab_pfx_ignored, stab_ovf;

  stab #(.DW(DW)) u_stab (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (in_valid),
    .in_instr     (in_instr),
    .in_ready     (in_ready),
    .out_valid    (stab_valid),
    .out_op       (stab_op),
    .out_ready    (stab_ready),
    .accumulating (stab_acc),
    .pfx_ignored  (stab_pfx_ignored),
    .src_overflow (stab_ovf)
  );

  // ---------------- writeback signals ----------------
  logic  [NUM_ALUS-1:0]                 wb_valid, wb_dest_valid;
  tag_t  [NUM_ALUS-1:0]                 wb_tag;
  word_t [NUM_ALUS-1:0]                 wb_val;
  logic  [NUM_ALUS-1:0][ROB_ID_W-1:0]   wb_rob;
  logic  [NUM_ALUS-1:0]                 alu_free, alu_loop;

  // ---------------- scoreboard and hazards ----------------
  // Macro-op d of a dispatch group goes only if every older one of the group
  // goes too. Its hazards are checked against older in-flight work (pending
  // bits, issue-queue sources) and against the older macro-ops of its group.
  logic [NUM_REGS-1:0]         pending;
  logic [DW-1:0]               war_hit, waw_hit, hazard;
  logic [DW-1:0]               iq_alloc_ready, rob_alloc_ready, disp_fire;
  logic [DW-1:0][ROB_ID_W-1:0] rob_alloc_id;
  logic [DW-1:0][1:0]          disp_src_ready;
  macro_op_t [DW-1:0]          disp_op;

  always_comb begin
    logic go;
    go = 1'b1;
    for (int d = 0; d < DW; d++) begin
      waw_hit[d] = stab_op[d].dest_valid && pending[stab_op[d].dest_tag];
      hazard[d]  = stab_op[d].dest_valid && (war_hit[d] || waw_hit[d]);
      disp_op[d]        = stab_op[d];
      disp_op[d].rob_id = rob_alloc_id[d];
      for (int i = 0; i < 2; i++) begin
        disp_src_ready[d][i] = !stab_op[d].src_valid[i] || !pending[stab_op[d].src_tag[i]];
      end
      for (int e = 0; e < d; e++) begin
        if (stab_op[e].dest_valid) begin
          // WAW and WAR against an older macro-op of the same group
          if (stab_op[d].dest_valid && stab_op[d].dest_tag == stab_op[e].dest_tag) hazard[d] = 1'b1;
          // RAW: the source will be written by the older macro-op
          for (int i = 0; i < 2; i++) begin
            if (stab_op[d].src_valid[i] && stab_op[d].src_tag[i] == stab_op[e].dest_tag)
              disp_src_ready[d][i] = 1'b0;
          end
        end
        for (int i = 0; i < 2; i++) begin
          if (stab_op[d].dest_valid && stab_op[e].src_valid[i] &&
              stab_op[e].src_tag[i] == stab_op[d].dest_tag) hazard[d] = 1'b1;
        end
      end
      go           = go && stab_valid[d] && iq_alloc_ready[d] && rob_alloc_ready[d] && !hazard[d];
      disp_fire[d] = go;
    end
  end
  assign stab_ready = disp_fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
    end else begin
      for (int a = 0; a < NUM_ALUS; a++) begin
        if (wb_dest_valid[a]) pending[wb_tag[a]] <= 1'b0;
      end
      for (int d = 0; d < DW; d++) begin
        if (disp_fire[d] && stab_op[d].dest_valid) pending[stab_op[d].dest_tag] <= 1'b1;
      end
    end
  end

  // ---------------- reorder buffer ----------------
  logic [$clog2(ROB_N+1)-1:0] rob_count;
  logic [DW-1:0][LEN_W-1:0]   disp_len;
  tag_t [DW-1:0]              war_tag;

  always_comb begin
    for (int d = 0; d < DW; d++) begin
      disp_len[d] = stab_op[d].len;
      war_tag[d]  = stab_op[d].dest_tag;
    end
  end

  rob #(.N(ROB_N), .NC(NUM_ALUS), .CW(2), .DA(DW)) u_rob (
    .clk            (clk),
    .rst_n          (rst_n),
    .alloc_valid    (disp_fire),
    .alloc_ninstr   (disp_len),
    .alloc_ready    (rob_alloc_ready),
    .alloc_id       (rob_alloc_id),
    .complete_valid (wb_valid),
    .complete_id    (wb_rob),
    .commit_valid   (commit_valid),
    .commit_ninstr  (commit_ninstr),
    .count          (rob_count)
  );

  // ---------------- issue queue ----------------
  logic      [NUM_ALUS-1:0]                 iss_valid, iss_bcast;
  macro_op_t [NUM_ALUS-1:0]                 iss_op;
  logic      [NUM_ALUS-1:0][$clog2(IQ_N)-1:0] iss_slot;
  logic      [IQ_N-1:0]                     iq_valid;
  logic      [IQ_N-1:0][1:0]                iq_waiting;

  issue_queue #(.N(IQ_N), .W(NUM_ALUS), .NB(NUM_ALUS), .DA(DW)) u_iq (
    .clk               (clk),
    .rst_n             (rst_n),
    .alloc_valid       (disp_fire),
    .alloc_op          (disp_op),
    .alloc_src_ready   (disp_src_ready),
    .alloc_ready       (iq_alloc_ready),
    .bcast_valid       (wb_dest_valid),
    .bcast_tag         (wb_tag),
    .port_free         (alu_free),
    .issue_valid       (iss_valid),
    .issue_op          (iss_op),
    .issue_bcast       (iss_bcast),
    .issue_slot        (iss_slot),
    .op_done           ('0),
    .war_tag           (war_tag),
    .war_hit           (war_hit),
    .slot_valid        (iq_valid),
    .slot_waiting_srcs (iq_waiting)
  );

  // ---------------- register file ----------------
  localparam int NRP = 2 * NUM_ALUS + 1;
  tag_t  [NRP-1:0] rf_raddr;
  word_t [NRP-1:0] rf_rdata;

  always_comb begin
    for (int a = 0; a < NUM_ALUS; a++) begin
      rf_raddr[2*a]   = iss_op[a].src_valid[0] ? iss_op[a].src_tag[0] : '0;
      rf_raddr[2*a+1] = iss_op[a].src_valid[1] ? iss_op[a].src_tag[1] : '0;
    end
    rf_raddr[NRP-1] = dbg_addr;
  end
  assign dbg_data = rf_rdata[NRP-1];

  reg_file #(.NREGS(NUM_REGS), .XLEN(XLEN), .NR(NRP), .NW(NUM_ALUS)) u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .raddr (rf_raddr),
    .rdata (rf_rdata),
    .we    (wb_dest_valid),
    .waddr (wb_tag),
    .wdata (wb_val)
  );

  // ---------------- closed-loop ALUs ----------------
  for (genvar a = 0; a < NUM_ALUS; a++) begin : g_alu
    closed_loop_alu u_alu (
      .clk            (clk),
      .rst_n          (rst_n),
      .issue_valid    (iss_valid[a]),
      .issue_op       (iss_op[a]),
      .src1_val       (rf_rdata[2*a]),
      .src2_val       (rf_rdata[2*a+1]),
      .can_issue      (alu_free[a]),
      .res_valid      (wb_valid[a]),
      .res_dest_valid (wb_dest_valid[a]),
      .res_dest_tag   (wb_tag[a]),
      .res_val        (wb_val[a]),
      .res_rob_id     (wb_rob[a]),
      .loop_active    (alu_loop[a])
    );
  end

  assign idle = (stab_valid == '0) && !stab_acc && (rob_count == '0);

  // An ALU-only macro-op always completes with its last operation.
  a_bcast_last: assert property (@(posedge clk) disable iff (!rst_n)
                                 iss_valid[0] |-> iss_bcast[0]);
  a_two_writes: assert property (@(posedge clk) disable iff (!rst_n)
                                 (wb_dest_valid[0] && wb_dest_valid[1]) |-> wb_tag[0] != wb_tag[1]);

endmodule
