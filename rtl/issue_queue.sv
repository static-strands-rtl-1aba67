// issue_queue: strand-capable issue queue.
//
// N iq_slot entries share a result tag bus of NB tags per cycle and one
// select_logic block that grants up to W entries per cycle to idle functional
// units. A single instruction and a whole strand each take one entry, which is
// what raises the queue's effective capacity when strands are present.
//
// Allocation: up to DA macro-ops per cycle (the dispatch width), in program
// order, go into the lowest-numbered free entries; alloc_ready[p] says that at
// least p+1 entries are free. Issue: for each port p, issue_valid[p]
// carries the granted entry's macro-op; the entry is released at the same
// clock edge. war_hit[p] reports whether any waiting entry still has to read
// register war_tag[p]; the dispatch stage uses it because this core does not
// rename registers. op_done[s] advances the oper-counter of a mixed strand in
// entry s.
//
// Follows the document: six entries (Table 2, out-of-order model), shared
// wakeup comparators per entry, select with grant. This design's own choices:
// allocation into the lowest free entry and the register-name WAR query.
module issue_queue
  import strand_pkg::*;
#(
  parameter int N  = IQ_ENTRIES,
  parameter int W  = 2,
  parameter int NB = 2,
  parameter int DA = 2   // allocations per cycle
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // dispatch
  input  logic [DA-1:0]               alloc_valid,
  input  macro_op_t [DA-1:0]          alloc_op,
  input  logic [DA-1:0][1:0]          alloc_src_ready,
  output logic [DA-1:0]               alloc_ready,
  // result tag bus
  input  logic [NB-1:0]               bcast_valid,
  input  tag_t [NB-1:0]               bcast_tag,
  // issue ports
  input  logic [W-1:0]                port_free,
  output logic [W-1:0]                issue_valid,
  output macro_op_t [W-1:0]           issue_op,
  output logic [W-1:0]                issue_bcast,
  output logic [W-1:0][$clog2(N)-1:0] issue_slot,
  input  logic [N-1:0]                op_done,
  // register-name hazard query
  input  tag_t [DA-1:0]               war_tag,
  output logic [DA-1:0]               war_hit,
  // status
  output logic [N-1:0]                slot_valid,
  output logic [N-1:0][1:0]           slot_waiting_srcs  // valid source not yet ready
);

  logic [N-1:0]            req, grant;
  logic [N-1:0]            slot_alloc;
  macro_op_t [N-1:0]       slot_op;
  logic [N-1:0][1:0]       slot_rdy;
  macro_op_t [N-1:0]       entries;
  logic [N-1:0][1:0]       rdy;
  logic [N-1:0]            bc_ok;

  // the p-th free entry, counted from entry 0, takes allocation port p
  always_comb begin
    int nfree;
    nfree      = 0;
    slot_alloc = '0;
    slot_op    = '0;
    slot_rdy   = '0;
    for (int s = 0; s < N; s++) begin
      for (int p = 0; p < DA; p++) begin
        if (!slot_valid[s] && nfree == p) begin
          slot_alloc[s]   = alloc_valid[p];
          slot_op[s]      = alloc_op[p];
          slot_rdy[s]     = alloc_src_ready[p];
        end
      end
      if (!slot_valid[s]) nfree++;
    end
  end

  // free-entry count, kept apart from the port steering so that alloc_ready
  // does not depend on alloc_valid
  always_comb begin
    int nfree;
    nfree = 0;
    for (int s = 0; s < N; s++) begin
      if (!slot_valid[s]) nfree++;
    end
    for (int p = 0; p < DA; p++) alloc_ready[p] = (nfree > p);
  end

  for (genvar s = 0; s < N; s++) begin : g_slot
    iq_slot #(.NB(NB)) u_slot (
      .clk          (clk),
      .rst_n        (rst_n),
      .alloc        (slot_alloc[s]),
      .alloc_op     (slot_op[s]),
      .alloc_ready  (slot_rdy[s]),
      .bcast_valid  (bcast_valid),
      .bcast_tag    (bcast_tag),
      .req          (req[s]),
      .grant        (grant[s]),
      .op_done      (op_done[s]),
      .valid        (slot_valid[s]),
      .entry        (entries[s]),
      .src_ready    (rdy[s]),
      .oper_counter (),
      .issue_bcast  (bc_ok[s]),
      .is_last_op   ()
    );
  end

  select_logic #(.N(N), .W(W)) u_select (
    .req        (req),
    .port_free  (port_free),
    .grant      (grant),
    .port_valid (issue_valid),
    .port_idx   (issue_slot)
  );

  always_comb begin
    for (int p = 0; p < W; p++) begin
      issue_op[p]    = entries[issue_slot[p]];
      issue_bcast[p] = bc_ok[issue_slot[p]];
    end
    war_hit = '0;
    for (int s = 0; s < N; s++) begin
      for (int i = 0; i < 2; i++) begin
        for (int p = 0; p < DA; p++) begin
          war_hit[p] |= slot_valid[s] && entries[s].src_valid[i] &&
                        entries[s].src_tag[i] == war_tag[p];
        end
        slot_waiting_srcs[s][i] = slot_valid[s] && entries[s].src_valid[i] && !rdy[s][i];
      end
    end
  end

  for (genvar p = 0; p < DA; p++) begin : g_chk
    a_alloc_room: assert property (@(posedge clk) disable iff (!rst_n)
                                   alloc_valid[p] |-> alloc_ready[p]);
  end

endmodule
