// iq_slot: one issue-queue entry that can hold a whole static strand.
//
// The entry stores a macro-op: valid bit, the op-code and immediate fields of
// every component operation, two source operands (ready bit, tag, oper-id),
// an oper-counter, the destination tag and the strand bit. Only two wakeup
// comparators exist, one per source, whatever the strand length: each compares
// its source tag with every tag on the result tag bus and sets the ready bit on
// a match. The oper-id of a source names the component operation that reads
// it. For a mixed strand (one holding non-ALU operations, issued one operation
// at a time) a source only gates the request while the oper-counter equals its
// oper-id; for a single instruction or an ALU-only strand, which issue
// atomically to a closed-loop ALU, every valid source must be ready.
//
//   src_ok[i] = !src_valid[i] | ready[i] | (mixed & oper_counter != oper_id[i])
//   req       = valid & !in_flight & src_ok[0] & src_ok[1]
//
// On grant an atomic macro-op frees the entry. A mixed strand keeps the entry,
// waits for op_done of the operation in flight and then advances the
// oper-counter and requests again; the entry is freed after its last
// operation. issue_bcast tells the functional unit whether the issued
// operation's result tag may be broadcast: internal results of a strand are
// never broadcast because their only consumer is inside the same entry.
//
// Timing: allocation and wakeup take effect at the clock edge; a tag broadcast
// in the same cycle as the allocation is caught. req is a function of the
// registered state only.
//
// Follows the document: the fields, the two shared comparators, the
// oper-counter / oper-id gating and the suppressed broadcast of internal
// results. This design's own choice: the op_done handshake that advances the
// oper-counter.
module iq_slot
  import strand_pkg::*;
#(
  parameter int NB = 2   // result tags broadcast per cycle
) (
  input  logic                clk,
  input  logic                rst_n,
  // allocation
  input  logic                alloc,
  input  macro_op_t           alloc_op,
  input  logic [1:0]          alloc_ready,
  // result tag bus
  input  logic [NB-1:0]       bcast_valid,
  input  tag_t [NB-1:0]       bcast_tag,
  // select
  output logic                req,
  input  logic                grant,
  input  logic                op_done,
  // state
  output logic                valid,
  output macro_op_t           entry,
  output logic [1:0]          src_ready,
  output opid_t               oper_counter,
  output logic                issue_bcast,
  output logic                is_last_op
);

  logic       in_flight;
  logic [1:0] match, alloc_match, src_ok;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      match[i]       = 1'b0;
      alloc_match[i] = 1'b0;
      for (int b = 0; b < NB; b++) begin
        match[i]       |= bcast_valid[b] && (bcast_tag[b] == entry.src_tag[i]);
        alloc_match[i] |= bcast_valid[b] && (bcast_tag[b] == alloc_op.src_tag[i]);
      end
      src_ok[i] = !entry.src_valid[i] || src_ready[i] ||
                  (entry.mixed && (oper_counter != entry.src_opid[i]));
    end
  end

  assign is_last_op  = !entry.mixed ||
                       (LEN_W'(oper_counter) == entry.len - LEN_W'(1));
  assign req         = valid && !in_flight && src_ok[0] && src_ok[1];
  assign issue_bcast = is_last_op;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid        <= 1'b0;
      in_flight    <= 1'b0;
      entry        <= '0;
      src_ready    <= '0;
      oper_counter <= '0;
    end else if (alloc) begin
      valid        <= 1'b1;
      in_flight    <= 1'b0;
      entry        <= alloc_op;
      src_ready    <= alloc_ready | alloc_match;
      oper_counter <= '0;
    end else if (valid) begin
      src_ready <= src_ready | match;
      if (grant) begin
        if (is_last_op) valid     <= 1'b0;
        else            in_flight <= 1'b1;
      end else if (in_flight && op_done) begin
        in_flight    <= 1'b0;
        oper_counter <= oper_counter + opid_t'(1);
      end
    end
  end

  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !valid);
  a_grant_req:  assert property (@(posedge clk) disable iff (!rst_n) grant |-> req);

endmodule
