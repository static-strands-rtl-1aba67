// closed_loop_alu: integer ALU with a self-bypass (closed-loop) mode.
//
// A macro-op is issued with its external source values, which are captured in
// two input buffers together with the op-codes, immediates and operand routing
// of every component operation. The ALU then executes one component operation
// per cycle. While a strand is running, each intermediate result is latched and
// fed straight back to the ALU inputs (the OPD_CHAIN operand); it is never
// driven onto the result bus, never written to the register file and its tag is
// never broadcast. Only the last operation's result leaves the unit.
//
// Timing: a macro-op of length L issued at clock edge E0 presents its result
// (res_valid) combinationally during the cycle that ends with edge E0+L, and the
// register file and scoreboard take it at that edge. A single instruction
// (L = 1) therefore has one cycle of latency, as the document assumes
// single-cycle ALU operation with no double pumping. The unit is busy while a
// strand spins; can_issue rises again in the cycle of the last operation so
// the next macro-op can be issued back to back.
//
// Follows the document: buffered inputs, a loop latch, output only after the
// last op, the unit unavailable for issue while busy. This design's own
// choices: the explicit per-operation operand routing fields and the
// combinational result in the last cycle.
module closed_loop_alu
  import strand_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // issue
  input  logic                issue_valid,
  input  macro_op_t           issue_op,
  input  word_t               src1_val,
  input  word_t               src2_val,
  output logic                can_issue,
  // result (writeback, bypass and tag broadcast)
  output logic                res_valid,
  output logic                res_dest_valid,
  output tag_t                res_dest_tag,
  output word_t               res_val,
  output logic [ROB_ID_W-1:0] res_rob_id,
  // status
  output logic                loop_active  // spinning on an intermediate result
);

  logic                running;
  logic [LEN_W-1:0]    step;
  macro_op_t           cur;
  word_t               buf1, buf2, chain;
  strand_op_t          op_now;
  word_t               opa, opb, y;
  logic                last;

  function automatic word_t pick(opd_sel_e sel, word_t s1, word_t s2,
                                 logic [IMM_W-1:0] imm, word_t ch);
    case (sel)
      OPD_SRC1:  return s1;
      OPD_SRC2:  return s2;
      OPD_IMM:   return sext_imm(imm);
      OPD_CHAIN: return ch;
      default:   return '0;
    endcase
  endfunction

  always_comb begin
    op_now = cur.ops[step[OPID_W-1:0]];
    opa    = pick(op_now.a_sel, buf1, buf2, op_now.imm, chain);
    opb    = pick(op_now.b_sel, buf1, buf2, op_now.imm, chain);
    y      = alu_compute(op_now.op, opa, opb);
    last   = running && (step == cur.len - LEN_W'(1));
  end

  assign can_issue      = !running || last;
  assign res_valid      = last;
  assign res_dest_valid = last && cur.dest_valid;
  assign res_dest_tag   = cur.dest_tag;
  assign res_val        = y;
  assign res_rob_id     = cur.rob_id;
  assign loop_active    = running && !last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      step    <= '0;
      cur     <= '0;
      buf1    <= '0;
      buf2    <= '0;
      chain   <= '0;
    end else if (issue_valid && can_issue) begin
      running <= 1'b1;
      step    <= '0;
      cur     <= issue_op;
      buf1    <= src1_val;
      buf2    <= src2_val;
    end else if (running) begin
      if (last) begin
        running <= 1'b0;
      end else begin
        chain <= y;
        step  <= step + LEN_W'(1);
      end
    end
  end

  // A strand occupies the unit: nothing may be issued to it while it spins.
  a_no_issue_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                    issue_valid |-> can_issue);
  a_len_ok: assert property (@(posedge clk) disable iff (!rst_n)
                             issue_valid |-> (issue_op.len >= LEN_W'(1) && issue_op.len <= LEN_W'(MAX_STRAND_LEN)));

endmodule
