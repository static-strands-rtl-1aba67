// stab: strand accumulation buffer (dispatch stage).
//
// Decoded instructions arrive up to DW per cycle, in program order in slots
// 0..DW-1. A prefix instruction announces that the next pfx_len instructions
// form a static strand. The buffer gathers those instructions into one
// macro-op: the op-code and immediate of each component, the (at most two)
// external source registers, the external destination (the last instruction's
// destination) and, for each component, where its two operands come from. An
// operand that names the previous component's destination is the transient
// operand and is routed to the closed-loop path (OPD_CHAIN); intermediate
// register numbers are not kept once they have been matched. Each external
// source records the position of the first component that reads it (its
// oper-id). An instruction outside a strand leaves as a macro-op of length 1.
// A strand may straddle cycles; the slots of one cycle are processed one after
// the other, so one cycle can both finish a strand and start another.
//
// Safety: the prefix is only a hint. A prefix whose length is below 2 or above
// MAX_STRAND_LEN is dropped and the instructions that follow are dispatched
// one by one, which is always correct because the annotated program is
// functionally identical to the original. Plain no-ops vanish here too.
//
// Interface: in_valid must be contiguous from slot 0; in_ready accepts all
// valid slots at once. Up to DW macro-ops are registered on out_valid/out_op,
// oldest in slot 0; out_ready must also be contiguous from slot 0 and the
// untaken macro-ops move down to slot 0. New input is accepted only in a cycle
// in which every waiting macro-op is taken. A single instruction accepted at
// edge E is on out_valid after E; a strand leaves after the edge that accepts
// its last component.
//
// Follows the document: prefix-based annotation, the STAB contents (op-codes
// 1..N, immediates 1..N, two external sources, one external destination), no
// storage of intermediate register numbers, dispatch width 2 (Table 2). This
// design's own choices: the operand routing fields, the oper-id assignment by
// first use, treating register 0 as the constant zero without using an
// external source, and the handling of bad prefixes. This instruction set has
// integer ALU instructions only, so every strand built here is an ALU-only
// strand (mixed = 0).
module stab
  import strand_pkg::*;
#(
  parameter int DW = 2   // instructions per cycle
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DW-1:0]       in_valid,
  input  instr_t [DW-1:0]     in_instr,
  output logic                in_ready,
  output logic [DW-1:0]       out_valid,
  output macro_op_t [DW-1:0]  out_op,
  input  logic [DW-1:0]       out_ready,
  output logic                accumulating,  // inside a strand
  output logic                pfx_ignored,   // a prefix was dropped this cycle
  output logic                src_overflow   // a strand named more than two sources
);

  typedef struct packed {
    logic             acc;
    logic [LEN_W-1:0] exp_len;
    logic [LEN_W-1:0] cnt;
    macro_op_t        build;
    tag_t             prev_dest;
  } acc_state_t;

  typedef struct packed {
    acc_state_t st;
    logic       emit;
    macro_op_t  m;
    logic       pfx_drop;
    logic       ovf;
    logic       chain_ok;
  } step_t;

  typedef struct packed {
    macro_op_t m;
    opd_sel_e  sel;
    logic      ovf;
  } resolve_t;

  // Route one source register of component kk, allocating an external source
  // slot on first use.
  function automatic resolve_t resolve(macro_op_t m, tag_t r, logic [LEN_W-1:0] kk,
                                       tag_t pdest);
    resolve_t res;
    res.m   = m;
    res.sel = OPD_ZERO;
    res.ovf = 1'b0;
    if (r == '0) begin
      res.sel = OPD_ZERO;
    end else if (kk != '0 && r == pdest) begin
      res.sel = OPD_CHAIN;
    end else if (m.src_valid[0] && m.src_tag[0] == r) begin
      res.sel = OPD_SRC1;
    end else if (m.src_valid[1] && m.src_tag[1] == r) begin
      res.sel = OPD_SRC2;
    end else if (!m.src_valid[0]) begin
      res.m.src_valid[0] = 1'b1;
      res.m.src_tag[0]   = r;
      res.m.src_opid[0]  = kk[OPID_W-1:0];
      res.sel            = OPD_SRC1;
    end else if (!m.src_valid[1]) begin
      res.m.src_valid[1] = 1'b1;
      res.m.src_tag[1]   = r;
      res.m.src_opid[1]  = kk[OPID_W-1:0];
      res.sel            = OPD_SRC2;
    end else begin
      res.ovf = 1'b1;
    end
    return res;
  endfunction

  // Effect of one instruction on the accumulation state.
  function automatic step_t step(acc_state_t s, instr_t ins);
    step_t            r;
    logic [LEN_W-1:0] k;
    resolve_t         ra, rb;
    strand_op_t       sop;
    macro_op_t        nb;
    r          = '0;
    r.st       = s;
    r.chain_ok = 1'b1;
    case (ins.kind)
      INS_PREFIX: begin
        if (!s.acc) begin
          if (ins.pfx_len < PFX_LEN_W'(2) || ins.pfx_len > PFX_LEN_W'(MAX_STRAND_LEN)) begin
            r.pfx_drop = 1'b1;
          end else begin
            r.st.acc     = 1'b1;
            r.st.exp_len = LEN_W'(ins.pfx_len);
            r.st.cnt     = '0;
          end
        end
      end
      INS_ALU: begin
        k  = s.acc ? s.cnt : '0;
        ra = resolve((k != '0) ? s.build : macro_op_t'('0), ins.rs1, k, s.prev_dest);
        if (ins.use_imm) begin
          rb     = ra;
          rb.sel = OPD_IMM;
          rb.ovf = 1'b0;
        end else begin
          rb = resolve(ra.m, ins.rs2, k, s.prev_dest);
        end
        nb        = rb.m;
        sop.op    = ins.op;
        sop.a_sel = ra.sel;
        sop.b_sel = rb.sel;
        sop.imm   = ins.imm;
        nb.ops[k[OPID_W-1:0]] = sop;
        nb.len        = k + LEN_W'(1);
        nb.dest_valid = (ins.rd != '0);
        nb.dest_tag   = ins.rd;
        nb.strand     = (k != '0);
        nb.mixed      = 1'b0;
        nb.rob_id     = '0;
        r.ovf         = ra.ovf || rb.ovf;
        r.chain_ok    = (k == '0) || ra.sel == OPD_CHAIN || rb.sel == OPD_CHAIN;
        if (!s.acc || s.cnt == s.exp_len - LEN_W'(1)) begin
          r.emit   = 1'b1;
          r.m      = nb;
          r.st.acc = 1'b0;
        end else begin
          r.st.build     = nb;
          r.st.prev_dest = ins.rd;
          r.st.cnt       = s.cnt + LEN_W'(1);
        end
      end
      default: ;
    endcase
    return r;
  endfunction

  acc_state_t              state, nstate;
  macro_op_t [DW-1:0]      emits;
  logic      [DW-1:0]      emit_v;
  logic      [DW-1:0]      rem_v;
  macro_op_t [DW-1:0]      rem_op;
  logic                    fire, chain_bad;

  assign in_ready     = ((out_valid & ~out_ready) == '0);
  assign fire         = in_ready && in_valid[0];
  assign accumulating = state.acc;

  step_t [DW-1:0] steps;
  localparam int  CW_ = $clog2(DW + 1);
  logic [CW_-1:0] pos    [DW];
  logic [CW_-1:0] ntaken;

  always_comb begin
    acc_state_t s;
    s            = state;
    pfx_ignored  = 1'b0;
    src_overflow = 1'b0;
    chain_bad    = 1'b0;
    for (int i = 0; i < DW; i++) begin
      steps[i] = '0;
      if (in_valid[i]) begin
        steps[i] = step(s, in_instr[i]);
        s        = steps[i].st;
      end
      pfx_ignored  |= fire && steps[i].pfx_drop;
      src_overflow |= fire && steps[i].ovf;
      chain_bad    |= fire && in_valid[i] && !steps[i].chain_ok;
    end
    nstate = s;
  end

  // compact the emitted macro-ops and the macro-ops left waiting to slot 0
  always_comb begin
    logic [CW_-1:0] n;
    n      = '0;
    ntaken = '0;
    for (int i = 0; i < DW; i++) begin
      pos[i] = n;
      if (steps[i].emit) n = n + CW_'(1);
      if (out_valid[i] && out_ready[i]) ntaken = ntaken + CW_'(1);
    end
    for (int o = 0; o < DW; o++) begin
      emit_v[o] = 1'b0;
      emits[o]  = '0;
      rem_v[o]  = 1'b0;
      rem_op[o] = '0;
      for (int i = 0; i < DW; i++) begin
        if (steps[i].emit && pos[i] == CW_'(o)) begin
          emit_v[o] = 1'b1;
          emits[o]  = steps[i].m;
        end
        if (i - o == int'(ntaken)) begin
          rem_v[o]  = out_valid[i] && !out_ready[i];
          rem_op[o] = out_op[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      out_valid <= '0;
      out_op    <= '0;
    end else if (fire) begin
      state     <= nstate;
      out_valid <= emit_v;
      out_op    <= emits;
    end else begin
      out_valid <= rem_v;
      out_op    <= rem_op;
    end
  end

  // The annotation is trusted to follow the strand rules.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !src_overflow);
  a_chain_used:  assert property (@(posedge clk) disable iff (!rst_n) !chain_bad);
  a_in_contig:   assert property (@(posedge clk) disable iff (!rst_n)
                                  in_valid[DW-1:1] != '0 |-> in_valid[0]);
  a_out_contig:  assert property (@(posedge clk) disable iff (!rst_n)
                                  out_ready[DW-1:1] != '0 |-> out_ready[0]);

endmodule
