// tb_stab: self-checking test of the strand accumulation buffer.
//
// A stream of single instructions, prefixed strands of 2..MAX_STRAND_LEN,
// over-long prefixes (which must be ignored), too-short prefixes and no-ops is
// fed with random input gaps and random output back-pressure. For every
// macro-op that leaves the buffer the test checks, against the instruction
// group it should stand for: its length, strand bit and destination; that it
// uses at most two external sources, each with an oper-id naming an operation
// that reads it; and that evaluating the macro-op on random register contents
// gives the same value as executing the group's instructions one by one. It
// also checks that a strand of L instructions leaves one cycle after its last
// instruction is accepted.
module tb_stab;
  import strand_pkg::*;
  import tb_strand_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int DW = 2;
  logic [DW-1:0]      in_valid, out_valid, out_ready;
  logic               in_ready, acc, pign, ovf;
  instr_t [DW-1:0]    in_instr;
  macro_op_t [DW-1:0] out_op;

  stab #(.DW(DW)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_instr(in_instr),
            .in_ready(in_ready), .out_valid(out_valid), .out_op(out_op),
            .out_ready(out_ready), .accumulating(acc), .pfx_ignored(pign),
            .src_overflow(ovf));

  int checks = 0, failures = 0;
  instr_t stream[$];
  int     exp_len[$];          // expected macro-op lengths, in order
  instr_t exp_grp[$][$];       // expected instruction groups
  logic [31:0] regs[64];
  int n_strands = 0, n_ignored = 0, n_single = 0;

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

  // build the stimulus and the expected macro-ops
  initial begin
    instr_t g[$];
    int kind, len;
    for (int i = 0; i < 64; i++) regs[i] = (i == 0) ? 0 : $urandom;
    for (int n = 0; n < 600; n++) begin
      g.delete();
      kind = $urandom % 10;
      if (kind < 3) begin
        gen_group(1, 1'b1, g);
        stream.push_back(g[0]);
        exp_grp.push_back(g);
        n_single++;
      end else if (kind < 8) begin
        len = 2 + $urandom % (MAX_STRAND_LEN - 1);
        gen_group(len, 1'b1, g);
        foreach (g[i]) stream.push_back(g[i]);
        g.pop_front();
        exp_grp.push_back(g);
        n_strands++;
      end else begin
        // prefix the hardware must drop: too long or too short
        len = (kind == 8) ? MAX_STRAND_LEN + 1 + $urandom % 3 : 1;
        gen_group((len < 2) ? 2 : len, 1'b1, g);
        g[0].pfx_len = 4'(len);
        foreach (g[i]) stream.push_back(g[i]);
        g.pop_front();
        foreach (g[i]) begin
          instr_t one[$];
          one.delete();
          one.push_back(g[i]);
          exp_grp.push_back(one);
        end
        n_ignored++;
      end
      if ($urandom % 8 == 0) begin
        instr_t nop;
        nop = '0;
        nop.kind = INS_NOP;
        stream.push_back(nop);
      end
    end
  end

  // checker
  int got = 0;
  int last_accept_cycle = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    for (int o = 0; o < DW; o++) begin
      if (rst_n && out_valid[o] && out_ready[o]) check_macro(out_op[o]);
    end
  end

  task automatic check_macro(macro_op_t m);
    instr_t grp[$];
    logic [31:0] seq[64];
    logic [31:0] mval;
    int nsrc;
    if (exp_grp.size() == 0) begin
      check(0, "unexpected macro-op");
      return;
    end
    grp = exp_grp.pop_front();
    foreach (regs[i]) seq[i] = regs[i];
    foreach (grp[i]) exec_instr(seq, grp[i]);
    mval = eval_macro(m, regs);
    check(int'(m.len) == grp.size(), $sformatf("length %0d expected %0d", m.len, grp.size()));
    check(m.strand == (grp.size() > 1), "strand bit");
    check(m.dest_valid == (grp[grp.size()-1].rd != 0) &&
          (!m.dest_valid || m.dest_tag == grp[grp.size()-1].rd), "destination");
    if (grp[grp.size()-1].rd != 0)
      check(mval == seq[grp[grp.size()-1].rd], $sformatf("macro value %h expected %h", mval,
            seq[grp[grp.size()-1].rd]));
    nsrc = 0;
    for (int s = 0; s < 2; s++) begin
      if (m.src_valid[s]) begin
        nsrc++;
        check(int'(m.src_opid[s]) < int'(m.len) &&
              (m.ops[m.src_opid[s]].a_sel == opd_sel_e'(OPD_SRC1 + s) ||
               m.ops[m.src_opid[s]].b_sel == opd_sel_e'(OPD_SRC1 + s)),
              "oper-id names a reader");
      end
    end
    check(nsrc <= 2 && !m.mixed, "two external sources, ALU only");
    got++;
  endtask

  // driver
  initial begin
    int idx = 0;
    in_valid = '0; in_instr = '0; out_ready = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (idx < stream.size()) begin
      int nin;
      @(negedge clk);
      case ($urandom % 4)
        0: out_ready = 2'b00;
        1: out_ready = 2'b01;
        default: out_ready = 2'b11;
      endcase
      nin = $urandom % 3;
      if (idx + nin > stream.size()) nin = stream.size() - idx;
      in_valid = '0;
      in_instr = '0;
      for (int i = 0; i < nin; i++) begin
        in_valid[i] = 1'b1;
        in_instr[i] = stream[idx + i];
      end
      #1;
      if (in_valid[0] && in_ready) idx += nin;
    end
    @(negedge clk);
    in_valid = '0;
    out_ready = '1;
    repeat (10) @(negedge clk);
    check(exp_grp.size() == 0, $sformatf("%0d macro-ops missing", exp_grp.size()));
    // latency: prefix + 3 components over two cycles with an always-ready output;
    // the same cycle that ends the strand also passes a single instruction.
    begin
      instr_t g[$], one[$];
      gen_group(3, 1'b1, g);
      gen_group(1, 1'b1, one);
      in_valid = 2'b11; in_instr[0] = g[0]; in_instr[1] = g[1];
      @(negedge clk);
      check(out_valid == 2'b00, "nothing leaves mid-strand");
      in_valid = 2'b11; in_instr[0] = g[2]; in_instr[1] = g[3];
      @(negedge clk);
      in_valid = 2'b11; in_instr[0] = one[0]; in_instr[1] = '0;
      in_valid = 2'b01;
      check(out_valid == 2'b01 && out_op[0].len == 3, "strand leaves one cycle after last component");
      g.pop_front();
      exp_grp.push_back(g);
      exp_grp.push_back(one);
      @(negedge clk);
      in_valid = '0;
      check(out_valid == 2'b01 && out_op[0].len == 1, "single follows");
      @(negedge clk);
    end
    $display("singles=%0d strands=%0d ignored_prefixes=%0d macro_ops=%0d", n_single, n_strands,
             n_ignored, got);
    check(n_strands > 0 && n_ignored > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
