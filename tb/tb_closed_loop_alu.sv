// tb_closed_loop_alu: self-checking test of the closed-loop ALU.
//
// Issues random macro-ops of one to MAX_STRAND_LEN operations with random
// op-codes, immediates and operand routing (the first operation reads external
// sources, immediates or zero; every later one reads the loop result on one
// side). The expected result is computed by an independent reference model in
// this file. Checks: the final value, the destination tag and rob id, that the
// result appears exactly L cycles after issue (one operation per cycle), that
// no intermediate result is presented, and that the unit refuses issue while
// it spins and accepts a new macro-op in the cycle of the last operation.
module tb_closed_loop_alu;
  import strand_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                issue_valid;
  macro_op_t           issue_op;
  word_t               s1, s2;
  logic                can_issue, res_valid, res_dest_valid, loop_active;
  tag_t                res_tag;
  word_t               res_val;
  logic [ROB_ID_W-1:0] res_rob;

  closed_loop_alu dut (
    .clk(clk), .rst_n(rst_n), .issue_valid(issue_valid), .issue_op(issue_op),
    .src1_val(s1), .src2_val(s2), .can_issue(can_issue), .res_valid(res_valid),
    .res_dest_valid(res_dest_valid), .res_dest_tag(res_tag), .res_val(res_val),
    .res_rob_id(res_rob), .loop_active(loop_active));

  int checks = 0, failures = 0;

  function automatic logic [31:0] ref_op(int op, logic [31:0] a, logic [31:0] b);
    case (op)
      0: return a + b;
      1: return a - b;
      2: return a & b;
      3: return a | b;
      4: return a ^ b;
      5: return a << (b % 32);
      6: return a >> (b % 32);
      7: return $unsigned($signed(a) >>> (b % 32));
      8: return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      9: return (a < b) ? 32'd1 : 32'd0;
      default: return 0;
    endcase
  endfunction

  function automatic logic [31:0] ref_opd(int sel, logic [31:0] v1, logic [31:0] v2,
                                          logic [15:0] imm, logic [31:0] ch);
    case (sel)
      1: return v1;
      2: return v2;
      3: return {{16{imm[15]}}, imm};
      4: return ch;
      default: return 0;
    endcase
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // build a random macro-op and its expected result
  task automatic make_op(output macro_op_t m, output logic [31:0] v1, output logic [31:0] v2,
                         output logic [31:0] expv);
    int len, a, b;
    logic [31:0] ch;
    m   = '0;
    len = 1 + ($urandom % MAX_STRAND_LEN);
    v1  = $urandom;
    v2  = ($urandom % 4 == 0) ? ($urandom % 40) : $urandom;
    m.len        = LEN_W'(len);
    m.strand     = (len > 1);
    m.dest_valid = 1'b1;
    m.dest_tag   = tag_t'($urandom % NUM_REGS);
    m.rob_id     = ROB_ID_W'($urandom % ROB_ENTRIES);
    ch = 0;
    for (int k = 0; k < len; k++) begin
      m.ops[k].op  = alu_op_e'($urandom % 10);
      m.ops[k].imm = IMM_W'($urandom);
      if (k == 0) begin
        a = $urandom % 4;
        b = $urandom % 4;
      end else if ($urandom % 2) begin
        a = 4;
        b = $urandom % 5;
      end else begin
        a = $urandom % 4;
        b = 4;
      end
      m.ops[k].a_sel = opd_sel_e'(a);
      m.ops[k].b_sel = opd_sel_e'(b);
      ch = ref_op(int'(m.ops[k].op), ref_opd(a, v1, v2, m.ops[k].imm, ch),
                  ref_opd(b, v1, v2, m.ops[k].imm, ch));
    end
    expv = ch;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    macro_op_t   m, m2;
    logic [31:0] v1, v2, e, v1b, v2b, e2;
    int cyc;
    issue_valid = 0; issue_op = '0; s1 = 0; s2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(can_issue, "idle unit accepts issue");
    for (int t = 0; t < 400; t++) begin
      make_op(m, v1, v2, e);
      issue_valid = 1; issue_op = m; s1 = v1; s2 = v2;
      @(negedge clk);
      issue_valid = 0; issue_op = '0; s1 = $urandom; s2 = $urandom;
      cyc = 1;
      while (!res_valid && cyc < 10) begin
        check(!can_issue && loop_active, "busy while spinning");
        check(!res_valid, "no intermediate result");
        @(negedge clk);
        cyc++;
      end
      check(cyc == int'(m.len), $sformatf("latency %0d for length %0d", cyc, m.len));
      check(res_val == e, $sformatf("value %h expected %h (len %0d)", res_val, e, m.len));
      check(res_dest_valid && res_tag == m.dest_tag && res_rob == m.rob_id, "dest and rob id");
      check(can_issue, "accepts issue in last cycle");
      if (t % 3 == 0) begin
        // back-to-back issue in the cycle of the last operation
        make_op(m2, v1b, v2b, e2);
        issue_valid = 1; issue_op = m2; s1 = v1b; s2 = v2b;
        @(negedge clk);
        issue_valid = 0;
        cyc = 1;
        while (!res_valid && cyc < 10) begin @(negedge clk); cyc++; end
        check(cyc == int'(m2.len) && res_val == e2, "back-to-back macro-op");
      end else begin
        @(negedge clk);
        check(!res_valid, "single result pulse");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
