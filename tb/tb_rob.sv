// tb_rob: self-checking test of the reorder buffer.
//
// Allocates up to two entries per cycle (each standing for 1..4
// instructions) in random cycles, completes random outstanding entries out of
// order on the two completion ports, and compares every retirement with a program-order reference queue:
// entries must leave in allocation order, only when done, at most two per
// cycle, carrying their instruction counts. Also checks that the buffer
// accepts exactly as many allocations as it has free entries.
module tb_rob;
  import strand_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]           alloc_valid, alloc_ready;
  logic [1:0][LEN_W-1:0] alloc_ninstr;
  logic [1:0][2:0]      alloc_id;
  logic [1:0]           cv;
  logic [1:0][2:0]      cid;
  logic [1:0]           commit_valid;
  logic [1:0][LEN_W-1:0] commit_ninstr;
  logic [2:0]           count;

  rob #(.N(6), .NC(2), .CW(2), .DA(2)) dut (.clk(clk), .rst_n(rst_n), .alloc_valid(alloc_valid),
    .alloc_ninstr(alloc_ninstr), .alloc_ready(alloc_ready), .alloc_id(alloc_id),
    .complete_valid(cv), .complete_id(cid), .commit_valid(commit_valid),
    .commit_ninstr(commit_ninstr), .count(count));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q_id[$], q_n[$];   // program order
  bit done_m[8];
  int full_seen = 0, dual_commit = 0;

  initial begin
    alloc_valid = '0; alloc_ninstr = '0; cv = 0; cid = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int pend[$];
      int nexp;
      int aid[2];
      @(negedge clk);
      // expected retirement this cycle, from the model
      nexp = 0;
      for (int c = 0; c < 2 && c < q_id.size(); c++) begin
        if (done_m[q_id[c]] && nexp == c) nexp++;
      end
      check(commit_valid[0] == (nexp > 0) && commit_valid[1] == (nexp > 1),
            $sformatf("commit %b expected %0d", commit_valid, nexp));
      for (int c = 0; c < nexp; c++)
        check(int'(commit_ninstr[c]) == q_n[c], "committed instruction count");
      check(alloc_ready[0] == (q_id.size() < 6) && alloc_ready[1] == (q_id.size() < 5),
            "accepts as many as free entries");
      check(int'(count) == q_id.size(), "occupancy");
      if (q_id.size() == 6) full_seen++;
      if (nexp == 2) dual_commit++;
      // drive
      case ($urandom % 3)
        0: alloc_valid = 2'b00;
        1: alloc_valid = 2'b01;
        default: alloc_valid = 2'b11;
      endcase
      alloc_valid &= alloc_ready;
      alloc_ninstr[0] = LEN_W'(1 + $urandom % 4);
      alloc_ninstr[1] = LEN_W'(1 + $urandom % 4);
      pend.delete();
      for (int i = nexp; i < q_id.size(); i++) if (!done_m[q_id[i]]) pend.push_back(q_id[i]);
      pend.shuffle();
      cv = 0;
      for (int k = 0; k < 2; k++) begin
        if (pend.size() > 0 && $urandom % 3 == 0) begin
          cv[k] = 1; cid[k] = 3'(pend.pop_front());
        end
      end
      #1 aid[0] = int'(alloc_id[0]); aid[1] = int'(alloc_id[1]);
      @(posedge clk);
      // update model
      for (int c = 0; c < nexp; c++) begin
        done_m[q_id[0]] = 0;
        void'(q_id.pop_front()); void'(q_n.pop_front());
      end
      for (int k = 0; k < 2; k++) if (cv[k]) done_m[cid[k]] = 1;
      for (int p = 0; p < 2; p++) begin
        if (alloc_valid[p]) begin
          q_id.push_back(aid[p]); q_n.push_back(int'(alloc_ninstr[p]));
          done_m[aid[p]] = 0;
        end
      end
    end
    check(full_seen > 0 && dual_commit > 0, "full buffer and dual retirement exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
