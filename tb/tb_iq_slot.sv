// tb_iq_slot: self-checking test of one strand-capable issue-queue entry.
//
// Directed cases: wakeup by the tag bus, wakeup in the allocation cycle, an
// atomic macro-op freed on grant, and a three-operation mixed strand whose
// second source belongs to its last operation (oper-id 2): the entry must
// request while that source is still missing, advance the oper-counter on
// op_done, stop requesting at operation 2 until the source is broadcast, and
// allow a tag broadcast only for its last operation. A random phase then
// compares req with a reference model of the ready bits over many random
// broadcasts.
module tb_iq_slot;
  import strand_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            alloc, req, grant, op_done, valid, issue_bcast, is_last;
  macro_op_t       alloc_op, entry;
  logic [1:0]      alloc_ready, src_ready;
  logic [1:0]      bv;
  tag_t [1:0]      bt;
  opid_t           ctr;

  iq_slot #(.NB(2)) dut (.clk(clk), .rst_n(rst_n), .alloc(alloc), .alloc_op(alloc_op),
    .alloc_ready(alloc_ready), .bcast_valid(bv), .bcast_tag(bt), .req(req), .grant(grant),
    .op_done(op_done), .valid(valid), .entry(entry), .src_ready(src_ready),
    .oper_counter(ctr), .issue_bcast(issue_bcast), .is_last_op(is_last));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic macro_op_t mop(int len, bit mixed, bit v1, int t1, int id1,
                                    bit v2, int t2, int id2);
    macro_op_t m;
    m = '0;
    m.len = LEN_W'(len); m.mixed = mixed; m.strand = len > 1;
    m.src_valid = {v2, v1};
    m.src_tag[0] = tag_t'(t1); m.src_tag[1] = tag_t'(t2);
    m.src_opid[0] = opid_t'(id1); m.src_opid[1] = opid_t'(id2);
    m.dest_valid = 1; m.dest_tag = 6'd9;
    return m;
  endfunction

  task automatic idle_inputs();
    alloc = 0; grant = 0; op_done = 0; bv = 0; bt = '0; alloc_ready = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle_inputs(); alloc_op = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!valid && !req, "empty after reset");

    // 1: wakeup by broadcast
    alloc = 1; alloc_op = mop(1, 0, 1, 5, 0, 1, 7, 0); alloc_ready = 2'b10;
    @(negedge clk); idle_inputs();
    check(valid && !req, "waits for source 1");
    bv = 2'b10; bt[1] = 6'd4;  // wrong tag
    @(negedge clk); idle_inputs();
    check(!req, "no wakeup on other tag");
    bv = 2'b10; bt[1] = 6'd5;
    @(negedge clk); idle_inputs();
    check(req && issue_bcast, "woken by tag bus");
    grant = req;  // a selector grants requesting entries only
    @(negedge clk); idle_inputs();
    check(!valid && !req, "freed on grant");

    // 2: wakeup in the allocation cycle
    alloc = 1; alloc_op = mop(2, 0, 1, 11, 0, 1, 12, 1); alloc_ready = 2'b00;
    bv = 2'b11; bt[0] = 6'd12; bt[1] = 6'd11;
    @(negedge clk); idle_inputs();
    check(req, "caught broadcast during allocation");
    check(src_ready == 2'b11, "both ready");
    // an ALU-only strand needs all its sources, whatever the oper-ids
    grant = req;  // a selector grants requesting entries only
    @(negedge clk); idle_inputs();
    alloc = 1; alloc_op = mop(3, 0, 1, 11, 0, 1, 12, 2); alloc_ready = 2'b01;
    @(negedge clk); idle_inputs();
    check(!req, "ALU strand waits for a late source");
    grant = 0; bv = 2'b01; bt[0] = 6'd12;
    @(negedge clk); idle_inputs();
    check(req && issue_bcast, "ALU strand ready, broadcasts once");
    grant = req;  // a selector grants requesting entries only
    @(negedge clk); idle_inputs();
    check(!valid, "ALU strand leaves atomically");

    // 3: mixed strand stepping with oper-counter / oper-id
    alloc = 1; alloc_op = mop(3, 1, 1, 20, 0, 1, 21, 2); alloc_ready = 2'b01;
    @(negedge clk); idle_inputs();
    check(req && ctr == 0 && !issue_bcast, "op 0 issues without op 2's source, no broadcast");
    grant = req;  // a selector grants requesting entries only
    @(negedge clk); idle_inputs();
    check(valid && !req, "waits while op 0 in flight");
    @(negedge clk);
    op_done = 1;
    @(negedge clk); idle_inputs();
    check(ctr == 1 && req && !issue_bcast, "op 1 requests, internal result not broadcast");
    grant = req;  // a selector grants requesting entries only
    @(negedge clk); idle_inputs();
    op_done = 1;
    @(negedge clk); idle_inputs();
    check(ctr == 2 && !req, "op 2 needs its own source");
    bv = 2'b01; bt[0] = 6'd21;
    @(negedge clk); idle_inputs();
    check(req && issue_bcast && is_last, "last op ready and broadcasts");
    grant = req;  // a selector grants requesting entries only
    @(negedge clk); idle_inputs();
    check(!valid, "freed after last op");

    // a slot left occupied by a failed step above must not disturb section 4
    if (valid) begin
      rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    end

    // 4: random wakeups against a model
    for (int t = 0; t < 300; t++) begin
      bit m_r0, m_r1, v0, v1;
      int t0, t1;
      v0 = $urandom % 2; v1 = $urandom % 2;
      t0 = $urandom % 8; t1 = $urandom % 8;
      m_r0 = $urandom % 2; m_r1 = $urandom % 2;
      alloc = 1; alloc_op = mop(1, 0, v0, t0, 0, v1, t1, 0); alloc_ready = {m_r1, m_r0};
      @(negedge clk); idle_inputs();
      for (int c = 0; c < 6; c++) begin
        bit exp_req;
        exp_req = (!v0 || m_r0) && (!v1 || m_r1);
        check(req == exp_req, $sformatf("random req %0d exp %0d", req, exp_req));
        if (req && $urandom % 3 == 0) begin
          grant = 1;
          @(negedge clk); idle_inputs();
          break;
        end
        bv = 2'($urandom); bt[0] = tag_t'($urandom % 8); bt[1] = tag_t'($urandom % 8);
        if ((bv[0] && bt[0] == t0) || (bv[1] && bt[1] == t0)) m_r0 = 1;
        if ((bv[0] && bt[0] == t1) || (bv[1] && bt[1] == t1)) m_r1 = 1;
        @(negedge clk); idle_inputs();
      end
      if (valid) begin
        // drain
        while (!req) begin bv = 2'b11; bt[0] = tag_t'(t0); bt[1] = tag_t'(t1); @(negedge clk); idle_inputs(); end
        grant = 1; @(negedge clk); idle_inputs();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
