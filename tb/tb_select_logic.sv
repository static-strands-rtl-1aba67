// tb_select_logic: exhaustive self-checking test of the select logic.
//
// Every combination of six request bits and two port-free bits is applied.
// The expected grants are worked out here: each free port, in port order,
// takes the lowest-numbered requesting slot not yet taken. Checks the grant
// vector, the per-port valid bits and slot indices, and that no slot is
// granted twice or without a request.
module tb_select_logic;
  localparam int N = 6, W = 2;
  logic [N-1:0] req, grant;
  logic [W-1:0] port_free, port_valid;
  logic [W-1:0][2:0] port_idx;

  select_logic #(.N(N), .W(W)) dut (.req(req), .port_free(port_free), .grant(grant),
                                    .port_valid(port_valid), .port_idx(port_idx));

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

  initial begin
    for (int r = 0; r < (1 << N); r++) begin
      for (int p = 0; p < (1 << W); p++) begin
        int reqs[$];
        int exp_idx[W];
        bit exp_v[W];
        logic [N-1:0] exp_g;
        reqs.delete();
        req = N'(r); port_free = W'(p);
        #1;
        for (int s = 0; s < N; s++) if (r[s]) reqs.push_back(s);
        exp_g = '0;
        for (int q = 0; q < W; q++) begin
          exp_v[q] = 0; exp_idx[q] = 0;
          if (p[q] && reqs.size() > 0) begin
            exp_v[q] = 1;
            exp_idx[q] = reqs.pop_front();
            exp_g[exp_idx[q]] = 1;
          end
        end
        check(grant == exp_g, $sformatf("req %b free %b grant %b exp %b", req, port_free, grant, exp_g));
        check((grant & ~req) == 0, "grant without request");
        for (int q = 0; q < W; q++) begin
          check(port_valid[q] == exp_v[q] && (!exp_v[q] || port_idx[q] == 3'(exp_idx[q])),
                $sformatf("port %0d", q));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
