// select_logic: matches requesting issue-queue slots to idle functional units.
//
// Each cycle every slot raises req when its operands are ready, and each issue
// port reports whether its unit can accept an operation. Ports are filled in
// order: port 0 takes the lowest-numbered requesting slot, port 1 the next
// one, and so on; a busy port is skipped (a closed-loop ALU spinning on a
// strand is busy). The logic is purely combinational.
//
// The document names the select logic and its grant signal but not its
// policy; the fixed slot-order priority is this design's own choice.
module select_logic #(
  parameter int N = 6,   // issue-queue slots
  parameter int W = 2    // issue ports
) (
  input  logic [N-1:0]                 req,
  input  logic [W-1:0]                 port_free,
  output logic [N-1:0]                 grant,
  output logic [W-1:0]                 port_valid,
  output logic [W-1:0][$clog2(N)-1:0]  port_idx
);

  always_comb begin
    logic [N-1:0] left;
    logic         found;
    left       = req;
    grant      = '0;
    port_valid = '0;
    port_idx   = '0;
    for (int p = 0; p < W; p++) begin
      found = 1'b0;
      if (port_free[p]) begin
        for (int s = 0; s < N; s++) begin
          if (!found && left[s]) begin
            found          = 1'b1;
            left[s]        = 1'b0;
            grant[s]       = 1'b1;
            port_valid[p]  = 1'b1;
            port_idx[p]    = ($clog2(N))'(s);
          end
        end
      end
    end
  end

endmodule
