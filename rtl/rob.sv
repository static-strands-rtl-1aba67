// rob: reorder buffer that keeps program order for retirement.
//
// Entries are allocated in program order at dispatch, up to DA per cycle
// (alloc_valid contiguous from port 0, alloc_ready[p] = room for p+1 more,
// alloc_id[p] the entry port p gets), and retired in order, up to CW per
// cycle, once their result has been produced. A collapsed strand takes a
// single entry however many instructions it holds, so the buffer
// records how many instructions each entry stands for and commit reports the
// count of instructions retired. An entry is marked done when a functional
// unit returns its id on one of the NC completion ports.
//
// Timing: alloc_id is valid in the cycle of the allocation; completion and
// retirement take effect at the clock edge; an entry completed at edge E can
// retire in the cycle after E.
//
// Follows the document: six entries (Table 2, out-of-order model) and one
// entry per strand. This design's own choices: the commit width of two and
// circular head/tail pointers. The core has no branches or exceptions, so
// nothing is ever squashed.
module rob
  import strand_pkg::*;
#(
  parameter int N  = ROB_ENTRIES,
  parameter int NC = 2,
  parameter int CW = 2,
  parameter int DA = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [DA-1:0]                alloc_valid,
  input  logic [DA-1:0][LEN_W-1:0]     alloc_ninstr,
  output logic [DA-1:0]                alloc_ready,
  output logic [DA-1:0][$clog2(N)-1:0] alloc_id,
  input  logic [NC-1:0]                complete_valid,
  input  logic [NC-1:0][$clog2(N)-1:0] complete_id,
  output logic [CW-1:0]                commit_valid,
  output logic [CW-1:0][LEN_W-1:0]     commit_ninstr,
  output logic [$clog2(N+1)-1:0]       count
);

  localparam int IW = $clog2(N);

  logic [N-1:0]            busy, done;
  logic [N-1:0][LEN_W-1:0] ninstr;
  logic [IW-1:0]           head, tail;

  function automatic logic [IW-1:0] wrap_inc(logic [IW-1:0] p, int unsigned d);
    int unsigned v;
    v = (int'(p) + d) % N;
    return IW'(v);
  endfunction

  always_comb begin
    for (int p = 0; p < DA; p++) begin
      alloc_ready[p] = (int'(count) + p < N);
      alloc_id[p]    = wrap_inc(tail, p);
    end
  end

  always_comb begin
    logic stop;
    stop = 1'b0;
    for (int c = 0; c < CW; c++) begin
      logic [IW-1:0] idx;
      idx = wrap_inc(head, c);
      commit_valid[c]  = !stop && busy[idx] && done[idx];
      commit_ninstr[c] = ninstr[idx];
      if (!commit_valid[c]) stop = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= '0;
      done   <= '0;
      ninstr <= '0;
      head   <= '0;
      tail   <= '0;
      count  <= '0;
    end else begin
      int unsigned nret, nal;
      nret = 0;
      nal  = 0;
      for (int c = 0; c < CW; c++) begin
        if (commit_valid[c]) begin
          busy[wrap_inc(head, c)] <= 1'b0;
          nret++;
        end
      end
      for (int k = 0; k < NC; k++) begin
        if (complete_valid[k]) done[complete_id[k]] <= 1'b1;
      end
      for (int p = 0; p < DA; p++) begin
        if (alloc_valid[p] && alloc_ready[p]) begin
          busy[alloc_id[p]]   <= 1'b1;
          done[alloc_id[p]]   <= 1'b0;
          ninstr[alloc_id[p]] <= alloc_ninstr[p];
          nal++;
        end
      end
      tail  <= wrap_inc(tail, nal);
      head  <= wrap_inc(head, nret);
      count <= count + ($clog2(N+1))'(nal) - ($clog2(N+1))'(nret);
    end
  end

  a_complete_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                    complete_valid[0] |-> busy[complete_id[0]] && !done[complete_id[0]]);

endmodule
