// tb_strand_configs: runs one random program under the strand-size
// configurations a compiler may target, on cores of default size.
//
// The program is made of dependence chains of one to six ALU instructions
// whose intermediate values are transient. It is annotated four times, as a
// compiler limited to strands of at most 2, 3, 4 and 5 instructions with at
// most two external inputs would annotate it: each chain is cut into pieces
// of at most that length, and a piece of two or more instructions gets a
// prefix if it reads no more than two registers from outside the piece. The
// unannotated program runs on a fifth core as the reference machine.
//
// The hardware collapses strands of up to MAX_STRAND_LEN (4) instructions, so
// in the 5-instruction configuration the five-long pieces have their prefix
// dropped and run as single instructions, while the shorter pieces still
// collapse. Checks for every core: the final value of every register against
// a sequential reference execution, the number of instructions retired, and
// the number of strands collapsed against the number the annotation allows.
// For every annotated configuration it also checks that tag broadcasts (each
// of which is also a register write) and register reads went down. A table of cycles and activity per
// configuration is printed.
module tb_strand_configs;
  import strand_pkg::*;
  import tb_strand_pkg::*;

  localparam int NCHAINS = 1500;
  localparam int NCORES  = 5;          // 0: no annotation, c: strands up to c+1

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [NCORES-1:0]                  in_ready, idle;
  logic  [NCORES-1:0][1:0]             in_valid;
  instr_t [NCORES-1:0][1:0]            in_instr;
  logic  [NCORES-1:0][1:0]             cv;
  logic  [NCORES-1:0][1:0][LEN_W-1:0]  cn;
  tag_t                                dbg_addr;
  word_t [NCORES-1:0]                  dbg;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t      prog[NCORES][$];
  int          exp_strands[NCORES] = '{default: 0};
  int          exp_dropped[NCORES] = '{default: 0};
  logic [31:0] gold[64];
  int          n_alu = 0;
  bit          counting = 0;

  longint cycles[NCORES]  = '{default: 0};
  longint bcasts[NCORES]  = '{default: 0};
  longint rdreads[NCORES] = '{default: 0};
  longint retired[NCORES] = '{default: 0};
  int     strands[NCORES] = '{default: 0};
  int     dropped[NCORES] = '{default: 0};
  int     ia[NCORES]      = '{default: 0};

  function automatic int popc2(logic [1:0] v); return int'(v[0]) + int'(v[1]); endfunction

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    strand_core u_core (.clk(clk), .rst_n(rst_n), .in_valid(in_valid[c]), .in_instr(in_instr[c]),
      .in_ready(in_ready[c]), .commit_valid(cv[c]), .commit_ninstr(cn[c]), .dbg_addr(dbg_addr),
      .dbg_data(dbg[c]), .idle(idle[c]));

    always @(posedge clk) begin
      if (in_valid[c][0] && in_ready[c]) ia[c] <= ia[c] + popc2(in_valid[c]);
      if (counting) begin
        if (!idle[c] || in_valid[c] != 0) cycles[c]++;
        bcasts[c] += popc2(u_core.wb_dest_valid);
        for (int p = 0; p < 2; p++) begin
          if (u_core.iss_valid[p]) rdreads[c] += popc2(u_core.iss_op[p].src_valid);
          if (u_core.disp_fire[p] && u_core.stab_op[p].strand) strands[c]++;
          if (cv[c][p]) retired[c] += cn[c][p];
        end
        if (u_core.stab_pfx_ignored) dropped[c]++;
      end
    end

    always_comb begin
      for (int k = 0; k < 2; k++) begin
        in_valid[c][k] = rst_n && counting && (ia[c] + k < prog[c].size());
        in_instr[c][k] = (ia[c] + k < prog[c].size()) ? prog[c][ia[c] + k] : '0;
      end
    end
  end

  // registers read by a piece from outside it (the previous instruction's
  // destination inside the piece is the transient operand)
  function automatic int piece_inputs(instr_t q[$], int first, int len);
    int regs[$];
    for (int k = first; k < first + len; k++) begin
      for (int s = 0; s < 2; s++) begin
        int r;
        if (s == 1 && q[k].use_imm) continue;
        r = (s == 0) ? int'(q[k].rs1) : int'(q[k].rs2);
        if (r == 0 || (k > first && r == int'(q[k - 1].rd))) continue;
        if (!(r inside {regs})) regs.push_back(r);
      end
    end
    return regs.size();
  endfunction

  initial begin
    instr_t chain[$];
    int len, pl;
    for (int r = 1; r <= GEN_REGS; r++)
      for (int c = 0; c < NCORES; c++) prog[c].push_back(mk(0, r, 0, 0, 1'b1, $urandom));
    for (int n = 0; n < NCHAINS; n++) begin
      chain.delete();
      len = ($urandom % 10 < 3) ? 1 : 2 + $urandom % 5;
      gen_group(len, 1'b0, chain);
      for (int c = 0; c < NCORES; c++) begin
        int first;
        first = 0;
        while (first < chain.size()) begin
          pl = (c == 0) ? 1 : ((chain.size() - first < c + 1) ? chain.size() - first : c + 1);
          if (pl >= 2 && piece_inputs(chain, first, pl) <= 2) begin
            prog[c].push_back(mk_prefix(pl));
            if (pl <= MAX_STRAND_LEN) exp_strands[c]++;
            else                      exp_dropped[c]++;
          end
          for (int k = first; k < first + pl; k++) prog[c].push_back(chain[k]);
          first += pl;
        end
      end
    end
    for (int i = 0; i < 64; i++) gold[i] = 0;
    foreach (prog[0][i]) begin
      exec_instr(gold, prog[0][i]);
      n_alu++;
    end
  end

  initial begin
    bit all_in;
    dbg_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    counting = 1;
    do begin
      @(negedge clk);
      all_in = 1;
      for (int c = 0; c < NCORES; c++) if (ia[c] < prog[c].size()) all_in = 0;
    end while (!all_in);
    wait (idle == '1);
    @(negedge clk);
    counting = 0;
    for (int r = 0; r < 64; r++) begin
      dbg_addr = tag_t'(r);
      #1;
      if (r >= SCRATCH_BASE && r < SCRATCH_BASE + 8) continue;
      for (int c = 0; c < NCORES; c++)
        check(dbg[c] == gold[r], $sformatf("config %0d: r%0d = %h expected %h", c, r, dbg[c], gold[r]));
    end
    $display("config        strands  dropped   cycles     IPC  broadcasts  reg_reads");
    for (int c = 0; c < NCORES; c++) begin
      check(retired[c] == n_alu, $sformatf("config %0d retired %0d of %0d", c, retired[c], n_alu));
      check(strands[c] == exp_strands[c], $sformatf("config %0d collapsed %0d of %0d", c, strands[c], exp_strands[c]));
      check(dropped[c] == exp_dropped[c], $sformatf("config %0d dropped %0d of %0d", c, dropped[c], exp_dropped[c]));
      if (c > 0) begin
        check(bcasts[c] < bcasts[0], $sformatf("config %0d fewer broadcasts", c));
        check(rdreads[c] < rdreads[0], $sformatf("config %0d fewer register reads", c));
      end
      $display("%-12s %8d %8d %8d %7.3f %11d %10d",
               (c == 0) ? "none" : $sformatf("%0d/2", c + 1), strands[c], dropped[c], cycles[c],
               real'(n_alu) / real'(cycles[c]), bcasts[c], rdreads[c]);
    end
    check(exp_dropped[4] > 0, "five-long strands were offered to the hardware");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
