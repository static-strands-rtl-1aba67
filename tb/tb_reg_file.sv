// tb_reg_file: self-checking test of the register file.
//
// Random writes on both write ports and random reads on all four read ports
// are compared with a shadow array kept here. Checks that register 0 reads
// zero and ignores writes, that reset clears every register, that a read in
// the write cycle returns the old value, and that both ports can write in
// the same cycle.
module tb_reg_file;
  localparam int NREGS = 64, XLEN = 32, NR = 4, NW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NR-1:0][5:0]      raddr;
  logic [NR-1:0][XLEN-1:0] rdata;
  logic [NW-1:0]           we;
  logic [NW-1:0][5:0]      waddr;
  logic [NW-1:0][XLEN-1:0] wdata;
  logic [XLEN-1:0]         shadow[NREGS];

  reg_file #(.NREGS(NREGS), .XLEN(XLEN), .NR(NR), .NW(NW)) dut (
    .clk(clk), .rst_n(rst_n), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

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
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NREGS; i++) shadow[i] = 0;
    for (int i = 0; i < NREGS; i += NR) begin
      for (int r = 0; r < NR; r++) raddr[r] = 6'(i + r);
      #1;
      for (int r = 0; r < NR; r++) check(rdata[r] == 0, "reset value");
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = 2'($urandom);
      waddr[0] = 6'($urandom); waddr[1] = 6'($urandom);
      if (waddr[1] == waddr[0]) waddr[1] = waddr[0] + 1;
      wdata[0] = $urandom; wdata[1] = $urandom;
      if (t % 50 == 0) begin waddr[0] = 0; we[0] = 1; end
      for (int r = 0; r < NR; r++) raddr[r] = (r == 0) ? waddr[0] : 6'($urandom);
      #1;
      for (int r = 0; r < NR; r++)
        check(rdata[r] == shadow[raddr[r]], $sformatf("read r%0d = %h exp %h", raddr[r], rdata[r], shadow[raddr[r]]));
      @(posedge clk);
      for (int w = 0; w < NW; w++) if (we[w] && waddr[w] != 0) shadow[waddr[w]] = wdata[w];
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < NREGS; i += NR) begin
      for (int r = 0; r < NR; r++) raddr[r] = 6'(i + r);
      #1;
      for (int r = 0; r < NR; r++) check(rdata[r] == shadow[i + r], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
