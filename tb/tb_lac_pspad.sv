// tb_lac_pspad - check of the partial-sum scratchpad.
//
// Applies random replace and accumulate writes to random entries, keeps a
// model array, and reads entries back (data one cycle after re) to compare.
// Also checks that reset clears every entry.
module tb_lac_pspad;
  localparam int NOUT = 16, PS_W = 32, DEPTH = 64, AW = 6;
  logic clk = 0, rst_n = 0, we = 0, wacc = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [NOUT-1:0][PS_W-1:0] wdata = '0, rdata;
  logic [NOUT-1:0][PS_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  lac_pspad #(.NOUT(NOUT), .PS_W(PS_W), .DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .we(we), .wacc(wacc), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(input int addr);
    re = 1; raddr = AW'(addr);
    @(posedge clk); #1;
    re = 0;
    checks++;
    if (rdata != model[addr]) begin failures++; if (failures < 10) $display("entry %0d wrong", addr); end
  endtask

  initial begin
    int ad;
    foreach (model[d]) model[d] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int d = 0; d < DEPTH; d++) rd(d);
    for (int t = 0; t < 3000; t++) begin
      ad = int'($urandom % DEPTH);
      we = 1; wacc = 1'($urandom); waddr = AW'(ad);
      for (int o = 0; o < NOUT; o++) wdata[o] = $urandom;
      for (int o = 0; o < NOUT; o++) model[ad][o] = wacc ? model[ad][o] + wdata[o] : wdata[o];
      @(posedge clk); #1;
      we = 0;
      if (t % 3 == 0) rd(int'($urandom % DEPTH));
    end
    for (int d = 0; d < DEPTH; d++) rd(d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
