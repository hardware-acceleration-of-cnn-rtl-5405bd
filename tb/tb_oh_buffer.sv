// tb_oh_buffer - check of the on-chip buffer.
//
// Fills every row with a value derived from its address, reads the rows back
// in random order and checks the data one cycle after the request, that
// rdata holds while re is low, and that a read of the row being written
// returns the old contents.
module tb_oh_buffer;
  localparam int WIDTH = 96, DEPTH = 1024, AW = 10;
  logic clk = 0, rst_n = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  oh_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] pat(input int addr, input int salt);
    return {32'(addr * 7919 + salt), 32'(addr ^ 32'h5a5a_1234), 32'(~addr + salt)};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = AW'(i); wdata = pat(i, 1);
      @(posedge clk); #1;
    end
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      r = int'($urandom % DEPTH);
      re = 1; raddr = AW'(r);
      @(posedge clk); #1;
      re = 0;
      checks++;
      if (rdata != pat(r, 1)) begin failures++; if (failures < 10) $display("read %0d wrong", r); end
      @(posedge clk); #1;
      checks++;
      if (rdata != pat(r, 1)) failures++;   // held while re is low
    end
    // read during write of the same row: old data, then new data
    we = 1; waddr = 10'd5; wdata = pat(5, 2); re = 1; raddr = 10'd5;
    @(posedge clk); #1;
    we = 0;
    checks++;
    if (rdata != pat(5, 1)) failures++;
    @(posedge clk); #1;
    re = 0;
    checks++;
    if (rdata != pat(5, 2)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
