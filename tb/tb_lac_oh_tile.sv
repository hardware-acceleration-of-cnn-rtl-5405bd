// tb_lac_oh_tile - check of the one-hot Laconic tile.
//
// Fills WSpad and ASpad with random 8-bit one-hot codes, runs passes of
// several lengths into PSpad entries, some replacing and some accumulating
// onto an entry, reads the entries back and compares all 16 outputs with an
// integer model of PE (r, c) = output channel r, output neuron c. Checks the
// cycle count from start to done (len+3) and that a start during a run is
// ignored. Scratchpad depths are reduced; the array is the default 4 x 4.
module tb_lac_oh_tile;
  import tb_ohn_util::*;

  localparam int ROWS = 4, COLS = 4, NPAIR = 16, EW = 3, ACC_W = 32;
  localparam int WS_DEPTH = 32, AS_DEPTH = 32, PS_DEPTH = 8;
  localparam int WS_AW = 5, AS_AW = 5, PS_AW = 3, LEN_W = 11;

  logic clk = 0, rst_n = 0;
  logic ws_we = 0, as_we = 0;
  logic [WS_AW-1:0] ws_waddr = '0;
  logic [AS_AW-1:0] as_waddr = '0;
  logic [ROWS-1:0][NPAIR-1:0][EW+1:0] ws_wdata = '0;
  logic [COLS-1:0][NPAIR-1:0][EW+1:0] as_wdata = '0;
  logic start = 0, ps_acc = 0, ps_re = 0;
  logic [WS_AW-1:0] w_base = '0;
  logic [AS_AW-1:0] a_base = '0;
  logic [LEN_W-1:0] len = '0;
  logic [PS_AW-1:0] ps_addr = '0, ps_raddr = '0;
  logic busy, done;
  logic [ROWS*COLS-1:0][ACC_W-1:0] ps_rdata;

  logic [ROWS-1:0][NPAIR-1:0][EW+1:0] wmem [WS_DEPTH];
  logic [COLS-1:0][NPAIR-1:0][EW+1:0] amem [AS_DEPTH];
  longint model [PS_DEPTH][ROWS*COLS];
  int checks = 0, failures = 0;

  lac_oh_tile #(.ROWS(ROWS), .COLS(COLS), .NPAIR(NPAIR), .EW(EW), .ACC_W(ACC_W),
                .WS_DEPTH(WS_DEPTH), .AS_DEPTH(AS_DEPTH), .PS_DEPTH(PS_DEPTH), .LEN_W(LEN_W)) dut (
    .clk(clk), .rst_n(rst_n),
    .ws_we(ws_we), .ws_waddr(ws_waddr), .ws_wdata(ws_wdata),
    .as_we(as_we), .as_waddr(as_waddr), .as_wdata(as_wdata),
    .start(start), .w_base(w_base), .a_base(a_base), .len(len), .ps_addr(ps_addr), .ps_acc(ps_acc),
    .busy(busy), .done(done), .ps_re(ps_re), .ps_raddr(ps_raddr), .ps_rdata(ps_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass(input int wb, input int ab, input int n, input int pa, input bit acc, input bit poke);
    int cyc;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        longint d;
        d = 0;
        for (int k = 0; k < n; k++)
          for (int i = 0; i < NPAIR; i++)
            d += oh_val(8'(wmem[(wb + k) % WS_DEPTH][r][i]), EW) * oh_val(8'(amem[(ab + k) % AS_DEPTH][c][i]), EW);
        model[pa][r*COLS+c] = acc ? model[pa][r*COLS+c] + d : d;
      end
    start = 1; w_base = WS_AW'(wb); a_base = AS_AW'(ab); len = LEN_W'(n); ps_addr = PS_AW'(pa); ps_acc = acc;
    @(posedge clk); #1;
    start = 0;
    cyc = 0;
    while (!done) begin
      if (poke && cyc == 1) begin start = 1; ps_addr = PS_AW'(pa + 1); ps_acc = 0; end
      else start = 0;
      @(posedge clk); #1;
      cyc++;
    end
    start = 0;
    checks++;
    if (cyc + 1 != n + 3) begin
      failures++;
      $display("len %0d: done after %0d edges, expected %0d", n, cyc + 1, n + 3);
    end
  endtask

  task automatic readback(input int pa);
    ps_re = 1; ps_raddr = PS_AW'(pa);
    @(posedge clk); #1;
    ps_re = 0;
    for (int o = 0; o < ROWS*COLS; o++) begin
      checks++;
      if (longint'(signed'(ps_rdata[o])) != model[pa][o]) begin
        failures++;
        if (failures < 10) $display("entry %0d out %0d: got %0d expected %0d", pa, o, signed'(ps_rdata[o]), model[pa][o]);
      end
    end
  endtask

  initial begin
    foreach (model[p, o]) model[p][o] = 0;
    for (int k = 0; k < WS_DEPTH; k++)
      for (int r = 0; r < ROWS; r++) for (int i = 0; i < NPAIR; i++) wmem[k][r][i] = (EW+2)'(oh_rand(EW, 4, 1));
    for (int k = 0; k < AS_DEPTH; k++)
      for (int c = 0; c < COLS; c++) for (int i = 0; i < NPAIR; i++) amem[k][c][i] = (EW+2)'(oh_rand(EW, 3, 0));
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < WS_DEPTH; k++) begin
      ws_we = 1; ws_waddr = WS_AW'(k); ws_wdata = wmem[k];
      as_we = 1; as_waddr = AS_AW'(k); as_wdata = amem[k];
      @(posedge clk); #1;
    end
    ws_we = 0; as_we = 0;
    pass(0, 0, 1, 0, 0, 0);    readback(0);
    pass(4, 9, 12, 1, 0, 1);   readback(1); readback(2);
    pass(16, 16, 16, 1, 1, 0); readback(1);   // second half of a 28-row inner product
    pass(0, 20, 32, 7, 0, 0);  readback(7);
    pass(5, 5, 3, 7, 1, 0);    readback(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
