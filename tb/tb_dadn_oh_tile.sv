// tb_dadn_oh_tile - check of the one-hot DaDianNao tile.
//
// Fills the weight buffer and a testbench model of the activation buffer
// (one-cycle read latency) with random 16-bit one-hot codes, runs inner
// products of several lengths and compares all 16 lane results with an
// integer model. Checks the cycle count from start to done (len+2, one row
// of 256 pairs per cycle) and that a start during a run is ignored.
// Buffer depths are reduced; lanes, inputs and widths are the defaults.
module tb_dadn_oh_tile;
  import tb_ohn_util::*;

  localparam int NLANE = 16, NIN = 16, EW = 4, ACC_W = 48;
  localparam int WB_DEPTH = 64, WB_AW = 6, AB_AW = 8, AB_DEPTH = 256, LEN_W = 18;

  logic clk = 0, rst_n = 0;
  logic wb_we = 0;
  logic [WB_AW-1:0] wb_waddr = '0;
  logic [NLANE-1:0][NIN-1:0][EW+1:0] wb_wdata = '0;
  logic act_re;
  logic [AB_AW-1:0] act_raddr;
  logic [NIN-1:0][EW+1:0] act_rdata;
  logic start = 0;
  logic [WB_AW-1:0] w_base = '0;
  logic [AB_AW-1:0] a_base = '0;
  logic [LEN_W-1:0] len = '0;
  logic busy, done;
  logic signed [NLANE-1:0][ACC_W-1:0] psum;

  logic [NLANE-1:0][NIN-1:0][EW+1:0] wmem [WB_DEPTH];
  logic [NIN-1:0][EW+1:0]            amem [AB_DEPTH];
  int checks = 0, failures = 0;

  dadn_oh_tile #(.NLANE(NLANE), .NIN(NIN), .EW(EW), .ACC_W(ACC_W), .WB_DEPTH(WB_DEPTH), .AB_AW(AB_AW), .LEN_W(LEN_W)) dut (
    .clk(clk), .rst_n(rst_n), .wb_we(wb_we), .wb_waddr(wb_waddr), .wb_wdata(wb_wdata),
    .act_re(act_re), .act_raddr(act_raddr), .act_rdata(act_rdata),
    .start(start), .w_base(w_base), .a_base(a_base), .len(len),
    .busy(busy), .done(done), .psum(psum));

  always #5 clk = ~clk;

  // activation buffer model, one-cycle read latency
  always_ff @(posedge clk) if (act_re) act_rdata <= amem[act_raddr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int wb, input int ab, input int n, input bit poke);
    longint model [NLANE];
    int cyc;
    foreach (model[l]) model[l] = 0;
    for (int r = 0; r < n; r++)
      for (int l = 0; l < NLANE; l++)
        for (int i = 0; i < NIN; i++)
          model[l] += oh_val(8'(wmem[(wb + r) % WB_DEPTH][l][i]), EW) * oh_val(8'(amem[(ab + r) % AB_DEPTH][i]), EW);
    start = 1; w_base = WB_AW'(wb); a_base = AB_AW'(ab); len = LEN_W'(n);
    @(posedge clk); #1;
    start = 0;
    cyc = 0;
    while (!done) begin
      if (poke && cyc == 1) begin start = 1; w_base = '0; len = LEN_W'(1); end
      else start = 0;
      @(posedge clk); #1;
      cyc++;
    end
    start = 0;
    checks++;
    if (cyc + 1 != n + 2) begin
      failures++;
      $display("len %0d: done after %0d edges, expected %0d", n, cyc + 1, n + 2);
    end
    for (int l = 0; l < NLANE; l++) begin
      checks++;
      if (longint'(signed'(psum[l])) != model[l]) begin
        failures++;
        if (failures < 10) $display("len %0d lane %0d: got %0d expected %0d", n, l, signed'(psum[l]), model[l]);
      end
    end
    @(posedge clk); #1;
  endtask

  initial begin
    act_rdata = '0;
    for (int r = 0; r < AB_DEPTH; r++)
      for (int i = 0; i < NIN; i++) amem[r][i] = (EW+2)'(oh_rand(EW, 3, 0));
    for (int r = 0; r < WB_DEPTH; r++)
      for (int l = 0; l < NLANE; l++)
        for (int i = 0; i < NIN; i++) wmem[r][l][i] = (EW+2)'(oh_rand(EW, 4, 1));
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < WB_DEPTH; r++) begin
      wb_we = 1; wb_waddr = WB_AW'(r); wb_wdata = wmem[r];
      @(posedge clk); #1;
    end
    wb_we = 0;
    run(0, 0, 1, 0);
    run(3, 17, 5, 0);
    run(0, 100, 64, 1);
    run(10, 200, 40, 0);
    // weights all +2^15 and activations all 2^15: largest products
    for (int i = 0; i < NIN; i++) amem[0][i] = {1'b0, 4'd15, 1'b1};
    for (int l = 0; l < NLANE; l++) for (int i = 0; i < NIN; i++) wmem[0][l][i] = {1'b1, 4'd15, 1'b1};
    wb_we = 1; wb_waddr = '0; wb_wdata = wmem[0];
    @(posedge clk); #1;
    wb_we = 0;
    run(0, 0, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
