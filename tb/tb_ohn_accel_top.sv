// tb_ohn_accel_top - end-to-end test of the one-hot accelerator top level,
// at its default sizes.
//
// DaDianNao side: writes activation rows (16 unsigned one-hot codes) into
// the activation buffer and weight rows (16 lanes x 16 signed codes) into
// the tile's weight buffer, near the start and the end of both address
// ranges, then runs inner products and compares the 16 lane results with an
// integer model. Laconic side: fills WSpad and ASpad, runs passes that
// replace and that accumulate onto PSpad entries, and compares the 4 x 4
// outputs read back from PSpad. The two tiles are run at the same time.
//
// Mechanisms counted (each must occur): DaDianNao run, Laconic pass, PSpad
// accumulate, start ignored while busy, zero operand skipped, negative
// product, both tiles busy in the same cycle. Cycle counts are checked
// against len+2 (DaDianNao) and len+3 (Laconic).
module tb_ohn_accel_top;
  import tb_ohn_util::*;

  localparam int D_NLANE = 16, D_NIN = 16, D_EW = 4, D_ACC_W = 48;
  localparam int D_WB_DEPTH = 4096, D_AB_DEPTH = 131072, D_WB_AW = 12, D_AB_AW = 17, D_LEN_W = 18;
  localparam int L_ROWS = 4, L_COLS = 4, L_NPAIR = 16, L_EW = 3, L_ACC_W = 32;
  localparam int L_WS_AW = 10, L_AS_AW = 10, L_PS_AW = 6, L_LEN_W = 11;

  logic clk = 0, rst_n = 0;
  logic d_ab_we = 0, d_wb_we = 0, d_start = 0;
  logic [D_AB_AW-1:0] d_ab_waddr = '0, d_a_base = '0;
  logic [D_NIN-1:0][D_EW+1:0] d_ab_wdata = '0;
  logic [D_WB_AW-1:0] d_wb_waddr = '0, d_w_base = '0;
  logic [D_NLANE-1:0][D_NIN-1:0][D_EW+1:0] d_wb_wdata = '0;
  logic [D_LEN_W-1:0] d_len = '0;
  logic d_busy, d_done;
  logic [D_NLANE-1:0][D_ACC_W-1:0] d_psum;
  logic l_ws_we = 0, l_as_we = 0, l_start = 0, l_ps_acc = 0, l_ps_re = 0;
  logic [L_WS_AW-1:0] l_ws_waddr = '0, l_w_base = '0;
  logic [L_AS_AW-1:0] l_as_waddr = '0, l_a_base = '0;
  logic [L_ROWS-1:0][L_NPAIR-1:0][L_EW+1:0] l_ws_wdata = '0;
  logic [L_COLS-1:0][L_NPAIR-1:0][L_EW+1:0] l_as_wdata = '0;
  logic [L_LEN_W-1:0] l_len = '0;
  logic [L_PS_AW-1:0] l_ps_addr = '0, l_ps_raddr = '0;
  logic l_busy, l_done;
  logic [L_ROWS*L_COLS-1:0][L_ACC_W-1:0] l_ps_rdata;

  ohn_accel_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_dadn_run = 0, n_lac_pass = 0, n_ps_acc = 0, n_ignored = 0, n_zero = 0, n_neg = 0, n_both = 0;

  // testbench copies of what is written into the buffers
  localparam int NR = 64;
  logic [D_NIN-1:0][D_EW+1:0]               dact [NR];
  logic [D_NLANE-1:0][D_NIN-1:0][D_EW+1:0]  dwt  [NR];
  logic [L_ROWS-1:0][L_NPAIR-1:0][L_EW+1:0] lwt  [NR];
  logic [L_COLS-1:0][L_NPAIR-1:0][L_EW+1:0] lact [NR];
  longint lmodel [4][16];

  always @(posedge clk) if (d_busy && l_busy) n_both++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DaDianNao rows r of the tables sit at buffer rows base + r.
  task automatic dadn_run(input int abase, input int wbase, input int r0, input int n);
    longint model [D_NLANE];
    longint p;
    int cyc;
    foreach (model[l]) model[l] = 0;
    for (int r = r0; r < r0 + n; r++)
      for (int l = 0; l < D_NLANE; l++)
        for (int i = 0; i < D_NIN; i++) begin
          p = oh_val(8'(dwt[r][l][i]), D_EW) * oh_val(8'(dact[r][i]), D_EW);
          if (!dwt[r][l][i][0] || !dact[r][i][0]) n_zero++;
          if (p < 0) n_neg++;
          model[l] += p;
        end
    d_start = 1; d_a_base = D_AB_AW'(abase + r0); d_w_base = D_WB_AW'(wbase + r0); d_len = D_LEN_W'(n);
    @(posedge clk); #1;
    d_start = 0;
    cyc = 1;
    while (!d_done) begin
      d_start = (cyc == 2);           // a start while busy must be ignored
      if (cyc == 2) n_ignored++;
      @(posedge clk); #1;
      cyc++;
    end
    d_start = 0;
    checks++;
    if (cyc != n + 2) begin failures++; $display("DaDN len %0d took %0d", n, cyc); end
    for (int l = 0; l < D_NLANE; l++) begin
      checks++;
      if (longint'(signed'(d_psum[l])) != model[l]) begin
        failures++;
        if (failures < 10) $display("DaDN lane %0d got %0d expected %0d", l, signed'(d_psum[l]), model[l]);
      end
    end
    n_dadn_run++;
  endtask

  task automatic lac_pass(input int r0, input int n, input int pa, input bit acc);
    int cyc;
    for (int r = 0; r < L_ROWS; r++)
      for (int c = 0; c < L_COLS; c++) begin
        longint d;
        d = 0;
        for (int k = r0; k < r0 + n; k++)
          for (int i = 0; i < L_NPAIR; i++)
            d += oh_val(8'(lwt[k][r][i]), L_EW) * oh_val(8'(lact[k][c][i]), L_EW);
        lmodel[pa][r*L_COLS+c] = acc ? lmodel[pa][r*L_COLS+c] + d : d;
      end
    l_start = 1; l_w_base = L_WS_AW'(r0); l_a_base = L_AS_AW'(r0); l_len = L_LEN_W'(n);
    l_ps_addr = L_PS_AW'(pa); l_ps_acc = acc;
    @(posedge clk); #1;
    l_start = 0;
    cyc = 1;
    while (!l_done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != n + 3) begin failures++; $display("Lac len %0d took %0d", n, cyc); end
    n_lac_pass++;
    if (acc) n_ps_acc++;
    l_ps_re = 1; l_ps_raddr = L_PS_AW'(pa);
    @(posedge clk); #1;
    l_ps_re = 0;
    for (int o = 0; o < 16; o++) begin
      checks++;
      if (longint'(signed'(l_ps_rdata[o])) != lmodel[pa][o]) begin
        failures++;
        if (failures < 10) $display("Lac entry %0d out %0d got %0d expected %0d", pa, o, signed'(l_ps_rdata[o]), lmodel[pa][o]);
      end
    end
  endtask

  int abase_hi = D_AB_DEPTH - NR, wbase_hi = D_WB_DEPTH - NR;

  initial begin
    for (int r = 0; r < NR; r++) begin
      for (int i = 0; i < D_NIN; i++) dact[r][i] = (D_EW+2)'(oh_rand(D_EW, 3, 0));
      for (int l = 0; l < D_NLANE; l++) for (int i = 0; i < D_NIN; i++) dwt[r][l][i] = (D_EW+2)'(oh_rand(D_EW, 4, 1));
      for (int q = 0; q < L_ROWS; q++) for (int i = 0; i < L_NPAIR; i++) lwt[r][q][i] = (L_EW+2)'(oh_rand(L_EW, 4, 1));
      for (int q = 0; q < L_COLS; q++) for (int i = 0; i < L_NPAIR; i++) lact[r][q][i] = (L_EW+2)'(oh_rand(L_EW, 3, 0));
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // fill: DaDianNao rows at the bottom and the top of both buffers
    for (int pass_i = 0; pass_i < 2; pass_i++)
      for (int r = 0; r < NR; r++) begin
        d_ab_we = 1; d_ab_waddr = D_AB_AW'((pass_i ? abase_hi : 0) + r); d_ab_wdata = dact[r];
        d_wb_we = 1; d_wb_waddr = D_WB_AW'((pass_i ? wbase_hi : 0) + r); d_wb_wdata = dwt[r];
        l_ws_we = !pass_i; l_ws_waddr = L_WS_AW'(r); l_ws_wdata = lwt[r];
        l_as_we = !pass_i; l_as_waddr = L_AS_AW'(r); l_as_wdata = lact[r];
        @(posedge clk); #1;
      end
    d_ab_we = 0; d_wb_we = 0; l_ws_we = 0; l_as_we = 0;
    foreach (lmodel[p, o]) lmodel[p][o] = 0;
    // both tiles at once
    fork
      begin dadn_run(0, 0, 0, 32); dadn_run(abase_hi, wbase_hi, 10, 54); end
      begin lac_pass(0, 20, 0, 0); lac_pass(20, 44, 0, 1); lac_pass(3, 5, 3, 0); end
    join
    dadn_run(abase_hi, 0, 0, 1);
    checks++; if (n_dadn_run == 0) failures++;
    checks++; if (n_lac_pass == 0) failures++;
    checks++; if (n_ps_acc == 0) failures++;
    checks++; if (n_ignored == 0) failures++;
    checks++; if (n_zero == 0) failures++;
    checks++; if (n_neg == 0) failures++;
    checks++; if (n_both == 0) failures++;
    $display("mechanisms: dadn_runs=%0d lac_passes=%0d pspad_acc=%0d start_ignored=%0d zero_terms=%0d neg_terms=%0d both_busy_cycles=%0d",
             n_dadn_run, n_lac_pass, n_ps_acc, n_ignored, n_zero, n_neg, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
