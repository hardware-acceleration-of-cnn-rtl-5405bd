// tb_alexnet_conv3 - AlexNet conv3-shaped workload on both one-hot tiles.
//
// AlexNet's third convolution takes a 256 x 13 x 13 input, 3 x 3 kernels
// with padding 1, and has 384 filters. This test builds a random one-hot
// input map and random one-hot kernels of that shape (activations unsigned,
// weights signed), lowers the convolution to inner products of length
// 256*3*3 = 2304 (144 rows of 16 terms: row j = (ky*3+kx)*16 + c/16, with
// channel c%16 in lane i of the row; padding reads as the zero code), and
//   * on the DaDianNao tile computes 16 filters at one output pixel,
//   * on the Laconic tile computes 4 filters x 4 adjacent output pixels
//     (one of them on the right border, so padding is used) into PSpad,
// comparing every result with a direct convolution computed here, and the
// run times with 144+2 and 144+3 cycles (one row of pairs per cycle).
// The top runs at its default sizes.
module tb_alexnet_conv3;
  import tb_ohn_util::*;

  localparam int C = 256, H = 13, W = 13, K = 3, NROW = C * K * K / 16;
  localparam int D_EW = 4, L_EW = 3;

  logic clk = 0, rst_n = 0;
  logic d_ab_we = 0, d_wb_we = 0, d_start = 0;
  logic [16:0] d_ab_waddr = '0, d_a_base = '0;
  logic [15:0][5:0] d_ab_wdata = '0;
  logic [11:0] d_wb_waddr = '0, d_w_base = '0;
  logic [15:0][15:0][5:0] d_wb_wdata = '0;
  logic [17:0] d_len = '0;
  logic d_busy, d_done;
  logic [15:0][47:0] d_psum;
  logic l_ws_we = 0, l_as_we = 0, l_start = 0, l_ps_acc = 0, l_ps_re = 0;
  logic [9:0] l_ws_waddr = '0, l_w_base = '0, l_as_waddr = '0, l_a_base = '0;
  logic [3:0][15:0][4:0] l_ws_wdata = '0, l_as_wdata = '0;
  logic [10:0] l_len = '0;
  logic [5:0] l_ps_addr = '0, l_ps_raddr = '0;
  logic l_busy, l_done;
  logic [15:0][31:0] l_ps_rdata;

  ohn_accel_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // input map and kernels, for both value formats (16-bit and 8-bit one-hot)
  logic [7:0] xd [C][H][W];
  logic [7:0] xl [C][H][W];
  logic [7:0] wd [16][C][K][K];
  logic [7:0] wl [4][C][K][K];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] xat(input bit dadn, input int c, input int y, input int x);
    if (y < 0 || y >= H || x < 0 || x >= W) return '0;
    return dadn ? xd[c][y][x] : xl[c][y][x];
  endfunction

  function automatic longint conv(input bit dadn, input int f, input int oy, input int ox);
    longint s = 0;
    for (int c = 0; c < C; c++)
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++)
          s += (dadn ? oh_val(wd[f][c][ky][kx], D_EW) : oh_val(wl[f][c][ky][kx], L_EW))
             * oh_val(xat(dadn, c, oy + ky - 1, ox + kx - 1), dadn ? D_EW : L_EW);
    return s;
  endfunction

  localparam int OY = 6, OXD = 5, OXL = 9;   // Laconic pixels 9..12, 12 on the border

  initial begin
    int cyc, j, c;
    for (c = 0; c < C; c++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          xd[c][y][x] = oh_rand(D_EW, 3, 0);
          xl[c][y][x] = oh_rand(L_EW, 3, 0);
        end
    for (int f = 0; f < 16; f++)
      for (c = 0; c < C; c++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++) begin
            wd[f][c][ky][kx] = oh_rand(D_EW, 4, 1);
            if (f < 4) wl[f][c][ky][kx] = oh_rand(L_EW, 4, 1);
          end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // lowered operands, one row per cycle
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++)
        for (int cg = 0; cg < C / 16; cg++) begin
          j = (ky * K + kx) * 16 + cg;
          for (int i = 0; i < 16; i++) begin
            c = cg * 16 + i;
            d_ab_wdata[i] = 6'(xat(1, c, OY + ky - 1, OXD + kx - 1));
            for (int f = 0; f < 16; f++) d_wb_wdata[f][i] = 6'(wd[f][c][ky][kx]);
            for (int f = 0; f < 4; f++) l_ws_wdata[f][i] = 5'(wl[f][c][ky][kx]);
            for (int n = 0; n < 4; n++) l_as_wdata[n][i] = 5'(xat(0, c, OY + ky - 1, OXL + n + kx - 1));
          end
          d_ab_we = 1; d_ab_waddr = 17'(j);
          d_wb_we = 1; d_wb_waddr = 12'(j);
          l_ws_we = 1; l_ws_waddr = 10'(j);
          l_as_we = 1; l_as_waddr = 10'(j);
          @(posedge clk); #1;
        end
    d_ab_we = 0; d_wb_we = 0; l_ws_we = 0; l_as_we = 0;

    // DaDianNao tile: 16 filters at pixel (OY, OXD)
    d_start = 1; d_a_base = '0; d_w_base = '0; d_len = 18'(NROW);
    @(posedge clk); #1;
    d_start = 0; cyc = 1;
    while (!d_done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != NROW + 2) begin failures++; $display("DaDianNao conv3 took %0d cycles", cyc); end
    for (int f = 0; f < 16; f++) begin
      checks++;
      if (longint'(signed'(d_psum[f])) != conv(1, f, OY, OXD)) begin
        failures++;
        $display("DaDianNao filter %0d got %0d expected %0d", f, signed'(d_psum[f]), conv(1, f, OY, OXD));
      end
    end
    $display("DaDianNao tile: 16 outputs x 2304 terms in %0d cycles", cyc);

    // Laconic tile: 4 filters x 4 pixels into PSpad entry 5
    l_start = 1; l_w_base = '0; l_a_base = '0; l_len = 11'(NROW); l_ps_addr = 6'd5; l_ps_acc = 0;
    @(posedge clk); #1;
    l_start = 0; cyc = 1;
    while (!l_done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != NROW + 3) begin failures++; $display("Laconic conv3 took %0d cycles", cyc); end
    l_ps_re = 1; l_ps_raddr = 6'd5;
    @(posedge clk); #1;
    l_ps_re = 0;
    for (int f = 0; f < 4; f++)
      for (int n = 0; n < 4; n++) begin
        checks++;
        if (longint'(signed'(l_ps_rdata[f*4+n])) != conv(0, f, OY, OXL + n)) begin
          failures++;
          $display("Laconic filter %0d pixel %0d got %0d expected %0d", f, n, signed'(l_ps_rdata[f*4+n]), conv(0, f, OY, OXL + n));
        end
      end
    $display("Laconic tile: 16 outputs x 2304 terms in %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
