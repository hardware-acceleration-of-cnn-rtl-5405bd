// ohn_accel_top - one-hot CNN accelerator top level.
//
// Weights and activations are quantized to one-hot numbers (a signed power
// of two or zero), so every multiply becomes an addition of exponents and
// every reduction a histogram of exponents followed by shifts and one add.
// The design applies this to two accelerator tiles, which stand side by side
// here with their own ports:
//   * a bit-parallel DaDianNao tile (dadn_oh_tile): 16 lanes x 16 inputs of
//     16-bit one-hot values per cycle, fed from its own weight buffer and
//     from the activation buffer instantiated here;
//   * a bit-serial Laconic tile (lac_oh_tile): a 4 x 4 PE array of 8-bit
//     one-hot values with WSpad, ASpad and PSpad.
// The two share only clock and reset.
//
// The DaDianNao activation buffer is sized from the design's 4 MB of
// activation buffer holding 16-bit values: 2M values, 16 per row, so
// 131072 rows. How it is filled (a plain write port) is this
// implementation's choice. Timing of each side: see the tile modules.
module ohn_accel_top #(
  // DaDianNao side
  parameter int unsigned D_NLANE    = 16,
  parameter int unsigned D_NIN      = 16,
  parameter int unsigned D_EW       = ohn_pkg::DADN_EW,
  parameter int unsigned D_ACC_W    = 48,
  parameter int unsigned D_WB_DEPTH = 4096,
  parameter int unsigned D_AB_DEPTH = 131072,
  parameter int unsigned D_WB_AW    = (D_WB_DEPTH > 1) ? $clog2(D_WB_DEPTH) : 1,
  parameter int unsigned D_AB_AW    = (D_AB_DEPTH > 1) ? $clog2(D_AB_DEPTH) : 1,
  parameter int unsigned D_LEN_W    = 18,
  // Laconic side
  parameter int unsigned L_ROWS     = 4,
  parameter int unsigned L_COLS     = 4,
  parameter int unsigned L_NPAIR    = 16,
  parameter int unsigned L_EW       = ohn_pkg::LAC_EW,
  parameter int unsigned L_ACC_W    = 32,
  parameter int unsigned L_WS_DEPTH = 1024,
  parameter int unsigned L_AS_DEPTH = 1024,
  parameter int unsigned L_PS_DEPTH = 64,
  parameter int unsigned L_WS_AW    = (L_WS_DEPTH > 1) ? $clog2(L_WS_DEPTH) : 1,
  parameter int unsigned L_AS_AW    = (L_AS_DEPTH > 1) ? $clog2(L_AS_DEPTH) : 1,
  parameter int unsigned L_PS_AW    = (L_PS_DEPTH > 1) ? $clog2(L_PS_DEPTH) : 1,
  parameter int unsigned L_LEN_W    = 11
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  // ---- DaDianNao one-hot tile ----
  input  logic                                        d_ab_we,
  input  logic [D_AB_AW-1:0]                          d_ab_waddr,
  input  logic [D_NIN-1:0][D_EW+1:0]                  d_ab_wdata,
  input  logic                                        d_wb_we,
  input  logic [D_WB_AW-1:0]                          d_wb_waddr,
  input  logic [D_NLANE-1:0][D_NIN-1:0][D_EW+1:0]     d_wb_wdata,
  input  logic                                        d_start,
  input  logic [D_WB_AW-1:0]                          d_w_base,
  input  logic [D_AB_AW-1:0]                          d_a_base,
  input  logic [D_LEN_W-1:0]                          d_len,
  output logic                                        d_busy,
  output logic                                        d_done,
  output logic [D_NLANE-1:0][D_ACC_W-1:0]             d_psum,
  // ---- Laconic one-hot tile ----
  input  logic                                        l_ws_we,
  input  logic [L_WS_AW-1:0]                          l_ws_waddr,
  input  logic [L_ROWS-1:0][L_NPAIR-1:0][L_EW+1:0]    l_ws_wdata,
  input  logic                                        l_as_we,
  input  logic [L_AS_AW-1:0]                          l_as_waddr,
  input  logic [L_COLS-1:0][L_NPAIR-1:0][L_EW+1:0]    l_as_wdata,
  input  logic                                        l_start,
  input  logic [L_WS_AW-1:0]                          l_w_base,
  input  logic [L_AS_AW-1:0]                          l_a_base,
  input  logic [L_LEN_W-1:0]                          l_len,
  input  logic [L_PS_AW-1:0]                          l_ps_addr,
  input  logic                                        l_ps_acc,
  output logic                                        l_busy,
  output logic                                        l_done,
  input  logic                                        l_ps_re,
  input  logic [L_PS_AW-1:0]                          l_ps_raddr,
  output logic [L_ROWS*L_COLS-1:0][L_ACC_W-1:0]       l_ps_rdata
);

  // DaDianNao side: shared activation buffer feeding the tile.
  logic                          d_act_re;
  logic [D_AB_AW-1:0]            d_act_raddr;
  logic [D_NIN-1:0][D_EW+1:0]    d_act_rdata;

  oh_buffer #(.WIDTH(D_NIN*(D_EW+2)), .DEPTH(D_AB_DEPTH)) u_dadn_abuf (
    .clk(clk), .rst_n(rst_n),
    .we(d_ab_we), .waddr(d_ab_waddr), .wdata(d_ab_wdata),
    .re(d_act_re), .raddr(d_act_raddr), .rdata(d_act_rdata)
  );

  dadn_oh_tile #(
    .NLANE(D_NLANE), .NIN(D_NIN), .EW(D_EW), .ACC_W(D_ACC_W),
    .WB_DEPTH(D_WB_DEPTH), .AB_AW(D_AB_AW), .LEN_W(D_LEN_W)
  ) u_dadn (
    .clk(clk), .rst_n(rst_n),
    .wb_we(d_wb_we), .wb_waddr(d_wb_waddr), .wb_wdata(d_wb_wdata),
    .act_re(d_act_re), .act_raddr(d_act_raddr), .act_rdata(d_act_rdata),
    .start(d_start), .w_base(d_w_base), .a_base(d_a_base), .len(d_len),
    .busy(d_busy), .done(d_done), .psum(d_psum)
  );

  // Laconic side.
  lac_oh_tile #(
    .ROWS(L_ROWS), .COLS(L_COLS), .NPAIR(L_NPAIR), .EW(L_EW), .ACC_W(L_ACC_W),
    .WS_DEPTH(L_WS_DEPTH), .AS_DEPTH(L_AS_DEPTH), .PS_DEPTH(L_PS_DEPTH),
    .LEN_W(L_LEN_W)
  ) u_lac (
    .clk(clk), .rst_n(rst_n),
    .ws_we(l_ws_we), .ws_waddr(l_ws_waddr), .ws_wdata(l_ws_wdata),
    .as_we(l_as_we), .as_waddr(l_as_waddr), .as_wdata(l_as_wdata),
    .start(l_start), .w_base(l_w_base), .a_base(l_a_base), .len(l_len),
    .ps_addr(l_ps_addr), .ps_acc(l_ps_acc),
    .busy(l_busy), .done(l_done),
    .ps_re(l_ps_re), .ps_raddr(l_ps_raddr), .ps_rdata(l_ps_rdata)
  );

endmodule
