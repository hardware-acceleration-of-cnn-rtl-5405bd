// dadn_oh_tile - one-hot DaDianNao tile.
//
// A DaDianNao tile computes, every cycle, 256 weight/activation products in
// an input-reuse manner: NIN = 16 input activations are broadcast to
// NLANE = 16 output lanes, each of which holds its own 16 weights, giving 16
// partial outputs along the output channels. In this one-hot version every
// lane is an oh_pe: exponent additions in place of 16-bit multipliers and a
// histogram-based reduction unit in place of the adder tree. Values are
// 16-bit one-hot numbers (4-bit exponent, sign, non-zero flag).
//
// The tile owns its weight buffer (one row = the 256 weight codes of one
// cycle). Activations come from the shared activation buffer outside the
// tile through act_re/act_raddr/act_rdata, which must return data one cycle
// after the request (oh_buffer timing).
//
// Operation: a start pulse with w_base, a_base and len (>= 1) runs one inner
// product of len*NIN terms per lane: rows w_base..w_base+len-1 of the weight
// buffer are paired with rows a_base..a_base+len-1 of the activation buffer,
// one row pair per cycle. The lanes are cleared at start. done pulses for
// one cycle len+2 clock edges after the edge that sampled start; psum then
// holds the NLANE results until the next start. start is ignored while busy
// and accepted again from the cycle in which done is high.
// The buffer sizes derive from the design's 32 MB of weight buffers spread
// over 16 tiles; the control sequence and the accumulator width are this
// implementation's choices.
module dadn_oh_tile #(
  parameter int unsigned NLANE    = 16,
  parameter int unsigned NIN      = 16,
  parameter int unsigned EW       = ohn_pkg::DADN_EW,
  parameter int unsigned ACC_W    = 48,
  parameter int unsigned WB_DEPTH = 4096,
  parameter int unsigned AB_AW    = 17,
  parameter int unsigned WB_AW    = (WB_DEPTH > 1) ? $clog2(WB_DEPTH) : 1,
  parameter int unsigned LEN_W    = 18
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // weight buffer fill port
  input  logic                                 wb_we,
  input  logic [WB_AW-1:0]                     wb_waddr,
  input  logic [NLANE-1:0][NIN-1:0][EW+1:0]    wb_wdata,
  // activation buffer read port (one-cycle latency)
  output logic                                 act_re,
  output logic [AB_AW-1:0]                     act_raddr,
  input  logic [NIN-1:0][EW+1:0]               act_rdata,
  // command
  input  logic                                 start,
  input  logic [WB_AW-1:0]                     w_base,
  input  logic [AB_AW-1:0]                     a_base,
  input  logic [LEN_W-1:0]                     len,
  output logic                                 busy,
  output logic                                 done,
  output logic signed [NLANE-1:0][ACC_W-1:0]   psum
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t state;

  logic [WB_AW-1:0] w_addr;
  logic [AB_AW-1:0] a_addr;
  logic [LEN_W-1:0] remain;
  logic             rd_valid;
  logic             issue;
  logic             clr;

  logic [NLANE-1:0][NIN-1:0][EW+1:0] wrow;

  assign issue = (state == S_RUN);
  assign clr   = (state == S_IDLE) && start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      w_addr   <= '0;
      a_addr   <= '0;
      remain   <= '0;
      rd_valid <= 1'b0;
      done     <= 1'b0;
    end else begin
      rd_valid <= issue;
      done     <= (state == S_DRAIN);
      case (state)
        S_IDLE: if (start) begin
          w_addr <= w_base;
          a_addr <= a_base;
          remain <= (len == '0) ? LEN_W'(1) : len;
          state  <= S_RUN;
        end
        S_RUN: begin
          w_addr <= w_addr + 1'b1;
          a_addr <= a_addr + 1'b1;
          remain <= remain - 1'b1;
          if (remain == LEN_W'(1)) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign act_re    = issue;
  assign act_raddr = a_addr;

  oh_buffer #(.WIDTH(NLANE*NIN*(EW+2)), .DEPTH(WB_DEPTH)) u_wbuf (
    .clk(clk), .rst_n(rst_n),
    .we(wb_we), .waddr(wb_waddr), .wdata(wb_wdata),
    .re(issue), .raddr(w_addr), .rdata(wrow)
  );

  for (genvar l = 0; l < NLANE; l++) begin : g_lane
    oh_pe #(.N(NIN), .EW(EW), .ACC_W(ACC_W)) u_lane (
      .clk(clk), .rst_n(rst_n),
      .en(rd_valid), .clr(clr),
      .w(wrow[l]), .a(act_rdata),
      .acc(psum[l])
    );
  end

  // A read is only issued while running.
  assert property (@(posedge clk) disable iff (!rst_n) act_re |-> busy);
  // done is raised as the tile returns to idle.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
