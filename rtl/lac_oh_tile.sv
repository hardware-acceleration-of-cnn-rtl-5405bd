// lac_oh_tile - one-hot Laconic tile.
//
// A Laconic tile is a PE array with a weight scratchpad (WSpad), an
// activation scratchpad (ASpad) and a partial-sum scratchpad (PSpad). The
// original bit-serial tile Booth-encodes every weight and activation into a
// list of effectual terms between the scratchpads and the PEs; with one-hot
// values each value already is a single term, so the encoders are gone and
// the scratchpad codes go straight into the PEs (exponent adders plus
// histogram reduction). Values are 8-bit one-hot numbers: 3-bit exponent,
// sign and non-zero flag.
//
// A WSpad row holds ROWS x NPAIR weight codes (NPAIR for each output channel
// of the array); an ASpad row holds COLS x NPAIR activation codes (NPAIR for
// each output neuron). One row of each is consumed per cycle.
//
// Operation: a start pulse with w_base, a_base, len (>= 1), ps_addr and
// ps_acc runs one pass: rows w_base.. and a_base.. are streamed for len
// cycles, then the ROWS x COLS results are written to PSpad entry ps_addr,
// added to what it holds if ps_acc is set. done pulses for one cycle
// len+3 clock edges after the edge that sampled start. PSpad entries are
// read through ps_re/ps_raddr/ps_rdata (data one cycle after ps_re), entry
// element r*COLS+c being PE (r, c). start is ignored while busy and accepted
// again from the cycle in which done is high.
// The array shape, the three scratchpads and the removal of the encoders
// follow the design; scratchpad depths, widths of the partial sums and the
// control sequence are this implementation's choices.
module lac_oh_tile #(
  parameter int unsigned ROWS     = 4,
  parameter int unsigned COLS     = 4,
  parameter int unsigned NPAIR    = 16,
  parameter int unsigned EW       = ohn_pkg::LAC_EW,
  parameter int unsigned ACC_W    = 32,
  parameter int unsigned WS_DEPTH = 1024,
  parameter int unsigned AS_DEPTH = 1024,
  parameter int unsigned PS_DEPTH = 64,
  parameter int unsigned WS_AW    = (WS_DEPTH > 1) ? $clog2(WS_DEPTH) : 1,
  parameter int unsigned AS_AW    = (AS_DEPTH > 1) ? $clog2(AS_DEPTH) : 1,
  parameter int unsigned PS_AW    = (PS_DEPTH > 1) ? $clog2(PS_DEPTH) : 1,
  parameter int unsigned LEN_W    = 11
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // scratchpad fill ports
  input  logic                                  ws_we,
  input  logic [WS_AW-1:0]                      ws_waddr,
  input  logic [ROWS-1:0][NPAIR-1:0][EW+1:0]    ws_wdata,
  input  logic                                  as_we,
  input  logic [AS_AW-1:0]                      as_waddr,
  input  logic [COLS-1:0][NPAIR-1:0][EW+1:0]    as_wdata,
  // command
  input  logic                                  start,
  input  logic [WS_AW-1:0]                      w_base,
  input  logic [AS_AW-1:0]                      a_base,
  input  logic [LEN_W-1:0]                      len,
  input  logic [PS_AW-1:0]                      ps_addr,
  input  logic                                  ps_acc,
  output logic                                  busy,
  output logic                                  done,
  // partial-sum read port
  input  logic                                  ps_re,
  input  logic [PS_AW-1:0]                      ps_raddr,
  output logic [ROWS*COLS-1:0][ACC_W-1:0]       ps_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_DRAIN, S_WRITE} state_t;
  state_t state;

  logic [WS_AW-1:0] w_addr;
  logic [AS_AW-1:0] a_addr;
  logic [LEN_W-1:0] remain;
  logic [PS_AW-1:0] ps_addr_q;
  logic             ps_acc_q;
  logic             rd_valid;
  logic             issue;
  logic             clr;

  logic [ROWS-1:0][NPAIR-1:0][EW+1:0]  wrow;
  logic [COLS-1:0][NPAIR-1:0][EW+1:0]  arow;
  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] acc;

  assign issue = (state == S_RUN);
  assign clr   = (state == S_IDLE) && start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      w_addr    <= '0;
      a_addr    <= '0;
      remain    <= '0;
      ps_addr_q <= '0;
      ps_acc_q  <= 1'b0;
      rd_valid  <= 1'b0;
      done      <= 1'b0;
    end else begin
      rd_valid <= issue;
      done     <= (state == S_WRITE);
      case (state)
        S_IDLE: if (start) begin
          w_addr    <= w_base;
          a_addr    <= a_base;
          remain    <= (len == '0) ? LEN_W'(1) : len;
          ps_addr_q <= ps_addr;
          ps_acc_q  <= ps_acc;
          state     <= S_RUN;
        end
        S_RUN: begin
          w_addr <= w_addr + 1'b1;
          a_addr <= a_addr + 1'b1;
          remain <= remain - 1'b1;
          if (remain == LEN_W'(1)) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_WRITE;
        S_WRITE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  oh_buffer #(.WIDTH(ROWS*NPAIR*(EW+2)), .DEPTH(WS_DEPTH)) u_wspad (
    .clk(clk), .rst_n(rst_n),
    .we(ws_we), .waddr(ws_waddr), .wdata(ws_wdata),
    .re(issue), .raddr(w_addr), .rdata(wrow)
  );

  oh_buffer #(.WIDTH(COLS*NPAIR*(EW+2)), .DEPTH(AS_DEPTH)) u_aspad (
    .clk(clk), .rst_n(rst_n),
    .we(as_we), .waddr(as_waddr), .wdata(as_wdata),
    .re(issue), .raddr(a_addr), .rdata(arow)
  );

  lac_pe_array #(.ROWS(ROWS), .COLS(COLS), .NPAIR(NPAIR), .EW(EW), .ACC_W(ACC_W)) u_array (
    .clk(clk), .rst_n(rst_n), .en(rd_valid), .clr(clr),
    .w(wrow), .a(arow), .acc(acc)
  );

  lac_pspad #(.NOUT(ROWS*COLS), .PS_W(ACC_W), .DEPTH(PS_DEPTH)) u_pspad (
    .clk(clk), .rst_n(rst_n),
    .we(state == S_WRITE), .wacc(ps_acc_q), .waddr(ps_addr_q), .wdata(acc),
    .re(ps_re), .raddr(ps_raddr), .rdata(ps_rdata)
  );

  // Scratchpads are only read while running, and done ends a run.
  assert property (@(posedge clk) disable iff (!rst_n) issue |-> busy);
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
