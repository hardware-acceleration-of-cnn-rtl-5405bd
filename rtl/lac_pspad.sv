// lac_pspad - partial-sum scratchpad (PSpad) of the one-hot Laconic tile.
//
// Holds, per entry, the NOUT partial or final sums one pass of the PE array
// produces (one per PE). A write either replaces an entry or adds the new
// sums to it, so an inner product longer than one pass can be split over
// several passes. A separate registered read port lets the outputs be
// drained. The design names this scratchpad; its depth, the
// accumulate-on-write and the ports are this implementation's choice.
//
// Interface: we/waddr/wdata/wacc write (wacc = add to the stored entry);
// re/raddr/rdata read. Timing: writes take effect at the clock edge; rdata
// holds the addressed entry from the cycle after re. All entries and rdata
// are cleared by the synchronous active-low reset.
module lac_pspad #(
  parameter int unsigned NOUT  = 16,
  parameter int unsigned PS_W  = 32,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           we,
  input  logic                           wacc,
  input  logic [AW-1:0]                  waddr,
  input  logic [NOUT-1:0][PS_W-1:0]      wdata,
  input  logic                           re,
  input  logic [AW-1:0]                  raddr,
  output logic [NOUT-1:0][PS_W-1:0]      rdata
);

  logic [NOUT-1:0][PS_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int d = 0; d < DEPTH; d++) mem[d] <= '0;
    end else if (we) begin
      for (int o = 0; o < NOUT; o++) begin
        mem[waddr][o] <= wacc ? mem[waddr][o] + wdata[o] : wdata[o];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule
