// oh_buffer - single-port-write, single-port-read on-chip buffer.
//
// The storage behind the weight and activation buffers of the one-hot
// DaDianNao tile and behind the weight and activation scratchpads (WSpad,
// ASpad) of the one-hot Laconic tile. One row holds all the one-hot codes a
// processing array consumes in a cycle, so a whole row is read at once.
// The design names these memories and, for DaDianNao, their capacities; the
// port arrangement (one write port, one read port, registered read data) is
// this implementation's choice.
//
// Interface: we/waddr/wdata write a row; re/raddr read one.
// Timing: rdata holds the row addressed in the cycle re was high, from the
// next cycle on; a read and a write of the same row in one cycle return the
// old contents. rdata resets to zero.
module oh_buffer #(
  parameter int unsigned WIDTH = 96,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule
