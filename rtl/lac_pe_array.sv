// lac_pe_array - the ROWS x COLS PE array of the one-hot Laconic tile.
//
// Each PE (oh_pe) computes NPAIR = 16 pair-wise exponent additions per cycle
// and reduces them with a histogram unit. Weights are shared along a row:
// the NPAIR weights of row r belong to output channel r and reach all COLS
// PEs of that row. Activations are shared along a column: the NPAIR
// activations of column c belong to output neuron c and reach all ROWS PEs
// of that column. PE (r, c) thus accumulates output neuron c of output
// channel r, and the array yields ROWS x COLS outputs per pass. Because a
// one-hot value is always a single term, all PEs take exactly one cycle per
// pair set and stay in lock step. The array shape and the sharing follow the
// design (4 x 4 PEs, 16 pairs each).
//
// Interface: w[r] and a[c] are NPAIR codes each; en/clr as in oh_pe, common
// to all PEs; acc[r][c] is the accumulator of PE (r, c).
// Timing: one pair set per cycle, result one cycle later.
module lac_pe_array #(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 4,
  parameter int unsigned NPAIR = 16,
  parameter int unsigned EW    = ohn_pkg::LAC_EW,
  parameter int unsigned ACC_W = 32
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    en,
  input  logic                                    clr,
  input  logic [ROWS-1:0][NPAIR-1:0][EW+1:0]      w,
  input  logic [COLS-1:0][NPAIR-1:0][EW+1:0]      a,
  output logic [ROWS-1:0][COLS-1:0][ACC_W-1:0]    acc
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      oh_pe #(.N(NPAIR), .EW(EW), .ACC_W(ACC_W)) u_pe (
        .clk(clk), .rst_n(rst_n), .en(en), .clr(clr),
        .w(w[r]), .a(a[c]), .acc(acc[r][c])
      );
    end
  end

endmodule
