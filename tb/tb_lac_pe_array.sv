// tb_lac_pe_array - check of the 4 x 4 one-hot Laconic PE array.
//
// Drives random 8-bit one-hot weight sets per row and activation sets per
// column and compares every PE's accumulator with the integer dot product
// of its row's weights and its column's activations, accumulated over
// cycles, which checks the row/column sharing of operands.
module tb_lac_pe_array;
  import tb_ohn_util::*;

  localparam int ROWS = 4, COLS = 4, NPAIR = 16, EW = 3, ACC_W = 32;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [ROWS-1:0][NPAIR-1:0][EW+1:0] w;
  logic [COLS-1:0][NPAIR-1:0][EW+1:0] a;
  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] acc;
  longint model [ROWS][COLS];
  int checks = 0, failures = 0;

  lac_pe_array #(.ROWS(ROWS), .COLS(COLS), .NPAIR(NPAIR), .EW(EW), .ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .w(w), .a(a), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w = '0; a = '0;
    foreach (model[r, c]) model[r][c] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      for (int r = 0; r < ROWS; r++) for (int i = 0; i < NPAIR; i++) w[r][i] = (EW+2)'(oh_rand(EW, 4, 1));
      for (int c = 0; c < COLS; c++) for (int i = 0; i < NPAIR; i++) a[c][i] = (EW+2)'(oh_rand(EW, 3, 0));
      en  = ($urandom % 6) != 0;
      clr = ($urandom % 40) == 0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          longint d;
          d = 0;
          for (int i = 0; i < NPAIR; i++) d += oh_val(8'(w[r][i]), EW) * oh_val(8'(a[c][i]), EW);
          if (clr) model[r][c] = en ? d : 0;
          else if (en) model[r][c] += d;
        end
      @(posedge clk); #1;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          checks++;
          if (longint'(signed'(acc[r][c])) != model[r][c]) begin
            failures++;
            if (failures < 10) $display("t=%0d PE(%0d,%0d) got %0d expected %0d", t, r, c, signed'(acc[r][c]), model[r][c]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
