// tb_oh_pe - check of the one-hot inner-product PE.
//
// Streams random weight/activation code sets (16-bit one-hot, 16 pairs per
// cycle) with random enable and occasional clears, and compares the
// accumulator every cycle with an integer model (sum of products of decoded
// values). Also checks the one-cycle latency from inputs to accumulator.
module tb_oh_pe;
  import tb_ohn_util::*;

  localparam int N = 16, EW = 4, ACC_W = 48;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [N-1:0][EW+1:0] w, a;
  logic signed [ACC_W-1:0] acc;
  longint model;
  int checks = 0, failures = 0;

  oh_pe #(.N(N), .EW(EW), .ACC_W(ACC_W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .w(w), .a(a), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint dot();
    longint s = 0;
    for (int i = 0; i < N; i++) s += oh_val(8'(w[i]), EW) * oh_val(8'(a[i]), EW);
    return s;
  endfunction

  initial begin
    w = '0; a = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    model = 0;
    @(posedge clk); #1;
    checks++;
    if (acc != 0) failures++;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < N; i++) begin
        w[i] = (EW+2)'(oh_rand(EW, 5, 1));
        a[i] = (EW+2)'(oh_rand(EW, 3, t % 2 == 0));
      end
      en  = ($urandom % 5) != 0;
      clr = ($urandom % 50) == 0;
      if (clr) model = en ? dot() : 0;
      else if (en) model += dot();
      @(posedge clk); #1;
      checks++;
      if (longint'(acc) != model) begin
        failures++;
        if (failures < 10) $display("t=%0d acc=%0d model=%0d", t, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
