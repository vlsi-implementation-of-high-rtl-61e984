// tb_bmu: exhaustive test of the branch metric unit. For each of the four
// received symbols, every one of the four metrics must equal the number of
// differing bits, counted here bit by bit.
module tb_bmu;
  logic [1:0] sym;
  logic [1:0] bm [4];
  int checks = 0, failures = 0;

  bmu dut (.sym, .bm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      sym = 2'(s);
      #1;
      for (int c = 0; c < 4; c++) begin
        int exp_d;
        exp_d = ((s & 1) != (c & 1) ? 1 : 0) + ((s & 2) != (c & 2) ? 1 : 0);
        checks++;
        if (int'(bm[c]) != exp_d) begin
          failures++;
          $display("FAIL sym=%0d c=%0d bm=%0d exp=%0d", s, c, bm[c], exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
