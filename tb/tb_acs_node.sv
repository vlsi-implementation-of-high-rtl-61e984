// tb_acs_node: random and corner-case test of one add-compare-select node.
// Expected: the smaller of pm_i+bm_i and pm_j+bm_j minus norm, decision 0
// only when the i sum is strictly smaller.
module tb_acs_node;
  logic [5:0] pm_i, pm_j, norm, pm_new;
  logic [1:0] bm_i, bm_j;
  logic       dec;
  int checks = 0, failures = 0;

  acs_node dut (.pm_i, .pm_j, .bm_i, .bm_j, .norm, .pm_new, .dec);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int a, input int b, input int ba, input int bb);
    int si, sj, mn, e_pm, e_dec;
    pm_i = 6'(a); pm_j = 6'(b); bm_i = 2'(ba); bm_j = 2'(bb);
    si = a + ba; sj = b + bb;
    mn = (si < sj) ? si : sj;
    norm = 6'($urandom_range(mn));
    e_dec = (si < sj) ? 0 : 1;
    e_pm = mn - int'(norm);
    #1;
    checks++;
    if (int'(dec) != e_dec || int'(pm_new) != e_pm) begin
      failures++;
      $display("FAIL %0d+%0d vs %0d+%0d: got %0d/%0d exp %0d/%0d", a, ba, b, bb,
               pm_new, dec, e_pm, e_dec);
    end
  endtask

  initial begin
    one(5, 5, 1, 1);   // tie goes to j
    one(4, 5, 1, 0);   // tie
    one(4, 5, 0, 0);   // i strictly smaller
    one(0, 0, 0, 2);
    for (int k = 0; k < 2000; k++)
      one(int'($urandom_range(60)), int'($urandom_range(60)),
          int'($urandom_range(2)), int'($urandom_range(2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
