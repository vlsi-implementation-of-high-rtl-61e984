// tb_acsu: the full 128-state add-compare-select array against the reference
// trellis. Random path metrics and symbols are applied; for every state the
// expected metric and decision come from the reference code's codewords and
// predecessor rule, with Hamming branch metrics computed in the testbench.
module tb_acsu;
  import vit_ref_pkg::*;
  logic [5:0] pm [NS];
  logic [5:0] pm_new [NS];
  logic [1:0] bm [4];
  logic [5:0] norm;
  logic [NS-1:0] dec;
  int checks = 0, failures = 0;

  acsu dut (.pm, .bm, .norm, .pm_new, .dec);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      logic [1:0] sym;
      int mn;
      sym = 2'($urandom());
      mn = 63;
      for (int s = 0; s < NS; s++) begin
        pm[s] = 6'($urandom_range(40));
        if (int'(pm[s]) < mn) mn = int'(pm[s]);
      end
      for (int c = 0; c < 4; c++) bm[c] = 2'(hd(sym, 2'(c)));
      norm = 6'(mn);
      #1;
      for (int p = 0; p < NS; p++) begin
        int u, pi, pj, a, b, e_pm, e_dec;
        u  = p >> (SW - 1);
        pi = (p << 1) & (NS - 1);
        pj = pi | 1;
        a  = int'(pm[pi]) + hd(sym, cw(u, pi));
        b  = int'(pm[pj]) + hd(sym, cw(u, pj));
        e_dec = (a < b) ? 0 : 1;
        e_pm  = ((a < b) ? a : b) - mn;
        checks++;
        if (int'(pm_new[p]) != e_pm || int'(dec[p]) != e_dec) begin
          failures++;
          if (failures < 10) $display("FAIL state %0d: %0d/%0d exp %0d/%0d", p,
                                      pm_new[p], dec[p], e_pm, e_dec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
