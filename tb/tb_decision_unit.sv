// tb_decision_unit: minimum search over 128 path metrics. Random metric sets,
// many with ties, are compared with a linear scan that keeps the first
// (lowest-index) smallest value.
module tb_decision_unit;
  localparam int NS = 128;
  logic [5:0] pm [NS];
  logic [5:0] min_pm;
  logic [6:0] best;
  int checks = 0, failures = 0;

  decision_unit dut (.pm, .min_pm, .best);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      int eb, range;
      range = (k % 2) ? 63 : 6;          // small ranges give many ties
      for (int s = 0; s < NS; s++) pm[s] = 6'($urandom_range(range));
      if (k % 5 == 0) pm[$urandom_range(NS - 1)] = 6'd0;
      eb = 0;
      for (int s = 1; s < NS; s++) if (pm[s] < pm[eb]) eb = s;
      #1;
      checks++;
      if (int'(best) != eb || min_pm != pm[eb]) begin
        failures++;
        if (failures < 10) $display("FAIL best %0d/%0d exp %0d/%0d", best, min_pm, eb, pm[eb]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
