// tb_pmm: path metric memory. After reset and after init every state but 0
// must hold 32 and state 0 must hold 0; with en the inputs are stored on the
// next edge; without en the contents hold.
module tb_pmm;
  localparam int NS = 128;
  logic clk = 1'b0, rst = 1'b1, init = 1'b0, en = 1'b0;
  logic [5:0] pm_in [NS];
  logic [5:0] pm [NS];
  logic [5:0] expv [NS];
  int checks = 0, failures = 0;

  pmm dut (.clk, .rst, .init, .en, .pm_in, .pm);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (pm[s] != expv[s]) begin
        failures++;
        if (failures < 10) $display("FAIL %s state %0d: %0d exp %0d", what, s, pm[s], expv[s]);
      end
    end
  endtask

  task automatic start_values();
    for (int s = 0; s < NS; s++) expv[s] = (s == 0) ? 6'd0 : 6'd32;
  endtask

  initial begin
    for (int s = 0; s < NS; s++) pm_in[s] = 6'($urandom());
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    start_values(); cmp("reset");
    for (int k = 0; k < 20; k++) begin
      for (int s = 0; s < NS; s++) pm_in[s] = 6'($urandom());
      en = (k % 3 != 2);
      if (en) expv = pm_in;
      @(negedge clk);
      cmp(en ? "load" : "hold");
    end
    init = 1'b1; en = 1'b1;
    @(negedge clk);
    init = 1'b0; en = 1'b0;
    start_values(); cmp("init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
