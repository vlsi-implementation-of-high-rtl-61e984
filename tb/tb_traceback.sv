// tb_traceback: the trace-back controller against a survivor memory model
// held in the testbench (random 2-bit entries, read one clock after the
// address). For random frame lengths and start states the expected output
// is found by walking the same memory: in column c with state s the bits are
// {s[5], s[6]} and the next state is {s[4:0], entry}. Output order, Valid
// timing (cycles X+ncols+2 .. X+2*ncols+1 for start in X) and busy are
// checked.
module tb_traceback;
  localparam int NS = 128, NC = 128;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [6:0] last_col = '0, best = '0, rcol, rstate;
  logic [1:0] rdata;
  logic busy, valid;
  logic [1:0] data;
  logic [1:0] m [NC][NS];
  int checks = 0, failures = 0, cyc = 0;
  int vcyc[$];
  logic [1:0] vdat[$];

  traceback dut (.clk, .rst, .start, .last_col, .best, .rcol, .rstate, .rdata,
                 .busy, .valid, .data);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    rdata <= m[rcol][rstate];
    cyc   <= cyc + 1;
    if (valid) begin
      vcyc.push_back(cyc);
      vdat.push_back(data);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 40; f++) begin
      int n, x;
      logic [6:0] s;
      logic [1:0] e [NC];
      for (int c = 0; c < NC; c++)
        for (int p = 0; p < NS; p++) m[c][p] = 2'($urandom());
      n = (f == 0) ? NC : (f == 1) ? 1 : int'($urandom_range(1, NC));
      vcyc.delete(); vdat.delete();
      @(negedge clk);
      chk(!busy, "busy while idle");
      start = 1'b1; last_col = 7'(n - 1); best = 7'($urandom());
      s = best;
      for (int c = n - 1; c >= 0; c--) begin
        e[c] = {s[5], s[6]};
        s = {s[4:0], m[c][s]};
      end
      x = cyc;
      @(negedge clk);
      start = 1'b0;
      chk(busy, "not busy after start");
      while (cyc < x + 2 * n + 3) @(negedge clk);
      chk(vdat.size() == n, $sformatf("%0d outputs for %0d columns", vdat.size(), n));
      for (int c = 0; c < n && c < vdat.size(); c++) begin
        chk(vdat[c] == e[c], $sformatf("column %0d: %b exp %b", c, vdat[c], e[c]));
        chk(vcyc[c] == x + n + 2 + c, $sformatf("column %0d in cycle %0d", c, vcyc[c] - x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
