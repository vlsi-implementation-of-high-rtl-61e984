// tb_smu: the survivor management unit fed with random decision vectors.
// The expected output is a plain one-step-at-a-time trace-back over the
// decision vectors as they were given (state s at step t came from
// {s[5:0], dec_t[s]}, and its information bit is s[6]), so the two-step
// packing, the memory and the trace-back are checked together. Frames of
// random even length up to 256 steps, including the longest, are used.
module tb_smu;
  localparam int NS = 128, NC = 128;
  logic clk = 1'b0, rst = 1'b1, step = 1'b0, start = 1'b0;
  logic [NS-1:0] dec = '0;
  logic [6:0] best = '0;
  logic busy, valid;
  logic [1:0] data;
  logic [NS-1:0] dh [2*NC];
  int checks = 0, failures = 0, cyc = 0;
  int vcyc[$];
  logic [1:0] vdat[$];

  smu dut (.clk, .rst, .step, .dec, .start, .best, .busy, .valid, .data);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (valid) begin
      vcyc.push_back(cyc);
      vdat.push_back(data);
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
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
    for (int f = 0; f < 30; f++) begin
      int L, x;
      logic [6:0] s;
      logic b [2*NC];
      L = (f == 0) ? 2 * NC : 2 * int'($urandom_range(1, NC));
      vcyc.delete(); vdat.delete();
      for (int t = 0; t < L; t++) begin
        @(negedge clk);
        step = 1'b1;
        for (int w = 0; w < NS / 32; w++) dec[32*w +: 32] = $urandom();
        dh[t] = dec;
        // an idle cycle now and then inside the frame
        if ($urandom_range(9) == 0) begin
          @(negedge clk);
          step = 1'b0;
        end
      end
      @(negedge clk);
      step = 1'b0; start = 1'b1; best = 7'($urandom());
      x = cyc;
      s = best;
      for (int t = L - 1; t >= 0; t--) begin
        b[t] = s[6];
        s = {s[5:0], dh[t][s]};
      end
      @(negedge clk);
      start = 1'b0;
      while (cyc < x + L + 3) @(negedge clk);
      chk(vdat.size() == L / 2, $sformatf("%0d outputs for %0d steps", vdat.size(), L));
      for (int c = 0; c < L / 2 && c < vdat.size(); c++) begin
        chk(vdat[c] == {b[2*c], b[2*c+1]},
            $sformatf("L=%0d pair %0d: %b exp %b%b", L, c, vdat[c], b[2*c], b[2*c+1]));
        chk(vcyc[c] == x + L / 2 + 2 + c, $sformatf("pair %0d in cycle %0d", c, vcyc[c] - x));
      end
      chk(!busy, "still busy after output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
