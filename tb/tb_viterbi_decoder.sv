// tb_viterbi_decoder: end-to-end test of the decoder at its default size.
//
// Random information bits are encoded, hit by random channel bit errors and
// sent as frames of 2 to 256 symbols (the largest frame the survivor memory
// holds). Every decoded pair on Data is compared with the reference model in
// vit_ref_pkg, and the Valid window is checked against the documented timing:
// with the first Wr-low cycle X, Valid is high in cycles X+L/2+2 .. X+L+1.
// Error-free frames must decode to the sent bits. Counted mechanisms, each of
// which must occur: full-length frames, frames whose channel errors were all
// corrected, metric normalisation (a non-zero minimum subtracted), writes
// ignored while the decoder was busy, and a short uncoded symbol run 3,3,2,1,3,3.
module tb_viterbi_decoder;
  import vit_ref_pkg::*;

  logic       Clk = 1'b0, Rst = 1'b1, Wr = 1'b0;
  logic [1:0] Msg = '0;
  logic       Valid;
  logic [1:0] Data;

  viterbi_decoder dut (.Clk, .Rst, .Wr, .Msg, .Valid, .Data);

  always #5 Clk = ~Clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int vcyc[$];
  logic [1:0] vdat[$];
  int n_full = 0, n_corrected = 0, n_norm = 0, n_ignored = 0, n_fig6 = 0;

  always_ff @(posedge Clk) begin
    cyc <= cyc + 1;
    if (Valid) begin
      vcyc.push_back(cyc);
      vdat.push_back(Data);
    end
    if (Wr && dut.busy) n_ignored <= n_ignored + 1;
    if (dut.step && dut.min_pm != '0) n_norm <= n_norm + 1;
  end

  initial begin
    repeat (400000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Send one frame of n received symbols and check what comes back.
  task automatic run_frame(input logic [1:0] rx [MAXL], input int n,
                           input logic bits [MAXL], input bit known_bits,
                           input int nerr);
    logic ref_out [MAXL];
    int x, ng;
    bit all_ok;
    decode(rx, n, ref_out);
    if (known_bits && nerr == 0) begin
      all_ok = 1;
      for (int t = 0; t < n; t++) if (ref_out[t] != bits[t]) all_ok = 0;
      check(all_ok, "reference model does not reproduce an error-free frame");
    end
    vcyc.delete();
    vdat.delete();
    for (int t = 0; t < n; t++) begin
      @(negedge Clk);
      Wr  = 1'b1;
      Msg = rx[t];
    end
    @(negedge Clk);
    Wr  = 1'b0;
    Msg = '0;
    x   = cyc;
    // Writes while busy must be ignored.
    @(negedge Clk);
    ng = (n / 2 < 3) ? n / 2 : 3;
    for (int g = 0; g < ng; g++) begin
      @(negedge Clk);
      Wr  = 1'b1;
      Msg = 2'($urandom());
    end
    @(negedge Clk);
    Wr = 1'b0;
    while (cyc < x + n + 4) @(negedge Clk);
    check(vdat.size() == n / 2, $sformatf("frame of %0d: %0d outputs", n, vdat.size()));
    all_ok = 1;
    for (int c = 0; c < n / 2 && c < vdat.size(); c++) begin
      check(vcyc[c] == x + n / 2 + 2 + c,
            $sformatf("frame of %0d: output %0d in cycle %0d, expected %0d",
                      n, c, vcyc[c] - x, n / 2 + 2 + c));
      check(vdat[c] == {ref_out[2*c], ref_out[2*c+1]},
            $sformatf("frame of %0d: pair %0d = %b, expected %b%b", n, c,
                      vdat[c], ref_out[2*c], ref_out[2*c+1]));
      if (known_bits && vdat[c] != {bits[2*c], bits[2*c+1]}) all_ok = 0;
    end
    if (n == 2 * viterbi_pkg::TB_COLS) n_full++;
    if (known_bits && nerr > 0 && all_ok && vdat.size() == n / 2) n_corrected++;
    repeat (2) @(negedge Clk);
  endtask

  task automatic coded_frame(input int n, input int err_per_1000);
    logic bits [MAXL];
    logic [1:0] sym [MAXL];
    int nerr;
    nerr = 0;
    for (int t = 0; t < n; t++) bits[t] = logic'($urandom_range(1));
    encode(bits, n, sym);
    for (int t = 0; t < n; t++)
      if (int'($urandom_range(999)) < err_per_1000) begin
        sym[t] ^= 2'(1 << $urandom_range(1));
        nerr++;
      end
    run_frame(sym, n, bits, 1'b1, nerr);
  endtask

  initial begin
    logic [1:0] rx [MAXL];
    logic bits [MAXL];
    repeat (3) @(negedge Clk);
    Rst = 1'b0;
    repeat (2) @(negedge Clk);
    coded_frame(256, 0);           // one full-length frame, no errors
    coded_frame(2, 0);             // shortest frame
    rx[0] = 2'd3; rx[1] = 2'd3; rx[2] = 2'd2; rx[3] = 2'd1; rx[4] = 2'd3; rx[5] = 2'd3;
    run_frame(rx, 6, bits, 1'b0, 0);
    n_fig6++;
    coded_frame(100, 30);
    coded_frame(256, 20);
    coded_frame(64, 200);          // heavy errors: must still match the model
    for (int f = 0; f < 12; f++)
      coded_frame(2 * int'($urandom_range(1, 128)), int'($urandom_range(0, 60)));
    // Reset in the middle of a frame, then a clean frame.
    for (int t = 0; t < 5; t++) begin
      @(negedge Clk); Wr = 1'b1; Msg = 2'($urandom());
    end
    @(negedge Clk); Wr = 1'b0; Rst = 1'b1;
    @(negedge Clk); Rst = 1'b0;
    @(negedge Clk);
    check(!Valid, "Valid after reset");
    coded_frame(256, 10);

    check(n_full > 0,      "no full-length frame");
    check(n_corrected > 0, "no frame with corrected channel errors");
    check(n_norm > 0,      "metric normalisation never happened");
    check(n_ignored > 0,   "no write arrived while busy");
    check(n_fig6 > 0,      "short 3,3,2,1,3,3 run not sent");
    $display("full=%0d corrected=%0d norm=%0d ignored=%0d", n_full, n_corrected,
             n_norm, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
