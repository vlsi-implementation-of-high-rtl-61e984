// tb_re_combiner: random decision vectors, with idle cycles and frame
// clears in between. Every second step of a frame must write a column in
// which state p holds {dec[p], previous-step decision of state
// {p[5:0], dec[p]}}; no other cycle may write.
module tb_re_combiner;
  localparam int NS = 128;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, step = 1'b0;
  logic [NS-1:0] dec = '0;
  logic col_we;
  logic [2*NS-1:0] col_data;
  int checks = 0, failures = 0, writes = 0;

  re_combiner dut (.clk, .rst, .clear, .step, .dec, .col_we, .col_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit odd;
    logic [NS-1:0] prev;
    odd = 0;
    prev = '0;
    @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      clear = ($urandom_range(99) < 3);
      step  = !clear && ($urandom_range(99) < 80);
      for (int w = 0; w < NS / 32; w++) dec[32*w +: 32] = $urandom();
      #1;
      checks++;
      if (col_we != (step && odd)) begin
        failures++;
        $display("FAIL col_we=%0d at step=%0d odd=%0d", col_we, step, odd);
      end
      if (step && odd) begin
        writes++;
        for (int p = 0; p < NS; p++) begin
          int q;
          q = ((p << 1) & (NS - 1)) | int'(dec[p]);
          checks++;
          if (col_data[2*p +: 2] != {dec[p], prev[q]}) begin
            failures++;
            if (failures < 10) $display("FAIL state %0d: %b exp %b%b", p,
                                        col_data[2*p +: 2], dec[p], prev[q]);
          end
        end
      end
      if (clear) odd = 0;
      else if (step) begin
        if (!odd) prev = dec;
        odd = !odd;
      end
    end
    checks++;
    if (writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
