// tb_survivor_ram: writes random 256-bit columns and reads random 2-bit
// entries, checking against a shadow copy that the read data appears one
// clock after its address, and that a read of the column being written in
// the same cycle returns the old contents.
module tb_survivor_ram;
  localparam int NS = 128, NC = 128;
  logic clk = 1'b0, we = 1'b0;
  logic [6:0] wcol = '0, rcol = '0, rstate = '0;
  logic [2*NS-1:0] wdata = '0;
  logic [1:0] rdata;
  logic [2*NS-1:0] shadow [NC];
  int checks = 0, failures = 0;

  survivor_ram dut (.clk, .we, .wcol, .wdata, .rcol, .rstate, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*NS-1:0] rnd();
    logic [2*NS-1:0] v;
    for (int w = 0; w < 2 * NS / 32; w++) v[32*w +: 32] = $urandom();
    return v;
  endfunction

  initial begin
    // Fill every column.
    for (int c = 0; c < NC; c++) begin
      @(negedge clk);
      we = 1'b1; wcol = 7'(c); wdata = rnd(); shadow[c] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      logic [1:0] e;
      @(negedge clk);
      rcol   = 7'($urandom());
      rstate = 7'($urandom());
      e      = shadow[rcol][2*rstate +: 2];
      we     = ($urandom_range(3) == 0);
      wcol   = ($urandom_range(3) == 0) ? rcol : 7'($urandom());
      wdata  = rnd();
      @(posedge clk);
      if (we) shadow[wcol] = wdata;
      #1;
      checks++;
      if (rdata != e) begin
        failures++;
        if (failures < 10) $display("FAIL col %0d state %0d: %b exp %b", rcol, rstate, rdata, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
