// tb_shift_reg: feeds a random bit stream into the default 4-stage shift
// register and checks dout against the input of four cycles before, and every
// tap against the input of i+1 cycles before; also a 20-bit wide, 3-deep copy.
module tb_shift_reg;
  logic clk = 0, reset = 1;
  logic [0:0]  din = '0, dout;
  logic [0:0]  taps [4];
  logic [19:0] din3 = '0, dout3;
  logic [19:0] taps3 [3];
  logic [0:0]  hist [$];
  logic [19:0] hist3 [$];
  int checks = 0, failures = 0, cycles = 0;

  shift_reg dut (.clk(clk), .reset(reset), .din(din), .dout(dout), .taps(taps));
  shift_reg #(.WIDTH(20), .DEPTH(3)) dut3 (.clk(clk), .reset(reset), .din(din3), .dout(dout3), .taps(taps3));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    checks++;
    if (dout != 0 || dout3 != 0) failures++;
    for (int t = 0; t < 500; t++) begin
      din = 1'($urandom); din3 = 20'($urandom);
      hist.push_front(din); hist3.push_front(din3);
      @(negedge clk);
      // hist[0] was applied before the last edge: tap i holds hist[i].
      for (int i = 0; i < 4; i++) if (hist.size() > i) begin
        checks++;
        if (taps[i] != hist[i]) failures++;
      end
      if (hist.size() >= 4) begin
        checks++;
        if (dout != hist[3]) begin
          failures++;
          $display("FAIL t=%0d dout=%b expected %b", t, dout, hist[3]);
        end
      end
      if (hist3.size() >= 3) begin
        checks++;
        if (dout3 != hist3[2] || taps3[0] != hist3[0]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
