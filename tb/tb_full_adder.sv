// tb_full_adder: exhaustive test of the one-bit full adder against the
// arithmetic sum of its three inputs.
module tb_full_adder;
  logic x, y, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, ci} = 3'(i);
      #1;
      checks++;
      if ({co, s} != 2'(x + y + ci)) begin
        failures++;
        $display("FAIL %b%b%b -> co=%b s=%b", x, y, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
