// tb_mao_node -- exhaustive truth table of a MAO tree node.
module tb_mao_node;
  logic mp0, mp1, lp_in, maa_out, lp0, lp1;
  int checks = 0, failures = 0;
  mao_node dut (.mp0, .mp1, .lp_in, .maa_out, .lp0, .lp1);
  initial begin
    for (int v = 0; v < 8; v++) begin
      {lp_in, mp1, mp0} = v[2:0];
      #1;
      // leftmost pointer goes to the left child when it has a match
      checks++;
      if (maa_out != (v[0] | v[1]) ||
          lp0 != (v[2] & v[0]) ||
          lp1 != (v[2] & v[1] & ~v[0]) ||
          (lp0 & lp1)) begin
        failures++; $display("FAIL v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
