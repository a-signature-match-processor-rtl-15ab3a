// tb_char_match_array -- random words against the comparator grid.
// Checks every one of the 256*P outputs and that exactly one per valid
// row fires.
module tb_char_match_array;
  localparam int P = 4;
  logic [P-1:0][7:0] data;
  logic [P-1:0] lane_valid;
  logic [255:0][P-1:0] match;
  int checks = 0, failures = 0;

  char_match_array #(.P(P)) dut (.data, .lane_valid, .match);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int ones;
      for (int j = 0; j < P; j++) data[j] = 8'($urandom);
      lane_valid = (t % 5 == 0) ? P'($urandom) : '1;
      #1;
      ones = 0;
      for (int x = 0; x < 256; x++)
        for (int j = 0; j < P; j++) begin
          ones += int'(match[x][j]);
          if (match[x][j] != (lane_valid[j] && data[j] == 8'(x))) begin
            failures++; $display("FAIL t=%0d x=%0d j=%0d", t, x, j);
          end
        end
      checks++;
      if (ones != $countones(lane_valid)) begin
        failures++; $display("FAIL count t=%0d", t);
      end
      checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
