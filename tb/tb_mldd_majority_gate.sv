// tb_mldd_majority_gate: exhaustive check of the majority vote for J = 4 and 8.
// Reference: maj = 1 exactly when the number of ones exceeds the number of zeros.
module tb_mldd_majority_gate;
  int checks = 0, failures = 0;

  logic [3:0] b4;
  logic       m4;
  logic [7:0] b8;
  logic       m8;

  mldd_majority_gate #(.J(4)) dut4 (.b(b4), .maj(m4));
  mldd_majority_gate dut8 (.b(b8), .maj(m8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int v = 0; v < 16; v++) begin
      b4 = 4'(v);
      #1;
      ones = $countones(b4);
      checks++;
      if (m4 !== (ones > 4 - ones)) begin
        failures++;
        $display("FAIL J=4 b=%b maj=%b", b4, m4);
      end
    end
    for (int v = 0; v < 256; v++) begin
      b8 = 8'(v);
      #1;
      ones = $countones(b8);
      checks++;
      if (m8 !== (ones > 8 - ones)) begin
        failures++;
        $display("FAIL J=8 b=%b maj=%b", b8, m8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
