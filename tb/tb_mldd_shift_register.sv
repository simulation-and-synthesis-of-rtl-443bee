// tb_mldd_shift_register: load, hold and rotate-with-correction of the codeword
// register, against a reference rotation kept in the testbench: on each shift
// ref becomes {ref[N-2:0], ref[N-1] ^ corr}; load has priority over shift.
module tb_mldd_shift_register;
  localparam int N = 63;
  int checks = 0, failures = 0;

  logic         clk = 1'b0;
  logic         load, shift_en, corr;
  logic [N-1:0] d, q, ref_q;

  mldd_shift_register dut (.clk(clk), .load(load), .shift_en(shift_en), .corr(corr), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; shift_en = 1'b0; corr = 1'b0; d = '0; ref_q = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      load     = (t == 0) || ($urandom_range(0, 15) == 0);
      shift_en = $urandom_range(0, 3) != 0;
      corr     = $urandom_range(0, 3) == 0;
      d        = {31'($urandom), $urandom};
      if (load) ref_q = d;
      else if (shift_en) ref_q = {ref_q[N-2:0], ref_q[N-1] ^ corr};
      @(posedge clk);
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL t=%0d q=%h expected %h", t, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
