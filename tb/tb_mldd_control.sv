// tb_mldd_control: sequencing of the control unit (N = 63, J = 8).
//
// For each read the testbench pulses load, then drives the check-sum inputs,
// optionally making one nonzero in one of the three detection cycles. Expected
// behaviour: shift_en high in exactly 3 cycles (no error) or 3 + N cycles
// (error); finish rises 3 clock edges after the edge that sampled load without
// error, N + 3 edges with error (output in cycle 5 or N + 5, counting the load cycle as cycle 1); error is 1 exactly when a check sum was nonzero
// in a detection cycle; a nonzero check sum after the detection cycles is
// ignored; a load while decoding restarts the sequence; finish and error hold.
module tb_mldd_control;
  localparam int N = 63;
  localparam int J = 8;
  int checks = 0, failures = 0;

  logic         clk = 1'b0;
  logic         rst, load, shift_en, finish, error;
  logic [J-1:0] b;

  mldd_control dut (.clk(clk), .rst(rst), .load(load), .b(b),
                    .shift_en(shift_en), .finish(finish), .error(error));

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One read. err_cycle = 0: no error; 1..3: nonzero check sum in that
  // detection cycle; 4: nonzero check sum only in a later cycle.
  task automatic run_read(int err_cycle);
    int edges, shifts, exp_edges;
    @(negedge clk);
    load = 1'b1;
    b    = '0;
    @(posedge clk);                // the edge that samples load
    @(negedge clk);
    load = 1'b0;
    edges = 0;
    shifts = 0;
    while (!finish && edges < 2 * N + 10) begin
      b = (edges + 1 == err_cycle || (err_cycle == 4 && edges == 3)) ? J'(1) << $urandom_range(0, J - 1) : '0;
      #1;
      if (shift_en) shifts++;
      @(posedge clk);
      edges++;
      @(negedge clk);
    end
    exp_edges = (err_cycle >= 1 && err_cycle <= 3) ? N + 3 : 3;
    expect_eq("edges from load to finish", edges, exp_edges);
    expect_eq("shift cycles", shifts, exp_edges);
    expect_eq($sformatf("error flag (err_cycle %0d)", err_cycle), int'(error), int'(err_cycle >= 1 && err_cycle <= 3));
    b = '1;
    repeat (5) begin
      @(negedge clk);
      checks++;
      if (!finish || shift_en || error != (err_cycle >= 1 && err_cycle <= 3)) begin
        failures++;
        $display("FAIL outputs not held after finish");
      end
    end
    b = '0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    expect_eq("finish after reset", int'(finish), 0);
    expect_eq("shift_en after reset", int'(shift_en), 0);
    for (int r = 0; r < 20; r++) run_read(r % 5);
    // Restart: load again in the middle of a full decoding pass.
    @(negedge clk);
    load = 1'b1; b = 8'h10;
    @(negedge clk);
    load = 1'b0;
    repeat (10) @(negedge clk);
    expect_eq("error while decoding", int'(error), 1);
    run_read(0);
    // Reset in the middle of a read.
    @(negedge clk);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0; rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    expect_eq("finish after mid-read reset", int'(finish), 0);
    expect_eq("shift_en after mid-read reset", int'(shift_en), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
