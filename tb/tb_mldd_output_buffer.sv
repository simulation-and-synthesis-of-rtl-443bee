// tb_mldd_output_buffer: output released while finish is low; with finish high,
// y[i] = c[(i + 3) mod N] and y_oe high.
module tb_mldd_output_buffer;
  localparam int N = 63;
  int checks = 0, failures = 0;

  logic         finish, y_oe;
  logic [N-1:0] c, y, expect_y;

  mldd_output_buffer dut (.finish(finish), .c(c), .y(y), .y_oe(y_oe));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      finish = t[0];
      c = (t < 63) ? (63'(1) << t) : {31'($urandom), $urandom};
      expect_y = '0;
      // Undo a left rotation by three: the bit loaded at i is now at (i+3) mod N.
      if (finish) expect_y = {c[2:0], c[N-1:3]};
      #1;
      checks++;
      if (y !== expect_y || y_oe !== finish) begin
        failures++;
        $display("FAIL finish=%b c=%h y=%h expected %h oe=%b", finish, c, y, expect_y, y_oe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
