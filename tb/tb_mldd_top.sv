// tb_mldd_top: end-to-end test of the decoder/detector at its default size, the
// (63,37) EG-LDPC code (N = 63, J = 8 check sums, corrects up to 4 flips).
// 2000 reads with 0 to 5 flipped bits; see mldd_code_check for what is checked.
// The generator polynomial of the (63,37) code with GF(64) built on x^6+x+1:
// g(x) = 0x501f445 (bit i = coefficient of x^i), degree 26.
module tb_mldd_top;
  localparam int N = 63;

  logic         clk = 1'b0;
  logic         rst, load, data_out_en, finish, error, done;
  logic [N-1:0] data_in, data_out;
  int           checks, failures;

  always #5 clk = ~clk;

  mldd_top dut (
    .clk         (clk),
    .rst         (rst),
    .load        (load),
    .data_in     (data_in),
    .data_out    (data_out),
    .data_out_en (data_out_en),
    .finish      (finish),
    .error       (error)
  );

  mldd_code_check #(.S(3), .GDEG(26), .G(1024'h501f445), .TRIALS(2000), .MAX_ERR(5)) chk (
    .clk         (clk),
    .rst         (rst),
    .load        (load),
    .data_in     (data_in),
    .data_out    (data_out),
    .data_out_en (data_out_en),
    .finish      (finish),
    .error       (error),
    .done        (done),
    .checks      (checks),
    .failures    (failures)
  );

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
