// tb_mldd_xor_matrix: checks the check sums of the XOR matrix.
//
// S = 2: the four sums must be the check equations of the (15,7) decoder,
// {3,11,12,14} {7,8,10,14} {1,5,13,14} {0,2,6,14}. S = 3: the eight sums of the
// (63,37) code, as masks worked out separately from GF(64) with x^6+x+1. Each
// is probed with every one-hot word and with random words, against
// b[k] = XOR of the word's bits on line k.
module tb_mldd_xor_matrix;
  int checks = 0, failures = 0;

  localparam logic [14:0] M2 [4] = '{
    15'((1<<3)|(1<<11)|(1<<12)|(1<<14)),
    15'((1<<7)|(1<<8)|(1<<10)|(1<<14)),
    15'((1<<1)|(1<<5)|(1<<13)|(1<<14)),
    15'((1<<0)|(1<<2)|(1<<6)|(1<<14))
  };
  localparam logic [62:0] M3 [8] = '{
    63'h5080098020000020, 63'h4c01000001050800, 63'h4200260080000082, 63'h4142002600800000,
    63'h6008000008284004, 63'h4010000010508009, 63'h4000004142002600, 63'h4004c01000001050
  };

  logic [14:0] c2;
  logic [3:0]  b2;
  logic [62:0] c3;
  logic [7:0]  b3;

  mldd_xor_matrix #(.S(2)) dut2 (.c(c2), .b(b2));
  mldd_xor_matrix #(.S(3)) dut3 (.c(c3), .b(b3));

  task automatic check2();
    #1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (b2[k] !== ^(c2 & M2[k])) begin
        failures++;
        $display("FAIL S=2 c=%h k=%0d b=%b", c2, k, b2[k]);
      end
    end
  endtask

  task automatic check3();
    #1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (b3[k] !== ^(c3 & M3[k])) begin
        failures++;
        $display("FAIL S=3 c=%h k=%0d b=%b", c3, k, b3[k]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 15; i++) begin c2 = 15'(1) << i; check2(); end
    for (int i = 0; i < 63; i++) begin c3 = 63'(1) << i; check3(); end
    for (int t = 0; t < 500; t++) begin
      c2 = 15'($urandom);
      c3 = {31'($urandom), $urandom};
      check2();
      check3();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
