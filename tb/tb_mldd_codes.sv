// tb_mldd_codes: the decoder/detector on the other EG-LDPC codes of the family,
// (15,7), (255,175) and (1023,781), side by side, each with its own stimulus
// and scoreboard (mldd_code_check). Generator polynomials, bit i = coefficient
// of x^i, from the field GF(2^(2S)) on the same primitive polynomials as the
// design: (15,7) 0x1d1; (255,175) 0x11377f7700fa55335ba55;
// (1023,781) 0x5505540506f83be56926918e7b498ec38b851497511405010504141500041.
// The (15,7) code corrects 2 flips, so its reads with 3 or 4 flips check
// detection only.
module tb_mldd_codes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 3;
  localparam int unsigned SS   [NC] = '{2, 4, 5};
  localparam int unsigned GDEGS[NC] = '{8, 80, 242};
  localparam logic [1023:0] GS [NC] = '{
    1024'h1d1,
    1024'h11377f7700fa55335ba55,
    1024'h5505540506f83be56926918e7b498ec38b851497511405010504141500041
  };
  localparam int unsigned TR   [NC] = '{300, 150, 60};
  localparam int unsigned ME   [NC] = '{4, 5, 5};

  logic [NC-1:0] done;
  int checks [NC];
  int failures [NC];

  for (genvar k = 0; k < NC; k++) begin : g_code
    localparam int unsigned S = SS[k];
    localparam int unsigned N = (1 << (2 * S)) - 1;
    logic         rst, load, data_out_en, finish, error;
    logic [N-1:0] data_in, data_out;

    mldd_top #(.S(S)) dut (
      .clk(clk), .rst(rst), .load(load), .data_in(data_in), .data_out(data_out),
      .data_out_en(data_out_en), .finish(finish), .error(error)
    );

    mldd_code_check #(.S(S), .GDEG(GDEGS[k]), .G(GS[k]), .TRIALS(TR[k]), .MAX_ERR(ME[k])) chk (
      .clk(clk), .rst(rst), .load(load), .data_in(data_in), .data_out(data_out),
      .data_out_en(data_out_en), .finish(finish), .error(error),
      .done(done[k]), .checks(checks[k]), .failures(failures[k])
    );
  end

  function automatic int total(int v [NC]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule
