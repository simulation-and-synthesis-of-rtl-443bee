// mldd_code_check: stimulus and scoreboard for one decoder/detector instance.
//
// Drives reads into an mldd_top of geometry S and checks every result against
// values worked out here, not by the decoder:
//   - codewords are c(x) = m(x) * g(x) mod (x^N + 1) for random data m of
//     degree < K, with g the generator polynomial of the code (parameter G,
//     degree N - K, computed separately from the geometry);
//   - each read flips NERR random distinct bits, 0 <= NERR <= MAX_ERR;
//   - error must be 1 exactly when NERR > 0 (for NERR up to 5, the flips the
//     detector is expected to catch in three cycles);
//   - data_out must equal c when NERR <= J/2, the one-step majority bound;
//   - finish must rise 3 clock edges after the edge that sampled load
//     (output in cycle 5 = 3 + 2 I/O cycles) when NERR = 0, N + 3 edges
//     (cycle N + 5) otherwise; data_out_en and data_out stay low before.
// It also counts each mechanism: early finish, full decoding, a corrected read,
// a detection beyond the correction bound, and a load that restarts a read in
// progress; one that never happened counts as a failure.
module mldd_code_check #(
  parameter int unsigned  S       = 3,
  parameter int unsigned  GDEG    = 26,
  parameter logic [1023:0] G      = 1024'h501f445,
  parameter int unsigned  TRIALS  = 200,
  parameter int unsigned  MAX_ERR = 5,
  localparam int unsigned N = (1 << (2 * S)) - 1,
  localparam int unsigned J = 1 << S,
  localparam int unsigned K = N - GDEG
) (
  input  logic         clk,
  output logic         rst,
  output logic         load,
  output logic [N-1:0] data_in,
  input  logic [N-1:0] data_out,
  input  logic         data_out_en,
  input  logic         finish,
  input  logic         error,
  output logic         done,
  output int           checks,
  output int           failures
);

  int n_early, n_full, n_corrected, n_beyond, n_restart;

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] w;
    w = '0;
    for (int i = 0; i < N; i += 32) w = (w << 32) | N'($urandom);
    return w;
  endfunction

  function automatic logic [N-1:0] encode(logic [N-1:0] m);
    logic [N-1:0] g, c;
    g = G[N-1:0];
    c = '0;
    for (int i = 0; i < K; i++) begin
      if (m[i]) c ^= g;
      g = {g[N-2:0], g[N-1]};        // multiply by x modulo x^N + 1
    end
    return c;
  endfunction

  function automatic logic [N-1:0] error_pattern(int nerr);
    logic [N-1:0] e;
    e = '0;
    while ($countones(e) < nerr) e[$urandom_range(0, N - 1)] = 1'b1;
    return e;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (N=%0d) %s", N, what);
    end
  endtask

  // One read; abort_after > 0 reloads after that many cycles (restart check).
  task automatic one_read(int nerr, int abort_after);
    logic [N-1:0] c, e;
    int edges, exp_edges;
    c = encode(rand_word());
    e = error_pattern(nerr);
    @(negedge clk);
    load    = 1'b1;
    data_in = c ^ e;
    @(posedge clk);
    @(negedge clk);
    load    = 1'b0;
    data_in = rand_word();             // input is don't-care after load
    edges   = 0;
    if (abort_after > 0) begin
      repeat (abort_after) @(negedge clk);
      n_restart++;
      one_read(nerr, 0);
      return;
    end
    while (!finish && edges < N + 10) begin
      #1;
      check("output released while busy", !data_out_en && data_out == '0);
      @(posedge clk);
      edges++;
      @(negedge clk);
    end
    exp_edges = (nerr == 0) ? 3 : N + 3;
    check($sformatf("latency %0d edges, expected %0d (nerr=%0d)", edges, exp_edges, nerr),
          edges == exp_edges);
    check($sformatf("error flag %b (nerr=%0d)", error, nerr), error == (nerr > 0));
    check("output enable", data_out_en);
    if (nerr <= int'(J / 2)) begin
      check($sformatf("data_out %h expected %h (nerr=%0d)", data_out, c, nerr), data_out == c);
      if (nerr > 0 && data_out == c) n_corrected++;
    end
    else if (error) n_beyond++;
    if (nerr == 0 && edges == 3) n_early++;
    if (nerr > 0 && edges == N + 3) n_full++;
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    n_early = 0; n_full = 0; n_corrected = 0; n_beyond = 0; n_restart = 0;
    rst = 1'b1; load = 1'b0; data_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    #1;
    check("finish low after reset", !finish && !data_out_en);
    for (int t = 0; t < int'(TRIALS); t++) begin
      int nerr;
      // Most reads are clean, as in a memory; the rest carry 1..MAX_ERR flips.
      nerr = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, MAX_ERR);
      one_read(nerr, (t % 17 == 5) ? $urandom_range(1, N) : 0);
    end
    $display("N=%0d: early finishes %0d, full decodings %0d, corrected reads %0d, detections beyond J/2 %0d, restarts %0d",
             N, n_early, n_full, n_corrected, n_beyond, n_restart);
    check("an error-free read finished early", n_early > 0);
    check("an erroneous read was fully decoded", n_full > 0);
    check("a read with flipped bits was corrected", n_corrected > 0);
    check("a read was restarted by a new load", n_restart > 0);
    if (MAX_ERR > J / 2) check("a pattern beyond the correction bound was detected", n_beyond > 0);
    done = 1'b1;
  end

endmodule
