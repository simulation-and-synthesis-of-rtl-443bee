// mldd_output_buffer: the output buffers between the register and output y.
//
// While finish is low the outputs are released; when finish is high the register
// contents are driven onto y. The original architecture uses tristate buffers; this two-state
// model drives y to zero and y_oe low where the buffers would be in high
// impedance, and y_oe is the common enable a pad or bus driver would use; it is
// finish itself, wired straight through, since the buffers share one enable.
//
// Every finishing path of the decoder leaves the codeword rotated by ROT
// positions (ROT = 3 detection cycles, or 3 + N), so bit i of the word sits in
// register bit (i + ROT) mod N. The buffers take each output from that tap,
// which is fixed wiring. This undoing of the rotation is this design's choice.
module mldd_output_buffer #(
  parameter int unsigned N   = 63,
  parameter int unsigned ROT = 3
) (
  input  logic         finish,
  input  logic [N-1:0] c,
  output logic [N-1:0] y,
  output logic         y_oe
);

  for (genvar i = 0; i < N; i++) begin : g_buf
    assign y[i] = finish & c[(i + ROT) % N];
  end
  assign y_oe = finish;

endmodule
