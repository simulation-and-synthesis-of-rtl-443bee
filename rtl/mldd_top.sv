// mldd_top: majority logic decoder/detector (MLDD) for cyclic EG-LDPC codes.
//
// A codeword read from memory is loaded into a cyclic shift register. Each clock
// the XOR matrix forms the J = 2^S check sums orthogonal on the last register bit,
// the majority gate decides whether that bit is wrong, and the register rotates
// by one, feeding the bit back through the correction gate. The control unit
// watches the check sums for the first three cycles only: if they are all zero
// the word has no error (any pattern of up to four flipped bits shows up in those
// three cycles for N = 63) and it is released to the output at once; otherwise
// the decoder runs a complete N-cycle majority-logic pass, correcting up to J/2
// flipped bits, and then releases the word.
//
// Interface: pulse load for one cycle with data_in valid. Without errors finish
// and data_out_en rise 4 clocks after the clock edge that sampled load (output in
// cycle 5, counting the load cycle as cycle 1); with errors N+4 clocks after it
// (cycle N+5). data_out is zero while data_out_en is low (a two-state stand-in
// for the tristate output of the original architecture); error tells whether the word needed
// correction. Outputs hold until the next load. Bit i of data_in and data_out is
// the coefficient of x^i of the code polynomial.
//
// S selects the code: S = 3 gives the (63,37) code used as the main size; 2, 4
// and 5 give the (15,7), (255,175) and (1023,781) codes.
module mldd_top
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned S = 3,
  localparam int unsigned N = (1 << (2 * S)) - 1,
  localparam int unsigned J = 1 << S,
  localparam int unsigned DETECT_CYCLES = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [N-1:0] data_in,
  output logic [N-1:0] data_out,
  output logic         data_out_en,
  output logic         finish,
  output logic         error
);

  if (S < 2 || S > MAX_S) begin : g_bad_s
    $error("mldd_top: S must be between 2 and %0d", MAX_S);
  end

  logic [N-1:0] c;
  logic [J-1:0] b;
  logic         maj;
  logic         shift_en;

  mldd_shift_register #(.N(N)) u_sreg (
    .clk      (clk),
    .load     (load),
    .shift_en (shift_en),
    .corr     (maj),
    .d        (data_in),
    .q        (c)
  );

  mldd_xor_matrix #(.S(S)) u_xor (
    .c (c),
    .b (b)
  );

  mldd_majority_gate #(.J(J)) u_maj (
    .b   (b),
    .maj (maj)
  );

  mldd_control #(.N(N), .J(J), .DETECT_CYCLES(DETECT_CYCLES)) u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .load     (load),
    .b        (b),
    .shift_en (shift_en),
    .finish   (finish),
    .error    (error)
  );

  mldd_output_buffer #(.N(N), .ROT(DETECT_CYCLES % N)) u_out (
    .finish (finish),
    .c      (c),
    .y      (data_out),
    .y_oe   (data_out_en)
  );

endmodule
