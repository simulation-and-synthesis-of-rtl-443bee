// mldd_control: control unit of the majority logic decoder/detector.
//
// A load request starts a read. The unit then runs DETECT_CYCLES (three, as in
// the original architecture) decoding cycles, counted by a small counter, while it ORs together
// all J check sums. If every check sum stayed zero over those cycles the word is
// error-free: the unit goes straight to MLDD_DONE and raises finish. Otherwise it
// sets error and lets the decoder run N more cycles, a complete majority-logic
// pass over every bit, before raising finish. finish and error then hold until
// the next load; a load in any state restarts the sequence.
//
// Timing, with the clock edge that samples load counted as the end of cycle 1:
// shift_en is high in cycles 2..4; without errors finish is high from cycle 5
// (3 detection + 2 I/O cycles), with errors from cycle N+5. error is valid from
// the same cycle as finish and also stays high during MLDD_DECODE.
//
// The counter limit, the finish flag and the three detection cycles follow the
// original architecture. The N extra cycles after a detected error, holding finish until the
// next load and the synchronous active-high reset are this design's choices.
module mldd_control
  import mldd_pkg::*;
#(
  parameter int unsigned N             = 63,
  parameter int unsigned J             = 8,
  parameter int unsigned DETECT_CYCLES = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [J-1:0] b,
  output logic         shift_en,
  output logic         finish,
  output logic         error
);

  mldd_state_e   state;

  localparam int unsigned CW = $clog2(N > DETECT_CYCLES ? N : DETECT_CYCLES);
  logic [CW-1:0] cnt;
  logic          err_seen;
  logic          err_now;

  assign err_now  = err_seen | (|b);
  assign shift_en = !load && (state == MLDD_DETECT || state == MLDD_DECODE);
  assign finish   = (state == MLDD_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= MLDD_IDLE;
      cnt      <= '0;
      err_seen <= 1'b0;
      error    <= 1'b0;
    end else if (load) begin
      state    <= MLDD_DETECT;
      cnt      <= '0;
      err_seen <= 1'b0;
      error    <= 1'b0;
    end else begin
      unique case (state)
        MLDD_DETECT: begin
          err_seen <= err_now;
          if (cnt == CW'(DETECT_CYCLES - 1)) begin
            cnt <= '0;
            if (err_now) begin
              state <= MLDD_DECODE;
              error <= 1'b1;
            end else begin
              state <= MLDD_DONE;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        MLDD_DECODE: begin
          if (cnt == CW'(N - 1)) begin
            cnt   <= '0;
            state <= MLDD_DONE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  // finish and error must never be raised together with an unfinished pass.
  property p_clean_finish;
    @(posedge clk) disable iff (rst)
      (state == MLDD_DETECT && cnt == CW'(DETECT_CYCLES - 1) && !load && !err_now)
      |=> finish && !error;
  endproperty
  a_clean_finish: assert property (p_clean_finish);

endmodule
