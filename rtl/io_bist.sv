// io_bist: built-in self-test controller for the serial-to-parallel input
// interface and the comparator output interface.
//
// The interface has eight sample-and-hold cells per chain but only four
// comparators, so the test is run in halves.  When Test rises the
// controller pulses Frame, then streams four test words serially, one bit
// per clock, nine clocks per word (eight samples and the PIPE transfer):
//   word 0: PATTERN,  first four cells checked
//   word 1: PATTERN,  last four cells checked
//   word 2: ~PATTERN, first four cells checked
//   word 3: ~PATTERN, last four cells checked
// In test mode the stored bits bypass the decoder core; sel_last tells the
// bypass multiplexer which half to route to the comparators and is set when
// the word is transferred to the hold capacitors.  The latched comparator
// outputs VCout are compared with the sent bits one clock after SAMPLE.  On
// the first mismatch Good_IO drops and the test stops; otherwise Finish
// rises after the fourth comparison with Good_IO high.
//
// Timing, counted in clocks from the Frame clock (cycle 0): bit i of word k
// is driven in cycle 9k+1+i, PIPE falls in cycle 9k+9, the comparators are
// latched at the end of cycle 9k+17 (the document's first output 17 cycles
// after Frame) and checked at the end of cycle 9k+18.  Finish: cycle 45.
// The half-by-half procedure and the signal names follow the document; the
// pattern, the use of its complement and the exact schedule are this
// design's choices.
module io_bist #(
  parameter logic [7:0] PATTERN = 8'b1001_0110   // bit i goes to cell i+1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       test,
  input  logic [3:0] vcout,
  output logic       frame,
  output logic       serial_in,
  output logic       sel_last,
  output logic       finish,
  output logic       good_io
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  localparam int WORDS = 4;
  localparam int LAST  = 9 * (WORDS - 1) + 18;

  state_e     state;
  logic [5:0] cyc;
  logic [5:0] pos;     // cyc - 1
  logic [1:0] word;    // word being shifted in
  logic [3:0] bitn;    // bit being shifted in
  logic [7:0] wpat;

  assign pos = cyc - 6'd1;

  always_comb begin
    word = 2'(pos / 6'd9);
    bitn = 4'(pos % 6'd9);
    wpat = word[1] ? ~PATTERN : PATTERN;
  end

  assign frame     = (state == S_RUN) && (cyc == 6'd0);
  assign serial_in = (state == S_RUN) && (cyc >= 6'd1) && (cyc <= 6'd36) &&
                     (bitn < 4'd8) && wpat[bitn[2:0]];
  assign finish    = (state == S_DONE);

  // Word checked at the end of cycle 9k+18.
  logic       check_now;
  logic [1:0] cword;
  logic [7:0] cpat;
  logic [3:0] expect_bits;

  always_comb begin
    check_now   = (state == S_RUN) && (cyc >= 6'd18) && ((cyc - 6'd18) % 6'd9 == 6'd0);
    cword       = 2'((cyc - 6'd18) / 6'd9);
    cpat        = cword[1] ? ~PATTERN : PATTERN;
    expect_bits = cword[0] ? cpat[7:4] : cpat[3:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cyc      <= '0;
      sel_last <= 1'b0;
      good_io  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (test) begin
          state    <= S_RUN;
          cyc      <= '0;
          sel_last <= 1'b0;
          good_io  <= 1'b1;
        end
        S_RUN: if (!test) begin
          state <= S_IDLE;
        end else begin
          cyc <= cyc + 6'd1;
          // PIPE cycle of word k (cycle 9k+9): route its half from now on.
          if (cyc >= 6'd9 && cyc % 6'd9 == 6'd0) sel_last <= word[0];
          if (check_now) begin
            if (vcout != expect_bits) begin
              good_io <= 1'b0;
              state   <= S_DONE;
            end else if (cyc == 6'(LAST)) begin
              state <= S_DONE;
            end
          end
        end
        S_DONE: if (!test) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
