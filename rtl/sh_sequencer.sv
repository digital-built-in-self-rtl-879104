// sh_sequencer: timing generator of the serial-to-parallel input interface
// and of the output interface.
//
// FRAME marks the start of the codeword stream and resets the sequence.  The
// eight select lines SEL1..SEL8 then go high one per clock, each making its
// sample-and-hold cell sample the serial LLR voltage.  In the ninth clock
// PIPE is high: the sampled values move from the sample capacitors to the
// hold capacitors and the decoder core is reset.  The nine-clock period then
// repeats for the next codeword.  SAMPLE, which latches the comparator
// decisions into the output shift registers, is high in the SEL8 clock once a
// codeword has been transferred, i.e. eight clocks after each PIPE, just
// before the next transfer replaces the decoded word.  With FRAME in clock 0,
// the first SAMPLE is in clock 17 and later ones follow every nine clocks, as
// the document states.
//
// Ports: sel[i] is SEL(i+1).  All outputs are decoded from registers.  The
// document resets on the falling clock edge; this design samples FRAME on the
// rising edge like every other register here.
module sh_sequencer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame,
  output logic [7:0] sel,
  output logic       pipe,
  output logic       sample
);

  logic [3:0] cnt;
  logic       active;
  logic       held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      active <= 1'b0;
      held   <= 1'b0;
    end else if (frame) begin
      cnt    <= '0;
      active <= 1'b1;
      held   <= 1'b0;
    end else if (active) begin
      cnt <= (cnt == 4'd8) ? 4'd0 : cnt + 4'd1;
      if (cnt == 4'd8) held <= 1'b1;
    end
  end

  always_comb begin
    sel = '0;
    if (active && cnt < 4'd8) sel[cnt[2:0]] = 1'b1;
  end

  assign pipe   = active && (cnt == 4'd8);
  assign sample = active && held && (cnt == 4'd7);

endmodule
