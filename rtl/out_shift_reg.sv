// out_shift_reg: latches and shift registers of the output interface.
//
// When SAMPLE is high the four comparator decisions are latched at the
// rising clock edge (the SR latch and the parallel load in one step) and
// appear on DOUT1..DOUT4 (q[0]..q[3]) in the following clock.  In the next
// three clocks the register shifts towards DOUT1, so DOUT1 presents bits 1,
// 2, 3 and 4 serially, one per clock; zeros shift in behind.  The document's
// register changes on the falling edge of the SAMPLE cycle; here everything
// is on the rising edge.
module out_shift_reg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample,
  input  logic [3:0] d,
  output logic [3:0] q,
  output logic       dout_serial
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (sample) q <= d;
    else             q <= {1'b0, q[3:1]};
  end

  assign dout_serial = q[0];

endmodule
