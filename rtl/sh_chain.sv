// sh_chain: behavioural model of the two sample-and-hold chains of the input
// interface (one for the LLR voltage Vin, one for its reference Vref), with
// the input multiplexer added for self-test.
//
// Each of the eight cells has a sample capacitor, written when its select
// line is high, and a hold capacitor, loaded from the sample capacitor when
// PIPE is high; a buffer drives the held value to the decoder.  While the
// core decodes the held codeword, the sample capacitors take in the next one.
// Voltages are carried as VW-bit codes.  The discharge of the hold capacitors
// during SEL8 is not modelled separately: the PIPE transfer that follows
// overwrites them.
//
// Test mode (test = 1): the multiplexer replaces the analog inputs with the
// 1-bit test stream tbit; a 1 is stored as Vin = VLO, Vref = VMID (a strong
// "bit is 1" LLR), a 0 as Vin = VHI, Vref = VMID.  Sample updates happen at the
// rising clock edge of the select cycle.  rst_n clears both chains to VMID
// (power-up state, this model's choice).
module sh_chain
  import hamming_pkg::*;
#(
  parameter volt_t VHI = volt_t'(255),
  parameter volt_t VLO = volt_t'(0)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] sel,
  input  logic       pipe,
  input  logic       test,
  input  logic       tbit,
  input  volt_t      vin,
  input  volt_t      vref,
  output volt_t      hold_vin  [N],
  output volt_t      hold_vref [N]
);

  volt_t s_vin [N], s_vref [N];
  volt_t d_vin, d_vref;

  assign d_vin  = test ? (tbit ? VLO : VHI) : vin;
  assign d_vref = test ? VMID : vref;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        s_vin[i]     <= VMID;
        s_vref[i]    <= VMID;
        hold_vin[i]  <= VMID;
        hold_vref[i] <= VMID;
      end
    end else begin
      for (int i = 0; i < N; i++)
        if (sel[i]) begin
          s_vin[i]  <= d_vin;
          s_vref[i] <= d_vref;
        end
      if (pipe) begin
        hold_vin  <= s_vin;
        hold_vref <= s_vref;
      end
    end
  end

endmodule
