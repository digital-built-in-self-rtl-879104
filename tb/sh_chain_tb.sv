// sh_chain_tb: writes random Vin/Vref samples into the eight cells one select
// line at a time and checks that the hold outputs change only on PIPE, that
// they then show exactly the sampled codeword while the next one is being
// sampled, and that in test mode a 1 is stored as (VLO, VMID) and a 0 as
// (VHI, VMID).
module sh_chain_tb;
  import hamming_pkg::*;

  logic clk = 0, rst_n = 0, pipe = 0, test = 0, tbit = 0;
  logic [7:0] sel = '0;
  volt_t vin = '0, vref = '0;
  volt_t hold_vin [N], hold_vref [N];
  int checks = 0, failures = 0;

  sh_chain dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  volt_t wv [N], wr [N], prev_v [N], prev_r [N];

  task automatic send_word(input logic tmode);
    for (int i = 0; i < N; i++) begin
      sel = 8'b1 << i;
      if (tmode) begin tbit = wv[i][0]; vin = 8'h33; vref = 8'h44; end
      else begin vin = wv[i]; vref = wr[i]; end
      @(negedge clk);
      // holds must not move while sampling
      for (int k = 0; k < N; k++) begin
        checks++;
        if (hold_vin[k] !== prev_v[k] || hold_vref[k] !== prev_r[k]) begin
          failures++; $display("FAIL hold changed while sampling, cell %0d", k);
        end
      end
    end
    sel = '0;
    pipe = 1;
    @(negedge clk) pipe = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin prev_v[k] = VMID; prev_r[k] = VMID; end
    for (int w = 0; w < 6; w++) begin
      logic tm;
      tm = (w >= 4);
      test = tm;
      for (int i = 0; i < N; i++) begin
        wv[i] = volt_t'($urandom_range(255));
        wr[i] = volt_t'($urandom_range(255));
      end
      send_word(tm);
      for (int i = 0; i < N; i++) begin
        volt_t ev, er;
        ev = tm ? (wv[i][0] ? 8'd0 : 8'd255) : wv[i];
        er = tm ? 8'd128 : wr[i];
        checks++;
        if (hold_vin[i] !== ev || hold_vref[i] !== er) begin
          failures++;
          $display("FAIL word %0d cell %0d: %0d/%0d expected %0d/%0d", w, i, hold_vin[i], hold_vref[i], ev, er);
        end
        prev_v[i] = hold_vin[i];
        prev_r[i] = hold_vref[i];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
