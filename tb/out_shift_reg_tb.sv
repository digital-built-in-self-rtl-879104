// out_shift_reg_tb: loads random decisions with SAMPLE every nine clocks and
// checks that DOUT1..DOUT4 show them in the next clock and that DOUT1 then
// presents bits 1, 2, 3, 4 in four consecutive clocks.
module out_shift_reg_tb;
  logic clk = 0, rst_n = 0, sample = 0;
  logic [3:0] d = '0, q;
  logic dout_serial;
  int checks = 0, failures = 0;

  out_shift_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 20; w++) begin
      logic [3:0] v;
      v = 4'($urandom);
      d = v;
      sample = 1;
      @(negedge clk);
      sample = 0;
      d = ~v;                       // must be ignored without SAMPLE
      checks++;
      if (q !== v) begin failures++; $display("FAIL parallel %b expected %b", q, v); end
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (dout_serial !== v[b]) begin failures++; $display("FAIL serial bit %0d", b + 1); end
        @(negedge clk);
      end
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
