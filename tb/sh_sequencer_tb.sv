// sh_sequencer_tb: checks the interface timing against the cycle numbers
// given for the serial-to-parallel interface: after FRAME (clock 0) SEL1..SEL8
// in clocks 1..8, PIPE in clock 9, the pattern repeating every nine clocks,
// SAMPLE first in clock 17 and then every nine clocks, nothing before FRAME,
// and a new FRAME restarting the sequence mid-stream.
module sh_sequencer_tb;
  logic clk = 0, rst_n = 0, frame = 0;
  logic [7:0] sel;
  logic pipe, sample;
  int checks = 0, failures = 0;

  sh_sequencer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs in clock n after FRAME (n >= 1).
  task automatic expect_clock(input int n);
    int ph = (n - 1) % 9;
    logic [7:0] es = (ph < 8) ? (8'b1 << ph) : 8'b0;
    logic ep = (ph == 8);
    logic esm = (ph == 7) && (n >= 17);
    checks++;
    if (sel !== es || pipe !== ep || sample !== esm) begin
      failures++;
      $display("FAIL clock %0d: sel=%b pipe=%b sample=%b expected %b %b %b", n, sel, pipe, sample, es, ep, esm);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (sel !== 0 || pipe || sample) begin failures++; $display("FAIL activity before FRAME"); end
    end
    frame = 1;                 // clock 0
    @(negedge clk) frame = 0;
    for (int n = 1; n <= 50; n++) begin
      expect_clock(n);
      @(negedge clk);
    end
    frame = 1;                 // restart mid-stream
    @(negedge clk) frame = 0;
    for (int n = 1; n <= 30; n++) begin
      expect_clock(n);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
