// io_bist_tb: runs the I/O BIST against a model of the interface written
// here: the serial bits are captured in eight cells during the eight clocks
// after each frame slot, moved to hold cells in the ninth, the half chosen by
// sel_last is latched into VCout at the end of clock 9k+17 after Frame.  A
// fault can be put on one response set.  Checks the words sent (pattern,
// pattern, complement, complement), that Frame is pulsed once, Finish in
// clock 46 with Good_IO high for a good interface, and Good_IO low with an
// early stop for a fault on each comparator output in each of the four
// response sets, and for each comparator stuck at 0 or at 1 (the pattern and
// its complement must catch both).  A clean run after the faults passes.
module io_bist_tb;
  logic clk = 0, rst_n = 0, test = 0;
  logic [3:0] vcout = '0;
  logic frame, serial_in, sel_last, finish, good_io;
  int checks = 0, failures = 0;

  localparam logic [7:0] PAT = 8'b1001_0110;

  io_bist dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Interface model.
  int         c = 0;            // clock number since the Frame clock, 0 = idle
  int         fault_set = -1;
  logic [3:0] fault_mask = 4'b0100;
  logic [3:0] stuck0 = '0, stuck1 = '0;   // comparator outputs stuck at 0 / 1
  int         frames = 0;
  logic [7:0] cap, hold;
  logic [7:0] sent [4];

  always @(posedge clk) begin
    if (frame) begin
      c <= 1;
      frames <= frames + 1;
    end else if (c > 0) begin
      if (c <= 36 && (c - 1) % 9 < 8) begin
        cap[(c - 1) % 9] = serial_in;
        sent[(c - 1) / 9][(c - 1) % 9] = serial_in;
      end
      if (c % 9 == 0) hold = cap;
      if (c >= 17 && (c - 17) % 9 == 0)
        vcout <= (((sel_last ? hold[7:4] : hold[3:0])
                   ^ (((c - 17) / 9 == fault_set) ? fault_mask : 4'b0000)) & ~stuck0) | stuck1;
      c <= c + 1;
    end
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int fs, output int fin_clock);
    fault_set = fs;
    frames = 0;
    @(negedge clk) test = 1;
    fin_clock = -1;
    for (int n = 0; n < 80 && fin_clock < 0; n++) begin
      @(negedge clk);
      if (finish) fin_clock = c;
    end
  endtask

  initial begin
    int fin;
    repeat (2) @(negedge clk);
    rst_n = 1;

    run(-1, fin);
    chk(fin == 46, $sformatf("finish in clock %0d, expected 46", fin));
    chk(good_io === 1'b1, "good interface passes");
    chk(frames == 1, "one frame pulse");
    chk(sent[0] == PAT && sent[1] == PAT && sent[2] == ~PAT && sent[3] == ~PAT, "test words");
    @(negedge clk) test = 0;
    @(negedge clk);
    chk(finish === 1'b0, "finish drops with test");

    for (int fs = 0; fs < 4; fs++)
      for (int b = 0; b < 4; b++) begin
        c = 0;
        fault_mask = 4'(1 << b);
        run(fs, fin);
        chk(good_io === 1'b0, $sformatf("fault on VCout%0d in set %0d detected", b + 1, fs));
        chk(fin == 19 + 9 * fs, $sformatf("stop in clock %0d after fault in set %0d", fin, fs));
        @(negedge clk) test = 0;
        @(negedge clk);
        c = 0;
      end

    // Stuck comparators: the failing set is the first whose expected bit
    // differs from the stuck value.
    for (int b = 0; b < 4; b++)
      for (int sv = 0; sv < 2; sv++) begin
        int first;
        logic [7:0] w;
        c = 0;
        stuck0 = (sv == 0) ? 4'(1 << b) : 4'b0;
        stuck1 = (sv == 1) ? 4'(1 << b) : 4'b0;
        first = -1;
        for (int set = 3; set >= 0; set--) begin
          w = (set >= 2) ? ~PAT : PAT;
          if (((set % 2 == 1) ? w[4 + b] : w[b]) != sv[0]) first = set;
        end
        run(-1, fin);
        chk(good_io === 1'b0, $sformatf("VCout%0d stuck at %0d detected", b + 1, sv));
        chk(fin == 19 + 9 * first, $sformatf("stuck VCout%0d: stop in clock %0d, expected %0d", b + 1, fin, 19 + 9 * first));
        @(negedge clk) test = 0;
        @(negedge clk);
        c = 0;
      end
    stuck0 = '0;
    stuck1 = '0;

    run(-1, fin);
    chk(fin == 46 && good_io === 1'b1, "clean run after faulty ones");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
