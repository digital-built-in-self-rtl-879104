// decoder_chip_full_tb: one complete operation of the chip at its default
// parameters.  The three serial codewords of the document's full-decoder
// simulation (01010100, 01010111, 00001011, each with one error, p(1) = 0.8
// or 0.2) are streamed in after FRAME; the decoded bits 0111, 0001, 1000 must
// appear on DOUT1..DOUT4 in clocks 18, 27 and 36 after FRAME.  Then one
// self-test with ERR1 set must report a faulty core with exactly C1, C3, ..,
// C15 bad and a good I/O interface.
module decoder_chip_full_tb;
  import hamming_pkg::*;

  logic  clk = 0, rst_n = 0, test = 0, err1 = 0, err2 = 0;
  logic  frame = 0, bk_frame = 0;
  volt_t vin = 128, vref = 128, bk_vin = 128, bk_vref = 128;
  logic [5:0] show_node = 0, bk_show_node = 0;
  logic [3:0] dout;
  logic core_finish, good_core, good_node, io_finish, good_io;
  prob_t bk_y [K];
  logic bk_core_finish, bk_good_core, bk_good_node;
  int checks = 0, failures = 0;

  decoder_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam logic [7:0] RX [3]  = '{8'b0101_0100, 8'b0101_0111, 8'b0000_1011};
  localparam logic [3:0] DEC [3] = '{4'b1110, 4'b1000, 4'b0001};   // {DOUT4..DOUT1}

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) frame = 1;
    @(negedge clk) frame = 0;
    for (int c = 1; c <= 40; c++) begin
      int k, i;
      k = (c - 1) / 9;
      i = (c - 1) % 9;
      vin = (k < 3 && i < 8) ? (RX[k][7-i] ? 8'd96 : 8'd160) : 8'd128;
      #1;
      if (c >= 18 && (c - 18) % 9 == 0 && (c - 18) / 9 < 3)
        chk(dout == DEC[(c - 18) / 9], $sformatf("clock %0d: DOUT %b expected %b", c, dout, DEC[(c - 18) / 9]));
      @(negedge clk);
    end
    err1 = 1;
    test = 1;
    for (int n = 0; n < 100 && !(core_finish && io_finish); n++) @(negedge clk);
    chk(core_finish && io_finish, "self-test finished");
    chk(good_core === 1'b0 && good_io === 1'b1, "faulty core, good I/O");
    for (int a = 0; a < 16; a++) begin
      show_node = 6'(a);
      #1 chk(good_node === a[0], $sformatf("C%0d", a + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
