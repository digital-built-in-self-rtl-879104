// decoder_chip_tb: end-to-end test of the decoder chip.
//
// 1. Decoding: after FRAME, the document's three serial codewords
//    (01010100, 01010111, 00001011, each with one bit in error) and then
//    random codewords with a random single error are streamed in, one LLR
//    voltage per clock (bit 1 -> Vin 32 codes below Vref, i.e. p(1) = 0.8).
//    Information bits must appear on DOUT1..DOUT4 in clock 18 + 9k (the
//    comparators latch 17 clocks after FRAME) and serially on DOUT1 over the
//    four clocks from there.  The back-up decoder gets the same stream and
//    its soft outputs must decide the same bits.
// 2. Self-test of a fault-free chip: both BISTs finish, Good_Core and Good_IO
//    high, every Show_Node address reads good.
// 3. ERR1, ERR2 and both: the six result bytes read as the FPGA controller
//    does (C8..C1, C16..C9, E8..E1, E16..E9, E24..E17, {Good_Core, Good_IO,
//    E25}) must match the document's measured node patterns.
// 4. A second chip with one comparator offset beyond full scale must fail
//    its I/O self-test while its core passes.
// Each mechanism (frame, pipe/core reset, comparator sample, serial shift,
// error correction, core BIST pass and fail, node readout, I/O BIST pass and
// fail, back-up decoding) is counted; one that never happens is a failure.
module decoder_chip_tb;
  import hamming_pkg::*;

  logic  clk = 0, rst_n = 0, test = 0, err1 = 0, err2 = 0;
  logic  frame = 0, bk_frame = 0;
  volt_t vin = 128, vref = 128, bk_vin = 128, bk_vref = 128;
  logic [5:0] show_node = 0, bk_show_node = 0;
  logic [3:0] dout, dout_b;
  logic core_finish, good_core, good_node, io_finish, good_io;
  logic core_finish_b, good_core_b, good_node_b, io_finish_b, good_io_b;
  prob_t bk_y [K], bk_y_b [K];
  logic bk_core_finish, bk_good_core, bk_good_node;
  logic bk_core_finish_b, bk_good_core_b, bk_good_node_b;
  int checks = 0, failures = 0;

  decoder_chip dut (.*);

  // Same chip with comparator 3 offset beyond full scale (always decides 0).
  decoder_chip #(.CMP_OFFSET('{0, 0, 5000, 0})) dut_bad (
    .clk, .rst_n, .test, .err1, .err2, .frame, .vin, .vref, .dout(dout_b),
    .show_node, .core_finish(core_finish_b), .good_core(good_core_b),
    .good_node(good_node_b), .io_finish(io_finish_b), .good_io(good_io_b),
    .bk_frame, .bk_vin, .bk_vref, .bk_y(bk_y_b), .bk_show_node,
    .bk_core_finish(bk_core_finish_b), .bk_good_core(bk_good_core_b),
    .bk_good_node(bk_good_node_b));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_frame = 0, n_pipe = 0, n_sample = 0, n_serial = 0, n_corrected = 0;
  int n_core_pass = 0, n_core_fail = 0, n_node_read = 0, n_io_pass = 0, n_io_fail = 0;
  int n_backup = 0;

  always @(posedge clk) begin
    if (dut.pipe)   n_pipe++;
    if (dut.sample) n_sample++;
  end

  localparam logic [7:0] GEN [4] = '{8'h8B, 8'h4E, 8'h2D, 8'h17};
  function automatic logic [7:0] cw(logic [3:0] info);
    logic [7:0] c = 0;
    for (int k = 0; k < 4; k++) if (info[3-k]) c ^= GEN[k];
    return c;
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam int NW = 40;
  logic [7:0] rx   [NW];
  logic [3:0] info [NW];

  // Streams NW words; checks outputs as they come out.
  task automatic decode_stream();
    int c;
    for (int k = 0; k < NW; k++) begin
      if (k < 3) begin
        rx[k]   = (k == 0) ? 8'b0101_0100 : (k == 1) ? 8'b0101_0111 : 8'b0000_1011;
        info[k] = (k == 0) ? 4'b0111 : (k == 1) ? 4'b0001 : 4'b1000;
      end else begin
        info[k] = 4'($urandom);
        rx[k]   = cw(info[k]) ^ (8'h80 >> $urandom_range(7));
      end
    end
    @(negedge clk);
    frame = 1; bk_frame = 1;          // clock 0
    n_frame++;
    @(negedge clk);
    frame = 0; bk_frame = 0;
    // clock c (c >= 1) is the interval after the c-th negedge from here
    for (c = 1; c <= 9 * NW + 30; c++) begin
      int k = (c - 1) / 9, i = (c - 1) % 9;
      if (k < NW && i < 8) begin
        vin  = rx[k][7-i] ? 8'd96 : 8'd160;
        vref = 8'd128;
      end else begin
        vin = 8'd128; vref = 8'd128;
      end
      bk_vin = vin; bk_vref = vref;
      #1;
      // back-up decoder soft outputs, just before the next PIPE
      if (c >= 17 && (c - 17) % 9 == 0 && (c - 17) / 9 < NW) begin
        int w = (c - 17) / 9;
        logic [3:0] hb;
        for (int j = 0; j < 4; j++) hb[3-j] = (bk_y[j] > 12'd2048);
        chk(hb == info[w], $sformatf("back-up word %0d decided %b expected %b", w, hb, info[w]));
        if (hb == info[w]) n_backup++;
      end
      if (c >= 18 && (c - 18) % 9 < 4 && (c - 18) / 9 < NW) begin
        int w = (c - 18) / 9, b = (c - 18) % 9;
        logic [3:0] d;
        for (int j = 0; j < 4; j++) d[j] = info[w][3-j];   // DOUT1 = first bit
        if (b == 0) begin
          chk(dout == d, $sformatf("word %0d parallel %b expected %b", w, dout, d));
          if (dout == d && rx[w] != cw(info[w])) n_corrected++;
        end
        chk(dout[0] == d[b], $sformatf("word %0d serial bit %0d", w, b + 1));
        if (b == 3 && dout[0] == d[b]) n_serial++;
      end
      // nothing latched before clock 17
      if (c < 18) chk(dout == 4'b0, "no output before the first SAMPLE");
      @(negedge clk);
    end
  endtask

  task automatic self_test(output logic [7:0] bytes [6]);
    @(negedge clk) test = 1;
    for (int n = 0; n < 100 && !(core_finish && io_finish && bk_core_finish); n++) @(negedge clk);
    chk(core_finish && io_finish && bk_core_finish, "self-tests finish");
    for (int a = 0; a < 16; a++) begin show_node = 6'(a);      #1 bytes[a / 8][a % 8] = good_node; n_node_read++; end
    for (int a = 0; a < 24; a++) begin show_node = (a < 16) ? 6'(32 + a) : 6'(48 + a - 16); #1 bytes[2 + a / 8][a % 8] = good_node; n_node_read++; end
    show_node = 6'd56;
    #1 bytes[5] = {5'b0, good_core, good_io, good_node};
    if (good_core) n_core_pass++; else n_core_fail++;
    if (good_io) n_io_pass++; else n_io_fail++;
    @(negedge clk) test = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [7:0] r [6];
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    decode_stream();

    // Fault-free self-test.
    self_test(r);
    chk(r[0] == 8'hFF && r[1] == 8'hFF && r[2] == 8'hFF && r[3] == 8'hFF && r[4] == 8'hFF,
        "all nodes good");
    chk(r[5] == 8'b111, "good core, good I/O, E25 good");
    chk(bk_good_core === 1'b1, "back-up core good");
    chk(good_io_b === 1'b0 && good_core_b === 1'b1, "comparator offset fails the I/O self-test only");
    if (good_io_b === 1'b0) n_io_fail++;

    // ERR1: C1, C3, .., C15 faulty.
    err1 = 1;
    self_test(r);
    chk(r[0] == 8'b1010_1010 && r[1] == 8'b1010_1010, "ERR1: C bytes 10101010");
    chk(r[2] == 8'hFF && r[3] == 8'hFF && r[4] == 8'hFF, "ERR1: E bytes all good");
    chk(r[5] == 8'b011, "ERR1: core bad, I/O good, E25 good");
    chk(bk_good_core === 1'b0, "ERR1: back-up core bad");

    // ERR2: E3, E6, .., E24 faulty.
    err1 = 0; err2 = 1;
    self_test(r);
    chk(r[0] == 8'hFF && r[1] == 8'hFF, "ERR2: C bytes all good");
    chk(r[2] == 8'b1101_1011 && r[3] == 8'b1011_0110 && r[4] == 8'b0110_1101, "ERR2: E bytes");
    chk(r[5] == 8'b011, "ERR2: core bad");

    // Both.
    err1 = 1;
    self_test(r);
    chk(r[0] == 8'b1010_1010 && r[1] == 8'b1010_1010 && r[2] == 8'b1101_1011 &&
        r[3] == 8'b1011_0110 && r[4] == 8'b0110_1101, "ERR1+ERR2 bytes");
    err1 = 0; err2 = 0;

    // Back to decoding after self-test.
    decode_stream();

    chk(n_frame > 0, "frame");
    chk(n_pipe > 0, "pipe / core reset");
    chk(n_sample > 0, "comparator sample");
    chk(n_serial > 0, "serial output");
    chk(n_corrected > 0, "error correction");
    chk(n_core_pass > 0, "core self-test pass");
    chk(n_core_fail > 0, "core self-test fail");
    chk(n_node_read > 0, "node readout");
    chk(n_io_pass > 0, "I/O self-test pass");
    chk(n_io_fail > 0, "I/O self-test fail");
    chk(n_backup > 0, "back-up decoding");
    $display("mechanisms: frame=%0d pipe=%0d sample=%0d serial=%0d corrected=%0d core_pass=%0d core_fail=%0d node_reads=%0d io_pass=%0d io_fail=%0d backup=%0d",
             n_frame, n_pipe, n_sample, n_serial, n_corrected, n_core_pass, n_core_fail, n_node_read, n_io_pass, n_io_fail, n_backup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
