// hamming_core_tb: checks the decoder core model in both of its modes.
//
// Decoding: the received word of the document's core simulation (channel
// probabilities p(1) = .1 .2 .4 .3 .9 .8 .3 .6, hard decision 00001101 with
// bit 3 in error) must decode to information bits 0010; the three serial
// codewords 01010100, 01010111, 00001011 (p(1) = 0.8 or 0.2) must decode to
// 0111, 0001 and 1000; and every codeword of the code with any single bit
// flipped must be corrected.  The core gets 8 clocks after the PIPE reset,
// as in the nine-clock codeword period.  Expected words come from the
// generator matrix written out here, not from the package.
//
// Test mode: for every XY vector and every ERR1/ERR2 setting each of the 41
// result groups must hold the right number of pairs {X^Y, ~(X^Y)}, zeros
// above, and exactly the injected groups (C odd, E multiple of 3) must be
// stuck at {1,0}.
module hamming_core_tb;
  import hamming_pkg::*;

  logic clk = 0, rst_n = 0, pipe = 0, test = 0, tx = 0, ty = 0, err1 = 0, err2 = 0;
  prob_t u [N];
  prob_t y [K];
  grp_t  c_resp [NCG];
  grp_t  e_resp [NEG];
  int checks = 0, failures = 0;
  bit dbg = 0;

  hamming_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] GEN [4] = '{8'h8B, 8'h4E, 8'h2D, 8'h17};

  function automatic logic [7:0] cw(logic [3:0] info);
    logic [7:0] c = 0;
    for (int k = 0; k < 4; k++) if (info[3-k]) c ^= GEN[k];
    return c;
  endfunction

  task automatic decode(input int p1000 [8], output logic [3:0] info);
    for (int i = 0; i < 8; i++) u[i] = prob_t'((p1000[i] * 4096) / 1000);
    @(negedge clk) pipe = 1;
    @(negedge clk) pipe = 0;
    repeat (8) @(negedge clk);
    for (int j = 0; j < 4; j++) info[3-j] = (y[j] > 12'd2048);
    if (dbg) $display("t=%0t y=%0d %0d %0d %0d", $time, y[0], y[1], y[2], y[3]);
  endtask

  task automatic hard_word(input logic [7:0] w, output logic [3:0] info);
    int p [8];
    for (int i = 0; i < 8; i++) p[i] = w[7-i] ? 800 : 200;
    decode(p, info);
  endtask

  task automatic expect_info(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: decoded %b expected %b", what, got, exp);
    end
  endtask

  function automatic int npairs_c(int i);  // i 0-based
    return (i % 2 == 0) ? 4 : 5;
  endfunction
  function automatic int npairs_e(int i);
    if (i == 24) return 4;
    return (i % 3 == 2) ? 3 : 4;
  endfunction

  task automatic check_group(input grp_t g, input int np, input int nfault, input string name);
    logic v = tx ^ ty;
    grp_t exp = '0;
    for (int k = 0; k < np; k++) exp[2*k +: 2] = {v, ~v};
    for (int k = 0; k < nfault; k++) exp[2*k +: 2] = 2'b10;
    checks++;
    if (g !== exp) begin
      failures++;
      $display("FAIL group %s xy=%b%b err=%b%b: %b expected %b", name, tx, ty, err1, err2, g, exp);
    end
  endtask

  initial begin
    logic [3:0] info;
    int tab [8] = '{100, 200, 400, 300, 900, 800, 300, 600};
    repeat (2) @(negedge clk);
    rst_n = 1;

    decode(tab, info);
    expect_info(info, 4'b0010, "table word");

    hard_word(8'b0101_0100, info); expect_info(info, 4'b0111, "word 1");
    hard_word(8'b0101_0111, info); expect_info(info, 4'b0001, "word 2");
    hard_word(8'b0000_1011, info); expect_info(info, 4'b1000, "word 3");

    for (int m = 0; m < 16; m++) begin
      hard_word(cw(4'(m)), info);
      expect_info(info, 4'(m), "clean codeword");
      for (int e = 0; e < 8; e++) begin
        hard_word(cw(4'(m)) ^ (8'h80 >> e), info);
        expect_info(info, 4'(m), "single error");
      end
    end

    // Test mode.
    test = 1;
    for (int ec = 0; ec < 4; ec++) begin
      {err1, err2} = 2'(ec);
      for (int v = 0; v < 4; v++) begin
        {tx, ty} = 2'(v);
        #1;
        for (int i = 0; i < 16; i++)
          check_group(c_resp[i], npairs_c(i), (err1 && (i % 2 == 0)) ? 2 : 0, $sformatf("C%0d", i + 1));
        for (int i = 0; i < 25; i++)
          check_group(e_resp[i], npairs_e(i), (err2 && (i % 3 == 2) && i < 24) ? 1 : 0, $sformatf("E%0d", i + 1));
      end
    end
    // Decoding mode: no test pairs.
    test = 0; #1;
    checks++;
    if (c_resp[0] != '0 || e_resp[24] != '0) begin
      failures++; $display("FAIL test pairs active in decoding mode");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
