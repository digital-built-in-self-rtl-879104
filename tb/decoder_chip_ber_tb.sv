// decoder_chip_ber_tb: bit-error-rate run of the full decoder at its default
// parameters, the way the chip is measured on the bench.
//
// For each SNR point random 4-bit source words are encoded with the
// generator matrix, sent as BPSK (bit 0 -> +1, bit 1 -> -1) through an
// additive white Gaussian noise channel at the given Eb/N0 (code rate 1/2),
// turned into LLRs L = 2y/sigma^2 and then into the serial input voltages
// Vin = 128 + 16*L/ln2 (clipped to 0..255) against Vref = 128, which is the
// converter's scale of 16 codes per doubling of the odds.  The words are
// streamed back to back after one FRAME; the decoded bits of word k are read
// from DOUT1..DOUT4 in clock 18 + 9k after FRAME.
//
// Reference decisions, computed here from the same quantised inputs:
//   * hard decision: the sign of the four systematic samples;
//   * maximum likelihood: the codeword of largest soft correlation.
// Checks per SNR point: the decoder makes at most a third of the bit errors
// of the hard decisions, at most 2.5x (+4 bits) the ML errors, and corrects
// at least one word whose hard decisions were wrong.  With eight iterations
// per word the sum-product model lands about 0.5-0.7 dB from ML at 3-5 dB,
// a little further than the 0.3-0.4 dB measured on silicon at low speed.
// The first output must also appear exactly 17 clocks after FRAME (checked by the
// fixed read-out clock of every word).  Gaussian samples use Box-Muller on
// $urandom.
module decoder_chip_ber_tb;
  import hamming_pkg::*;

  localparam int    WORDS = 2500;                 // words per SNR point
  localparam int    NSNR  = 3;
  localparam real   SNR_DB [NSNR] = '{3.0, 5.0, 7.0};
  localparam int    TOTAL = WORDS * NSNR;
  localparam real   LN2   = 0.6931471805599453;
  localparam real   TWO_PI = 6.283185307179586;

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
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(TWO_PI * u2);
  endfunction

  // Per word: source bits as {DOUT4..DOUT1}, the hard and ML decisions.
  logic [3:0] src_q  [TOTAL];
  logic [3:0] unc_q  [TOTAL];
  logic [3:0] ml_q   [TOTAL];
  volt_t      v_word [8];

  int err_dec [NSNR], err_unc [NSNR], err_ml [NSNR], fixed [NSNR];

  // dout order: dout[j] is information bit j, the first bit sent being j = 0.
  function automatic logic [3:0] to_dout(logic [K-1:0] u);
    return {u[0], u[1], u[2], u[3]};
  endfunction

  task automatic make_word(input int k);
    logic [K-1:0] u, best_u;
    logic [N-1:0] cw;
    real sigma, y, llr, vr;
    int   d [8];
    int   metric, best, vv;
    logic [3:0] hard;
    sigma = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** (SNR_DB[k / WORDS] / 10.0))));
    u  = 4'($urandom);
    cw = encode(u);
    for (int i = 0; i < 8; i++) begin
      y   = (cw[7-i] ? -1.0 : 1.0) + sigma * gauss();
      llr = 2.0 * y / (sigma * sigma);
      vr  = 128.0 + 16.0 * llr / LN2;
      vv  = (vr > 255.0) ? 255 : (vr < 0.0) ? 0 : int'(vr);
      v_word[i] = volt_t'(vv);
      d[i] = vv - 128;
    end
    for (int j = 0; j < 4; j++) hard[j] = (d[j] < 0);
    best = -100000;
    best_u = '0;
    for (int c = 0; c < 16; c++) begin
      cw = encode(4'(c));
      metric = 0;
      for (int i = 0; i < 8; i++) metric += cw[7-i] ? -d[i] : d[i];
      if (metric > best) begin best = metric; best_u = 4'(c); end
    end
    src_q[k] = to_dout(u);
    unc_q[k] = hard;
    ml_q[k]  = to_dout(best_u);
  endtask

  initial begin
    int k, i, kr, s, nclk;
    for (int p = 0; p < NSNR; p++) begin
      err_dec[p] = 0; err_unc[p] = 0; err_ml[p] = 0; fixed[p] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) frame = 1;
    @(negedge clk) frame = 0;
    nclk = 9 * TOTAL + 18;
    for (int c = 1; c <= nclk; c++) begin
      k = (c - 1) / 9;
      i = (c - 1) % 9;
      if (k < TOTAL && i == 0) make_word(k);
      vin = (k < TOTAL && i < 8) ? v_word[i] : 8'd128;
      #1;
      if (c >= 18 && (c - 18) % 9 == 0 && (c - 18) / 9 < TOTAL) begin
        kr = (c - 18) / 9;
        s  = kr / WORDS;
        err_dec[s] += $countones(dout ^ src_q[kr]);
        err_unc[s] += $countones(unc_q[kr] ^ src_q[kr]);
        err_ml[s]  += $countones(ml_q[kr] ^ src_q[kr]);
        if (unc_q[kr] != src_q[kr] && dout == src_q[kr]) fixed[s]++;
      end
      @(negedge clk);
    end
    for (int p = 0; p < NSNR; p++) begin
      $display("Eb/N0 %4.1f dB: bits %0d  hard-decision errors %0d  ML errors %0d  decoder errors %0d  words corrected %0d",
               SNR_DB[p], 4 * WORDS, err_unc[p], err_ml[p], err_dec[p], fixed[p]);
      chk(3 * err_dec[p] <= err_unc[p], $sformatf("%.1f dB: coding gain over hard decisions", SNR_DB[p]));
      chk(2 * err_dec[p] <= 5 * err_ml[p] + 8, $sformatf("%.1f dB: decoder close to ML", SNR_DB[p]));
      chk(fixed[p] > 0, $sformatf("%.1f dB: corrections happened", SNR_DB[p]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
