// hamming_pkg: constants and helper functions shared by the (8,4) extended
// Hamming analog decoder models and its two built-in self-test controllers.
//
// Probability encoding (this design's choice): a probability current pair
// (I0, I1) with I0 + I1 = IU is carried as the single unsigned code p1 =
// I1 / IU * 2**PW, so p0 is implied as 2**PW - p1.  Codes are kept inside
// [PMIN, PMAX] so that the normaliser never divides by zero, the way a real
// Gilbert normaliser never reaches an exact zero current.
//
// The generator and parity-check matrices are the code's own: H is the
// redundant 8x8 matrix whose rows each hold four ones and whose columns each
// hold four ones, so every check node has four edges (CHECK4) and every bit
// node has four check edges plus the channel edge (EQUALITY5).
//
// Self-test result groups: 16 check groups C1..C16 (one per three-edge check
// node), 24 equality groups E1..E24 (one per three-edge equality node) and the
// group E25 of the four output equality nodes.  Each group is a vector of
// differential pairs {Vout, Vout_n}; the pair count depends on how many extra
// diode-connected output pairs the node variant carries.
package hamming_pkg;

  localparam int N = 8;          // code length
  localparam int K = 4;          // information bits
  localparam int M = 8;          // rows of the redundant parity-check matrix
  localparam int DC = 4;         // check-node degree
  localparam int DV = 4;         // check edges per bit node

  localparam int PW = 12;        // width of a probability code
  localparam int IU = 1 << PW;   // code of probability 1 (unit current)
  localparam int PMID = IU / 2;  // equalised probability 0.5 (RESET value)
  localparam int PMIN = 1;
  localparam int PMAX = IU - 1;

  typedef logic [PW-1:0] prob_t;

  // Voltage codes of the serial LLR input (Vin and Vref samples).
  localparam int VW = 8;
  typedef logic [VW-1:0] volt_t;
  localparam volt_t VMID = volt_t'(128);

  // Row r, column j: bit 7-j of H_ROW[r] is h(r+1, j+1).
  localparam logic [7:0] H_ROW [M] = '{
    8'b1110_1000, 8'b0111_0100, 8'b1000_1011, 8'b0001_0111,
    8'b0101_1001, 8'b1100_0101, 8'b1010_0110, 8'b0011_1010
  };
  localparam logic [7:0] G_ROW [K] = '{
    8'b1000_1011, 8'b0100_1110, 8'b0010_1101, 8'b0001_0111
  };

  function automatic bit h_bit(int r, int j);
    return H_ROW[r][7-j];
  endfunction

  // Column index of the k-th one in row r.
  function automatic int var_of_check(int r, int k);
    int cnt = 0;
    for (int j = 0; j < N; j++)
      if (h_bit(r, j)) begin
        if (cnt == k) return j;
        cnt++;
      end
    return 0;
  endfunction

  // Row index of the k-th one in column j.
  function automatic int check_of_var(int j, int k);
    int cnt = 0;
    for (int r = 0; r < M; r++)
      if (h_bit(r, j)) begin
        if (cnt == k) return r;
        cnt++;
      end
    return 0;
  endfunction

  // Position of column j among the ones of row r.
  function automatic int pos_in_check(int r, int j);
    int cnt = 0;
    for (int jj = 0; jj < j; jj++)
      if (h_bit(r, jj)) cnt++;
    return cnt;
  endfunction

  // Codeword bit i (0 = first transmitted bit) of information word u,
  // where u[3] is the first information bit.
  function automatic logic [N-1:0] encode(logic [K-1:0] u);
    logic [N-1:0] c = '0;
    for (int k = 0; k < K; k++)
      if (u[K-1-k]) c ^= G_ROW[k];
    return c;
  endfunction

  // Intermediate width of the node arithmetic: products of two codes need
  // 2*PW bits, the normaliser's shifted numerator 3*PW.
  localparam int XW = 3 * PW + 2;
  typedef logic [XW-1:0] wide_t;

  function automatic prob_t clip(wide_t v);
    if (v < wide_t'(PMIN)) return prob_t'(PMIN);
    if (v > wide_t'(PMAX)) return prob_t'(PMAX);
    return prob_t'(v);
  endfunction

  // Equality node, Eq. (3.5): p1 = a1*b1 / (a0*b0 + a1*b1).
  function automatic prob_t eq_combine(prob_t a, prob_t b);
    wide_t a1 = wide_t'(a), b1 = wide_t'(b), iu = wide_t'(IU);
    wide_t num = a1 * b1;
    wide_t den = num + (iu - a1) * (iu - b1);
    return clip((num << PW) / den);
  endfunction

  // Check node, Eq. (3.6): p1 = a0*b1 + a1*b0.
  function automatic prob_t chk_combine(prob_t a, prob_t b);
    wide_t a1 = wide_t'(a), b1 = wide_t'(b), iu = wide_t'(IU);
    return clip((a1 * (iu - b1) + (iu - a1) * b1) >> PW);
  endfunction

  // ---- self-test result groups -------------------------------------------
  localparam int NCG = 16;       // check groups C1..C16
  localparam int NEG = 25;       // equality groups E1..E25
  localparam int GW  = 10;       // widest group vector (bits)

  typedef logic [GW-1:0] grp_t;

  // C(2m+1) is a CHECK3_1NG (one extra output pair, error switch ERR1),
  // C(2m+2) a CHECK3_2NG (two extra pairs).  Index i is 0-based.
  function automatic int c_pairs(int i);
    return (i % 2 == 0) ? 4 : 5;
  endfunction

  // E(3m+3) is an EQUALITY3 (no extra pair, error switch ERR2), the other two
  // of each EQUALITY5 are EQUALITY3_NG (one extra pair); E25 holds the four
  // EQUALITY1_IOUT outputs.
  function automatic int e_pairs(int i);
    if (i == 24) return 4;
    return (i % 3 == 2) ? 3 : 4;
  endfunction

  // Show_Node address map (Table 5.3).
  typedef enum logic [1:0] {
    ADDR_CHECK = 2'b00,
    ADDR_EQ_LO = 2'b10,
    ADDR_EQ_HI = 2'b11
  } addr_bank_e;

endpackage
