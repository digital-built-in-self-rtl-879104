// hamming_core: behavioural model of the analog (8,4) extended Hamming
// sum-product decoder core with its self-test reconfiguration.
//
// Structure (the factor graph of the redundant 8x8 parity-check matrix):
// eight four-edge check nodes (check4), eight five-edge equality nodes
// (equality5), each fed by its bit's channel message on edge 0 and by its
// four check nodes on edges 1..4, and four small output equality nodes
// (EQUALITY1_IOUT) that combine the channel message of information bit j with
// the extrinsic message of its equality5 to give the soft output y[j].
//
// Settling model: the analog network settles continuously.  Here the
// check-to-bit messages are held in registers that update once per clock, so
// one clock is one flooding iteration of the sum-product algorithm; every
// other message is combinational.  pipe is the PIPE pulse of the input
// interface: it loads all check-to-bit messages with probability 0.5 (the
// RESET circuit that equalises the interconnections before each codeword).
// rst_n does the same asynchronously.
//
// Test mode (test = 1): every unidirectional node becomes a differential XOR
// of the broadcast bits tx, ty.  c_resp[i] is group C(i+1) and e_resp[i] group
// E(i+1), right-aligned in GW bits with the unused upper bits zero; E25 holds
// the four output nodes, whose inverters produce the same pair convention.
// err1 faults every CHECK3_1NG (C1, C3, .., C15) and err2 every EQUALITY3
// (E3, E6, .., E24).  The numbering of groups (check node r holds C(2r+1),
// C(2r+2); bit node j holds E(3j+1)..E(3j+3)) is this model's assumption.
module hamming_core
  import hamming_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  pipe,
  input  logic  test,
  input  logic  tx,
  input  logic  ty,
  input  logic  err1,
  input  logic  err2,
  input  prob_t u      [N],
  output prob_t y      [K],
  output grp_t  c_resp [NCG],
  output grp_t  e_resp [NEG]
);

  prob_t c2v_q [M][DC];   // registered check-to-bit messages
  prob_t c2v_d [M][DC];   // check-node outputs
  prob_t v2c   [M][DC];   // bit-to-check messages, indexed on the check side
  prob_t ext   [N];       // extrinsic message towards the output node
  logic [1:0] out_pair [K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < M; r++)
        for (int k = 0; k < DC; k++) c2v_q[r][k] <= prob_t'(PMID);
    end else if (pipe) begin
      for (int r = 0; r < M; r++)
        for (int k = 0; k < DC; k++) c2v_q[r][k] <= prob_t'(PMID);
    end else begin
      c2v_q <= c2v_d;
    end
  end

  for (genvar r = 0; r < M; r++) begin : g_chk
    logic [7:0] ra;
    logic [9:0] rb;
    check4 u_chk (
      .test, .tx, .ty, .err1,
      .e_in(v2c[r]), .e_out(c2v_d[r]), .resp_a(ra), .resp_b(rb));
    assign c_resp[2*r]   = grp_t'(ra);
    assign c_resp[2*r+1] = grp_t'(rb);
  end

  for (genvar j = 0; j < N; j++) begin : g_var
    prob_t ein [5], eout [5];
    logic [7:0] ra, rb;
    logic [5:0] rc;
    assign ein[0] = u[j];
    assign ext[j] = eout[0];
    for (genvar k = 0; k < DV; k++) begin : g_edge
      localparam int R = check_of_var(j, k);
      localparam int P = pos_in_check(R, j);
      assign ein[1+k]  = c2v_q[R][P];
      assign v2c[R][P] = eout[1+k];
    end
    equality5 u_eq (
      .test, .tx, .ty, .err2,
      .e_in(ein), .e_out(eout), .resp_a(ra), .resp_b(rb), .resp_c(rc));
    assign e_resp[3*j]   = grp_t'(ra);
    assign e_resp[3*j+1] = grp_t'(rb);
    assign e_resp[3*j+2] = grp_t'(rc);
  end

  for (genvar j = 0; j < K; j++) begin : g_out
    sp_node #(.IS_CHECK(1'b0), .NPAIR(1)) u_out (
      .test, .tx, .ty, .err(1'b0),
      .px(u[j]), .py(ext[j]), .pz(y[j]), .tresp(out_pair[j]));
  end

  assign e_resp[NEG-1] = grp_t'({out_pair[3], out_pair[2], out_pair[1], out_pair[0]});

endmodule
