// check4: behavioural model of the four-edge check node CHECK4, made of a
// CHECK3_1NG (node A) and a CHECK3_2NG (node B) joined by one internal edge.
//
// External edges: e_in/e_out[0] and [1] belong to node A, [2] and [3] to node
// B.  Every outgoing message is the check-node (XOR) combination of the other
// three incoming messages, formed by the cascade.  In test mode the internal
// edge is cut and both three-edge nodes report their result groups: resp_a
// (8 bits) and resp_b (10 bits).  err1 is the ERR1 error-injection input of
// the CHECK3_1NG.  Combinational; no clock.
module check4
  import hamming_pkg::*;
(
  input  logic  test,
  input  logic  tx,
  input  logic  ty,
  input  logic  err1,
  input  prob_t e_in  [4],
  output prob_t e_out [4],
  output logic [7:0] resp_a,
  output logic [9:0] resp_b
);

  prob_t ab, ba;   // internal edge: A towards B and B towards A

  node3 #(.IS_CHECK(1'b1), .EXTRA(1), .HAS_ERR(1'b1)) u_a (
    .test, .tx, .ty, .err(err1),
    .pin0(e_in[0]), .pin1(e_in[1]), .pin2(ba),
    .pout0(e_out[0]), .pout1(e_out[1]), .pout2(ab), .tresp(resp_a));

  node3 #(.IS_CHECK(1'b1), .EXTRA(2), .HAS_ERR(1'b0)) u_b (
    .test, .tx, .ty, .err(1'b0),
    .pin0(ab), .pin1(e_in[2]), .pin2(e_in[3]),
    .pout0(ba), .pout1(e_out[2]), .pout2(e_out[3]), .tresp(resp_b));

endmodule
