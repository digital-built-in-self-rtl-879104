// dec_bist: built-in self-test controller for the decoder core.
//
// When Test rises, the core has already been reconfigured (every
// unidirectional sum-product node cut loose from its neighbours and turned
// into a differential XOR gate).  The controller then broadcasts the four
// test vectors XY = 00, 01, 11, 10 to the X and Y inputs of all nodes, one
// vector per clock, and checks every result group against the XOR truth
// table: each differential pair of a group must read {X^Y, ~(X^Y)}.  A
// per-group flag records whether all four vectors passed.  After the fourth
// check Finish goes high and Good_Core is the AND of all 41 group flags.
// When Test falls the controller returns to idle and the core to decoding;
// the group flags keep their values until the next self-test.
//
// Show_Node selects one group for Good_Node (address map: 00_iiii -> C(i+1),
// 10_iiii -> E(i+1), 11_iiii -> E(i+17) for i < 9; other addresses read 0).
//
// Timing (this design's choice): Test is sampled at a rising edge, the first
// vector is driven after that edge, each vector's response is checked at the
// next rising edge (the response path through the core is combinational),
// and Finish rises with the fourth check: five clocks from Test to Finish.
// The vector order, the signal names, the group map and the readout follow
// the document; the exact state sequence is this design's own.
module dec_bist
  import hamming_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       test,
  input  grp_t       c_resp [NCG],
  input  grp_t       e_resp [NEG],
  input  logic [5:0] show_node,
  output logic       x,
  output logic       y,
  output logic       finish,
  output logic       good_core,
  output logic       good_node
);

  typedef enum logic [1:0] {S_IDLE, S_APPLY, S_DONE} state_e;

  // Test vectors in the order they are sent: {X, Y}.
  localparam logic [1:0] VEC [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  state_e           state;
  logic [1:0]       step;
  logic [NCG-1:0]   c_ok;
  logic [NEG-1:0]   e_ok;
  logic [NCG-1:0]   c_pass;
  logic [NEG-1:0]   e_pass;

  // A group passes the current vector if each of its pairs is {v, ~v}.
  function automatic logic grp_match(grp_t g, int npairs, logic v);
    logic ok = 1'b1;
    for (int k = 0; k < GW / 2; k++)
      if (k < npairs && g[2*k +: 2] != {v, ~v}) ok = 1'b0;
    return ok;
  endfunction

  always_comb begin
    for (int i = 0; i < NCG; i++) c_pass[i] = grp_match(c_resp[i], c_pairs(i), x ^ y);
    for (int i = 0; i < NEG; i++) e_pass[i] = grp_match(e_resp[i], e_pairs(i), x ^ y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      {x, y} <= 2'b00;
      c_ok  <= '0;
      e_ok  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (test) begin
          c_ok   <= '1;
          e_ok   <= '1;
          step   <= '0;
          {x, y} <= VEC[0];
          state  <= S_APPLY;
        end
        S_APPLY: if (!test) begin
          state <= S_IDLE;
        end else begin
          c_ok <= c_ok & c_pass;
          e_ok <= e_ok & e_pass;
          if (step == 2'd3) begin
            state <= S_DONE;
          end else begin
            step   <= step + 2'd1;
            {x, y} <= VEC[step + 2'd1];
          end
        end
        S_DONE: if (!test) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign finish    = (state == S_DONE);
  assign good_core = (&c_ok) & (&e_ok);

  always_comb begin
    good_node = 1'b0;
    unique case (show_node[5:4])
      ADDR_CHECK: good_node = c_ok[show_node[3:0]];
      ADDR_EQ_LO: good_node = e_ok[{1'b0, show_node[3:0]}];
      ADDR_EQ_HI: if (show_node[3:0] < 4'd9) good_node = e_ok[5'd16 + 5'(show_node[3:0])];
      default:    good_node = 1'b0;
    endcase
  end

endmodule
