// dec_bist_tb: runs the decoder BIST against a model of the reconfigured core
// written here: every group answers each XY vector with its pairs
// {X^Y, ~(X^Y)}, except groups listed as faulty, which answer one chosen
// vector wrongly.  Checks the vector sequence 00, 01, 11, 10, the clock count
// from Test to Finish (5), Good_Core, Good_Node for all 64 Show_Node
// addresses, return to idle when Test falls, and the document's fault set
// C5, C10, C15, E10, E20, E25.
module dec_bist_tb;
  import hamming_pkg::*;

  logic clk = 0, rst_n = 0, test = 0;
  grp_t c_resp [NCG];
  grp_t e_resp [NEG];
  logic [5:0] show_node = 0;
  logic x, y, finish, good_core, good_node;
  int checks = 0, failures = 0;

  // Fault model: bit i set = group faulty; fault_vec selects the XY vector
  // the faulty group gets wrong.
  logic [15:0] c_bad = '0;
  logic [24:0] e_bad = '0;
  logic [1:0]  fault_vec = 2'b00;

  dec_bist dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic grp_t resp(int np, logic bad);
    grp_t g = '0;
    logic v = x ^ y;
    for (int k = 0; k < np; k++) g[2*k +: 2] = {v, ~v};
    if (bad && {x, y} == fault_vec) g[2*(np-1) +: 2] = ~g[2*(np-1) +: 2];
    return g;
  endfunction

  always_comb begin
    for (int i = 0; i < 16; i++) c_resp[i] = resp((i % 2 == 0) ? 4 : 5, c_bad[i]);
    for (int i = 0; i < 25; i++) e_resp[i] = resp((i == 24) ? 4 : ((i % 3 == 2) ? 3 : 4), e_bad[i]);
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_test(output int clocks, output logic [1:0] seen [4]);
    int n = 0;
    @(negedge clk) test = 1;
    while (!finish && n < 20) begin
      @(posedge clk);
      #1;
      if (n <= 3) seen[n] = {x, y};
      n++;
    end
    clocks = n;
  endtask

  task automatic check_nodes();
    for (int a = 0; a < 64; a++) begin
      logic exp;
      show_node = 6'(a);
      #1;
      if (a < 16)                   exp = !c_bad[a];
      else if (a >= 32 && a < 48)   exp = !e_bad[a-32];
      else if (a >= 48 && a < 57)   exp = !e_bad[a-48+16];
      else                          exp = 1'b0;
      chk(good_node === exp, $sformatf("good_node at address %b", 6'(a)));
    end
  endtask

  initial begin
    int clocks;
    logic [1:0] seen [4];
    repeat (2) @(negedge clk);
    rst_n = 1;

    // Fault-free core.
    run_test(clocks, seen);
    chk(clocks == 5, $sformatf("Test to Finish took %0d clocks", clocks));
    chk(seen[0] == 2'b00 && seen[1] == 2'b01 && seen[2] == 2'b11 && seen[3] == 2'b10,
        "vector order 00 01 11 10");
    chk(good_core === 1'b1, "good core reported good");
    check_nodes();
    @(negedge clk) test = 0;
    @(negedge clk);
    chk(finish === 1'b0, "finish drops with test");
    chk(good_core === 1'b1, "results kept after test");

    // The document's example fault set, each fault on a different vector.
    for (int fv = 0; fv < 4; fv++) begin
      c_bad = '0; e_bad = '0;
      c_bad[4] = 1; c_bad[9] = 1; c_bad[14] = 1;
      e_bad[9] = 1; e_bad[19] = 1; e_bad[24] = 1;
      fault_vec = 2'(fv);
      run_test(clocks, seen);
      chk(clocks == 5, "Test to Finish with faults");
      chk(good_core === 1'b0, $sformatf("faulty core detected, vector %0d", fv));
      check_nodes();
      @(negedge clk) test = 0;
      @(negedge clk);
    end

    // Random single faults.
    for (int n = 0; n < 20; n++) begin
      int g;
      g = $urandom_range(40);
      c_bad = '0; e_bad = '0;
      if (g < 16) c_bad[g] = 1; else e_bad[g-16] = 1;
      fault_vec = 2'($urandom_range(3));
      run_test(clocks, seen);
      chk(good_core === 1'b0, $sformatf("single fault in group %0d", g));
      check_nodes();
      @(negedge clk) test = 0;
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
