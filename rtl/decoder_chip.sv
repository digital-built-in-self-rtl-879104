// decoder_chip: top level of the (8,4) extended Hamming analog decoder chip
// with digital built-in self-test.
//
// Full decoder: the serial LLR voltages (vin, vref) are sampled into two
// eight-cell sample-and-hold chains under control of the FRAME-synchronised
// sequencer, converted to probability currents, decoded by the sum-product
// core and sliced by four comparators whose decisions are latched into the
// output shift registers (dout[0] is DOUT1, which also carries the serial
// output).  Two BIST controllers share the TEST pin:
//   * dec_bist reconfigures nothing itself; TEST switches every node of the
//     core into a differential XOR gate, dec_bist sends the XY patterns,
//     checks the 41 result groups and reports Finish/Good_Core, with
//     Show_Node/Good_Node for reading individual groups;
//   * io_bist takes over FRAME and the serial input, makes the bypass
//     multiplexer route the stored test bits past the core to the
//     comparators, and reports Finish/Good_IO.
// ERR1 and ERR2 inject faults into every CHECK3_1NG and every EQUALITY3.
//
// Back-up decoder (bk_*): a second input interface, core and decoder BIST
// without output interface or I/O BIST; its soft outputs (probability codes
// of the four information bits) go straight to the pins.
//
// Timing: one codeword every nine clocks; with FRAME in clock 0 the first
// decisions are latched at the end of clock 17 and shown on dout from clock
// 18.  Analog quantities are carried as codes (see hamming_pkg).
module decoder_chip
  import hamming_pkg::*;
#(
  // Input offset of each comparator in probability codes (0 = ideal); used to
  // reproduce comparator offset faults.
  parameter int CMP_OFFSET [K] = '{0, 0, 0, 0}
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       test,
  input  logic       err1,
  input  logic       err2,
  // full decoder
  input  logic       frame,
  input  volt_t      vin,
  input  volt_t      vref,
  output logic [3:0] dout,
  input  logic [5:0] show_node,
  output logic       core_finish,
  output logic       good_core,
  output logic       good_node,
  output logic       io_finish,
  output logic       good_io,
  // back-up decoder
  input  logic       bk_frame,
  input  volt_t      bk_vin,
  input  volt_t      bk_vref,
  output prob_t      bk_y [K],
  input  logic [5:0] bk_show_node,
  output logic       bk_core_finish,
  output logic       bk_good_core,
  output logic       bk_good_node
);

  // ---------------------------------------------------------------- full
  logic       iob_frame, iob_serial, iob_sel_last;
  logic       seq_frame;
  logic [7:0] sel;
  logic       pipe, sample;
  volt_t      h_vin [N], h_vref [N];
  prob_t      p_in [N];
  prob_t      y [K];
  prob_t      to_cmp [K];
  logic [3:0] dec;
  logic       bx, by;
  grp_t       c_resp [NCG];
  grp_t       e_resp [NEG];

  assign seq_frame = test ? iob_frame : frame;

  sh_sequencer u_seq (.clk, .rst_n, .frame(seq_frame), .sel, .pipe, .sample);

  sh_chain u_sh (
    .clk, .rst_n, .sel, .pipe, .test, .tbit(iob_serial),
    .vin, .vref, .hold_vin(h_vin), .hold_vref(h_vref));

  for (genvar i = 0; i < N; i++) begin : g_conv
    llr_to_prob u_conv (.vin(h_vin[i]), .vref(h_vref[i]), .p1(p_in[i]));
  end

  hamming_core u_core (
    .clk, .rst_n, .pipe, .test, .tx(bx), .ty(by), .err1, .err2,
    .u(p_in), .y, .c_resp, .e_resp);

  io_bypass_mux u_bypass (
    .test, .sel_last(iob_sel_last), .y, .p_in, .to_cmp);

  for (genvar i = 0; i < K; i++) begin : g_cmp
    comparator #(.OFFSET(CMP_OFFSET[i])) u_cmp (.p1(to_cmp[i]), .d(dec[i]));
  end

  out_shift_reg u_out (
    .clk, .rst_n, .sample, .d(dec), .q(dout), .dout_serial());

  dec_bist u_dbist (
    .clk, .rst_n, .test, .c_resp, .e_resp, .show_node,
    .x(bx), .y(by), .finish(core_finish), .good_core, .good_node);

  io_bist u_iobist (
    .clk, .rst_n, .test, .vcout(dout),
    .frame(iob_frame), .serial_in(iob_serial), .sel_last(iob_sel_last),
    .finish(io_finish), .good_io);

  // ------------------------------------------------------------- back-up
  logic [7:0] bk_sel;
  logic       bk_pipe;
  volt_t      bk_h_vin [N], bk_h_vref [N];
  prob_t      bk_p_in [N];
  logic       bk_bx, bk_by;
  grp_t       bk_c_resp [NCG];
  grp_t       bk_e_resp [NEG];

  sh_sequencer u_bk_seq (
    .clk, .rst_n, .frame(bk_frame), .sel(bk_sel), .pipe(bk_pipe), .sample());

  sh_chain u_bk_sh (
    .clk, .rst_n, .sel(bk_sel), .pipe(bk_pipe), .test(1'b0), .tbit(1'b0),
    .vin(bk_vin), .vref(bk_vref), .hold_vin(bk_h_vin), .hold_vref(bk_h_vref));

  for (genvar i = 0; i < N; i++) begin : g_bk_conv
    llr_to_prob u_conv (.vin(bk_h_vin[i]), .vref(bk_h_vref[i]), .p1(bk_p_in[i]));
  end

  hamming_core u_bk_core (
    .clk, .rst_n, .pipe(bk_pipe), .test, .tx(bk_bx), .ty(bk_by), .err1, .err2,
    .u(bk_p_in), .y(bk_y), .c_resp(bk_c_resp), .e_resp(bk_e_resp));

  dec_bist u_bk_dbist (
    .clk, .rst_n, .test, .c_resp(bk_c_resp), .e_resp(bk_e_resp),
    .show_node(bk_show_node), .x(bk_bx), .y(bk_by),
    .finish(bk_core_finish), .good_core(bk_good_core), .good_node(bk_good_node));

endmodule
