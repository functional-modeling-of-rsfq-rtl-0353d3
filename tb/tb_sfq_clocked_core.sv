// tb_sfq_clocked_core: self-checking testbench of the idealised clocked
// core (zero delay, zero hold, setup T_SETUP_P = 9).
//
// Part 1 replays the three data placements of the reference timing
// diagrams on a store/read-out core: a pulse in mid period (clean output),
// a pulse just before a clock (shaded output in two periods) and a clean
// pulse followed by a late one (clean output, then a shaded one). The
// expected pulses and warning counts are written out by hand.
// Part 2 drives random pulse trains, including shaded data and clock
// pulses, into four cores (store, inverter, AND with a separation check of
// 5, XOR) and compares every output pulse with the reference model of
// sfq_tb_pkg.
module tb_sfq_clocked_core;
  timeunit 1ps;
  timeprecision 1ps;
  import sfq_pkg::*;
  import sfq_tb_pkg::*;

  localparam int TSP = 9;
  localparam int SEP = 5;

  // stim[0..1]: BUF d, clk; [2..3]: INV d, clk; [4..6]: AND a, b, clk;
  // [7..9]: XOR a, b, clk
  sfq_t [9:0] stim;
  sfq_t       o_buf, o_inv, o_and, o_xor;
  evq_t       g_buf, g_inv, g_and, g_xor;
  int         checks = 0;
  int         failures = 0;

  sfq_clocked_core #(.N_IN(1), .FN(FN_BUF), .T_SETUP_P(TSP)) u_buf (
    .din(stim[0]), .clk_int(stim[1]), .out_int(o_buf));
  sfq_clocked_core #(.N_IN(1), .FN(FN_INV), .T_SETUP_P(TSP)) u_inv (
    .din(stim[2]), .clk_int(stim[3]), .out_int(o_inv));
  sfq_clocked_core #(.N_IN(2), .FN(FN_AND), .T_SETUP_P(TSP), .T_SEP(SEP)) u_and (
    .din({stim[5], stim[4]}), .clk_int(stim[6]), .out_int(o_and));
  sfq_clocked_core #(.N_IN(2), .FN(FN_XOR), .T_SETUP_P(TSP)) u_xor (
    .din({stim[8], stim[7]}), .clk_int(stim[9]), .out_int(o_xor));

  always @(posedge o_buf.p) g_buf.push_back('{t: int'($time), unk: o_buf.unk});
  always @(posedge o_inv.p) g_inv.push_back('{t: int'($time), unk: o_inv.unk});
  always @(posedge o_and.p) g_and.push_back('{t: int'($time), unk: o_and.unk});
  always @(posedge o_xor.p) g_xor.push_back('{t: int'($time), unk: o_xor.unk});

  // Drive a pulse train on stim[idx]: each pulse is 2 time units wide.
  task automatic drive(int idx, evq_t q);
    foreach (q[n]) begin
      fork
        automatic ev_t e = q[n];
        begin
          #(e.t - int'($time));
          stim[idx] = '{unk: e.unk, p: 1'b1};
          #2;
          stim[idx] = '0;
        end
      join_none
    end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    evq_t clk1, d1, exp1, none;
    evq_t c_buf, d_buf, c_inv, d_inv, c_and, a_and, b_and, c_xor, a_xor, b_xor;
    stim = '0;

    // ---- Part 1: timing-diagram cases on the store/read-out core ----
    for (int k = 1; k <= 8; k++) clk1.push_back('{t: 100 * k, unk: 1'b0});
    d1.push_back('{t: 142, unk: 1'b0});  // a) mid period
    d1.push_back('{t: 294, unk: 1'b0});  // b) 6 before the clock at 300
    d1.push_back('{t: 522, unk: 1'b0});  // c) clean ...
    d1.push_back('{t: 594, unk: 1'b0});  //    ... then late
    exp1.push_back('{t: 200, unk: 1'b0});
    exp1.push_back('{t: 300, unk: 1'b1});
    exp1.push_back('{t: 400, unk: 1'b1});
    exp1.push_back('{t: 600, unk: 1'b0});
    exp1.push_back('{t: 700, unk: 1'b1});
    drive(0, d1);
    drive(1, clk1);
    #900;
    failures += compare("timing-diagram cases", exp1, g_buf, checks);
    failures += compare("timing-diagram cases vs reference",
                        ref_outputs(clk1, d1, none, RF_BUF, 0, TSP, 0, 0), g_buf, checks);
    checks++;
    if (u_buf.n_viol != 2) begin
      $display("FAIL expected 2 timing warnings, saw %0d", u_buf.n_viol);
      failures++;
    end
    g_buf.delete();

    // ---- Part 2: random trains ----
    c_buf = rand_train(1000, 0, 20000, 5, 12, 5);
    d_buf = rand_train(1000, 2, 20000, 2, 14, 5);
    c_inv = rand_train(1000, 0, 20000, 5, 12, 5);
    d_inv = rand_train(1000, 2, 20000, 2, 14, 5);
    c_and = rand_train(1000, 0, 20000, 5, 12, 5);
    a_and = rand_train(1000, 2, 20000, 1, 8, 5);
    b_and = rand_train(1000, 6, 20000, 1, 8, 5);
    c_xor = rand_train(1000, 0, 20000, 5, 12, 5);
    a_xor = rand_train(1000, 2, 20000, 1, 10, 5);
    b_xor = rand_train(1000, 6, 20000, 1, 10, 5);
    drive(0, d_buf); drive(1, c_buf);
    drive(2, d_inv); drive(3, c_inv);
    drive(4, a_and); drive(5, b_and); drive(6, c_and);
    drive(7, a_xor); drive(8, b_xor); drive(9, c_xor);
    #20200;
    failures += compare("random BUF", ref_outputs(c_buf, d_buf, none, RF_BUF, 0, TSP, 0, 0), g_buf, checks);
    failures += compare("random INV", ref_outputs(c_inv, d_inv, none, RF_INV, 0, TSP, 0, 0), g_inv, checks);
    failures += compare("random AND", ref_outputs(c_and, a_and, b_and, RF_AND, 0, TSP, 0, SEP), g_and, checks);
    failures += compare("random XOR", ref_outputs(c_xor, a_xor, b_xor, RF_XOR, 0, TSP, 0, 0), g_xor, checks);
    checks++;
    if (u_and.n_sep == 0) begin
      $display("FAIL separation check never triggered");
      failures++;
    end
    $display("pulses: buf=%0d inv=%0d and=%0d xor=%0d, warnings: timing=%0d separation=%0d",
             g_buf.size(), g_inv.size(), g_and.size(), g_xor.size(),
             u_buf.n_viol + u_inv.n_viol + u_and.n_viol + u_xor.n_viol, u_and.n_sep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
