// tb_sfq_clocked_cell: self-checking testbench of the generic clocked cell
// (core plus data, clock and output delay lines).
//
// Two cells cover both ways the delay lines are split: a store/read-out
// cell with a positive hold time (hold 4, setup 5, delay 12: clock and
// output lines used) and an AND cell with a negative hold time (hold -3,
// setup 8, delay 9: data and output lines used) and a separation check of
// 5. Directed pulses check the clock-to-output delay and both edges of the
// forbidden interval around a clock: a pulse inside the hold window after
// a clock and one inside the setup window before it give shaded outputs in
// two periods. Random trains are then compared with the reference model.
module tb_sfq_clocked_cell;
  timeunit 1ps;
  timeprecision 1ps;
  import sfq_pkg::*;
  import sfq_tb_pkg::*;

  localparam int PH = 4, PS = 5, PD = 12;
  localparam int NH = -3, NS = 8, ND = 9, SEP = 5;

  // stim[0..1]: positive-hold cell d, clk; [2..4]: AND cell a, b, clk
  sfq_t [4:0] stim;
  sfq_t       o_pos, o_neg;
  evq_t       g_pos, g_neg;
  int         checks = 0;
  int         failures = 0;

  sfq_clocked_cell #(.N_IN(1), .FN(FN_BUF), .T_HOLD(PH), .T_SETUP(PS), .DELAY(PD)) u_pos (
    .din(stim[0]), .clk(stim[1]), .out_pulse(o_pos));
  sfq_clocked_cell #(.N_IN(2), .FN(FN_AND), .T_HOLD(NH), .T_SETUP(NS), .DELAY(ND),
                     .T_SEP(SEP), .WARN(1'b0)) u_neg (
    .din({stim[3], stim[2]}), .clk(stim[4]), .out_pulse(o_neg));

  always @(posedge o_pos.p) g_pos.push_back('{t: int'($time), unk: o_pos.unk});
  always @(posedge o_neg.p) g_neg.push_back('{t: int'($time), unk: o_neg.unk});

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
    evq_t c, d, a, b, e, none;
    stim = '0;

    // ---- directed, positive hold: clocks every 100 from 100 ----
    for (int k = 1; k <= 7; k++) c.push_back('{t: 100 * k, unk: 1'b0});
    d.push_back('{t: 150, unk: 1'b0});  // clean -> pulse at 200 + 12
    d.push_back('{t: 302, unk: 1'b0});  // 2 after clock 300: hold violated
    d.push_back('{t: 498, unk: 1'b0});  // 2 before clock 500: setup violated
    e.push_back('{t: 212, unk: 1'b0});
    e.push_back('{t: 312, unk: 1'b1});  // hold-violating pulse counts for clock 300 ...
    e.push_back('{t: 412, unk: 1'b1});  // ... and the next one
    e.push_back('{t: 512, unk: 1'b1});
    e.push_back('{t: 612, unk: 1'b1});
    drive(0, d);
    drive(1, c);
    #800;
    failures += compare("positive hold, directed", e, g_pos, checks);
    g_pos.delete();

    // ---- random ----
    c = rand_train(1000, 0, 30000, 5, 12, 5);
    d = rand_train(1000, 2, 30000, 2, 14, 5);
    drive(0, d);
    drive(1, c);
    begin
      evq_t c2 = rand_train(1000, 0, 30000, 5, 12, 5);
      a = rand_train(1000, 2, 30000, 2, 10, 5);
      b = rand_train(1000, 6, 30000, 2, 10, 5);
      drive(2, a);
      drive(3, b);
      drive(4, c2);
      #29400;
      failures += compare("positive hold, random", ref_outputs(c, d, none, RF_BUF, PH, PS, PD, 0),
                          g_pos, checks);
      failures += compare("negative hold AND, random", ref_outputs(c2, a, b, RF_AND, NH, NS, ND, SEP),
                          g_neg, checks);
    end
    $display("pulses: pos=%0d and=%0d; warnings: timing=%0d separation=%0d", g_pos.size(),
             g_neg.size(), u_pos.u_core.n_viol + u_neg.u_core.n_viol, u_neg.u_core.n_sep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
