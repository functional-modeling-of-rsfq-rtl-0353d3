// tb_dro_cell: self-checking testbench of the DRO cell model at its
// default timing (hold -3, setup 8, clock-to-output delay 9).
//
// Directed part, clocks every 100 from 100 to 1100, expected output times
// written out by hand (clock + 9):
//  - data at 142, mid period: clean pulse at 209;
//  - data at 294, 6 before the clock at 300 (setup 8 violated): shaded
//    pulses at 309 and 409;
//  - data at 522 (clean) and 594 (late): clean pulse at 609, shaded at 709;
//  - a shaded data pulse at 750: shaded pulse at 809;
//  - a shaded clock pulse at 900 with no data: shaded pulse at 909;
//  - data at 998, 2 before the clock at 1000: the hold time is -3, so it
//    belongs to the next period and reads out cleanly at 1109.
// The warning count is checked too. A random part then compares long
// pulse trains with the reference model.
module tb_dro_cell;
  timeunit 1ps;
  timeprecision 1ps;
  import sfq_pkg::*;
  import sfq_tb_pkg::*;

  sfq_t [1:0] stim;  // [0] d, [1] clk
  sfq_t       o;
  evq_t       got;
  int         checks = 0;
  int         failures = 0;

  dro_cell u_dut (.d(stim[0]), .clk(stim[1]), .out(o));

  always @(posedge o.p) got.push_back('{t: int'($time), unk: o.unk});

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
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    evq_t c, d, e, none;
    stim = '0;
    for (int k = 1; k <= 11; k++) c.push_back('{t: 100 * k, unk: (k == 9)});
    d = '{'{t: 142, unk: 1'b0}, '{t: 294, unk: 1'b0}, '{t: 522, unk: 1'b0},
          '{t: 594, unk: 1'b0}, '{t: 750, unk: 1'b1}, '{t: 998, unk: 1'b0}};
    e = '{'{t: 209, unk: 1'b0}, '{t: 309, unk: 1'b1}, '{t: 409, unk: 1'b1},
          '{t: 609, unk: 1'b0}, '{t: 709, unk: 1'b1}, '{t: 809, unk: 1'b1},
          '{t: 909, unk: 1'b1}, '{t: 1109, unk: 1'b0}};
    drive(0, d);
    drive(1, c);
    #1200;
    failures += compare("directed", e, got, checks);
    checks++;
    if (u_dut.u_cell.u_core.n_viol != 2) begin
      $display("FAIL expected 2 timing warnings, saw %0d", u_dut.u_cell.u_core.n_viol);
      failures++;
    end
    got.delete();

    c = rand_train(2000, 0, 30000, 5, 12, 5);
    d = rand_train(2000, 2, 30000, 2, 14, 5);
    drive(0, d);
    drive(1, c);
    #(c[$].t + 50 - int'($time));
    failures += compare("random", ref_outputs(c, d, none, RF_BUF, -3, 8, 9, 0), got, checks);
    $display("output pulses: %0d, timing warnings: %0d", got.size(), u_dut.u_cell.u_core.n_viol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
