// tb_inv_cell: self-checking testbench of the clocked inverter model at
// its default timing (hold -3, setup 8, clock-to-output delay 9).
//
// Directed part, clocks every 100 from 100 to 700, expected outputs by
// hand: every clock with no data since the previous one gives a pulse 9
// later (109, 409, 609 are clean); data at 150 suppresses the pulse at
// 200; data at 250 suppresses 300; data at 494, 6 before the clock at 500,
// violates the setup time and makes the outputs at 509 and 609 shaded;
// a shaded clock at 700 gives a shaded pulse at 709. Then random trains
// are compared with the reference model.
module tb_inv_cell;
  timeunit 1ps;
  timeprecision 1ps;
  import sfq_pkg::*;
  import sfq_tb_pkg::*;

  sfq_t [1:0] stim;  // [0] d, [1] clk
  sfq_t       o;
  evq_t       got;
  int         checks = 0;
  int         failures = 0;

  inv_cell u_dut (.d(stim[0]), .clk(stim[1]), .out(o));

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
    for (int k = 1; k <= 7; k++) c.push_back('{t: 100 * k, unk: (k == 7)});
    d = '{'{t: 150, unk: 1'b0}, '{t: 250, unk: 1'b0}, '{t: 494, unk: 1'b0}};
    e = '{'{t: 109, unk: 1'b0}, '{t: 409, unk: 1'b0}, '{t: 509, unk: 1'b1},
          '{t: 609, unk: 1'b1}, '{t: 709, unk: 1'b1}};
    drive(0, d);
    drive(1, c);
    #800;
    failures += compare("directed", e, got, checks);
    got.delete();

    c = rand_train(2000, 0, 30000, 5, 12, 5);
    d = rand_train(2000, 2, 30000, 2, 14, 5);
    drive(0, d);
    drive(1, c);
    #(c[$].t + 50 - int'($time));
    failures += compare("random", ref_outputs(c, d, none, RF_INV, -3, 8, 9, 0), got, checks);
    $display("output pulses: %0d", got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
