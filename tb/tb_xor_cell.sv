// tb_xor_cell: self-checking testbench of the clocked XOR cell model at its
// default timing (hold -3, setup 8, clock-to-output delay 9).
//
// Directed part, clocks every 100 from 100 to 600, outputs 9 after the
// clock, written out by hand: period ending at 200 has no data, 300 only a
// (150), 400 only b (250), 500 both (a 342, b 366), 600 a clean a (442)
// and a b at 494 that violates the setup time of the clock at 500, which
// leaves b undetermined in the periods ending at 500 and 600.
// Expected: pulses at 209 and 309 (one input each), none at 409 (both),
// shaded pulses at 509 and 609 (an undetermined input).
// Then random trains on a, b and clk are compared with the reference model.
module tb_xor_cell;
  timeunit 1ps;
  timeprecision 1ps;
  import sfq_pkg::*;
  import sfq_tb_pkg::*;

  sfq_t [2:0] stim;  // [0] a, [1] b, [2] clk
  sfq_t       o;
  evq_t       got;
  int         checks = 0;
  int         failures = 0;

  xor_cell u_dut (.a(stim[0]), .b(stim[1]), .clk(stim[2]), .out(o));

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
    evq_t c, a, b, e;
    stim = '0;
    for (int k = 1; k <= 6; k++) c.push_back('{t: 100 * k, unk: 1'b0});
    a = '{'{t: 150, unk: 1'b0}, '{t: 342, unk: 1'b0}, '{t: 442, unk: 1'b0}};
    b = '{'{t: 250, unk: 1'b0}, '{t: 366, unk: 1'b0}, '{t: 494, unk: 1'b0}};
    e = '{'{t: 209, unk: 1'b0}, '{t: 309, unk: 1'b0}, '{t: 509, unk: 1'b1}, '{t: 609, unk: 1'b1}};
    drive(0, a);
    drive(1, b);
    drive(2, c);
    #700;
    failures += compare("directed", e, got, checks);
    got.delete();

    c = rand_train(1000, 0, 30000, 5, 12, 5);
    a = rand_train(1000, 2, 30000, 2, 10, 5);
    b = rand_train(1000, 6, 30000, 2, 10, 5);
    drive(0, a);
    drive(1, b);
    drive(2, c);
    #(c[$].t + 50 - int'($time));
    failures += compare("random", ref_outputs(c, a, b, RF_XOR, -3, 8, 9, 0), got, checks);
    $display("output pulses: %0d", got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
