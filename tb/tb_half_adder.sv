// tb_half_adder: self-checking testbench of the half adder model at its
// default timing (hold -3, setup 8, delay 9, input separation 5).
//
// Directed part, clocks every 100 from 100 to 500, outputs 9 after the
// clock, written out by hand: a at 130 and b at 146 give a carry at 209;
// b alone at 250 gives a sum at 309; a at 342 and b at 346, only 4 apart,
// break the separation rule and give shaded sum and carry pulses at 409;
// the period ending at 500 has no data and no output. Then random trains
// are compared with the reference model on both outputs.
module tb_half_adder;
  timeunit 1ps;
  timeprecision 1ps;
  import sfq_pkg::*;
  import sfq_tb_pkg::*;

  sfq_t [2:0] stim;  // [0] a, [1] b, [2] clk
  sfq_t       o_sum, o_carry;
  evq_t       g_sum, g_carry;
  int         checks = 0;
  int         failures = 0;

  half_adder u_dut (.a(stim[0]), .b(stim[1]), .clk(stim[2]), .sum(o_sum), .carry(o_carry));

  always @(posedge o_sum.p) g_sum.push_back('{t: int'($time), unk: o_sum.unk});
  always @(posedge o_carry.p) g_carry.push_back('{t: int'($time), unk: o_carry.unk});

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
    evq_t c, a, b, es, ec;
    stim = '0;
    for (int k = 1; k <= 5; k++) c.push_back('{t: 100 * k, unk: 1'b0});
    a  = '{'{t: 130, unk: 1'b0}, '{t: 342, unk: 1'b0}};
    b  = '{'{t: 146, unk: 1'b0}, '{t: 250, unk: 1'b0}, '{t: 346, unk: 1'b0}};
    es = '{'{t: 309, unk: 1'b0}, '{t: 409, unk: 1'b1}};
    ec = '{'{t: 209, unk: 1'b0}, '{t: 409, unk: 1'b1}};
    drive(0, a);
    drive(1, b);
    drive(2, c);
    #600;
    failures += compare("directed sum", es, g_sum, checks);
    failures += compare("directed carry", ec, g_carry, checks);
    g_sum.delete();
    g_carry.delete();

    c = rand_train(1000, 0, 30000, 5, 12, 5);
    a = rand_train(1000, 2, 30000, 2, 10, 5);
    b = rand_train(1000, 6, 30000, 2, 10, 5);
    drive(0, a);
    drive(1, b);
    drive(2, c);
    #(c[$].t + 50 - int'($time));
    failures += compare("random sum", ref_outputs(c, a, b, RF_XOR, -3, 8, 9, 5), g_sum, checks);
    failures += compare("random carry", ref_outputs(c, a, b, RF_AND, -3, 8, 9, 5), g_carry, checks);
    $display("output pulses: sum=%0d carry=%0d", g_sum.size(), g_carry.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
