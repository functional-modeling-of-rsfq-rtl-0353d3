// tb_sfq_delay_line: self-checking testbench of the SFQ delay line.
//
// A random train of known and shaded 2-unit pulses, spaced closer than the
// delay so several pulses are in flight at once, goes through a 7-unit and
// a 0-unit delay line. Every rising and falling edge at each output must
// appear exactly the delay after the matching input edge, with the same
// shaded flag.
module tb_sfq_delay_line;
  timeunit 1ps;
  timeprecision 1ps;
  import sfq_pkg::*;
  import sfq_tb_pkg::*;

  localparam int D = 7;

  sfq_t in_p, out_d, out_0;
  evq_t rise_d, fall_d, rise_0;
  evq_t train;
  int   checks = 0;
  int   failures = 0;

  sfq_delay_line #(.DELAY(D)) u_dut (.in_pulse(in_p), .out_pulse(out_d));
  sfq_delay_line #(.DELAY(0)) u_wire (.in_pulse(in_p), .out_pulse(out_0));

  always @(posedge out_d.p) rise_d.push_back('{t: int'($time), unk: out_d.unk});
  always @(negedge out_d.p) if ($time > 0) fall_d.push_back('{t: int'($time), unk: 1'b0});
  always @(posedge out_0.p) rise_0.push_back('{t: int'($time), unk: out_0.unk});

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    evq_t exp_r, exp_f, exp_0;
    in_p  = '0;
    train = rand_train(100, 2, 5000, 1, 3, 20);
    foreach (train[n]) begin
      #(train[n].t - int'($time));
      in_p = '{unk: train[n].unk, p: 1'b1};
      #2;
      in_p = '0;
    end
    #20;
    foreach (train[n]) begin
      exp_r.push_back('{t: train[n].t + D, unk: train[n].unk});
      exp_f.push_back('{t: train[n].t + D + 2, unk: 1'b0});
      exp_0.push_back(train[n]);
    end
    failures += compare("delayed rising edges", exp_r, rise_d, checks);
    failures += compare("delayed falling edges", exp_f, fall_d, checks);
    failures += compare("zero-delay rising edges", exp_0, rise_0, checks);
    $display("pulses through the line: %0d", train.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
