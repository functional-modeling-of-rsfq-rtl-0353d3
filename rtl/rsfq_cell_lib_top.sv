// rsfq_cell_lib_top: the RSFQ cell models side by side, each with its own
// pins, so that one simulation exercises the whole library. Behavioural,
// not synthesizable.
//
// Contents: a DRO (store a pulse, read it out destructively on the clock),
// a clocked inverter, a clocked AND and a half adder (an XOR cell and an
// AND cell). Each cell has its own clock and data lines; nothing is
// shared, since the cells are independent library elements. All use their
// default timing: hold -3, setup 8, clock-to-output delay 9, output pulse
// width 2 (time unit 1 ps); the half adder also checks a separation of 5
// between its input pulses.
//
// Every pin is an sfq_pkg::sfq_t pulse line: p is the pulse, unk marks an
// undetermined (shaded) pulse.
module rsfq_cell_lib_top
  import sfq_pkg::*;
(
  input  sfq_t dro_d,
  input  sfq_t dro_clk,
  output sfq_t dro_out,
  input  sfq_t inv_d,
  input  sfq_t inv_clk,
  output sfq_t inv_out,
  input  sfq_t and_a,
  input  sfq_t and_b,
  input  sfq_t and_clk,
  output sfq_t and_out,
  input  sfq_t ha_a,
  input  sfq_t ha_b,
  input  sfq_t ha_clk,
  output sfq_t ha_sum,
  output sfq_t ha_carry
);
  timeunit 1ps;
  timeprecision 1ps;

  dro_cell u_dro (
    .d  (dro_d),
    .clk(dro_clk),
    .out(dro_out)
  );

  inv_cell u_inv (
    .d  (inv_d),
    .clk(inv_clk),
    .out(inv_out)
  );

  and_cell u_and (
    .a  (and_a),
    .b  (and_b),
    .clk(and_clk),
    .out(and_out)
  );

  half_adder u_ha (
    .a    (ha_a),
    .b    (ha_b),
    .clk  (ha_clk),
    .sum  (ha_sum),
    .carry(ha_carry)
  );

endmodule
