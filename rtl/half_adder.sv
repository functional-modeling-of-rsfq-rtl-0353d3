// half_adder: behavioural timing model of an RSFQ half adder. Not
// synthesizable: it uses simulation delays.
//
// On each clock pulse the adder reports the inputs seen since the previous
// clock pulse: sum = a xor b, carry = a and b, as pulses DELAY after the
// clock. It is built as an XOR cell and an AND cell sharing the inputs and
// the clock; input fan-out is ideal (no splitter delay is modelled). A
// timing violation on a or b makes both outputs undetermined (shaded
// pulses) in the affected clock periods. The function follows the
// published half-adder example; the two-cell structure, the shared timing
// values (the DRO's) and the separation requirement T_SEP = 5 between
// pulses on a and b are this model's choices.
//
// Interface: a, b, clk in; sum, carry out; each an sfq_pkg::sfq_t line.
// Time unit 1 ps.
module half_adder
  import sfq_pkg::*;
#(
  parameter int          T_HOLD  = -3,
  parameter int          T_SETUP = 8,
  parameter int          DELAY   = 9,
  parameter int          T_SEP   = 5,
  parameter int unsigned PULSE_W = PULSE_W_DEFAULT
) (
  input  sfq_t a,
  input  sfq_t b,
  input  sfq_t clk,
  output sfq_t sum,
  output sfq_t carry
);
  timeunit 1ps;
  timeprecision 1ps;

  xor_cell #(
    .T_HOLD(T_HOLD), .T_SETUP(T_SETUP), .DELAY(DELAY), .T_SEP(T_SEP), .PULSE_W(PULSE_W)
  ) u_sum (
    .a  (a),
    .b  (b),
    .clk(clk),
    .out(sum)
  );

  and_cell #(
    .T_HOLD(T_HOLD), .T_SETUP(T_SETUP), .DELAY(DELAY), .T_SEP(T_SEP), .PULSE_W(PULSE_W)
  ) u_carry (
    .a  (a),
    .b  (b),
    .clk(clk),
    .out(carry)
  );

endmodule
