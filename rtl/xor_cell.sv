// xor_cell: behavioural timing model of the clocked two-input RSFQ XOR cell.
// Not synthesizable: it uses simulation delays.
//
// Each input is stored like the data input of a DRO; a clock pulse emits
// a pulse if exactly one of the two inputs received a pulse since the
// previous clock, then clears both. This is the sum half of a half adder.
//
// Timing: each data input obeys the hold/setup rule of the DRO model: a
// pulse less than T_SETUP before or less than T_HOLD after a clock pulse
// makes the output undetermined (a shaded pulse) and prints a warning.
// With T_SEP > 0, two data pulses (on a, on b, or one on each) closer than
// T_SEP also make the next output undetermined. Output pulses appear DELAY
// after the clock pulse and last PULSE_W. Time unit 1 ps. No timing values
// are published for this cell: the defaults are those of the DRO model and
// the separation check is off (T_SEP = 0), to be set per instance.
//
// Interface: a, b (data), clk, out, each an sfq_pkg::sfq_t pulse line.
module xor_cell
  import sfq_pkg::*;
#(
  parameter int          T_HOLD  = -3,
  parameter int          T_SETUP = 8,
  parameter int          DELAY   = 9,
  parameter int          T_SEP   = 0,
  parameter int unsigned PULSE_W = PULSE_W_DEFAULT
) (
  input  sfq_t a,
  input  sfq_t b,
  input  sfq_t clk,
  output sfq_t out
);
  timeunit 1ps;
  timeprecision 1ps;

  sfq_clocked_cell #(
    .N_IN   (2),
    .FN     (FN_XOR),
    .T_HOLD (T_HOLD),
    .T_SETUP(T_SETUP),
    .DELAY  (DELAY),
    .T_SEP  (T_SEP),
    .PULSE_W(PULSE_W)
  ) u_cell (
    .din      ({b, a}),
    .clk      (clk),
    .out_pulse(out)
  );

endmodule
