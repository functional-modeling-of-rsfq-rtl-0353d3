// dro_cell: behavioural timing model of the RSFQ DRO (destructive read-out) cell.
// Not synthesizable: it uses simulation delays.
//
// A data pulse on d sets the cell; the next clock pulse reads it out as a
// pulse on out and resets it. A clock pulse with no data pulse before it
// gives no output. The default timing (hold -3, setup 8, delay 9) and the
// 2-unit output pulse are the values of the published DRO model.
//
// Timing: a data pulse must arrive at least T_HOLD after one clock pulse
// and at least T_SETUP before the next; a pulse inside that forbidden
// interval gives an undetermined (shaded) output at that clock and, when
// it also violates the hold time of the next clock, at the next clock too,
// and prints a warning. Output pulses appear DELAY after the clock pulse
// and last PULSE_W. Time unit 1 ps.
//
// Interface: d (data), clk, out, each an sfq_pkg::sfq_t pulse line.
// The model is the shared clocked cell (sfq_clocked_cell) with the store-and-read-out
// function.
module dro_cell
  import sfq_pkg::*;
#(
  parameter int          T_HOLD  = -3,
  parameter int          T_SETUP = 8,
  parameter int          DELAY   = 9,
  parameter int          T_SEP   = 0,
  parameter int unsigned PULSE_W = PULSE_W_DEFAULT
) (
  input  sfq_t d,
  input  sfq_t clk,
  output sfq_t out
);
  timeunit 1ps;
  timeprecision 1ps;

  sfq_clocked_cell #(
    .N_IN   (1),
    .FN     (FN_BUF),
    .T_HOLD (T_HOLD),
    .T_SETUP(T_SETUP),
    .DELAY  (DELAY),
    .T_SEP  (T_SEP),
    .PULSE_W(PULSE_W)
  ) u_cell (
    .din      (d),
    .clk      (clk),
    .out_pulse(out)
  );

endmodule
