// sfq_clocked_cell: behavioural timing model of a clocked RSFQ cell with
// arbitrary hold time T_HOLD, setup time T_SETUP and clock-to-output
// delay DELAY. Not synthesizable: it uses simulation delays.
//
// The cell is the idealised core DRO' (zero delay, zero hold, setup time
// T_HOLD + T_SETUP, see sfq_clocked_core) wrapped in three delay lines
// whose lengths make the whole match the real cell's timing:
//   T_HOLD >= 0: data 0,        clock T_HOLD, output DELAY - T_HOLD
//   T_HOLD <  0: data -T_HOLD,  clock 0,      output DELAY
// With these, a data pulse violates timing when it falls less than
// T_SETUP before or less than T_HOLD after a clock pulse, and a correct
// output pulse appears DELAY after its clock pulse. This split follows the
// published model exactly. Its constraints DELAY >= 0,
// T_HOLD + T_SETUP >= 0 and T_HOLD <= DELAY are checked at elaboration.
//
// Interface: din[N_IN] data pulses, clk clock pulse, out_pulse output, all
// sfq_pkg::sfq_t; FN selects the cell function (sfq_pkg::gate_fn_t).
// T_SEP is the minimum separation of data pulses (0 = not checked).
module sfq_clocked_cell
  import sfq_pkg::*;
#(
  parameter int          N_IN    = 1,
  parameter gate_fn_t    FN      = FN_BUF,
  parameter int          T_HOLD  = -3,
  parameter int          T_SETUP = 8,
  parameter int          DELAY   = 9,
  parameter int          T_SEP   = 0,
  parameter int unsigned PULSE_W = PULSE_W_DEFAULT,
  parameter bit          WARN    = 1'b1
) (
  input  sfq_t [N_IN-1:0] din,
  output sfq_t            out_pulse,
  input  sfq_t            clk
);
  timeunit 1ps;
  timeprecision 1ps;

  // Constraints on the timing parameters.
  if (DELAY < 0) begin : g_bad_delay
    $error("sfq_clocked_cell: DELAY must be >= 0");
  end
  if (T_HOLD + T_SETUP < 0) begin : g_bad_window
    $error("sfq_clocked_cell: T_HOLD + T_SETUP must be >= 0");
  end
  if (T_HOLD > DELAY) begin : g_bad_hold
    $error("sfq_clocked_cell: T_HOLD must not exceed DELAY");
  end
  if (T_SEP < 0) begin : g_bad_sep
    $error("sfq_clocked_cell: T_SEP must be >= 0");
  end

  localparam bit          HOLD_NEG  = (T_HOLD < 0);
  localparam int unsigned DATA_DLY  = HOLD_NEG ? unsigned'(-T_HOLD) : 0;
  localparam int unsigned CLK_DLY   = HOLD_NEG ? 0 : unsigned'(T_HOLD);
  localparam int unsigned OUT_DLY   = HOLD_NEG ? unsigned'(DELAY) : unsigned'(DELAY - T_HOLD);
  localparam int unsigned T_SETUP_P = unsigned'(T_HOLD + T_SETUP);

  sfq_t [N_IN-1:0] d_internal;
  sfq_t            clk_internal;
  sfq_t            out_internal;

  for (genvar i = 0; i < N_IN; i++) begin : g_data
    sfq_delay_line #(.DELAY(DATA_DLY)) u_data_delay (
      .in_pulse (din[i]),
      .out_pulse(d_internal[i])
    );
  end

  sfq_delay_line #(.DELAY(CLK_DLY)) u_clk_delay (
    .in_pulse (clk),
    .out_pulse(clk_internal)
  );

  sfq_clocked_core #(
    .N_IN     (N_IN),
    .FN       (FN),
    .T_SETUP_P(T_SETUP_P),
    .T_SEP    (unsigned'(T_SEP)),
    .PULSE_W  (PULSE_W),
    .WARN     (WARN)
  ) u_core (
    .din    (d_internal),
    .clk_int(clk_internal),
    .out_int(out_internal)
  );

  sfq_delay_line #(.DELAY(OUT_DLY)) u_out_delay (
    .in_pulse (out_internal),
    .out_pulse(out_pulse)
  );

endmodule
