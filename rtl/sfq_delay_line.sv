// sfq_delay_line: behavioural model of a passive SFQ delay line
// (a Josephson transmission line segment). Not synthesizable: it uses
// simulation delays.
//
// Every change of the input, a known pulse or an undetermined one, appears
// at the output exactly DELAY time units later (transport delay, so pulses
// closer together than DELAY are all kept). DELAY = 0 is a plain wire.
// The clocked cell models use three of these, in the data, clock and output
// paths, to give a zero-delay core cell the hold time, setup time and
// clock-to-output delay of the real cell.
//
// Interface: in_pulse -> out_pulse, both sfq_pkg::sfq_t. Time unit 1 ps
// (the time unit is this model's choice).
module sfq_delay_line #(
  parameter int unsigned DELAY = 0
) (
  input  sfq_pkg::sfq_t in_pulse,
  output sfq_pkg::sfq_t out_pulse
);
  timeunit 1ps;
  timeprecision 1ps;

  if (DELAY == 0) begin : g_wire
    assign out_pulse = in_pulse;
  end else begin : g_delay
    sfq_pkg::sfq_t dly_q;
    initial dly_q = '0;
    // One waiting process per input change keeps every pulse (transport).
    always @(in_pulse) begin
      fork
        automatic sfq_pkg::sfq_t v = in_pulse;
        begin
          #(DELAY);
          dly_q = v;
        end
      join_none
    end
    assign out_pulse = dly_q;
  end

endmodule
