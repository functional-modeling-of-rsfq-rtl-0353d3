// sfq_clocked_core: behavioural model of the idealised clocked RSFQ cell
// (written DRO' below) from which every clocked cell model is built. Not
// synthesizable: it reacts to pulse edges at simulation times.
//
// DRO' has zero clock-to-output delay and zero hold time; its setup time
// T_SETUP_P equals t_hold + t_setup of the real cell. It keeps one stored
// state per data input, 0, 1 or undetermined:
//  - a data pulse makes the state undetermined (a state already confirmed
//    as 1 stays 1), and T_SETUP_P later the pulse is checked: if no clock
//    pulse arrived in that interval the state becomes 1, otherwise the
//    setup time was violated, the state becomes undetermined and a warning
//    is printed;
//  - an undetermined (shaded) data pulse makes the state undetermined and
//    is never confirmed;
//  - a clock pulse applies FN to the stored states and emits a pulse of
//    PULSE_W for a 1, a shaded pulse for an undetermined result and nothing
//    for a 0, then clears the states. A shaded clock pulse always gives a
//    shaded output pulse.
// So a data pulse too close to a clock makes the output undetermined in
// that clock period and, when its check falls after the clock, in the next
// one as well. This follows the published cell model.
//
// Added here: a minimum separation T_SEP between two data pulses on the
// same or on related inputs (all data inputs of the cell count as
// related). A pulse closer than T_SEP to an earlier one makes the next
// output undetermined and prints a warning. The published model names this
// requirement but does not show how it is checked; T_SEP = 0 disables it.
// When pulses coincide, the core handles set checks first, then the clock,
// then new data, so a data pulse at the same instant as a clock belongs to
// the following period (zero hold time).
//
// Interface: din[N_IN] data pulses, clk_int clock pulse, out_int output
// pulse, all sfq_pkg::sfq_t. n_viol and n_sep count the warnings issued.
module sfq_clocked_core
  import sfq_pkg::*;
#(
  parameter int unsigned N_IN      = 1,
  parameter gate_fn_t    FN        = FN_BUF,
  parameter int unsigned T_SETUP_P = 5,
  parameter int unsigned T_SEP     = 0,
  parameter int unsigned PULSE_W   = PULSE_W_DEFAULT,
  parameter bit          WARN      = 1'b1
) (
  input  sfq_t [N_IN-1:0] din,
  input  sfq_t            clk_int,
  output sfq_t            out_int
);
  timeunit 1ps;
  timeprecision 1ps;

  if (N_IN < 1 || N_IN > 2) begin : g_bad_n
    $error("sfq_clocked_core: N_IN must be 1 or 2");
  end
  if ((FN == FN_AND || FN == FN_XOR) && N_IN != 2) begin : g_bad_fn
    $error("sfq_clocked_core: AND and XOR need N_IN = 2");
  end

  localparam time TSP_T = time'(T_SETUP_P);
  localparam time SEP_T = time'(T_SEP);

  // Set-check events: every known data pulse, T_SETUP_P later.
  sfq_t [N_IN-1:0] set_src;
  sfq_t [N_IN-1:0] set_evt;
  for (genvar i = 0; i < N_IN; i++) begin : g_set
    assign set_src[i] = '{unk: 1'b0, p: din[i].p & ~din[i].unk};
    sfq_delay_line #(.DELAY(T_SETUP_P)) u_set_dly (
      .in_pulse (set_src[i]),
      .out_pulse(set_evt[i])
    );
  end

  tri_t            st       [N_IN];  // stored state per data input
  logic            sep_bad;          // separation violated this period
  time             last_clk_t;       // time of the last clock pulse
  time             last_d_t [N_IN];  // time of the last data pulse
  logic [N_IN-1:0] d_seen;
  logic [N_IN-1:0] din_q, set_q;
  logic            clk_q;
  int unsigned     n_viol;           // setup/hold warnings
  int unsigned     n_sep;            // separation warnings

  initial begin
    for (int i = 0; i < N_IN; i++) begin
      st[i]       = ST_0;
      last_d_t[i] = 0;
    end
    sep_bad    = 1'b0;
    last_clk_t = 0;
    d_seen     = '0;
    din_q      = '0;
    set_q      = '0;
    clk_q      = 1'b0;
    n_viol     = 0;
    n_sep      = 0;
    out_int    = '0;
  end

  always @(din, set_evt, clk_int) begin : p_cell
    logic [N_IN-1:0] din_rise, set_rise;
    logic            clk_rise;
    tri_t            res;
    for (int i = 0; i < N_IN; i++) begin
      din_rise[i] = din[i].p & ~din_q[i];
      set_rise[i] = set_evt[i].p & ~set_q[i];
      din_q[i]    = din[i].p;
      set_q[i]    = set_evt[i].p;
    end
    clk_rise = clk_int.p & ~clk_q;
    clk_q    = clk_int.p;

    // 1. End of a setup interval: confirm the pulse or flag a violation.
    for (int i = 0; i < N_IN; i++) begin
      if (set_rise[i]) begin
        if ($time >= last_clk_t + TSP_T) begin
          st[i] = ST_1;
        end else begin
          st[i] = ST_X;
          n_viol++;
          if (WARN) $display("Violation of timing in module %m at %0t.", $time);
        end
      end
    end

    // 2. Clock: evaluate, emit, clear.
    if (clk_rise) begin
      if (clk_int.unk || sep_bad) res = ST_X;
      else res = gate_eval(FN, st[0], st[N_IN-1]);
      if (res != ST_0) begin
        out_int = '{unk: (res == ST_X), p: 1'b1};
        fork
          begin
            #(PULSE_W);
            out_int = '0;
          end
        join_none
      end
      for (int i = 0; i < N_IN; i++) st[i] = ST_0;
      sep_bad    = 1'b0;
      last_clk_t = $time;
    end

    // 3. New data pulses.
    for (int i = 0; i < N_IN; i++) begin
      if (din_rise[i]) begin
        if (T_SETUP_P == 0 && !din[i].unk) st[i] = ST_1;
        else st[i] = tri_or_x(st[i]);
        for (int j = 0; j < N_IN; j++) begin
          if (d_seen[j] && ($time < last_d_t[j] + SEP_T)) begin
            if (!sep_bad) begin
              n_sep++;
              if (WARN) $display("Violation of pulse separation in module %m at %0t.", $time);
            end
            sep_bad = 1'b1;
          end
        end
        last_d_t[i] = $time;
        d_seen[i]   = 1'b1;
      end
    end
  end

endmodule
