// sfq_tb_pkg: reference model and helpers shared by the RSFQ testbenches.
//
// The reference predicts the output pulses of a clocked RSFQ cell from its
// input pulse times, working directly with the timing rule seen from the
// cell's pins, not with the core-plus-delay-lines structure of the models:
//  - the data pulses that count for clock k are those at or after
//    clk[k-1] + h and before clk[k] + h (h = hold time);
//  - such a pulse is clean if it is known and lies at least s (setup time)
//    before clk[k]: the input state is then 1;
//  - otherwise (setup violated, or a shaded pulse) the state is
//    undetermined, and a known pulse that violated clock k-1 (it lies less
//    than s before clk[k-1]) also leaves the state of period k undetermined;
//    a clean pulse overrides both;
//  - with sep > 0, a pulse that follows another data pulse (same or other
//    input) by less than sep makes the output of its period undetermined;
//  - a shaded clock pulse gives a shaded output;
//  - the output is the cell function of the states: a 1 gives a pulse and
//    an undetermined value a shaded pulse, dly after the clock pulse.
// Stimuli keep clear of the boundaries of these windows (clock times on
// multiples of 4, data times 2 above a multiple of 4), so the prediction
// never depends on the order of coincident events.
package sfq_tb_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  typedef struct packed {
    int   t;    // time of the rising edge
    logic unk;  // shaded pulse
  } ev_t;

  typedef ev_t evq_t[$];

  typedef enum int { RF_BUF, RF_INV, RF_AND, RF_XOR } rfn_t;
  typedef enum int { RV0, RV1, RVX } rv_t;

  localparam int NEG_INF = -32'sd1000000000;

  function automatic rv_t rv_eval(rfn_t fn, rv_t a, rv_t b);
    case (fn)
      RF_BUF: return a;
      RF_INV: return (a == RVX) ? RVX : (a == RV1 ? RV0 : RV1);
      RF_AND: begin
        if (a == RV0 || b == RV0) return RV0;
        if (a == RV1 && b == RV1) return RV1;
        return RVX;
      end
      default: begin
        if (a == RVX || b == RVX) return RVX;
        return (a == b) ? RV0 : RV1;
      end
    endcase
  endfunction

  // State of one input for the period ending at clock k.
  function automatic rv_t input_state(evq_t clk, evq_t d, int k, int h, int s);
    int  lo  = (k == 0) ? NEG_INF : clk[k-1].t + h;
    int  hi  = clk[k].t + h;
    int  lo2 = (k <= 1) ? NEG_INF : clk[k-2].t + h;
    bit  clean = 0;
    bit  xs    = 0;
    foreach (d[n]) begin
      if (d[n].t >= lo && d[n].t < hi) begin
        if (!d[n].unk && d[n].t + s < clk[k].t) clean = 1;
        else xs = 1;
      end
      if (k > 0 && d[n].t >= lo2 && d[n].t < lo && !d[n].unk && d[n].t + s > clk[k-1].t)
        xs = 1;
    end
    return clean ? RV1 : (xs ? RVX : RV0);
  endfunction

  // True if a pulse of period k came less than sep after another pulse.
  function automatic bit sep_violated(evq_t clk, evq_t da, evq_t db, int k, int h, int sep);
    int   lo = (k == 0) ? NEG_INF : clk[k-1].t + h;
    int   hi = clk[k].t + h;
    evq_t all;
    if (sep <= 0) return 0;
    all = da;
    foreach (db[n]) all.push_back(db[n]);
    foreach (all[x]) begin
      if (all[x].t >= lo && all[x].t < hi) begin
        foreach (all[y]) begin
          if (y != x && all[y].t <= all[x].t && all[x].t - all[y].t < sep) return 1;
        end
      end
    end
    return 0;
  endfunction

  // Expected output pulses of a clocked cell. clk must be in time order.
  function automatic evq_t ref_outputs(evq_t clk, evq_t da, evq_t db, rfn_t fn,
                                       int h, int s, int dly, int sep);
    evq_t exp;
    evq_t none;
    for (int k = 0; k < clk.size(); k++) begin
      rv_t sa = input_state(clk, da, k, h, s);
      rv_t sb = (fn == RF_AND || fn == RF_XOR) ? input_state(clk, db, k, h, s) : RV0;
      rv_t v  = rv_eval(fn, sa, sb);
      if (clk[k].unk || sep_violated(clk, da, (fn == RF_AND || fn == RF_XOR) ? db : none, k, h, sep))
        v = RVX;
      if (v != RV0) exp.push_back('{t: clk[k].t + dly, unk: (v == RVX)});
    end
    return exp;
  endfunction

  // Compare observed pulses with expected ones; returns the failures.
  function automatic int compare(string what, evq_t exp, evq_t got, ref int checks);
    int fails = 0;
    checks++;
    if (exp.size() != got.size()) begin
      $display("FAIL %s: expected %0d pulses, saw %0d", what, exp.size(), got.size());
      fails++;
    end
    for (int n = 0; n < exp.size() && n < got.size(); n++) begin
      checks++;
      if (exp[n] != got[n]) begin
        $display("FAIL %s: pulse %0d expected t=%0d unk=%0d, saw t=%0d unk=%0d",
                 what, n, exp[n].t, exp[n].unk, got[n].t, got[n].unk);
        fails++;
      end
    end
    return fails;
  endfunction

  // Random pulse train: times base + 4*m + off, in order, consecutive pulses
  // min_gap..max_gap steps of 4 apart; unk_pct percent of them shaded.
  function automatic evq_t rand_train(int base, int off, int stop, int min_gap, int max_gap,
                                      int unk_pct);
    evq_t q;
    int   t = base + off;
    while (t < stop) begin
      q.push_back('{t: t, unk: ($urandom_range(99) < unk_pct)});
      t += 4 * $urandom_range(max_gap, min_gap);
    end
    return q;
  endfunction

endpackage
