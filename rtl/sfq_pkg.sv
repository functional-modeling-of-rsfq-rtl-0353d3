// sfq_pkg: types and helper functions shared by the RSFQ cell models.
//
// An RSFQ signal carries short voltage pulses (single flux quanta), not
// levels: a logic one is the presence of a pulse within a clock period.
// The models represent a pulse as a short high level on `p`. A pulse whose
// value or timing cannot be trusted (a "shaded" pulse, the result of a
// timing violation) is a pulse with `unk` set as well. The original
// four-state formulation used the Verilog value x for such pulses; the
// separate `unk` flag gives the same information in a two-state simulator.
//
// tri_t is the three-valued internal state of a clocked cell (0, 1 or
// undetermined) and gate_fn_t selects the logic function a clocked cell
// applies to its stored input states when it is clocked.
package sfq_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // One SFQ line: p is the pulse, unk marks an undetermined (shaded) pulse.
  typedef struct packed {
    logic unk;
    logic p;
  } sfq_t;

  // Stored state of one data input of a clocked cell.
  typedef enum logic [1:0] {
    ST_0 = 2'b00,
    ST_1 = 2'b01,
    ST_X = 2'b10
  } tri_t;

  // Logic function evaluated at the clock.
  typedef enum logic [1:0] {
    FN_BUF = 2'd0,  // DRO: output = stored state
    FN_INV = 2'd1,  // inverter: output = not stored state
    FN_AND = 2'd2,  // AND of the two inputs
    FN_XOR = 2'd3   // XOR of the two inputs
  } gate_fn_t;

  // Width of an output pulse, in time units.
  localparam int unsigned PULSE_W_DEFAULT = 2;

  // Three-valued operators with the usual unknown propagation.
  function automatic tri_t tri_not(tri_t a);
    case (a)
      ST_0:    return ST_1;
      ST_1:    return ST_0;
      default: return ST_X;
    endcase
  endfunction

  function automatic tri_t tri_and(tri_t a, tri_t b);
    if (a == ST_0 || b == ST_0) return ST_0;
    if (a == ST_1 && b == ST_1) return ST_1;
    return ST_X;
  endfunction

  function automatic tri_t tri_xor(tri_t a, tri_t b);
    if (a == ST_X || b == ST_X) return ST_X;
    return (a == b) ? ST_0 : ST_1;
  endfunction

  // State a data pulse leaves behind: an already confirmed one stays one,
  // anything else becomes undetermined until its setup interval is over.
  function automatic tri_t tri_or_x(tri_t a);
    return (a == ST_1) ? ST_1 : ST_X;
  endfunction

  // Apply the cell function to input states a (and b for two-input cells).
  function automatic tri_t gate_eval(gate_fn_t fn, tri_t a, tri_t b);
    case (fn)
      FN_BUF:  return a;
      FN_INV:  return tri_not(a);
      FN_AND:  return tri_and(a, b);
      default: return tri_xor(a, b);
    endcase
  endfunction

endpackage
