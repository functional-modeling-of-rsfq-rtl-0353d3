// tb_rsfq_cell_lib_top: end-to-end testbench of the whole cell library at
// its default parameters (no parameter overrides).
//
// All four cells of the top (DRO, inverter, AND, half adder) are driven at
// once with random pulse trains on every pin, about 3000 clock periods in
// all, including shaded data and clock pulses, and every output pulse is
// compared with the reference model. The run also counts how often each
// behaviour of the models occurred and fails if one never did: clean
// outputs, setup/hold violations and their shaded outputs, a violation
// shading two consecutive periods, a pulse just before a clock counted in
// the next period (negative hold time), shaded data and shaded clock
// pulses passing on as shaded outputs, the inverter firing on an empty
// period, and the separation check of the half adder.
module tb_rsfq_cell_lib_top;
  timeunit 1ps;
  timeprecision 1ps;
  import sfq_pkg::*;
  import sfq_tb_pkg::*;

  localparam int H = -3, S = 8, D = 9, SEP = 5;  // the cells' defaults
  localparam int STOP = 40000;

  // [0..1] dro d, clk; [2..3] inv d, clk; [4..6] and a, b, clk;
  // [7..9] half adder a, b, clk
  sfq_t [9:0] stim;
  sfq_t       dro_out, inv_out, and_out, ha_sum, ha_carry;
  evq_t       g_dro, g_inv, g_and, g_sum, g_carry;
  int         checks = 0;
  int         failures = 0;

  rsfq_cell_lib_top u_top (
    .dro_d  (stim[0]), .dro_clk(stim[1]), .dro_out(dro_out),
    .inv_d  (stim[2]), .inv_clk(stim[3]), .inv_out(inv_out),
    .and_a  (stim[4]), .and_b  (stim[5]), .and_clk(stim[6]), .and_out(and_out),
    .ha_a   (stim[7]), .ha_b   (stim[8]), .ha_clk (stim[9]),
    .ha_sum (ha_sum),  .ha_carry(ha_carry)
  );

  always @(posedge dro_out.p)  g_dro.push_back('{t: int'($time), unk: dro_out.unk});
  always @(posedge inv_out.p)  g_inv.push_back('{t: int'($time), unk: inv_out.unk});
  always @(posedge and_out.p)  g_and.push_back('{t: int'($time), unk: and_out.unk});
  always @(posedge ha_sum.p)   g_sum.push_back('{t: int'($time), unk: ha_sum.unk});
  always @(posedge ha_carry.p) g_carry.push_back('{t: int'($time), unk: ha_carry.unk});

  task automatic drive(int idx, evq_t q);
    foreach (q[n]) begin
      fork
        automatic ev_t e = q[n];
        begin
          #(e.t - int'($time));
          stim[idx] = '{unk: e.unk, p: 1'b1};
          #2;
          stim[idx] = '0;
        end
      join_none
    end
  endtask

  function automatic int count_known(evq_t q, bit unk);
    int n = 0;
    foreach (q[k]) if (q[k].unk == unk) n++;
    return n;
  endfunction

  // Known data pulses of d falling in (c + lo, c + hi) for some clock c.
  function automatic int count_near(evq_t clk, evq_t d, int lo, int hi);
    int n = 0;
    foreach (d[i]) begin
      if (!d[i].unk) begin
        foreach (clk[k]) begin
          if (d[i].t > clk[k].t + lo && d[i].t < clk[k].t + hi) n++;
        end
      end
    end
    return n;
  endfunction

  task automatic need(string what, int n);
    checks++;
    $display("  %-44s %0d", what, n);
    if (n == 0) begin
      $display("FAIL %s never happened", what);
      failures++;
    end
  endtask

  initial begin : watchdog
    #(STOP + 10000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    evq_t c_dro, d_dro, c_inv, d_inv, c_and, a_and, b_and, c_ha, a_ha, b_ha, none;
    int   viol, sep;
    stim  = '0;
    c_dro = rand_train(100, 0, STOP, 5, 10, 3);
    d_dro = rand_train(100, 2, STOP, 2, 12, 3);
    c_inv = rand_train(100, 0, STOP, 5, 10, 3);
    d_inv = rand_train(100, 2, STOP, 3, 16, 3);
    c_and = rand_train(100, 0, STOP, 5, 10, 3);
    a_and = rand_train(100, 2, STOP, 3, 10, 3);
    b_and = rand_train(100, 6, STOP, 3, 10, 3);
    c_ha  = rand_train(100, 0, STOP, 5, 10, 3);
    a_ha  = rand_train(100, 2, STOP, 3, 10, 3);
    b_ha  = rand_train(100, 6, STOP, 3, 10, 3);
    drive(0, d_dro); drive(1, c_dro);
    drive(2, d_inv); drive(3, c_inv);
    drive(4, a_and); drive(5, b_and); drive(6, c_and);
    drive(7, a_ha);  drive(8, b_ha);  drive(9, c_ha);
    #(STOP + 100);

    failures += compare("DRO", ref_outputs(c_dro, d_dro, none, RF_BUF, H, S, D, 0), g_dro, checks);
    failures += compare("inverter", ref_outputs(c_inv, d_inv, none, RF_INV, H, S, D, 0), g_inv, checks);
    failures += compare("AND", ref_outputs(c_and, a_and, b_and, RF_AND, H, S, D, 0), g_and, checks);
    failures += compare("half adder sum", ref_outputs(c_ha, a_ha, b_ha, RF_XOR, H, S, D, SEP),
                        g_sum, checks);
    failures += compare("half adder carry", ref_outputs(c_ha, a_ha, b_ha, RF_AND, H, S, D, SEP),
                        g_carry, checks);

    viol = u_top.u_dro.u_cell.u_core.n_viol + u_top.u_inv.u_cell.u_core.n_viol
         + u_top.u_and.u_cell.u_core.n_viol + u_top.u_ha.u_sum.u_cell.u_core.n_viol
         + u_top.u_ha.u_carry.u_cell.u_core.n_viol;
    sep  = u_top.u_ha.u_sum.u_cell.u_core.n_sep + u_top.u_ha.u_carry.u_cell.u_core.n_sep;
    $display("behaviour counts:");
    need("clean DRO read-outs", count_known(g_dro, 1'b0));
    need("shaded DRO outputs", count_known(g_dro, 1'b1));
    need("setup/hold violation warnings", viol);
    need("DRO pulses inside the forbidden window", count_near(c_dro, d_dro, -S, H));
    need("DRO pulses just before a clock (next period)", count_near(c_dro, d_dro, H, 0));
    need("shaded DRO data pulses", count_known(d_dro, 1'b1));
    need("shaded DRO clock pulses", count_known(c_dro, 1'b1));
    need("inverter pulses on empty periods", count_known(g_inv, 1'b0));
    need("AND outputs", count_known(g_and, 1'b0));
    need("half adder sums", count_known(g_sum, 1'b0));
    need("half adder carries", count_known(g_carry, 1'b0));
    need("half adder separation violations", sep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
