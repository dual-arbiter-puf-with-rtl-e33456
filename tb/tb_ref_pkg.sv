`timescale 1ps/1ps
// tb_ref_pkg: reference model for the SR-APUF testbenches.
//
// It computes, by plain arithmetic, what the event-driven delay lines and the
// obfuscation loop should produce: the arrival times of the two racing edges
// under the additive delay model, the response bit they give, the parity and
// ones/zeros rule of the control logic, and circular shifts. The device's
// delays themselves come from srapuf_pkg::stage_delay_ps, which defines the
// simulated chip.
package tb_ref_pkg;
  localparam int MAXW = 256;

  // arrival times (ps after the step) of the top and bottom line
  function automatic void race_times(int unsigned seed, int unsigned cell_id,
                                     logic [MAXW-1:0] ch, int n, int nom, int spr,
                                     output int t_top, output int t_bot);
    int nt, nb;
    t_top = 0;
    t_bot = 0;
    for (int i = 0; i < n; i++) begin
      if (ch[i] == 1'b0) begin
        nt = t_top + srapuf_pkg::stage_delay_ps(seed, cell_id, i, 0, nom, spr);
        nb = t_bot + srapuf_pkg::stage_delay_ps(seed, cell_id, i, 2, nom, spr);
      end else begin
        nt = t_bot + srapuf_pkg::stage_delay_ps(seed, cell_id, i, 1, nom, spr);
        nb = t_top + srapuf_pkg::stage_delay_ps(seed, cell_id, i, 3, nom, spr);
      end
      t_top = nt;
      t_bot = nb;
    end
  endfunction

  // bottom minus top arrival: positive means the top edge wins (bit 1)
  function automatic int race_margin(int unsigned seed, int unsigned cell_id,
                                     logic [MAXW-1:0] ch, int n, int nom, int spr);
    int tt, tb;
    race_times(seed, cell_id, ch, n, nom, spr, tt, tb);
    return tb - tt;
  endfunction

  function automatic int count_ones(logic [MAXW-1:0] v, int n);
    int c = 0;
    for (int i = 0; i < n; i++) c += int'(v[i]);
    return c;
  endfunction

  // shift distance: |ones - zeros|
  function automatic int shift_amount(logic [MAXW-1:0] v, int n);
    int o = count_ones(v, n);
    return (2 * o > n) ? 2 * o - n : n - 2 * o;
  endfunction

  // 1 = left: odd parity, inverted by a1
  function automatic logic shift_left(logic [MAXW-1:0] v, int n, logic a1);
    return logic'(count_ones(v, n) % 2) ^ a1;
  endfunction

  // circular shift of the low n bits by k places
  function automatic logic [MAXW-1:0] rotate(logic [MAXW-1:0] v, int n, int k, logic left);
    logic [MAXW-1:0] r = '0;
    for (int i = 0; i < n; i++) begin
      if (left) r[(i + k) % n] = v[i];
      else      r[i] = v[(i + k) % n];
    end
    return r;
  endfunction
endpackage
