// hil_tb_pkg: testbench helpers for the converter models.
//
// Converts between real numbers and the fixed-point words of hil_fxp_pkg and
// holds real-valued (double precision) reference models of one Euler step of
// the buck converter and of the three-phase VSI, written directly from the
// model equations and independent of the RTL's operator order and formats.
package hil_tb_pkg;

  // Real value of a word with frac fractional bits.
  function automatic real fx2r(input logic [32:0] w, input int width,
                               input int frac, input bit is_signed);
    longint v;
    v = longint'(w) & ((longint'(1) << width) - 1);
    if (is_signed && w[width-1]) v = v - (longint'(1) << width);
    return real'(v) / (2.0 ** frac);
  endfunction

  // Nearest word (floor) for a real value, frac fractional bits.
  function automatic logic [31:0] r2fx(input real r, input int frac);
    longint v;
    v = longint'($floor(r * (2.0 ** frac)));
    return v[31:0];
  endfunction

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // ---- buck converter reference step (Eq. 12-14 with the current clamp) --
  typedef struct {
    real r_l, r_ds, esr, v_s, v_d, h_l, h_c, inv_r, k;
  } buck_c_t;

  typedef struct {
    real il_next, vc_next, vo, io, ic;
    int  mode;   // 0 on, 1 diode, 2 discontinuous
  } buck_r_t;

  function automatic buck_r_t buck_step(input buck_c_t c, input real il,
                                        input real vc, input bit pwm);
    buck_r_t o;
    real ilc, vl;
    ilc = (il <= 0.0) ? 0.0 : il;
    o.vo = c.k * (ilc * c.esr + vc);
    o.io = o.vo * c.inv_r;
    o.ic = ilc - o.io;
    if (pwm) vl = c.v_s - ilc * (c.r_l + c.r_ds) - o.vo;
    else     vl = -c.v_d - ilc * c.r_l - o.vo;
    o.il_next = ilc + c.h_l * vl;
    o.vc_next = vc + c.h_c * o.ic;
    if (o.vc_next < 0.0) o.vc_next = 0.0;
    o.mode = pwm ? 0 : ((il <= 0.0) ? 2 : 1);
    return o;
  endfunction

  // ---- VSI reference step (Eq. 4-7, Table 5, resistive load voltage) -----
  typedef struct {
    real i_next [3];
    real v [3];
  } vsi_r_t;

  function automatic vsi_r_t vsi_step(input real vdc, input real h_l,
                                      input real r, input logic [2:0] sw,
                                      input real ia, input real ib,
                                      input real ic);
    vsi_r_t o;
    real    vnn;
    real    i [3];
    i[0] = ia; i[1] = ib; i[2] = ic;
    vnn = real'(int'(sw[0]) + int'(sw[1]) + int'(sw[2])) * vdc / 3.0;
    for (int x = 0; x < 3; x++) begin
      o.v[x]      = (sw[x] ? vdc : 0.0) - vnn;
      o.i_next[x] = i[x] + h_l * (o.v[x] - r * i[x]);
    end
    return o;
  endfunction

endpackage
