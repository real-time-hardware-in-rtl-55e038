// hil_fxp_pkg: fixed-point types, constants and the resize function shared by
// the real-time converter models.
//
// Numbers follow the <sign, word length, integer word length> convention:
// <+/-,32,6> is a signed 32-bit word with 6 integer bits (sign included) and
// 26 fractional bits; <+,32,5> is an unsigned 32-bit word with 27 fractional
// bits. The buck converter formats are the ones printed on the operators of
// the pipelined datapath. The VSI formats, the struct layouts and the rounding
// rule are this design's own choices.
//
// fx_fit() moves a value from one binary point to another and fits it into a
// word: it drops fractional bits by truncation toward minus infinity and
// saturates at the limits of the destination word. Its arguments other than
// the value are constants at every call, so it synthesizes to wiring plus a
// comparator pair.
package hil_fxp_pkg;

  // Wide intermediate used for products and sums before they are fitted.
  localparam int unsigned WIDE = 80;
  typedef logic signed [WIDE-1:0] wide_t;

  // Buck converter formats (fractional bit counts).
  localparam int unsigned F_S32_6 = 26;  // <+/-,32,6>
  localparam int unsigned F_U32_6 = 26;  // <+,32,6>
  localparam int unsigned F_U32_5 = 27;  // <+,32,5>
  localparam int unsigned F_U32_3 = 29;  // <+,32,3>
  localparam int unsigned F_S33_7 = 26;  // <+/-,33,7>

  typedef logic signed [31:0] s32_6_t;   // currents, voltages, differences
  typedef logic        [31:0] u32_6_t;   // capacitor voltage, h/L, 1/R
  typedef logic        [31:0] u32_5_t;   // output voltage, load current, h/C
  typedef logic        [31:0] u32_3_t;   // resistances
  typedef logic signed [32:0] s33_7_t;   // clamped inductor current

  // Converter constants set by the host (front panel).
  typedef struct packed {
    u32_3_t r_l;       // inductor series resistance RL
    u32_3_t r_ds_on;   // switch on-resistance RDS(on)
    u32_3_t esr;       // capacitor equivalent series resistance
    s32_6_t v_s;       // input voltage Vs(k)
    s32_6_t neg_v_d;   // minus the diode forward voltage, -Vd
    u32_6_t h_over_l;  // time step over inductance, h/L
    u32_5_t h_over_c;  // time step over capacitance, h/C
    u32_6_t inv_r;     // load conductance 1/R
    u32_5_t k_vo;      // R/(R+ESR)
  } buck_param_t;

  // State and outputs of one buck iteration.
  typedef struct packed {
    s32_6_t i_l;       // iL
    u32_6_t v_c;       // vC
  } buck_state_t;

  typedef struct packed {
    s32_6_t i_l_next;  // iL(k+1)
    u32_6_t v_c_next;  // vC(k+1)
    u32_5_t v_o;       // vo(k)
    u32_5_t i_o;       // io(k)
    s32_6_t i_c;       // ic(k)
  } buck_out_t;

  // Which of the three switching states of Eq. (12)-(14) an iteration used.
  typedef enum logic [1:0] {
    BUCK_ON    = 2'd0,  // switch on, Eq. (12)
    BUCK_DIODE = 2'd1,  // switch off, diode conducting, Eq. (13)
    BUCK_DCM   = 2'd2   // switch off, inductor current at zero, Eq. (14)
  } buck_mode_t;

  // VSI formats: phase currents and voltages <+/-,32,10>, coefficients
  // h/L <+,32,2> and R <+,32,8>.
  localparam int unsigned F_S32_10 = 22;
  localparam int unsigned F_U32_2  = 30;
  localparam int unsigned F_U32_8  = 24;
  typedef logic signed [31:0] s32_10_t;
  typedef logic        [31:0] u32_2_t;
  typedef logic        [31:0] u32_8_t;

  // 1/3 in <+,32,0> (32 fractional bits), used for the common-mode voltage.
  localparam logic [31:0] ONE_THIRD_U32_0 = 32'h5555_5555;

  typedef struct packed {
    s32_10_t v_dc;     // DC-link voltage VDC
    u32_2_t  h_over_l; // time step over phase inductance, h/Lx
    u32_8_t  r_load;   // phase load resistance Rx
  } vsi_param_t;

  typedef struct packed {
    s32_10_t i_a;
    s32_10_t i_b;
    s32_10_t i_c;
  } vsi_state_t;

  // Move v from frac_in to frac_out fractional bits (truncating) and saturate
  // to a w_out-bit word, signed if s_out.
  function automatic wide_t fx_fit(input wide_t v, input int frac_in,
                                   input int w_out, input int frac_out,
                                   input bit s_out);
    wide_t r, hi, lo;
    if (frac_in >= frac_out) r = v >>> (frac_in - frac_out);
    else                     r = v <<< (frac_out - frac_in);
    if (s_out) begin
      hi = (wide_t'(1) <<< (w_out - 1)) - wide_t'(1);
      lo = -(wide_t'(1) <<< (w_out - 1));
    end else begin
      hi = (wide_t'(1) <<< w_out) - wide_t'(1);
      lo = '0;
    end
    if (r > hi)      r = hi;
    else if (r < lo) r = lo;
    return r;
  endfunction

endpackage
