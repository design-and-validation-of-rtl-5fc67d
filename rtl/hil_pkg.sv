// hil_pkg: types, constants and fixed-point helpers shared by the PMSM
// minimum-losses controller.
//
// Every signal of the controller is a signed 32-bit fixed-point number with
// 16 integer and 16 fractional bits ("Q16.16": value = raw / 65536), as in the
// design this RTL follows. Products are formed at 64 bits and shifted back by
// 16, with saturation to the Q16.16 range. The model-based loss-minimisation
// block works in a wider 64-bit Q32.32 format (value = raw / 2^32).
//
// The motor constants below (Rs, Rc, Ld, Lq, lambda_m, pole pairs, DC link)
// are this design's own example values: the controller needs them but the
// source of the design does not list the motor's data. They are Q16.16 raw
// values; change them to fit another machine.
package hil_pkg;

  localparam int unsigned QF = 16;  // fractional bits of Q16.16

  typedef logic signed [31:0] q16_t;  // Q16.16
  typedef logic signed [63:0] q32_t;  // Q32.32

  typedef struct packed {
    q16_t d;
    q16_t q;
  } dq_t;

  typedef struct packed {
    q16_t a;
    q16_t b;
    q16_t c;
  } abc_t;

  localparam q16_t Q_ONE  = 32'sd65536;
  localparam q16_t Q_MAX  = 32'sh7FFF_FFFF;
  localparam q16_t Q_MIN  = 32'sh8000_0000;
  localparam q16_t Q_PI   = 32'sd205887;   // pi
  localparam q16_t Q_PI_2 = 32'sd102944;   // pi/2

  // Example motor (own choice, see above)
  localparam q16_t MOTOR_RS   = 32'sd65536;    // 1.0 ohm stator resistance
  localparam q16_t MOTOR_RC   = 32'sd13107200; // 200 ohm iron-loss resistance
  localparam q16_t MOTOR_LD   = 32'sd328;      // 5 mH d-axis inductance
  localparam q16_t MOTOR_LQ   = 32'sd459;      // 7 mH q-axis inductance
  localparam q16_t MOTOR_LM   = 32'sd6554;     // 0.1 Wb magnet flux
  localparam q16_t DC_LINK    = 32'sd19660800; // 300 V inverter supply

  // Saturate a wide value to Q16.16.
  function automatic q16_t q_sat(input logic signed [95:0] v);
    if (v > 96'sd2147483647) return Q_MAX;
    if (v < -96'sd2147483648) return Q_MIN;
    return q16_t'(v);
  endfunction

  // Q16.16 multiply: 64-bit product, arithmetic shift by 16, saturate.
  function automatic q16_t q_mul(input q16_t a, input q16_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return q_sat(96'(p >>> QF));
  endfunction

  // Saturating Q16.16 add and subtract.
  function automatic q16_t q_add(input q16_t a, input q16_t b);
    return q_sat(96'(a) + 96'(b));
  endfunction

  function automatic q16_t q_sub(input q16_t a, input q16_t b);
    return q_sat(96'(a) - 96'(b));
  endfunction

  // Reciprocal of a positive Q16.16 constant, as Q16.16 (elaboration time).
  function automatic q16_t q_recip(input q16_t a);
    return q16_t'(64'sh1_0000_0000 / 64'(a));
  endfunction

  // Quotient a/b of two Q16.16 constants, as Q16.16 (elaboration time).
  function automatic q16_t q_div(input q16_t a, input q16_t b);
    return q16_t'((64'(a) <<< QF) / 64'(b));
  endfunction

  // Reciprocal of a positive Q16.16 constant with 32 fractional bits, for
  // precise division by a constant: x / b = (x * q_recip32(b)) >>> 32.
  function automatic logic signed [63:0] q_recip32(input q16_t b);
    return (64'sh1 <<< 48) / 64'(b);
  endfunction

endpackage
