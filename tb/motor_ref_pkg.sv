// motor_ref_pkg: real-number reference model of the example motor's losses,
// used by the testbenches to check the loss evaluator and the two
// loss-minimisation blocks independently of their fixed-point arithmetic.
//   W(i_d, i_q, w) = 3/2 Rs [(i_d - w Lq i_q/Rc)^2 + (i_q - w (lm + Ld i_d)/Rc)^2]
//                  + 3 w^2/(2 Rc) [(Lq i_q)^2 + (lm + Ld i_d)^2]
// and its minimiser over i_d from dW/di_d = 0.
// The constants are the Q16.16 values of hil_pkg read back as reals, so the
// model and the hardware describe the same machine.
package motor_ref_pkg;
  import hil_pkg::*;

  function automatic real q2r(q16_t q);
    return $itor(q) / 65536.0;
  endfunction

  function automatic q16_t r2q(real r);
    return q16_t'($rtoi(r * 65536.0));
  endfunction

  function automatic real absr(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  function automatic real loss_w(real id, real iq, real w);
    real rs, rc, ld, lq, lm, a, b, fd, fq;
    rs = q2r(MOTOR_RS); rc = q2r(MOTOR_RC); ld = q2r(MOTOR_LD);
    lq = q2r(MOTOR_LQ); lm = q2r(MOTOR_LM);
    fd = lm + ld * id;
    fq = lq * iq;
    a  = id - w * fq / rc;
    b  = iq - w * fd / rc;
    return 1.5 * rs * (a * a + b * b) + 1.5 * w * w / rc * (fq * fq + fd * fd);
  endfunction

  function automatic real id_opt(real iq, real w);
    real rs, rc, ld, lq, lm, k, num, den;
    rs = q2r(MOTOR_RS); rc = q2r(MOTOR_RC); ld = q2r(MOTOR_LD);
    lq = q2r(MOTOR_LQ); lm = q2r(MOTOR_LM);
    k   = w / rc;
    num = rs * k * iq * (ld + lq) - ld * lm * k * (rs * k + w);
    den = rs + ld * ld * k * (rs * k + w);
    return num / den;
  endfunction
endpackage
