// spt_ref_pkg: reference arithmetic for the testbenches, written directly
// from the coefficient definition rather than from the RTL structure.
//   magnitude = t1 (+/-) t2 (+/-) t3 + correction, t_i = floor(|x| / 2^ctl_i),
//   correction = +1 when term 2 is added, -1 when it is subtracted,
//   taken modulo 2^15; sign = coefficient sign xor sample sign.
package spt_ref_pkg;
  import spt_pkg::*;

  function automatic logic [MAG_W:0] spt_mul_ref(input logic [MAG_W:0] x,
                                                 input spt_ctrl_t c);
    int mag, t1, t2, t3, r;
    mag = int'(x[MAG_W-1:0]);
    t1  = mag / (1 << c.ctl1);
    t2  = mag / (1 << c.ctl2);
    t3  = mag / (1 << c.ctl3);
    r   = t1;
    if (c.en1) begin
      r = c.sub1 ? r - t2 : r + t2;
      if (c.corr) r = c.sub1 ? r - 1 : r + 1;
      if (c.en2) r = c.sub2 ? r - t3 : r + t3;
    end
    r = r & ((1 << MAG_W) - 1);
    return {c.sg ^ x[MAG_W], MAG_W'(r)};
  endfunction

  // Two's-complement value of a sign-magnitude product.
  function automatic int sm_to_int(input logic [MAG_W:0] p);
    return p[MAG_W] ? -int'(p[MAG_W-1:0]) : int'(p[MAG_W-1:0]);
  endfunction

  // Number of SPT terms a control word uses (1..3).
  function automatic int n_terms(input spt_ctrl_t c);
    return !c.en1 ? 1 : (c.en2 ? 3 : 2);
  endfunction

  // Random control word with term 1 of the largest weight (ctl1 <= ctl2,
  // ctl3), as the coefficient encoding requires.
  function automatic spt_ctrl_t rand_ctrl();
    spt_ctrl_t c;
    c       = spt_ctrl_t'($urandom);
    c.ctl1  = SHIFT_W'($urandom_range(0, 6));
    c.ctl2  = SHIFT_W'($urandom_range(c.ctl1 + 1, 15));
    c.ctl3  = SHIFT_W'($urandom_range(c.ctl2, 15));
    return c;
  endfunction
endpackage
