// tb_alg1_pkg: reference model of the adaptive cell thresholding update,
// written directly from the algorithm (threshold pass, then target pass),
// for the testbenches. Step = Disp * (0.5/OTF) * TH is evaluated with the
// same fixed-point constant round(2**32 * 0.5/OTF) as the hardware so the
// comparison is exact; everything else uses plain integers.
package tb_alg1_pkg;
  typedef longint cellarr_t [64];

  function automatic void alg1(input cellarr_t nf, input cellarr_t th_in, input cellarr_t tf_in,
                               input int otf, output cellarr_t th_out, output cellarr_t tf_out,
                               output longint slack, output longint curr_ef, output int nlow);
    longint c, disp, stp, cand, slack_cell;
    bit low [64];
    c = longint'((2.0 ** 32) * 0.5 / real'(otf) + 0.5);
    slack = 0; curr_ef = 0; nlow = 0;
    for (int k = 0; k < 64; k++) curr_ef += nf[k];
    for (int k = 0; k < 64; k++) begin
      disp = nf[k] - tf_in[k];
      stp = (disp * th_in[k] * c) >>> 32;
      cand = th_in[k] + stp;
      th_out[k] = th_in[k];
      low[k] = 1'b0;
      if (disp < -15) begin
        if (cand < 15) begin low[k] = 1'b1; slack += (disp < 0) ? -disp : disp; nlow++; end
        else th_out[k] = cand;
      end else if (disp > 15) begin
        th_out[k] = (cand > 64'h7FFF_FFFF) ? 64'h7FFF_FFFF : cand;
      end
    end
    for (int k = 0; k < 64; k++) tf_out[k] = tf_in[k];
    if (slack > 0) begin
      slack_cell = (slack < 64) ? 1 : slack / 64;
      for (int k = 0; k < 64; k++)
        if (curr_ef <= otf) tf_out[k] = low[k] ? nf[k] : tf_in[k] + slack_cell;
        else                tf_out[k] = (tf_in[k] == 0) ? 0 : tf_in[k] - 1;
    end
  endfunction
endpackage
