// fuzzy_ref_pkg - reference model of the fuzzy controller for the testbenches.
//
// Written from the specification in plain integer arithmetic, with its own
// copy of the breakpoints, slopes, rule table and output weights, so that the
// RTL is compared against numbers it does not share:
//   sets (a1,a2,a3): NB(-,2A,55) NS(2A,55,7F) ZE(55,7F,AA) PS(7F,AA,DA) PB(AA,DA,-)
//   edge slopes: 2A..55 -> 6, 55..7F -> 5, 7F..AA -> 6, AA..DA -> 5
//   result = |170*(NB-PB) + 85*(NS-PS)| / (NB+NS+ZE+PS+PB), sign 1 if PS/PB win
package fuzzy_ref_pkg;

  function automatic int sat255(input int v);
    return (v > 255) ? 255 : v;
  endfunction

  // flag "input lies in set k"
  function automatic bit ref_fn(input int k, input int x);
    case (k)
      0: return x < 85;
      1: return x > 42  && x < 127;
      2: return x > 85  && x < 170;
      3: return x > 127 && x < 218;
      default: return x > 170;
    endcase
  endfunction

  // membership degree of x in set k, 0..255
  function automatic int ref_mu(input int k, input int x);
    case (k)
      0: if (x <= 42) return 255;
         else if (x < 85) return sat255((85 - x) * 6);
      1: if (x > 42 && x <= 85) return sat255((x - 42) * 6);
         else if (x > 85 && x < 127) return sat255((127 - x) * 5);
      2: if (x > 85 && x <= 127) return sat255((x - 85) * 5);
         else if (x > 127 && x < 170) return sat255((170 - x) * 6);
      3: if (x > 127 && x <= 170) return sat255((x - 127) * 6);
         else if (x > 170 && x < 218) return sat255((218 - x) * 5);
      default: if (x > 218) return 255;
         else if (x > 170) return sat255((x - 170) * 5);
    endcase
    return 0;
  endfunction

  // rule table, rows = input-1 set, columns = input-2 set, entries = output set
  function automatic int ref_rule(input int a, input int b);
    int t [5][5] = '{'{0,0,0,1,2}, '{0,1,1,2,3}, '{0,1,2,3,4}, '{1,2,3,3,4}, '{2,3,4,4,4}};
    return t[a][b];
  endfunction

  function automatic int imin(input int a, input int b); return (a < b) ? a : b; endfunction
  function automatic int imax(input int a, input int b); return (a > b) ? a : b; endfunction

  // output-set degrees from the two inputs' flags and degrees
  function automatic void ref_infer(input bit f1[5], input int d1[5],
                                    input bit f2[5], input int d2[5], output int o[5]);
    for (int k = 0; k < 5; k++) o[k] = 0;
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 5; b++)
        if (f1[a] && f2[b]) o[ref_rule(a, b)] = imax(o[ref_rule(a, b)], imin(d1[a], d2[b]));
  endfunction

  function automatic void ref_defuzz(input int o[5], output bit sign, output int mag);
    int neg, pos, sum;
    neg = o[0] * 170 + o[1] * 85;
    pos = o[3] * 85 + o[4] * 170;
    sum = o[0] + o[1] + o[2] + o[3] + o[4];
    sign = pos > neg;
    mag = (sum == 0) ? 0 : ((pos > neg) ? pos - neg : neg - pos) / sum;
  endfunction

  function automatic void ref_controller(input int x1, input int x2,
                                         output bit sign, output int mag, output int o[5]);
    bit f1[5], f2[5];
    int d1[5], d2[5];
    for (int k = 0; k < 5; k++) begin
      f1[k] = ref_fn(k, x1); d1[k] = f1[k] ? ref_mu(k, x1) : 0;
      f2[k] = ref_fn(k, x2); d2[k] = f2[k] ? ref_mu(k, x2) : 0;
    end
    ref_infer(f1, d1, f2, d2, o);
    ref_defuzz(o, sign, mag);
  endfunction

endpackage
