// tb_math_pkg: reference arithmetic for the testbenches (double precision).
// erfc uses the Abramowitz-Stegun 7.1.26 approximation (|error| < 1.5e-7),
// accurate enough to decide a P-value against alpha = 0.05.
package tb_math_pkg;
  function automatic real erfc_r(input real x);
    real t, y, ax;
    ax = (x < 0) ? -x : x;
    t  = 1.0 / (1.0 + 0.3275911 * ax);
    y  = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 +
         t * (-1.453152027 + t * 1.061405429)))) * $exp(-ax * ax);
    return (x < 0) ? 2.0 - y : y;
  endfunction

  function automatic real ncdf(input real x);
    return 0.5 * erfc_r(-x / $sqrt(2.0));
  endfunction

  // NIST cumulative-sums P-value for maximum excursion z over n steps
  function automatic real cusum_p(input real z, input real n);
    real s1, s2;
    int kmin, kmax;
    s1 = 0.0; s2 = 0.0;
    kmin = int'($floor((-n / z + 1.0) / 4.0));
    kmax = int'($floor((n / z - 1.0) / 4.0));
    for (int k = kmin; k <= kmax; k++)
      s1 += ncdf((4.0 * k + 1.0) * z / $sqrt(n)) - ncdf((4.0 * k - 1.0) * z / $sqrt(n));
    kmin = int'($floor((-n / z - 3.0) / 4.0));
    for (int k = kmin; k <= kmax; k++)
      s2 += ncdf((4.0 * k + 3.0) * z / $sqrt(n)) - ncdf((4.0 * k + 1.0) * z / $sqrt(n));
    return 1.0 - s1 + s2;
  endfunction
endpackage
