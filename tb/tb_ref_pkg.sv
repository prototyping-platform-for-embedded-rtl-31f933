// tb_ref_pkg: reference arithmetic for the testbenches.
//
// Everything here is computed in double precision straight from the
// definitions, independently of the fixed-format arithmetic of the design:
//   nssd_ref  - the NSSD of two 11x11 patches, two-pass form
//               (1/n) * sum(((f-fbar)/sigma_f - (t-tbar)/sigma_t)^2)
//   f2r       - value of an IEEE-754 single-precision bit pattern
//   r2f       - single-precision bit pattern of a real (truncated)
package tb_ref_pkg;

  localparam int P = 11;
  localparam int N = P * P;

  typedef int patch_t [N];

  function automatic real f2r(input logic [31:0] b);
    real m;
    int  e;
    if (b[30:23] == 8'd0) return 0.0;
    if (b[30:23] == 8'hFF) return b[31] ? -1.0e300 : 1.0e300;
    m = 1.0 + real'(b[22:0]) / 8388608.0;
    e = int'(b[30:23]) - 127;
    m = m * (2.0 ** e);
    return b[31] ? -m : m;
  endfunction

  // nearest-below single-precision bit pattern of a real (normal range)
  function automatic logic [31:0] r2f(input real x);
    logic s;
    int   e;
    real  m;
    if (x == 0.0) return 32'd0;
    s = (x < 0.0);
    m = s ? -x : x;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    return {s, 8'(e + 127), 23'($rtoi((m - 1.0) * 8388608.0))};
  endfunction

  function automatic bit is_inf(input logic [31:0] b);
    return b[30:23] == 8'hFF;
  endfunction

  // returns -1.0 for a flat patch (undefined NSSD)
  function automatic real nssd_ref(input patch_t f, input patch_t t);
    real fm, tm, vf, vt, sfd, std, acc, d;
    fm = 0.0; tm = 0.0;
    for (int i = 0; i < N; i++) begin fm += f[i]; tm += t[i]; end
    fm /= N; tm /= N;
    vf = 0.0; vt = 0.0;
    for (int i = 0; i < N; i++) begin
      vf += (f[i] - fm) * (f[i] - fm);
      vt += (t[i] - tm) * (t[i] - tm);
    end
    vf /= N; vt /= N;
    if (vf <= 0.0 || vt <= 0.0) return -1.0;
    sfd = $sqrt(vf); std = $sqrt(vt);
    acc = 0.0;
    for (int i = 0; i < N; i++) begin
      d = (f[i] - fm) / sfd - (t[i] - tm) / std;
      acc += d * d;
    end
    return acc / N;
  endfunction

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

endpackage
