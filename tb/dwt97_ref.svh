// dwt97_ref.svh: real-valued reference of the 9/7 lifting transform for the
// testbenches, written from the classic lifting equations (alpha, beta, gamma,
// delta, then scaling by K and 1/K), not from the rearranged form the RTL
// uses. Line ends: d[-1] = d[0] and s[n] = s[n-1] (whole-sample symmetric
// extension). x holds 2n samples; lo and hi receive n coefficients each.
`ifndef DWT97_REF_SVH
`define DWT97_REF_SVH

localparam real REF_ALPHA = -1.586134342;
localparam real REF_BETA  = -0.05298011854;
localparam real REF_GAMMA =  0.8829110762;
localparam real REF_DELTA =  0.4435068522;
localparam real REF_K     =  1.230174105;

function automatic void dwt97_line(input real x[], output real lo[], output real hi[]);
  int  n = x.size() / 2;
  real s[], d[];
  s = new[n]; d = new[n];
  for (int i = 0; i < n; i++) begin
    s[i] = x[2*i];
    d[i] = x[2*i+1];
  end
  for (int i = 0; i < n; i++) d[i] += REF_ALPHA * (s[i] + s[(i == n-1) ? i : i+1]);
  for (int i = 0; i < n; i++) s[i] += REF_BETA  * (d[(i == 0) ? 0 : i-1] + d[i]);
  for (int i = 0; i < n; i++) d[i] += REF_GAMMA * (s[i] + s[(i == n-1) ? i : i+1]);
  for (int i = 0; i < n; i++) s[i] += REF_DELTA * (d[(i == 0) ? 0 : i-1] + d[i]);
  lo = new[n]; hi = new[n];
  for (int i = 0; i < n; i++) begin
    lo[i] = REF_K * s[i];
    hi[i] = d[i] / REF_K;
  end
endfunction

`endif
