// Reference model of the enhanced single-Gaussian update and
// classification, in plain integer arithmetic, for the testbenches.
//   I     = (13933 R + 46871 G + 4732 B) / 2^8           (8 fraction bits)
//   mu    = (a*mu0 + (1-a)*I), a = 65472/2^16, 8 fraction bits, truncated
//   var   = a*sigma0^2 + (1-a)*(mu - I)^2, 16 fraction bits, saturating
//   sigma = floor(sqrt(var))                             (8 fraction bits)
//   fg    = |I - mu| > max(Th, K*sigma), K = 589/2^8, Th = 768/2^8
package sg_ref_pkg;
  localparam longint A = 65472, B = 64, K = 589, TH = 768;

  typedef struct { logic [31:0] ms; logic [31:0] cls; bit th_saved; } sg_res_t;

  function automatic longint isqrt(longint v);
    longint r = 0, bit_ = longint'(1) << 32;
    longint x = v;
    while (bit_ > x) bit_ >>= 2;
    while (bit_ != 0) begin
      if (x >= r + bit_) begin x -= r + bit_; r = (r >> 1) + bit_; end
      else r >>= 1;
      bit_ >>= 2;
    end
    return r;
  endfunction

  function automatic longint gray_of(logic [23:0] px);
    return (longint'(px[23:16])*13933 + longint'(px[15:8])*46871 + longint'(px[7:0])*4732) >> 8;
  endfunction

  function automatic sg_res_t sg_step(logic [23:0] px, logic [31:0] m);
    sg_res_t e;
    longint gi, mu0, s0, mu, dv, vr, sg, ks;
    gi  = gray_of(px);
    mu0 = m[31:16]; s0 = m[15:0];
    mu  = (((mu0*A) >> 8) + ((gi*B) >> 8)) >> 8;
    dv  = mu - gi; if (dv < 0) dv = -dv;
    vr  = (((s0*s0)*A) >> 16) + ((dv*dv*B) >> 16);
    if (vr > 64'hFFFF_FFFF) vr = 64'hFFFF_FFFF;
    sg  = isqrt(vr);
    ks  = (sg*K) >> 8; if (ks > 65535) ks = 65535;
    e.ms  = {16'(mu), 16'(sg)};
    e.cls = (dv > TH && dv > ks) ? 32'hFFFF_FFFF : 32'h0;
    e.th_saved = (dv > ks) && (dv <= TH);
    return e;
  endfunction
endpackage
