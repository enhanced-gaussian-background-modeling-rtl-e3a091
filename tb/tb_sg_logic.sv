// Self-checking test of sg_logic, the enhanced single-Gaussian datapath.
//
// A new (pixel, model) pair enters every cycle; 85 cycles later the new
// {mean, sigma} word and the classification word must match a reference
// model of the algorithm written here in integer arithmetic:
//   mu    = floor((a*mu0 + (1-a)*I) in UFix16_8)
//   var   = a*sigma0^2 + (1-a)*(mu - I)^2          (UFix32_16, saturating)
//   sigma = floor(sqrt(var))
//   fg    = |I - mu| > max(Th, K*sigma)
// Stimulus mixes random models with models close to the pixel so that
// background, foreground by the Th band only, and foreground by the
// K*sigma band all occur; each case is counted and must occur.
module tb_sg_logic;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_bg = 0, n_fg = 0, n_th_saved = 0;

  localparam longint A = 65472, B = 64, K = 589, TH = 768;
  logic [23:0] pixel;
  logic [31:0] ms_in, class_out, ms_out;
  sg_logic dut (.clk(clk), .pixel(pixel), .ms_in(ms_in), .class_out(class_out), .ms_out(ms_out));

  typedef struct { logic [31:0] ms; logic [31:0] cls; bit th_saved; } exp_t;
  exp_t q [$];

  function automatic longint isqrt(longint v);
    longint r = 0;
    while ((r+1)*(r+1) <= v) r++;
    return r;
  endfunction

  function automatic exp_t model(logic [23:0] px, logic [31:0] m);
    exp_t e;
    longint gi, mu0, s0, mu, dv, var0, vr, sg, df, ks;
    gi  = (longint'(px[23:16])*13933 + longint'(px[15:8])*46871 + longint'(px[7:0])*4732) >> 8;
    mu0 = m[31:16]; s0 = m[15:0];
    mu  = (((mu0*A) >> 8) + ((gi*B) >> 8)) >> 8;
    dv  = mu - gi; if (dv < 0) dv = -dv;
    var0 = ((s0*s0)*A) >> 16;
    vr  = var0 + ((dv*dv*B) >> 16);
    if (vr > 64'hFFFF_FFFF) vr = 64'hFFFF_FFFF;
    sg  = isqrt(vr);
    df  = gi - mu; if (df < 0) df = -df;
    ks  = (sg*K) >> 8; if (ks > 65535) ks = 65535;
    e.ms  = {16'(mu), 16'(sg)};
    e.cls = (df > TH && df > ks) ? 32'hFFFF_FFFF : 32'h0;
    e.th_saved = (df > ks) && (df <= TH);
    return e;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    exp_t e;
    int lat, t_mark;
    logic [15:0] gm, r1, r2;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t >= 85) begin
        e = q.pop_front();
        checks++;
        if (ms_out !== e.ms || class_out !== e.cls) begin
          failures++;
          if (failures < 10) $display("t=%0d ms %h/%h cls %h/%h", t, ms_out, e.ms, class_out, e.cls);
        end
        if (e.cls != 0) n_fg++; else n_bg++;
        if (e.th_saved) n_th_saved++;
      end
      pixel = 24'($urandom);
      case (t % 4)
        0: ms_in = $urandom;
        1: begin  // model mean near this pixel, small sigma: Th decides
             gm = 16'((longint'(pixel[23:16])*13933 + longint'(pixel[15:8])*46871 + longint'(pixel[7:0])*4732) >> 8);
             r1 = 16'($urandom_range(0, 1200));
             r2 = 16'($urandom_range(0, 300));
             ms_in = {gm + r1 - 16'd600, r2};
           end
        2: ms_in = {16'($urandom), 16'($urandom_range(0, 16'h3000))};
        default: ms_in = {16'($urandom), 16'($urandom_range(0, 16'h0400))};
      endcase
      q.push_back(model(pixel, ms_in));
    end
    // latency: a lone change of the model input must show after exactly 85 cycles
    @(negedge clk); pixel = 0; ms_in = 32'h0;
    repeat (100) @(negedge clk);
    ms_in = 32'h4000_0000; t_mark = 0; lat = -1;
    for (int i = 1; i <= 100; i++) begin
      @(negedge clk); ms_in = 32'h0;
      if (lat < 0 && ms_out[31:16] != 0) lat = i;
    end
    checks++; if (lat != 85) begin failures++; $display("latency %0d", lat); end
    checks++; if (n_bg == 0 || n_fg == 0 || n_th_saved == 0) begin
      failures++; $display("coverage bg=%0d fg=%0d th=%0d", n_bg, n_fg, n_th_saved); end
    $display("bg=%0d fg=%0d decided by Th=%0d", n_bg, n_fg, n_th_saved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
