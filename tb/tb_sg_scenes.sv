// Self-checking test of sg_logic with the tuned constants of the three
// evaluation scenes, one instance per scene:
//   "Time of Day"  a = 0.993  K = 2.3  Th = 3.9
//   "Bootstrap"    a = 0.99   K = 0.6  Th = 19.6
//   "Waving Trees" a = 0.994  K = 1.8  Th = 11.6
// The constants are rounded to the datapath's formats: a and 1-a to Q0.16
// (1-a rounded, a = 65536 - (1-a) so the weights sum to one), K to Q8.8,
// Th to 8.8. All three instances see the same random stream of
// (pixel, model) pairs, half of them with a model close to the pixel, and
// after 85 cycles each output is compared with an integer reference of
// the same arithmetic that takes the constants as arguments. Background,
// foreground and pixels kept as background only by Th must occur in every
// scene; the fixed latency is checked by the alignment of the queues.
module tb_sg_scenes;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NS = 3;
  localparam logic [15:0] BQ [NS] = '{16'd459, 16'd655, 16'd393};
  localparam logic [15:0] KQ [NS] = '{16'd589, 16'd154, 16'd461};
  localparam logic [15:0] TQ [NS] = '{16'd998, 16'd5018, 16'd2970};

  typedef struct { logic [31:0] ms; logic [31:0] cls; bit th_saved; } exp_t;

  function automatic longint isqrt(longint v);
    longint r = 0;
    while ((r+1)*(r+1) <= v) r++;
    return r;
  endfunction

  function automatic exp_t model(logic [23:0] px, logic [31:0] m,
                                 longint a, longint b, longint k, longint th);
    exp_t e;
    longint gi, mu0, s0, mu, dv, vr, sg, ks;
    gi  = (longint'(px[23:16])*13933 + longint'(px[15:8])*46871 + longint'(px[7:0])*4732) >> 8;
    mu0 = m[31:16]; s0 = m[15:0];
    mu  = (((mu0*a) >> 8) + ((gi*b) >> 8)) >> 8;
    dv  = mu - gi; if (dv < 0) dv = -dv;
    vr  = (((s0*s0)*a) >> 16) + ((dv*dv*b) >> 16);
    if (vr > 64'hFFFF_FFFF) vr = 64'hFFFF_FFFF;
    sg  = isqrt(vr);
    ks  = (sg*k) >> 8; if (ks > 65535) ks = 65535;
    e.ms  = {16'(mu), 16'(sg)};
    e.cls = (dv > th && dv > ks) ? 32'hFFFF_FFFF : 32'h0;
    e.th_saved = (dv > ks) && (dv <= th);
    return e;
  endfunction

  logic [23:0] pixel = '0;
  logic [31:0] ms_in = '0;
  logic [31:0] cls_o [NS], ms_o [NS];

  for (genvar s = 0; s < NS; s++) begin : g_scene
    sg_logic #(.A_Q16(16'(65536 - BQ[s])), .B_Q16(BQ[s]), .K_Q8(KQ[s]), .TH_Q8(TQ[s])) dut (
      .clk(clk), .pixel(pixel), .ms_in(ms_in), .class_out(cls_o[s]), .ms_out(ms_o[s]));
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int N = 6000;
  logic [23:0] px_hist [N];
  logic [31:0] ms_hist [N];
  int n_bg [NS], n_fg [NS], n_th [NS];

  initial begin
    exp_t e;
    logic [7:0] g;
    for (int s = 0; s < NS; s++) begin n_bg[s] = 0; n_fg[s] = 0; n_th[s] = 0; end
    for (int t = 0; t < N + 85; t++) begin
      @(negedge clk);
      if (t < N) begin
        g = 8'($urandom);
        pixel = {g + 8'($urandom_range(0, 6)), g, g - 8'($urandom_range(0, 6))};
        if ($urandom_range(0, 1) == 0)
          ms_in = $urandom;
        else
          ms_in = {g + 8'($urandom_range(0, 40)) - 8'd20, 8'($urandom),
                   8'($urandom_range(0, 12)), 8'($urandom)};
        px_hist[t] = pixel; ms_hist[t] = ms_in;
      end
      if (t >= 85) begin
        for (int s = 0; s < NS; s++) begin
          e = model(px_hist[t-85], ms_hist[t-85], 65536 - longint'(BQ[s]), BQ[s], KQ[s], TQ[s]);
          checks++;
          if (ms_o[s] !== e.ms || cls_o[s] !== e.cls) begin
            failures++;
            if (failures < 10)
              $display("scene %0d t=%0d ms %h exp %h cls %h exp %h", s, t-85, ms_o[s], e.ms, cls_o[s], e.cls);
          end
          if (e.cls != 0) n_fg[s]++; else n_bg[s]++;
          if (e.th_saved) n_th[s]++;
        end
      end
    end
    for (int s = 0; s < NS; s++) begin
      $display("scene %0d: bg=%0d fg=%0d decided by Th=%0d", s, n_bg[s], n_fg[s], n_th[s]);
      checks++;
      if (n_bg[s] == 0 || n_fg[s] == 0 || n_th[s] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
