// Self-checking test of preproc_pipeline: a CCIR656 camera stream carrying
// random RGGB Bayer frames goes through the whole chain. With the threshold
// at its maximum (no correction), unity gains and the identity gamma the RGB
// output must be the 2x2 interpolation of the raw frame; a third frame adds
// a brightness offset and doubles the green gain, and a fourth adds a hot
// pixel that must be corrected. Also checked: one fsync per frame, the
// measured resolution, and that the statistics unit reports.
module tb_preproc_pipeline;
  localparam int W = 16, H = 6, HB = 8, VB = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, fs = 0, nsv = 0;
  logic cvs, chs; logic [7:0] cd;
  logic [7:0] thr; logic [8:0] con, gr, gg, gb; logic signed [8:0] bri;
  logic lut_ready, sv, rv, vs, hs, vb, hb, de, fsync;
  logic [23:0] smax, smin, dq; logic [11:0] hr, vr;
  logic [7:0] img [H][W];
  logic [23:0] expq [$]; logic chkq [$];
  preproc_pipeline #(.H_ACTIVE(W)) dut (.clk, .rst, .cam_vsync(cvs), .cam_hsync(chs), .cam_data(cd),
    .spc_thresh(thr), .bc_contrast(con), .bc_brightness(bri), .cc_gain_r(gr), .cc_gain_g(gg), .cc_gain_b(gb),
    .lut_we(1'b0), .lut_sel(2'd0), .lut_addr(8'd0), .lut_wdata(8'd0), .lut_ready,
    .stats_max(smax), .stats_min(smin), .stats_valid(sv), .h_res(hr), .v_res(vr), .res_valid(rv),
    .vsync_o(vs), .hsync_o(hs), .vblank_o(vb), .hblank_o(hb), .de_o(de), .data_o(dq), .fsync);
  function automatic logic [7:0] adj(logic [7:0] p);
    int v; v = int'(p) + int'(bri);
    return (v > 255) ? 8'd255 : (v < 0) ? 8'd0 : 8'(v);
  endfunction
  function automatic logic [23:0] quad(int x, int y);
    logic [7:0] r, b; int g;
    g = 0; r = 0; b = 0;
    for (int dy = 0; dy < 2; dy++)
      for (int dx = 0; dx < 2; dx++) begin
        int xx, yy; logic [7:0] p; xx = x - dx; yy = y - dy; p = adj(img[yy][xx]);
        if (xx % 2 == 0 && yy % 2 == 0) r = p;
        else if (xx % 2 == 1 && yy % 2 == 1) b = p;
        else g += p;
      end
    g = (g / 2) * int'(gg) / 128;
    return {r, (g > 255) ? 8'd255 : 8'(g), b};
  endfunction
  task automatic send(logic [7:0] b, logic v, logic h);
    cd = b; cvs = v; chs = h; @(negedge clk);
  endtask
  task automatic code(logic v, logic h);
    send(8'hFF, 0, 0); send(8'h00, 0, 0); send(8'h00, 0, 0); send({2'b10, v, h, 4'h0}, 0, 0);
  endtask
  always @(posedge clk) begin
    if (fsync && !rst) fs++;
    if (sv) nsv++;
    if (!rst && de) begin
      logic [23:0] e; logic c;
      if (expq.size() == 0) begin failures++; if (failures < 4) $display("extra pixel at %0t", $time); end
      else begin
        e = expq.pop_front(); c = chkq.pop_front();
        if (c) begin
          checks++;
          if (dq !== e) begin failures++; if (failures < 6) $display("%0t got %h exp %h n=%0d", $time, dq, e, expq.size()); end
        end
      end
    end
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cvs = 0; chs = 0; cd = 8'h10; thr = 8'd255; con = 9'd128; bri = 0; gr = 9'd128; gg = 9'd128; gb = 9'd128;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (lut_ready);
    @(negedge clk);
    for (int f = 0; f < 5; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 8'($urandom_range(60, 180));
      repeat (40) send(8'h10, 0, 0);   // let the previous frame drain
      if (f == 2) begin bri = 9'sd10; gg = 9'd256; end
      if (f == 3) begin
        // a smooth frame, so only the planted hot pixel exceeds the threshold
        bri = 0; gg = 9'd128; thr = 8'd20;
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 8'($urandom_range(100, 110));
        img[3][6] = 8'd250;
      end
      if (f == 4) thr = 8'd255;
      // expected output first: the corrected hot pixel takes the median of
      // its same-colour neighbours two columns away
      begin
        logic [7:0] sent_hot, a, c;
        sent_hot = img[3][6];
        if (f == 3) begin
          a = img[3][4]; c = img[3][8];
          img[3][6] = (a > c) ? a : c;
        end
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
          expq.push_back((x > 0 && y > 0) ? quad(x, y) : 24'h0);
          chkq.push_back(x > 0 && y > 0);
        end
        img[3][6] = sent_hot;
      end
      for (int l = 0; l < VB + H; l++) begin
        logic v; v = (l < VB);
        code(v, 1'b1);
        for (int b = 0; b < HB; b++) send(8'h10, (l == 0 && b < 4), b < 2);
        code(v, 1'b0);
        for (int x = 0; x < W; x++) send(v ? 8'h10 : img[l - VB][x], 0, 0);
      end
      code(1'b1, 1'b1);   // EAV closing the last active line
    end
    code(1'b1, 1'b1);
    repeat (40) send(8'h10, 0, 0);
    checks += 3;
    if (fs != 5) begin failures++; $display("fsync %0d", fs); end
    if (!rv || hr != W || vr != H) begin failures++; $display("resolution %0dx%0d", hr, vr); end
    if (nsv < 4) begin failures++; $display("statistics pulses %0d", nsv); end
    if (expq.size() != 0) begin failures++; $display("%0d pixels missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
