// Full-size end-to-end test of mod_top with every parameter at its default
// (1280x720 camera frames, 720p display timing), two camera frames. Same
// checks as the small end-to-end test, on a sample of the frame-store
// pixels and on every classification and model word. A CCIR656 camera
// stream of a static Bayer scene with a moving bright square goes through preprocessing,
// the frame-buffer write, the enhanced single-Gaussian pipeline and the
// display pipeline, with a behavioural six-port memory controller whose read
// FIFOs stall at random (5 % of fills). The model buffer is preloaded with the scene's
// grey level and mixed sigmas.
// Checked: every camera frame lands in the alternate frame store as the
// interpolated RGB of the raw frame; after each frame the classification
// and mean/sigma buffers equal the reference model applied to the frame
// store the pipeline had to read; the display shows whole frames; the
// measured resolution. Mechanisms counted (each must occur): read stalls,
// frame-store switches, foreground and background pixels, pixels the Th
// bound decided, statistics updates, displayed frames.
module tb_mod_top_full;
  import sg_ref_pkg::*;
  localparam int W = 1280, H = 720, N = W * H, HB = 280, VB = 20;
  localparam int PIX0 = 0, PIX1 = 32'h0040_0000 / 4, MSB = 32'h0080_0000 / 4, FBB = 32'h00C0_0000 / 4;
  localparam int FRAMES = 2;
  logic cam_clk = 0, disp_clk = 0, cam_rst = 1, disp_rst = 1;
  always #12.5 cam_clk = ~cam_clk;     // 40 MHz
  always #6.9 disp_clk = ~disp_clk;    // about 72.5 MHz
  int checks = 0, failures = 0;
  int n_stall = 0, n_switch = 0, n_fg = 0, n_bg = 0, n_th = 0, n_stats = 0, n_disp = 0;

  logic cvs, chs; logic [7:0] cd;
  logic lut_ready, sv, rv, ddE, dhs, dvs, drn, vovf, sovf, sbusy;
  logic [23:0] smax, smin; logic [11:0] hr, vr, ddr, ddf; logic [31:0] uf;
  logic        clk_a [6], cmd_write [6], cmd_full [6], wd_write [6], wd_full [6], rd_empty [6], rd_read [6];
  logic [31:0] cmd_data [6], wd_data [6], rd_data [6];
  assign clk_a = '{cam_clk, cam_clk, cam_clk, cam_clk, cam_clk, disp_clk};

  vfbc_mem_model #(.NP(6), .RD_DEPTH(64), .STALL_PCT(5)) mem_m (.rst(cam_rst), .clk(clk_a), .cmd_data, .cmd_write,
    .cmd_full, .wd_data, .wd_write, .wd_full, .rd_data, .rd_empty, .rd_read);

  mod_top dut (
    .cam_clk, .cam_rst, .disp_clk, .disp_rst, .cam_vsync(cvs), .cam_hsync(chs), .cam_data(cd),
    .spc_thresh(8'd255), .bc_contrast(9'd128), .bc_brightness(9'sd0), .cc_gain_r(9'd128), .cc_gain_g(9'd128),
    .cc_gain_b(9'd128), .lut_we(1'b0), .lut_sel(2'd0), .lut_addr(8'd0), .lut_wdata(8'd0), .lut_ready,
    .stats_max(smax), .stats_min(smin), .stats_valid(sv), .h_res(hr), .v_res(vr), .res_valid(rv),
    .vfbc_cmd_data(cmd_data), .vfbc_cmd_write(cmd_write), .vfbc_cmd_full(cmd_full),
    .vfbc_wd_data(wd_data), .vfbc_wd_write(wd_write), .vfbc_wd_full(wd_full),
    .vfbc_rd_data(rd_data), .vfbc_rd_empty(rd_empty), .vfbc_rd_read(rd_read),
    .dvi_de(ddE), .dvi_hsync(dhs), .dvi_vsync(dvs), .dvi_data_rise(ddr), .dvi_data_fall(ddf), .dvi_reset_n(drn),
    .vdma_overflow(vovf), .sg_overflow(sovf), .sg_busy(sbusy), .disp_underflows(uf));

  logic [7:0]  scene [H][W], img [H][W];
  logic [31:0] model [N];
  logic [31:0] last_vdma_addr = '1;
  int disp_px = 0; logic dvs_q = 0;

  function automatic logic [23:0] quad(int x, int y);
    logic [7:0] r, b; int g;
    g = 0; r = 0; b = 0;
    for (int dy = 0; dy < 2; dy++)
      for (int dx = 0; dx < 2; dx++) begin
        int xx, yy; xx = x - dx; yy = y - dy;
        if (xx % 2 == 0 && yy % 2 == 0) r = img[yy][xx];
        else if (xx % 2 == 1 && yy % 2 == 1) b = img[yy][xx];
        else g += img[yy][xx];
      end
    return {r, 8'(g / 2), b};
  endfunction

  task automatic send(logic [7:0] b, logic v, logic h);
    cd = b; cvs = v; chs = h; @(negedge cam_clk);
  endtask
  task automatic code(logic v, logic h);
    send(8'hFF, 0, 0); send(8'h00, 0, 0); send(8'h00, 0, 0); send({2'b10, v, h, 4'h0}, 0, 0);
  endtask

  // mechanism counters
  always @(posedge cam_clk) if (!cam_rst) begin
    if (dut.u_sg.u_rd_pix.state == 2 && !dut.u_sg.take) n_stall++;
    if (sv) n_stats++;
    if (cmd_write[0] && dut.u_vdma_wr.idx == 2'd1) begin
      if (last_vdma_addr != '1 && cmd_data[0] != last_vdma_addr) n_switch++;
      last_vdma_addr = cmd_data[0];
    end
  end
  always @(posedge disp_clk) if (!disp_rst) begin
    dvs_q <= dvs;
    if (ddE) disp_px++;
    if (dvs && !dvs_q) begin
      if (disp_px != 0) begin
        n_disp++; checks++;
        if (disp_px != N) begin failures++; $display("display frame of %0d pixels", disp_px); end
      end
      disp_px = 0;
    end
  end

  initial begin
    #200000000;
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) scene[y][x] = 8'($urandom_range(70, 150));
    img = scene;
    // model buffer: mean = the scene's grey level, sigma 0 or 2.0
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      longint gq;
      gq = (x > 0 && y > 0) ? gray_of(quad(x, y)) : 0;
      model[y * W + x] = {16'(gq), ((x + y) % 2 == 0) ? 16'd0 : 16'd512};
      mem_m.mem[MSB + y * W + x] = model[y * W + x];
      // the store read in the first frame holds the scene as well
      mem_m.mem[PIX1 + y * W + x] = (x > 0 && y > 0) ? {8'h0, quad(x, y)} : 32'h0;
    end
    cvs = 0; chs = 0; cd = 8'h10;
    repeat (4) @(posedge cam_clk);
    @(negedge cam_clk) cam_rst = 0;
    @(negedge disp_clk) disp_rst = 0;
    wait (lut_ready);
    @(negedge cam_clk);
    for (int f = 0; f < FRAMES; f++) begin
      int sx, sy;
      img = scene;
      // a bright 4x2 square moving right, with a little noise elsewhere
      sx = 100 + 40 * f; sy = 300;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        if (x >= sx && x < sx + 64 && y >= sy && y < sy + 48) img[y][x] = 8'd240;
        else if ($urandom_range(0, 7) == 0) img[y][x] = 8'(int'(img[y][x]) + 1);
      end
      for (int l = 0; l < VB + H; l++) begin
        logic v; v = (l < VB);
        code(v, 1'b1);
        for (int b = 0; b < HB; b++) send(8'h10, (l == 0 && b < 4), b < 2);
        code(v, 1'b0);
        for (int x = 0; x < W; x++) send(v ? 8'h10 : img[l - VB][x], 0, 0);
      end
      code(1'b1, 1'b1);
      repeat (2000) send(8'h10, 0, 0);
      // frame f is now in store f % 2; the SG pipeline ran on store (f-1) % 2
      begin
        int st, ps;
        st = (f % 2 == 0) ? PIX0 : PIX1;
        ps = (f % 2 == 0) ? PIX1 : PIX0;
        for (int y = 1; y < H; y += 7) for (int x = 1; x < W; x += 3) begin
          checks++;
          if (mem_m.peek(st + y * W + x) !== {8'h0, quad(x, y)}) begin
            failures++; if (failures < 6) $display("f%0d store px(%0d,%0d) %h exp %h", f, x, y, mem_m.peek(st + y * W + x), quad(x, y));
          end
        end
        checks++;
        if (sbusy) begin failures++; $display("f%0d SG pipeline still busy", f); end
        for (int i = 0; i < N; i++) begin
          sg_res_t r;
          r = sg_step(mem_m.peek(ps + i), model[i]);
          model[i] = r.ms;
          if (r.cls == 32'hFFFF_FFFF) n_fg++; else n_bg++;
          if (r.th_saved) n_th++;
          checks += 2;
          if (mem_m.peek(FBB + i) !== r.cls) begin
            failures++; if (failures < 6) $display("f%0d px%0d class %h exp %h", f, i, mem_m.peek(FBB + i), r.cls);
          end
          if (mem_m.peek(MSB + i) !== r.ms) begin
            failures++; if (failures < 6) $display("f%0d px%0d model %h exp %h", f, i, mem_m.peek(MSB + i), r.ms);
          end
        end
      end
    end
    checks += 3;
    if (!rv || hr != W || vr != H) begin failures++; $display("resolution %0dx%0d", hr, vr); end
    if (vovf || sovf) begin failures++; $display("overflow vdma %b sg %b", vovf, sovf); end
    if (!drn) begin failures++; $display("transmitter held in reset"); end
    $display("stalls %0d switches %0d fg %0d bg %0d th %0d stats %0d disp %0d underflows %0d",
             n_stall, n_switch, n_fg, n_bg, n_th, n_stats, n_disp, uf);
    if (n_stall == 0)  begin failures++; $display("no read stall"); end
    if (n_switch == 0) begin failures++; $display("no frame-store switch"); end
    if (n_fg == 0)     begin failures++; $display("no foreground pixel"); end
    if (n_bg == 0)     begin failures++; $display("no background pixel"); end
    if (n_th == 0)     begin failures++; $display("no pixel decided by Th"); end
    if (n_stats == 0)  begin failures++; $display("no statistics update"); end
    if (n_disp == 0)   begin failures++; $display("no displayed frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
