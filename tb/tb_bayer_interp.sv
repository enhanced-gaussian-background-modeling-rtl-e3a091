// Self-checking test of bayer_interp: random RGGB mosaics of W x H pixels,
// two frames, lines separated by blanking and frames by VSYNC. For every
// pixel that has a left and an upper neighbour in the frame, the RGB output
// must be red and blue of its 2x2 quad and the floor average of the quad's
// two greens. Also checks the 2-stage latency of DATA_VALID.
module tb_bayer_interp;
  localparam int W = 16, H = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic vs, de; logic [7:0] di; logic [23:0] dq;
  logic vso, hso, vbo, hbo, deo;
  logic [7:0] img [H][W];
  logic [23:0] expq [$];
  logic        chkq [$];
  logic        de_hist [$];
  bayer_interp #(.H_ACTIVE(W)) dut (.clk, .rst, .vsync_i(vs), .hsync_i(1'b0), .vblank_i(1'b0), .hblank_i(!de),
    .de_i(de), .data_i(di), .vsync_o(vso), .hsync_o(hso), .vblank_o(vbo), .hblank_o(hbo), .de_o(deo), .data_o(dq));
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
  always @(posedge clk) begin
    de_hist.push_back(de);
    if (de_hist.size() > 2) begin
      logic d; d = de_hist.pop_front();
      if (!rst && deo !== d) begin failures++; $display("DATA_VALID latency wrong"); end
    end
    if (!rst && deo) begin
      logic [23:0] e; logic c;
      e = expq.pop_front(); c = chkq.pop_front();
      if (c) begin
        checks++;
        if (dq !== e) begin failures++; if (failures < 6) $display("got %h exp %h", dq, e); end
      end
    end
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    vs = 0; de = 0; di = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 8'($urandom);
      vs = 1; repeat (3) @(negedge clk); vs = 0; repeat (3) @(negedge clk);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          de = 1; di = img[y][x];
          expq.push_back((x > 0 && y > 0) ? quad(x, y) : 24'h0);
          chkq.push_back(x > 0 && y > 0);
          @(negedge clk);
        end
        de = 0; repeat (4) @(negedge clk);
      end
    end
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
