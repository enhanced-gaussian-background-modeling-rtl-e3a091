// Self-checking test of ccir656_decoder: builds CCIR656 frames (EAV and SAV
// timing codes, horizontal blanking bytes, vertical blanking lines with
// V = 1, active lines with V = 0) and checks that exactly the active bytes
// come out with DATA_VALID high, in order, that VBLANK and HBLANK follow the
// codes, and that VSYNC and HSYNC pass with the same 5-stage delay.
module tb_ccir656_decoder;
  localparam int W = 24, HB = 8, VB = 2, VA = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cvs, chs; logic [7:0] cd;
  logic vs, hs, vb, hb, de; logic [7:0] dq;
  logic [7:0] bytes [$]; logic sv [$]; logic sh [$]; logic [7:0] act [$];
  logic act_line [$];
  ccir656_decoder dut (.clk, .rst, .cam_vsync(cvs), .cam_hsync(chs), .cam_data(cd),
    .vsync_o(vs), .hsync_o(hs), .vblank_o(vb), .hblank_o(hb), .de_o(de), .data_o(dq));
  task automatic put(logic [7:0] b, logic v, logic h);
    bytes.push_back(b); sv.push_back(v); sh.push_back(h);
  endtask
  task automatic code(logic v, logic h, logic frame_vs);
    put(8'hFF, frame_vs, 1'b0); put(8'h00, frame_vs, 1'b0); put(8'h00, frame_vs, 1'b0);
    put({1'b1, 1'b0, v, h, 4'h0}, frame_vs, 1'b0);
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int nact, vb_seen_active;
    for (int f = 0; f < 2; f++) begin
      for (int l = 0; l < VB + VA; l++) begin
        logic v; v = (l < VB);
        code(v, 1'b1, l == 0);
        for (int b = 0; b < HB; b++) put(8'($urandom_range(1, 254)), l == 0, b < 3);
        code(v, 1'b0, 1'b0);
        for (int x = 0; x < W; x++) begin
          logic [7:0] p; p = 8'($urandom_range(1, 254));
          put(p, 1'b0, 1'b0);
          if (!v) act.push_back(p);
        end
      end
    end
    // closing EAV and blanking so the last active line ends
    code(1'b1, 1'b1, 1'b0);
    for (int b = 0; b < HB; b++) put(8'h10, 1'b0, 1'b0);
    cvs = 0; chs = 0; cd = 0; nact = 0; vb_seen_active = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < bytes.size() + 5; t++) begin
      if (t < bytes.size()) begin cd = bytes[t]; cvs = sv[t]; chs = sh[t]; end
      @(posedge clk); #1;
      if (t >= 4 && t - 4 < bytes.size()) begin
        checks++;
        if (vs !== sv[t-4] || hs !== sh[t-4]) begin failures++; if (failures < 6) $display("sync t=%0d", t); end
      end
      if (de) begin
        checks++;
        if (vb || hb) begin failures++; $display("DATA_VALID during blanking"); end
        if (act.size() == 0) begin failures++; $display("extra active byte %h", dq); end
        else begin
          logic [7:0] e; e = act.pop_front(); nact++;
          if (dq !== e) begin failures++; if (failures < 6) $display("byte %0d got %h exp %h", nact, dq, e); end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (act.size() != 0) begin failures++; $display("%0d active bytes missing", act.size()); end
    $display("active bytes %0d", nact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
