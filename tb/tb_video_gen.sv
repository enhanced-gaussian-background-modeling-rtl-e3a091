// Self-checking test of video_gen at a small raster (8x4 active, small
// porches): the frame period between fsync pulses, DATA_VALID pixels per
// frame, HSYNC and VSYNC high time per frame, that each valid pixel carries
// the word taken in the previous cycle or black when none was available,
// and that the underflow count equals the pixels sent without a word.
module tb_video_gen;
  localparam int HA = 8, HF = 2, HS = 2, HBK = 3, VA = 4, VF = 1, VS = 1, VBK = 2;
  localparam int HT = HA + HF + HS + HBK, VT = VA + VF + VS + VBK;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic avail, req, fsync, vs, hs, vb, hb, de; logic [31:0] pix, uf; logic [23:0] dq;
  logic [23:0] exp_d; logic exp_v;
  int last_fs = -1, cyc = 0, nde = 0, nhs = 0, nvs = 0, miss = 0, frames = 0;
  video_gen #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HBK), .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VBK))
    dut (.clk, .rst, .avail, .pix, .req, .fsync, .vsync_o(vs), .hsync_o(hs), .vblank_o(vb), .hblank_o(hb),
         .de_o(de), .data_o(dq), .underflows(uf));
  always @(posedge clk) if (!rst) begin
    cyc++;
    // outputs now reflect the previous cycle's request
    if (de) begin
      nde++; checks++;
      if (dq !== exp_d) begin failures++; if (failures < 6) $display("pixel %h exp %h", dq, exp_d); end
      if (de && (vb || hb)) begin failures++; $display("DATA_VALID in blanking"); end
    end
    if (hs) nhs++;
    if (vs) nvs++;
    if (fsync) begin
      if (last_fs >= 0) begin
        frames++; checks += 4;
        if (cyc - last_fs != HT * VT) begin failures++; $display("frame period %0d", cyc - last_fs); end
        if (nde != HA * VA) begin failures++; $display("valid pixels %0d", nde); end
        if (nhs != HS * VT) begin failures++; $display("hsync time %0d", nhs); end
        if (nvs != VS * HT) begin failures++; $display("vsync time %0d", nvs); end
      end
      last_fs = cyc; nde = 0; nhs = 0; nvs = 0;
    end
    exp_d = req ? pix[23:0] : 24'h0;
    if (!req && dut.active) miss++;
  end
  always @(negedge clk) begin avail <= ($urandom_range(0, 4) != 0); pix <= $urandom; end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    avail = 0; pix = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (frames == 5);
    @(posedge clk); #1;
    checks++;
    if (uf != 32'(miss) || miss == 0) begin failures++; $display("underflows %0d exp %0d", uf, miss); end
    $display("frames %0d underflows %0d", frames, uf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
