// Self-checking testbench for axis_vid_out on a small raster.
//
// Raster: 8 active pixels (+2 front porch, 2 sync, 2 back porch), 4 active
// lines (+1, 1, 1). The stream first offers 5 beats from the middle of a
// frame, which must be discarded, then three frames whose pixels encode frame,
// row and column, offered whenever the bridge is ready. Every active output
// pixel must show the right value, with data enable and syncs in the right
// raster places (hsync at counts 10-11 of each 14-pixel line, vsync on line
// 5). The bridge must lock. Then the stream stops and the underflow flag must
// rise.
module tb_axis_vid_out;
  import vp_pkg::*;

  localparam int HA = 8, HF = 2, HS = 2, HB = 2, VA = 4, VF = 1, VS = 1, VB = 1;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  localparam int FR = 3;
  localparam int PRE = 5;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   s_valid = 1'b0;
  vbeat_t s_beat = '0;
  logic   s_ready;
  logic   vid_de, vid_hsync, vid_vsync;
  rgb_t   vid_rgb;
  logic   locked, underflow;
  int     checks = 0;
  int     failures = 0;
  int     npix = 0;
  int     ph = 0;      // raster position of the output, counted from the first pixel
  bit     started = 1'b0;

  always #5 clk = ~clk;

  axis_vid_out #(
    .H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)
  ) dut (.*);

  function automatic rgb_t pix(int f, int y, int x);
    return '{r: 8'(f + 1), g: 8'(y), b: 8'(x)};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Offers one beat (called at a falling edge) and returns at the falling edge
  // after it was taken, leaving valid high for the next call.
  task automatic send(input vbeat_t b);
    s_valid = 1'b1; s_beat = b;
    @(posedge clk);
    while (!s_ready) @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < PRE; i++) send('{data: 24'hDEAD00 + 24'(i), user: 1'b0, last: 1'b0});
    fork
      for (int f = 0; f < FR; f++)
        for (int y = 0; y < VA; y++)
          for (int x = 0; x < HA; x++)
            send('{data: pix(f, y, x), user: (x == 0 && y == 0), last: (x == HA - 1)});
    join
    s_valid = 1'b0;
    repeat (HT * VT) @(negedge clk);
    checks++;
    if (npix != FR * HA * VA) begin
      failures++;
      $display("shown %0d pixels", npix);
    end
    checks++;
    if (!underflow) begin
      failures++;
      $display("no underflow after the stream stopped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker: the raster starts with the first pixel shown.
  always @(posedge clk) begin
    if (rst_n) begin
      if (!started && vid_de) started = 1'b1;
      if (started && ph < FR * HT * VT) begin
        int f, l, h;
        bit de_e, hs_e, vs_e;
        f = ph / (HT * VT);
        l = (ph / HT) % VT;
        h = ph % HT;
        de_e = (l < VA && h < HA);
        hs_e = (h >= HA + HF && h < HA + HF + HS);
        vs_e = (l >= VA + VF && l < VA + VF + VS);
        checks++;
        if (vid_de !== de_e || vid_hsync !== hs_e || vid_vsync !== vs_e ||
            (de_e && vid_rgb !== pix(f, l, h))) begin
          failures++;
          if (failures < 10) $display("raster %0d,%0d,%0d: de %b hs %b vs %b rgb %h", f, l, h,
                                      vid_de, vid_hsync, vid_vsync, vid_rgb);
        end
        if (de_e) npix++;
        if (!locked) begin
          failures++;
          $display("not locked at %0d", ph);
        end
        ph++;
      end
    end
  end

endmodule
