// tb_qcif_frame: workload test at the published operating point. A whole
// QCIF frame pair (99 macroblocks of 16x16, search range [-8,+7]) is
// estimated three times, with one, two and four PE arrays, and all
// 99 x 16 block results of each pass are compared with a full search done
// here. The frame time in clocks is reported for each mode. Before that,
// the largest bitstream the BlockRAM can cache (2^14 words) is streamed
// into an ICAP model that is never busy, and the transfer rate at a
// 100 MHz configuration clock must reach at least 367 MB/s.
module tb_qcif_frame;
  import me_pkg::*;

  localparam int unsigned W  = FRAME_W;
  localparam int unsigned H  = FRAME_H;
  localparam int unsigned AW = $clog2(W * H);
  localparam int          NW = 1 << 14;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               cur_we = 0, ref_we = 0;
  logic [AW-1:0]      cur_waddr = '0, ref_waddr = '0;
  pixel_t             cur_wdata = '0, ref_wdata = '0;
  logic [3:0]         sad_raddr = '0;
  blk_result_t        sad_rdata;
  logic               me_start = 0;
  logic [3:0]         mb_x = '0, mb_y = '0;
  prr_mode_e          me_mode = PRR_1;
  logic [3:0]         prr_loaded = 4'b1111;
  logic               me_busy, me_done, me_reject;
  logic [13:0]        addrA = '0;
  logic [31:0]        dataA_in = '0, dataA_out;
  logic               weA = 0;
  logic               cfg_start = 0;
  logic [14:0]        cfg_length = '0;
  logic               cfg_busy, cfg_done;
  logic [31:0]        cfg_icap_status;
  logic               ce_icap, we_icap, busy_icap;
  logic [31:0]        din_icap, out_icap;

  me_reconfig_top dut (.*);

  icap_model #(.DEPTH(NW), .BUSY_PERIOD(0)) u_icap (
    .clk(clk), .ce(ce_icap), .we(we_icap), .din(din_icap),
    .busy(busy_icap), .out(out_icap)
  );

  int checks = 0, failures = 0;
  pixel_t ref_img [H][W];
  pixel_t cur_img [H][W];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic blk_result_t model_block(int bx, int by);
    blk_result_t r;
    int best;
    best = 1 << 30;
    r = '0;
    for (int hh = -8; hh <= 7; hh++)
      for (int vv = -8; vv <= 7; vv++) begin
        int s;
        s = 0;
        for (int x = 0; x < 4; x++)
          for (int y = 0; y < 4; y++) begin
            int a, b;
            a = cur_img[by + y][bx + x];
            b = ref_img[clampi(by + vv + y, 0, H - 1)][clampi(bx + hh + x, 0, W - 1)];
            s += (a > b) ? a - b : b - a;
          end
        if (s < best) begin
          best = s;
          r.sad = sad_t'(s);
          r.mv.h = off_t'(hh);
          r.mv.v = off_t'(vv);
        end
      end
    return r;
  endfunction

  // Smooth moving content: a gradient with texture, displaced by a
  // position-dependent motion, plus noise.
  task automatic write_frames();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        ref_img[y][x] = pixel_t'((x * 3 + y * 5 + ((x * y) % 23) * 4 + $urandom_range(15)) & 255);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int dx, dy;
        dx = (x / 16) % 9 - 4;
        dy = (y / 16) % 7 - 3;
        cur_img[y][x] = pixel_t'(ref_img[clampi(y + dy, 0, H - 1)][clampi(x + dx, 0, W - 1)] ^ pixel_t'($urandom_range(1)));
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        cur_we = 1; cur_waddr = AW'(y * W + x); cur_wdata = cur_img[y][x];
        ref_we = 1; ref_waddr = AW'(y * W + x); ref_wdata = ref_img[y][x];
      end
    @(negedge clk);
    cur_we = 0; ref_we = 0;
  endtask

  task automatic max_bitstream();
    int t0, t1;
    real rate;
    for (int i = 0; i < NW; i++) begin
      @(negedge clk);
      weA = 1; addrA = 14'(i); dataA_in = 32'(i) * 32'h0001_0003 + 32'h11;
    end
    @(negedge clk);
    weA = 0;
    cfg_length = 15'(NW); cfg_start = 1;
    t0 = $time / 10;
    @(negedge clk);
    cfg_start = 0;
    while (!cfg_done) @(negedge clk);
    t1 = $time / 10;
    check(u_icap.n_words == NW, "all bitstream words delivered");
    for (int i = 0; i < NW; i++)
      if (u_icap.got[i] != 32'(i) * 32'h0001_0003 + 32'h11) begin
        check(0, $sformatf("bitstream word %0d", i));
        break;
      end
    rate = 4.0 * NW / real'(t1 - t0) * 100.0;   // MB/s at 100 MHz
    $display("bitstream %0d bytes in %0d clocks: %0.1f MB/s at 100 MHz", 4 * NW, t1 - t0, rate);
    check(rate >= 367.0, "reconfiguration rate at least 367 MB/s");
  endtask

  task automatic frame(prr_mode_e mode);
    int t0, t1, nprr;
    nprr = 1 << int'(mode);
    t0 = $time / 10;
    for (int my = 0; my < int'(H / 16); my++)
      for (int mx = 0; mx < int'(W / 16); mx++) begin
        @(negedge clk);
        mb_x = 4'(mx); mb_y = 4'(my); me_mode = mode; me_start = 1;
        @(negedge clk);
        me_start = 0;
        while (!me_done) @(negedge clk);
        for (int b = 0; b < 16; b++) begin
          blk_result_t e;
          e = model_block(mx * 16 + (b % 4) * 4, my * 16 + (b / 4) * 4);
          sad_raddr = 4'(b);
          @(negedge clk);
          check(sad_rdata == e, $sformatf("P=%0d MB (%0d,%0d) block %0d", nprr, mx, my, b));
        end
      end
    t1 = $time / 10;
    $display("QCIF frame with %0d array(s): %0d clocks including result read-out", nprr, t1 - t0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    max_bitstream();
    write_frames();
    frame(PRR_1);
    frame(PRR_2);
    frame(PRR_4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
