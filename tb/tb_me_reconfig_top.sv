// tb_me_reconfig_top: end-to-end test of the self-reconfigurable ME platform
// at its default size (QCIF frames, 14-bit BlockRAM).
//
// The test plays the processor: it writes a reference frame of random pixels
// and a current frame that is the reference displaced by a known motion plus
// a little noise, caches a partial bitstream in the BlockRAM and lets the
// configuration interface stream it into an ICAP model that raises busy now
// and then. Each "reconfiguration" then marks more region slots as holding a
// PE array. Macroblocks are estimated with one, two and four arrays, inside
// the frame and at its edges and corners; each of the 16 results is compared
// with a full-search model computed here, and the number of clocks per
// macroblock with 64*16/P*4 + 4 issue clocks plus the fixed pipeline tail.
// A request for more arrays than are loaded must be rejected. Each mechanism
// (ICAP busy stall, reconfiguration, reconfiguration running while a
// macroblock is estimated, each mode, mode switch, edge clamping, rejected
// request) is counted and must occur at least once.
module tb_me_reconfig_top;
  import me_pkg::*;

  localparam int unsigned W  = FRAME_W;
  localparam int unsigned H  = FRAME_H;
  localparam int unsigned AW = $clog2(W * H);

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
  logic [3:0]         prr_loaded = '0;
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

  icap_model #(.DEPTH(4096), .BUSY_PERIOD(13), .BUSY_LEN(2)) u_icap (
    .clk(clk), .ce(ce_icap), .we(we_icap), .din(din_icap),
    .busy(busy_icap), .out(out_icap)
  );

  function automatic int sx(off_t v);
    return (int'(v) ^ 8) - 8;   // 4-bit two's complement to int
  endfunction

  int checks = 0, failures = 0;
  int n_stall = 0, n_reconf = 0, n_mode1 = 0, n_mode2 = 0, n_mode4 = 0;
  int n_switch = 0, n_edge = 0, n_reject = 0, n_overlap = 0;

  // clocks in which a reconfiguration streams while a macroblock runs
  always @(posedge clk) if (cfg_busy && me_busy) n_overlap++;
  prr_mode_e last_mode = PRR_1;
  bit        have_last = 0;

  pixel_t ref_img [H][W];
  pixel_t cur_img [H][W];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // Full search of one 4x4 block, first minimum in (h, v) order.
  function automatic blk_result_t model_block(int bx, int by);
    blk_result_t r;
    automatic int best = 1 << 30;
    for (int hh = -8; hh <= 7; hh++)
      for (int vv = -8; vv <= 7; vv++) begin
        automatic int s = 0;
        for (int x = 0; x < 4; x++)
          for (int y = 0; y < 4; y++) begin
            automatic int a = cur_img[by + y][bx + x];
            automatic int b = ref_img[clampi(by + vv + y, 0, H - 1)][clampi(bx + hh + x, 0, W - 1)];
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

  task automatic write_frames(int dx, int dy);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) ref_img[y][x] = pixel_t'($urandom_range(255));
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int p = ref_img[clampi(y + dy, 0, H - 1)][clampi(x + dx, 0, W - 1)] + $urandom_range(3);
        cur_img[y][x] = pixel_t'(p > 255 ? 255 : p);
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

  // Cache a bitstream of n words, stream it into the ICAP and compare.
  task automatic reconfigure(int n, int seed, logic [3:0] loaded);
    logic [31:0] bs [];
    int          t0, t1, stalls;
    bs = new[n];
    for (int i = 0; i < n; i++) begin
      bs[i] = {16'(seed), 16'(i)} ^ 32'h0123_4567;
      if (bs[i] == 32'h2000_0000) bs[i] = 32'h1;
      @(negedge clk);
      weA = 1; addrA = 14'(i); dataA_in = bs[i];
    end
    @(negedge clk);
    weA = 0; addrA = 14'(n / 2);
    @(negedge clk);
    check(dataA_out == bs[n / 2], "BlockRAM port A read-back");
    u_icap.clear();
    cfg_length = 15'(n);
    cfg_start  = 1;
    t0 = $time / 10;
    @(negedge clk);
    cfg_start = 0;
    while (!cfg_done) @(negedge clk);
    t1 = $time / 10;
    stalls = int'(u_icap.n_busy);
    check(u_icap.n_words == n, $sformatf("ICAP words %0d of %0d", u_icap.n_words, n));
    for (int i = 0; i < n; i++)
      if (u_icap.got[i] != bs[i]) begin
        check(0, $sformatf("ICAP word %0d", i));
        break;
      end
    check(u_icap.n_noop >= 8, "eight-clock wait with ce high");
    check(u_icap.n_proto == 0, "ICAP we/ce ordering");
    // start is sampled one clock after t0, then N + 10 clocks to done.
    check(t1 - t0 == n + 11 + stalls,
          $sformatf("reconfiguration took %0d clocks, expected %0d", t1 - t0, n + 11 + stalls));
    check(cfg_icap_status == 32'(n), "ICAP output register");
    if (stalls > 0) n_stall++;
    n_reconf++;
    prr_loaded = loaded;
  endtask

  task automatic run_mb(int mx, int my, prr_mode_e mode);
    int t0, t1, nprr, expect_clk;
    nprr = 1 << int'(mode);
    @(negedge clk);
    mb_x = 4'(mx); mb_y = 4'(my); me_mode = mode; me_start = 1;
    @(negedge clk);
    me_start = 0;
    check(me_busy && !me_reject, "macroblock accepted");
    t0 = $time / 10 - 1;
    while (!me_done) begin
      @(negedge clk);
      if ($time / 10 - t0 > 10000) break;
    end
    t1 = $time / 10;
    // issue: (64 * 16/P + 1) slots of 4 clocks; tail: read, PE, comparator,
    // capture and P writes.
    expect_clk = (64 * (16 / nprr) + 1) * 4 + 4 + nprr;
    check(t1 - t0 == expect_clk,
          $sformatf("MB (%0d,%0d) P=%0d took %0d clocks, expected %0d", mx, my, nprr, t1 - t0, expect_clk));
    @(negedge clk);
    for (int b = 0; b < 16; b++) begin
      blk_result_t exp_r;
      exp_r = model_block(mx * 16 + (b % 4) * 4, my * 16 + (b / 4) * 4);
      sad_raddr = 4'(b);
      @(negedge clk);
      check(sad_rdata == exp_r,
            $sformatf("MB (%0d,%0d) P=%0d block %0d: got sad %0d mv (%0d,%0d) expected sad %0d mv (%0d,%0d)",
                      mx, my, nprr, b, sad_rdata.sad, sx(sad_rdata.mv.h), sx(sad_rdata.mv.v),
                      exp_r.sad, sx(exp_r.mv.h), sx(exp_r.mv.v)));
    end
    if (mode == PRR_1) n_mode1++;
    if (mode == PRR_2) n_mode2++;
    if (mode == PRR_4) n_mode4++;
    if (have_last && mode != last_mode) n_switch++;
    have_last = 1;
    last_mode = mode;
    if (mx == 0 || my == 0 || mx == int'(W / 16) - 1 || my == int'(H / 16) - 1) n_edge++;
  endtask

  task automatic try_reject(prr_mode_e mode);
    @(negedge clk);
    me_mode = mode; me_start = 1;
    @(negedge clk);
    me_start = 0;
    check(me_reject && !me_busy, "request for unloaded arrays rejected");
    if (me_reject) n_reject++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    write_frames(3, -2);

    reconfigure(700, 1, 4'b0001);            // one array
    run_mb(5, 4, PRR_1);
    try_reject(PRR_4);
    reconfigure(900, 2, 4'b0011);            // second array
    run_mb(0, 0, PRR_2);
    fork                                     // load arrays 3-4 while 1-2 work
      run_mb(4, 8, PRR_2);
      reconfigure(1200, 3, 4'b1111);
    join
    run_mb(10, 8, PRR_4);
    run_mb(3, 8, PRR_2);
    run_mb(7, 2, PRR_4);

    check(n_stall  > 0, "ICAP busy stall exercised");
    check(n_reconf > 0, "reconfiguration exercised");
    check(n_mode1  > 0 && n_mode2 > 0 && n_mode4 > 0, "all three modes exercised");
    check(n_switch > 0, "mode switch exercised");
    check(n_edge   > 0, "frame-edge clamping exercised");
    check(n_reject > 0, "rejection exercised");
    check(n_overlap > 0, "reconfiguration overlapped with motion estimation");
    $display("mechanisms: stalls=%0d reconfigs=%0d mode1=%0d mode2=%0d mode4=%0d switches=%0d edge_mbs=%0d rejects=%0d overlap_clocks=%0d",
             n_stall, n_reconf, n_mode1, n_mode2, n_mode4, n_switch, n_edge, n_reject, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
