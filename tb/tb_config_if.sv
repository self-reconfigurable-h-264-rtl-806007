// tb_config_if: the configuration interface streaming bitstreams from a
// one-clock-latency RAM model into the ICAP model, once with the port never
// busy and twice with busy pulses of different rates. Checks: every word
// arrives once and in order; we rises at least one clock before ce and
// falls at least one clock after it; ce stays high for eight NOOP clocks
// after the last word; the transfer takes N + 10 clocks plus one per busy
// clock (one word per clock, i.e. 400 MB/s at 100 MHz); start is ignored
// while busy and with length 0.
module tb_config_if;

  localparam int AW = 14;

  logic          clk = 0, rst_n = 0, start = 0;
  logic [AW:0]   length = '0;
  logic          busy, done;
  logic [31:0]   icap_status;
  logic [AW-1:0] addrB;
  logic [31:0]   dataB;
  logic          ce_icap, we_icap, busy_icap;
  logic [31:0]   din_icap, out_icap;
  always #5 clk = ~clk;

  logic [31:0] ram [2 ** AW];
  always_ff @(posedge clk) dataB <= ram[addrB];

  config_if dut (.*);

  icap_model #(.DEPTH(2 ** AW), .BUSY_PERIOD(5), .BUSY_LEN(3)) u_icap (
    .clk(clk), .ce(ce_icap), .we(we_icap), .din(din_icap), .busy(busy_icap), .out(out_icap)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic transfer(int n, bit with_busy);
    int t0, t1, stalls;
    for (int i = 0; i < n; i++) ram[i] = {$urandom} | 32'h1;   // never the NOOP word
    u_icap.busy_enable = with_busy;
    u_icap.clear();
    @(negedge clk);
    length = (AW + 1)'(n); start = 1;
    t0 = $time;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    // a second start while busy must be ignored
    start = 1; length = 5;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t1 = $time;
    stalls = int'(u_icap.n_busy);
    check(u_icap.n_words == n, $sformatf("%0d words of %0d", u_icap.n_words, n));
    for (int i = 0; i < n && i < 2 ** AW; i++)
      if (u_icap.got[i] != ram[i]) begin check(0, $sformatf("word %0d", i)); break; end
    check(u_icap.n_noop == 8, $sformatf("%0d NOOP clocks", u_icap.n_noop));
    check(u_icap.n_proto == 0, "we/ce ordering");
    check((t1 - t0) / 10 == n + 11 + stalls,
          $sformatf("%0d clocks, expected %0d", (t1 - t0) / 10, n + 11 + stalls));
    if (with_busy) check(stalls > 0, "busy stalls happened");
    repeat (3) @(negedge clk);
    check(!busy && !ce_icap && !we_icap, "idle after transfer");
    check(icap_status == 32'(n), "ICAP output captured");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // length 0 does nothing
    @(negedge clk);
    start = 1; length = '0;
    @(negedge clk);
    start = 0;
    check(!busy && !we_icap, "length 0 ignored");
    transfer(1, 0);
    transfer(300, 0);
    transfer(1000, 1);
    transfer(2 ** AW, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
