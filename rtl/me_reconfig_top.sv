// me_reconfig_top: self-reconfigurable variable-block-size motion
// estimation platform.
//
// Static region: current and reference frame buffers, the ME controller,
// the parallel-to-serial unit and the SAD buffer. Reconfigurable part: four
// region slots, each of which holds either a 16x1 PE array (pe_array) or
// nothing ("blank"). Reconfiguration path: a dual-port BlockRAM caching one
// decompressed partial bitstream and the configuration interface that
// streams it into the ICAP.
//
// The embedded processor, its bus and the ICAP primitive are outside this
// RTL; their signals are the ports of this module:
//   * frame writes, SAD-buffer reads, BlockRAM port A, cfg_start/cfg_length
//     and the ME commands are what the processor drives over its bus;
//   * prr_loaded[p] tells which region slots currently hold a PE array,
//     i.e. which functional (not blank) bitstreams have been loaded. A blank
//     slot receives no data and produces no results (no switching activity);
//   * the icap_* ports go to the configuration port.
// Bitstream contents cannot change logic in simulation, so prr_loaded stands
// for the outcome of a reconfiguration. A macroblock command (me_start with
// mode = 1, 2 or 4 arrays) is accepted only when every slot that mode uses is
// loaded; otherwise me_reject pulses. me_done pulses when the 16 results of
// the macroblock are in the SAD buffer.
//
// The split into these blocks and their signal names follow the published
// platform; the slot gating, the command handshake and the rejection of a
// mode whose arrays are not loaded are this implementation's.
module me_reconfig_top
  import me_pkg::*;
#(
  parameter int unsigned W       = FRAME_W,
  parameter int unsigned H       = FRAME_H,
  parameter int unsigned BRAM_AW = 14,
  localparam int unsigned AW     = $clog2(W * H)
) (
  input  logic               clk,
  input  logic               rst_n,
  // frame buffers (bus side)
  input  logic               cur_we,
  input  logic [AW-1:0]      cur_waddr,
  input  pixel_t             cur_wdata,
  input  logic               ref_we,
  input  logic [AW-1:0]      ref_waddr,
  input  pixel_t             ref_wdata,
  // SAD buffer (bus side)
  input  logic [3:0]         sad_raddr,
  output blk_result_t        sad_rdata,
  // ME command
  input  logic               me_start,
  input  logic [3:0]         mb_x,
  input  logic [3:0]         mb_y,
  input  prr_mode_e          me_mode,
  input  logic [MAX_PRR-1:0] prr_loaded,
  output logic               me_busy,
  output logic               me_done,
  output logic               me_reject,
  // BlockRAM port A (bus side)
  input  logic [BRAM_AW-1:0] addrA,
  input  logic [31:0]        dataA_in,
  input  logic               weA,
  output logic [31:0]        dataA_out,
  // configuration interface command
  input  logic               cfg_start,
  input  logic [BRAM_AW:0]   cfg_length,
  output logic               cfg_busy,
  output logic               cfg_done,
  output logic [31:0]        cfg_icap_status,
  // ICAP
  output logic               ce_icap,
  output logic               we_icap,
  output logic [31:0]        din_icap,
  input  logic               busy_icap,
  input  logic [31:0]        out_icap
);

  // ---------------------------------------------------------------- ME side
  logic [AW-1:0] ref_addr [NBAND_ALL];
  logic [AW-1:0] cur_addr [MAX_PRR];
  logic          ref_en   [NBAND_ALL];
  logic          cur_en   [MAX_PRR];
  pixel_t        ref_data [NBAND_ALL];
  pixel_t        cur_data [MAX_PRR];

  logic       sw_wr, swap, pe_en, pe_first, pe_last, blk_first, blk_last;
  logic [1:0] sw_row, c_row;
  off_t       h;

  logic [MAX_PRR-1:0] need, res_valid;
  blk_result_t        result [MAX_PRR];
  logic               start_ok, ctrl_busy;
  logic [2:0]         rows_per;
  prr_mode_e          mode_q;
  logic [MAX_PRR-1:0] need_q;

  always_comb begin
    unique case (me_mode)
      PRR_1:   need = 4'b0001;
      PRR_2:   need = 4'b0011;
      PRR_4:   need = 4'b1111;
      default: need = 4'b1111;
    endcase
    start_ok = me_start && !me_busy && me_mode != prr_mode_e'(2'd3)
               && ((need & prr_loaded) == need);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      me_busy   <= 1'b0;
      me_reject <= 1'b0;
      mode_q    <= PRR_1;
      need_q    <= '0;
    end else begin
      me_reject <= me_start && !me_busy && !start_ok;
      if (start_ok) begin
        me_busy <= 1'b1;
        mode_q  <= me_mode;
        need_q  <= need;
      end else if (me_done) begin
        me_busy <= 1'b0;
      end
    end
  end

  assign rows_per = 3'd4 >> mode_q;

  frame_buffer #(.W(W), .H(H), .NRD(MAX_PRR)) u_cur_fb (
    .clk    (clk),
    .wr_en  (cur_we),
    .wr_addr(cur_waddr),
    .wr_data(cur_wdata),
    .rd_en  (cur_en),
    .rd_addr(cur_addr),
    .rd_data(cur_data)
  );

  frame_buffer #(.W(W), .H(H), .NRD(NBAND_ALL)) u_ref_fb (
    .clk    (clk),
    .wr_en  (ref_we),
    .wr_addr(ref_waddr),
    .wr_data(ref_wdata),
    .rd_en  (ref_en),
    .rd_addr(ref_addr),
    .rd_data(ref_data)
  );

  me_controller #(.W(W), .H(H)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start_ok),
    .mb_x     (mb_x),
    .mb_y     (mb_y),
    .mode     (me_mode),
    .busy     (ctrl_busy),
    .ref_addr (ref_addr),
    .ref_en   (ref_en),
    .cur_addr (cur_addr),
    .cur_en   (cur_en),
    .sw_wr    (sw_wr),
    .sw_row   (sw_row),
    .swap     (swap),
    .pe_en    (pe_en),
    .c_row    (c_row),
    .pe_first (pe_first),
    .pe_last  (pe_last),
    .h        (h),
    .blk_first(blk_first),
    .blk_last (blk_last)
  );

  // Reconfigurable region slots (the bus macros are plain wires here).
  for (genvar p = 0; p < MAX_PRR; p++) begin : g_prr
    logic   act;
    pixel_t bands [NBAND];
    logic   rv;

    assign act = prr_loaded[p];
    always_comb
      for (int b = 0; b < NBAND; b++)
        bands[b] = act ? ref_data[p * int'(rows_per) + b] : '0;

    pe_array u_pe_array (
      .clk      (clk),
      .rst_n    (rst_n),
      .sw_in    (bands),
      .sw_wr    (sw_wr && act),
      .sw_row   (sw_row),
      .swap     (swap && act),
      .c_in     (act ? cur_data[p] : '0),
      .c_row    (c_row),
      .pe_en    (pe_en && act),
      .pe_first (pe_first),
      .pe_last  (pe_last),
      .h        (h),
      .blk_first(blk_first),
      .blk_last (blk_last),
      .res_valid(rv),
      .result   (result[p])
    );
    assign res_valid[p] = rv && act;
  end

  logic        sad_we;
  logic [3:0]  sad_waddr;
  blk_result_t sad_final;

  par2ser u_p2s (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start_ok),
    .mode     (me_mode),
    .res_valid(res_valid[0]),
    .sad_min  (result),
    .we       (sad_we),
    .addr     (sad_waddr),
    .sad_final(sad_final),
    .done     (me_done)
  );

  // The controller only runs inside an accepted command, and every loaded
  // array of the running mode delivers its result in the same clock.
  a_ctrl_in_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl_busy |-> me_busy);
  a_results_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid[0] |-> ((res_valid & need_q) == need_q));

  sad_buffer u_sad_buf (
    .clk      (clk),
    .rst_n    (rst_n),
    .we       (sad_we),
    .wr_addr  (sad_waddr),
    .sad_final(sad_final),
    .rd_addr  (sad_raddr),
    .rd_data  (sad_rdata)
  );

  // ----------------------------------------------------- reconfiguration side
  logic [BRAM_AW-1:0] addrB;
  logic [31:0]        dataB;

  bitstream_bram #(.AW(BRAM_AW), .DW(32)) u_bram (
    .clk      (clk),
    .addrA    (addrA),
    .dataA_in (dataA_in),
    .weA      (weA),
    .dataA_out(dataA_out),
    .addrB    (addrB),
    .dataB    (dataB)
  );

  config_if #(.AW(BRAM_AW)) u_cfg (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (cfg_start),
    .length     (cfg_length),
    .busy       (cfg_busy),
    .done       (cfg_done),
    .icap_status(cfg_icap_status),
    .addrB      (addrB),
    .dataB      (dataB),
    .ce_icap    (ce_icap),
    .we_icap    (we_icap),
    .din_icap   (din_icap),
    .busy_icap  (busy_icap),
    .out_icap   (out_icap)
  );

endmodule
