// tb_mem_if_top: end-to-end test of the video memory interface with a DDR
// SDRAM model, at the design's default parameters (M x N = 16 x 4 units,
// BL = 8, four banks, 1920-pixel line memory).
//
// 1. The motion-compensation port writes a whole frame as 16 x 16
//    macroblocks in raster order; write beats are produced from the unit tag,
//    the pixel at (x, y) holding pix(x, y).
// 2. The video output displays that frame field by field through the line
//    memory while the motion-compensation port reads prediction blocks of the
//    MPEG-2 block types at random positions. Every display word and every
//    read beat (matched by its tag) is compared with pix().
// 3. The statistics are read back and compared with what was issued; the
//    aligned display requests must show no pixel overhead.
// The SDRAM model checks all timing rules. The test also counts the design's
// mechanisms and fails if one never happened: bank-aware arbitration
// overriding round-robin, ACT held back by a busy bank, read/write bus
// turnaround, units of the two clients interleaved, display waiting for a
// line-memory credit, both line buffers full, and statistics back-pressure.
module tb_mem_if_top;
  import mif_pkg::*;

  localparam int LINE = 1920, HEIGHT = 1088;   // one HD frame
  localparam int M = 16, N = 4;
  localparam int NPRED = 3000;

  logic clk = 0, rst_n = 0;
  logic mc_req_valid, mc_req_ready;
  xfer_req_t mc_req;
  logic mc_rd_valid, mc_wd_req;
  du_tag_t mc_rd_tag, mc_wd_tag;
  logic [1:0] mc_rd_beat, mc_wd_beat;
  ddr_beat_t mc_rd_data, mc_wd_data;
  logic vo_start, vo_busy;
  logic [COORD_W-1:0] vo_line, vo_height;
  logic [UIDX_W-1:0] vo_base;
  logic px_valid, px_ready, px_sol, px_eol, px_eof;
  logic [DQ_W-1:0] px_data;
  logic an_busy, an_rd_en;
  logic [1:0] an_rd_sel;
  logic [11:0] an_rd_addr;
  logic [31:0] an_rd_data;
  sdram_cmd_e sd_cmd;
  logic [BANK_W-1:0] sd_ba;
  logic [ROW_W-1:0] sd_addr;
  ddr_beat_t sd_dq_out, sd_dq_in;
  logic sd_dq_oe;

  mem_if_top dut (.*);

  ddr_sdram_model sdram (
    .clk, .cke(rst_n), .cmd(sd_cmd), .ba(sd_ba), .addr(sd_addr), .dq_in(sd_dq_out), .dq_oe(sd_dq_oe),
    .dq_out(sd_dq_in)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- picture content ----------------
  function automatic logic [7:0] pix(input int x, input int y);
    return 8'(x * 7 + y * 13 + (x >> 4) * 5 + (y >> 3));
  endfunction

  // the two words of one beat of a data unit: word w = 2*beat + h holds
  // pixels (w % 2) * 8 .. +7 of field line urow*N + w/2
  function automatic ddr_beat_t unit_beat(input du_tag_t t, input logic [1:0] beat);
    ddr_beat_t d;
    for (int h = 0; h < 2; h++) begin
      int w, y, x0;
      w  = 2 * int'(beat) + h;
      y  = 2 * (int'(t.urow) * N + w / 2) + int'(t.field);
      x0 = int'(t.ucol) * M + (w % 2) * 8;
      for (int p = 0; p < 8; p++) d[h][8*p +: 8] = pix(x0 + p, y);
    end
    return d;
  endfunction

  assign mc_wd_data = mc_wd_req ? unit_beat(mc_wd_tag, mc_wd_beat) : '0;

  // ---------------- mechanism counters ----------------
  int n_override = 0, n_act_stall = 0, n_turn = 0, n_interleave = 0;
  int n_credit_wait = 0, n_both_full = 0, n_an_bp = 0;
  int bursts = 0, rd_beats_mc = 0, last_client = -1, last_dir = -1;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_arb.in_valid == 2'b11 && dut.u_arb.free_c != 2'b11 && dut.u_arb.free_c != 2'b00
        && dut.u_arb.sel != dut.u_arb.ptr) n_override++;
    if (dut.u_sched.in_valid && !dut.u_sched.in_ready) n_act_stall++;
    if (sd_cmd == CMD_RDA || sd_cmd == CMD_WRA) begin
      bursts++;
      if (last_dir >= 0 && last_dir != int'(sd_cmd == CMD_RDA)) n_turn++;
      last_dir = int'(sd_cmd == CMD_RDA);
      if (last_client >= 0 && last_client != int'(dut.u_sched.hd.tag.client)) n_interleave++;
      last_client = int'(dut.u_sched.hd.tag.client);
    end
    if (dut.u_vo.busy && !dut.u_vo.req_valid) n_credit_wait++;
    if (dut.u_lm.full == 2'b11) n_both_full++;
    if ((dut.an_valid & ~dut.an_ready) != 2'b00) n_an_bp++;
  end

  // ---------------- MC read data check ----------------
  int mc_units_back = 0, mc_last_back = 0;
  always @(negedge clk) if (mc_rd_valid) begin
    check(mc_rd_data == unit_beat(mc_rd_tag, mc_rd_beat),
          $sformatf("MC read data f%0d r%0d c%0d beat %0d", mc_rd_tag.field, mc_rd_tag.urow,
                    mc_rd_tag.ucol, mc_rd_beat));
    rd_beats_mc++;
    if (mc_rd_beat == 2'd3) begin
      mc_units_back++;
      if (mc_rd_tag.last) mc_last_back++;
    end
  end

  // ---------------- display check ----------------
  int disp_words = 0, fld = 0, strip = 0, dl = 0, dw = 0;
  always @(negedge clk) begin
    if (rst_n) px_ready = ($urandom_range(0, 9) != 0);
    #1;
    if (px_valid && px_ready) begin
      int y;
      y = 2 * (strip * N + dl) + fld;
      check(px_data == {pix(dw*8+7, y), pix(dw*8+6, y), pix(dw*8+5, y), pix(dw*8+4, y),
                        pix(dw*8+3, y), pix(dw*8+2, y), pix(dw*8+1, y), pix(dw*8, y)},
            $sformatf("display word field %0d line %0d word %0d", fld, y, dw));
      check(px_sol == (dw == 0) && px_eol == (dw == LINE / 8 - 1), "display line flags");
      disp_words++;
      dw++;
      if (dw == LINE / 8) begin
        dw = 0;
        dl++;
        if (dl == N) begin
          dl = 0;
          strip++;
          if (strip == HEIGHT / 2 / N) begin strip = 0; fld++; end
        end
      end
    end
  end

  // ---------------- MC transfers ----------------
  int n_pred [NCLASS];
  int n_mc_reads = 0, n_mc_writes = 0;

  task automatic mc_send(input xfer_req_t r);
    @(negedge clk);
    mc_req_valid = 1;
    mc_req = r;
    #1;
    while (!mc_req_ready) begin @(negedge clk); #1; end
    if (r.rd) n_mc_reads++; else n_mc_writes++;
    @(posedge clk);
    #1;
    mc_req_valid = 0;
  endtask

  function automatic xfer_req_t pred_block();
    // MPEG-2 prediction block types: luminance and chrominance, frame and field
    int types [16][3] = '{
      '{0,16,16}, '{0,17,16}, '{0,16,17}, '{0,17,17}, '{1,16,8}, '{1,17,8}, '{1,16,9}, '{1,17,9},
      '{0,16,8}, '{0,18,8}, '{0,16,9}, '{0,18,9}, '{1,16,4}, '{1,18,4}, '{1,16,5}, '{1,18,5}};
    xfer_req_t r;
    int k;
    k = $urandom_range(0, 15);
    r = '0;
    r.rd = 1; r.interl = types[k][0][0];
    r.bx = BSZ_W'(types[k][1]); r.by = BSZ_W'(types[k][2]);
    // half of the blocks on the macroblock grid (zero motion), the rest anywhere
    if ($urandom_range(0, 1) == 0) begin
      r.x = COORD_W'($urandom_range(0, LINE / 16 - 2) * 16);
      r.y = COORD_W'($urandom_range(0, HEIGHT / 16 - 3) * 16);
    end else begin
      r.x = COORD_W'($urandom_range(0, LINE - 20));
      r.y = COORD_W'($urandom_range(0, HEIGHT - 40));
    end
    r.line = COORD_W'(LINE);
    r.base = '0;
    return r;
  endfunction

  int class_of_pred [NCLASS];
  longint t0, t1, t_wr0, t_wr1;
  int bursts_wr0, bursts_wr1;

  initial begin
    xfer_req_t r;
    mc_req_valid = 0; mc_req = '0; vo_start = 0;
    vo_line = COORD_W'(LINE); vo_height = COORD_W'(HEIGHT); vo_base = '0;
    an_rd_en = 0; an_rd_sel = 0; an_rd_addr = 0; px_ready = 0;
    foreach (n_pred[i]) n_pred[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (an_busy) @(negedge clk);

    // 1. write the frame as macroblocks
    t_wr0 = $time; bursts_wr0 = bursts;
    for (int my = 0; my < HEIGHT / 16; my++)
      for (int mx = 0; mx < LINE / 16; mx++) begin
        r = '0;
        r.rd = 0; r.interl = 0; r.bx = 16; r.by = 16;
        r.x = COORD_W'(mx * 16); r.y = COORD_W'(my * 16);
        r.line = COORD_W'(LINE);
        mc_send(r);
      end
    repeat (50) @(negedge clk);
    t_wr1 = $time; bursts_wr1 = bursts;
    $display("frame written: %0d macroblocks, %0d bursts in %0d clocks",
             n_mc_writes, bursts_wr1 - bursts_wr0, (t_wr1 - t_wr0) / 10);

    // 2. display while predicting
    @(negedge clk);
    vo_start = 1;
    @(negedge clk);
    vo_start = 0;
    t0 = $time;
    for (int i = 0; i < NPRED; i++) begin
      r = pred_block();
      n_pred[classify(r, CID_MC)]++;
      mc_send(r);
      repeat ($urandom_range(0, 40)) @(negedge clk);
    end
    while (vo_busy || disp_words < 2 * (HEIGHT / 2) * LINE / 8 || mc_last_back < n_mc_reads)
      @(negedge clk);
    repeat (50) @(negedge clk);
    t1 = $time;
    $display("frame displayed: %0d words, %0d prediction reads, %0d clocks",
             disp_words, NPRED, (t1 - t0) / 10);
    check(disp_words == HEIGHT * LINE / 8, "display word count");
    check(mc_last_back == n_mc_reads, $sformatf("MC transfers completed %0d of %0d",
                                                 mc_last_back, n_mc_reads));

    // 3. statistics
    for (int c = 0; c < NCLASS; c++) begin
      int occ, rq, xf;
      an_rd_en = 1; an_rd_sel = 0; an_rd_addr = 12'(c);
      @(negedge clk); occ = int'(an_rd_data);
      an_rd_sel = 1; @(negedge clk); rq = int'(an_rd_data);
      an_rd_sel = 2; @(negedge clk); xf = int'(an_rd_data);
      an_rd_en = 0;
      if (c == CLS_WRITE) begin
        check(occ == (LINE / 16) * (HEIGHT / 16), "write count");
        check(xf == rq, "macroblock writes without overhead");
      end else if (c == CLS_DISPLAY) begin
        check(occ == 2 * (HEIGHT / 2 / N) * (LINE / M), "display request count");
        check(xf == rq, "display reads without overhead");
      end else begin
        check(occ == n_pred[c], $sformatf("class %0d count %0d vs %0d", c, occ, n_pred[c]));
        if (occ > 0) begin
          check(xf >= rq, "transferred >= requested");
          $display("class %2d: %5d requests, overhead %0d%%", c, occ, (xf - rq) * 100 / rq);
        end
      end
    end

    check(sdram.violations == 0, $sformatf("SDRAM timing violations %0d", sdram.violations));
    check(mc_units_back == sdram.n_rd - 2 * (HEIGHT / 2 / N) * (LINE / M), "MC read bursts");
    $display("mechanisms: override %0d act-stall %0d turnaround %0d interleave %0d credit-wait %0d both-full %0d stats-backpressure %0d",
             n_override, n_act_stall, n_turn, n_interleave, n_credit_wait, n_both_full, n_an_bp);
    check(n_override > 0, "bank-aware arbitration happened");
    check(n_act_stall > 0, "ACT held by busy bank happened");
    check(n_turn > 0, "read/write turnaround happened");
    check(n_interleave > 0, "client interleaving happened");
    check(n_credit_wait > 0, "line-memory credit wait happened");
    check(n_both_full > 0, "both line buffers full happened");
    check(n_an_bp > 0, "statistics back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
