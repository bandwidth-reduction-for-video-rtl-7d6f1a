// shape_run: one MPEG-2 decoding workload through mem_if_top at a given
// data-unit shape M x N (simulation only; used by tb_unit_shapes).
//
// The run has three phases:
//   1. The motion-compensation port writes a LINE x HEIGHT frame as 16 x 16
//      macroblocks in raster order. Each pixel (x, y) holds pix(x, y).
//   2. The video output displays the frame through the line memory. In
//      parallel, NPRED prediction reads are drawn from the measured MPEG-2
//      block-type mix.
//   3. The statistics tables are read back.
//
// The prediction mix follows the published occurrence table for the
// luminance and chrominance sets, frame and field (weights in hundredths of
// a percent):
//   - luminance blocks lie on the macroblock grid half of the time (zero
//     motion), otherwise anywhere;
//   - chrominance blocks always start at an even x, because Cr and Cb
//     samples alternate horizontally.
// The position model is this testbench's own choice.
//
// Values worked out independently of the design:
//   - every read beat and every display word is compared with pix();
//   - the number of data units of every transfer comes from the unit-count
//     formula applied to each field part, and is checked against the units
//     that come back from the SDRAM;
//   - the statistics counters are checked against the testbench's own sums;
//   - the SDRAM model must report no timing violation.
// Outputs: done, the check counts, and the measured overheads in tenths of a
// percent, for the prediction reads alone and for all traffic.
module shape_run
  import mif_pkg::*;
#(
  parameter int M      = 16,
  parameter int N      = 4,
  parameter int LINE   = 1920,
  parameter int HEIGHT = 1088,
  parameter int NPRED  = 4000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   pred_ovh_pm,     // prediction overhead, per mille
  output int   total_ovh_pm,    // all traffic, per mille
  output int   clocks
);
  localparam int WPL = M / 8;

  logic rst_n = 0;
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

  mem_if_top #(.M(M), .N(N)) dut (.*);

  ddr_sdram_model sdram (
    .clk, .cke(rst_n), .cmd(sd_cmd), .ba(sd_ba), .addr(sd_addr), .dq_in(sd_dq_out),
    .dq_oe(sd_dq_oe), .dq_out(sd_dq_in)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0dx%0d: %s", M, N, what);
    end
  endtask

  function automatic logic [7:0] pix(input int x, input int y);
    return 8'(x * 7 + y * 13 + (x >> 4) * 5 + (y >> 3));
  endfunction

  // word w = 2*beat + h of a unit holds pixels (w % WPL) * 8 .. +7 of unit
  // line w / WPL, i.e. field line urow*N + w/WPL
  function automatic ddr_beat_t unit_beat(input du_tag_t t, input logic [1:0] beat);
    ddr_beat_t d;
    for (int h = 0; h < 2; h++) begin
      int w, y, x0;
      w  = 2 * int'(beat) + h;
      y  = 2 * (int'(t.urow) * N + w / WPL) + int'(t.field);
      x0 = int'(t.ucol) * M + (w % WPL) * 8;
      for (int p = 0; p < 8; p++) d[h][8*p +: 8] = pix(x0 + p, y);
    end
    return d;
  endfunction

  assign mc_wd_data = mc_wd_req ? unit_beat(mc_wd_tag, mc_wd_beat) : '0;

  // units of one transfer by the unit-count formula, per field part
  function automatic int units_of(input xfer_req_t r);
    int m, cols, total;
    m     = int'(r.x) % M;
    cols  = 1 + (int'(r.bx) + m - 1) / M;
    total = 0;
    if (r.interl) begin
      int n;
      n     = (int'(r.y) / 2) % N;
      total = cols * (1 + (int'(r.by) + n - 1) / N);
    end else begin
      for (int f = 0; f < 2; f++) begin
        int y0, h, n;
        y0 = int'(r.y) + f;                   // first frame line of this part
        h  = (int'(r.by) - f + 1) / 2;        // lines of this part
        if (h > 0) begin
          n     = (y0 / 2) % N;
          total += cols * (1 + (h + n - 1) / N);
        end
      end
    end
    return total;
  endfunction

  // ---------------- MC read data ----------------
  int mc_units_back = 0, mc_last_back = 0;
  always @(negedge clk) if (mc_rd_valid) begin
    check(mc_rd_data == unit_beat(mc_rd_tag, mc_rd_beat), "MC read data");
    if (mc_rd_beat == 2'd3) begin
      mc_units_back++;
      if (mc_rd_tag.last) mc_last_back++;
    end
  end

  // ---------------- display ----------------
  int disp_words = 0, fld = 0, strip = 0, dl = 0, dw = 0;
  always @(negedge clk) begin
    if (rst_n) px_ready = ($urandom_range(0, 9) != 0);
    #1;
    if (px_valid && px_ready) begin
      int y;
      y = 2 * (strip * N + dl) + fld;
      check(px_data == {pix(dw*8+7, y), pix(dw*8+6, y), pix(dw*8+5, y), pix(dw*8+4, y),
                        pix(dw*8+3, y), pix(dw*8+2, y), pix(dw*8+1, y), pix(dw*8, y)},
            "display word");
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
  int n_mc_reads = 0;
  task automatic mc_send(input xfer_req_t r);
    @(negedge clk);
    mc_req_valid = 1;
    mc_req = r;
    #1;
    while (!mc_req_ready) begin @(negedge clk); #1; end
    if (r.rd) n_mc_reads++;
    @(posedge clk);
    #1;
    mc_req_valid = 0;
  endtask

  // block type, weight (0.01 %), chrominance flag
  localparam int NT = 16;
  localparam int TYPES [NT][5] = '{
    // interl, Bx, By, weight, chroma
    '{0, 16, 16, 159, 0}, '{0, 17, 16, 312, 0}, '{0, 16, 17, 475, 0}, '{0, 17, 17, 1486, 0},
    '{1, 16,  8, 228, 0}, '{1, 17,  8, 684, 0}, '{1, 16,  9, 306, 0}, '{1, 17,  9, 1350, 0},
    '{0, 16,  8, 1295, 1}, '{0, 18,  8, 447, 1}, '{0, 16,  9, 405, 1}, '{0, 18,  9, 286, 1},
    '{1, 16,  4, 785, 1}, '{1, 18,  4, 624, 1}, '{1, 16,  5, 616, 1}, '{1, 18,  5, 543, 1}};

  function automatic xfer_req_t pred_block();
    xfer_req_t r;
    int sum, pick, acc, k;
    sum = 0;
    for (int i = 0; i < NT; i++) sum += TYPES[i][3];
    pick = $urandom_range(0, sum - 1);
    acc = 0;
    k = -1;
    for (int i = 0; i < NT; i++) begin
      acc += TYPES[i][3];
      if (k < 0 && pick < acc) k = i;
    end
    r = '0;
    r.rd = 1; r.interl = TYPES[k][0][0];
    r.bx = BSZ_W'(TYPES[k][1]); r.by = BSZ_W'(TYPES[k][2]);
    if (TYPES[k][4] == 0 && $urandom_range(0, 1) == 0) begin
      r.x = COORD_W'($urandom_range(0, LINE / 16 - 2) * 16);
      r.y = COORD_W'($urandom_range(0, HEIGHT / 16 - 3) * 16);
    end else begin
      r.x = COORD_W'($urandom_range(0, LINE - 20));
      r.y = COORD_W'($urandom_range(0, HEIGHT - 40));
      if (TYPES[k][4] != 0) r.x[0] = 1'b0;
    end
    r.line = COORD_W'(LINE);
    r.base = '0;
    return r;
  endfunction

  initial begin
    xfer_req_t r;
    longint exp_units, exp_req_pix, t0;
    done = 0; checks = 0; failures = 0;
    pred_ovh_pm = 0; total_ovh_pm = 0; clocks = 0;
    mc_req_valid = 0; mc_req = '0; vo_start = 0;
    vo_line = COORD_W'(LINE); vo_height = COORD_W'(HEIGHT); vo_base = '0;
    an_rd_en = 0; an_rd_sel = 0; an_rd_addr = 0; px_ready = 0;
    exp_units = 0; exp_req_pix = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (an_busy) @(negedge clk);
    t0 = $time;

    // 1. write the frame
    for (int my = 0; my < HEIGHT / 16; my++)
      for (int mx = 0; mx < LINE / 16; mx++) begin
        r = '0;
        r.rd = 0; r.bx = 16; r.by = 16;
        r.x = COORD_W'(mx * 16); r.y = COORD_W'(my * 16);
        r.line = COORD_W'(LINE);
        mc_send(r);
      end
    repeat (50) @(negedge clk);

    // 2. display while predicting
    @(negedge clk); vo_start = 1;
    @(negedge clk); vo_start = 0;
    for (int i = 0; i < NPRED; i++) begin
      r = pred_block();
      exp_units   += longint'(units_of(r));
      exp_req_pix += int'(r.bx) * int'(r.by);
      mc_send(r);
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
    while (vo_busy || disp_words < HEIGHT * LINE / 8 || mc_last_back < n_mc_reads)
      @(negedge clk);
    repeat (50) @(negedge clk);
    clocks = int'(($time - t0) / 10);
    check(disp_words == HEIGHT * LINE / 8, "display word count");
    check(longint'(mc_units_back) == exp_units,
          $sformatf("prediction units %0d, formula %0d", mc_units_back, exp_units));
    check(sdram.violations == 0, "SDRAM timing violations");

    // 3. statistics: totals over the prediction classes and over everything
    begin
      longint rq_p, xf_p, rq_all, xf_all;
      rq_p = 0; xf_p = 0; rq_all = 0; xf_all = 0;
      for (int c = 0; c < NCLASS; c++) begin
        longint rq, xf;
        an_rd_en = 1; an_rd_sel = 1; an_rd_addr = 12'(c);
        @(negedge clk); rq = longint'(an_rd_data);
        an_rd_sel = 2; @(negedge clk); xf = longint'(an_rd_data);
        an_rd_en = 0;
        rq_all += rq; xf_all += xf;
        if (c < NTYPES || c == CLS_OTHER) begin rq_p += rq; xf_p += xf; end
      end
      check(rq_p == exp_req_pix, "requested prediction pixels");
      check(xf_p == exp_units * M * N, "transferred prediction pixels");
      check(rq_all == exp_req_pix + 2 * longint'(LINE) * HEIGHT, "requested pixels, all traffic");
      pred_ovh_pm  = int'((xf_p - rq_p) * 1000 / rq_p);
      total_ovh_pm = int'((xf_all - rq_all) * 1000 / rq_all);
    end
    done = 1;
  end
endmodule
