// tb_line_mem: checks block-to-line conversion in the line memory.
//
// A 96-pixel-wide test picture (6 data units per strip, 4 field lines per
// strip) is pushed through the memory, strip after strip, as unit bursts in
// random column order with random gaps, while the display side pulls pixels
// with random back-pressure. The pixel of line l, column x carries a value
// made from (strip, l, x), so every output word can be checked. Also checked:
// line start/end flags, the strip end flag, that both buffers fill while the
// display is stalled (ping-pong), and that a `released` pulse follows each
// displayed strip.
module tb_line_mem;
  import mif_pkg::*;

  localparam int M = 16, N = 4, BL = 8, LINE = 96, UNITS = LINE / M, STRIPS = 12;

  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] line;
  logic wr_valid;
  logic [UC_W-1:0] wr_ucol;
  logic [1:0] wr_beat;
  ddr_beat_t wr_data;
  logic px_valid, px_ready, px_sol, px_eol, px_eof, released;
  logic [DQ_W-1:0] px_data;
  logic [1:0] full;

  line_mem #(.M(M), .N(N), .BL(BL), .LINE_MAX(256)) dut (.*);

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pix(input int s, input int l, input int x);
    return 8'(s * 37 + l * 11 + x * 3 + (x >> 3));
  endfunction

  function automatic logic [DQ_W-1:0] word8(input int s, input int l, input int x0);
    logic [DQ_W-1:0] w;
    for (int p = 0; p < 8; p++) w[8*p +: 8] = pix(s, l, x0 + p);
    return w;
  endfunction

  int released_cnt = 0, both_full = 0;
  always @(posedge clk) begin
    if (rst_n && released) released_cnt++;
    if (rst_n && full == 2'b11) both_full++;
  end

  // writer: strips in order, units of a strip in random order
  initial begin
    wr_valid = 0; wr_ucol = 0; wr_beat = 0; wr_data = '0; line = COORD_W'(LINE);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < STRIPS; s++) begin
      int order [UNITS];
      for (int u = 0; u < UNITS; u++) order[u] = u;
      order.shuffle();
      // wait for an empty buffer (the request generator's credit)
      while (s >= 2 && released_cnt < s - 1) @(negedge clk);
      for (int u = 0; u < UNITS; u++) begin
        for (int b = 0; b < BL / 2; b++) begin
          // word w = 2b + h: line w / 2, pixels (w % 2) * 8 of unit column order[u]
          wr_valid = 1;
          wr_ucol  = UC_W'(order[u]);
          wr_beat  = 2'(b);
          for (int h = 0; h < 2; h++)
            wr_data[h] = word8(s, (2 * b + h) / 2, order[u] * M + ((2 * b + h) % 2) * 8);
          @(negedge clk);
        end
        wr_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
  end

  // reader
  initial begin
    int words = 0;
    px_ready = 0;
    repeat (3) @(negedge clk);
    // hold the display until both buffers are full
    while (full != 2'b11) @(negedge clk);
    for (int s = 0; s < STRIPS; s++)
      for (int l = 0; l < N; l++)
        for (int w = 0; w < LINE / 8; w++) begin
          px_ready = 1;
          #1;
          while (!(px_valid && px_ready)) begin
            @(negedge clk);
            px_ready = ($urandom_range(0, 3) != 0);
            #1;
          end
          check(px_data == word8(s, l, w * 8), $sformatf("pixels s%0d l%0d w%0d", s, l, w));
          check(px_sol == (w == 0), "start of line");
          check(px_eol == (w == LINE / 8 - 1), "end of line");
          check(px_eof == (w == LINE / 8 - 1 && l == N - 1), "end of strip");
          words++;
          @(negedge clk);
          px_ready = ($urandom_range(0, 3) != 0);
        end
    px_ready = 0;
    repeat (3) @(negedge clk);
    check(released_cnt == STRIPS, $sformatf("released pulses %0d", released_cnt));
    check(both_full > 0, "ping-pong buffers both full");
    check(words == STRIPS * N * LINE / 8, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
