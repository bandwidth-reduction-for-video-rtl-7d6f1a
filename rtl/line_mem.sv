// line_mem: embedded video-line memory for block-to-line conversion.
//
// The picture is stored in data units of M x N field pixels, but a display
// needs whole video lines. Reading lines straight from memory would transfer
// N lines for every line used; instead the video output fetches complete
// M x N units (one strip of N field lines across the picture) into this
// memory and reads the strip out line by line.
//
// Two strip buffers of N lines x LINE_MAX pixels work as a ping-pong pair:
// one is filled from the SDRAM read data while the other is displayed.
// Write side: each beat carries two 64-bit words (8 pixels each, pixel 0 in
// bits 7:0) of unit column wr_ucol; word w = 2*beat + h of a unit holds
// pixels (w mod M/8)*8 .. +7 of unit line w / (M/8). A strip is complete after
// ceil(line/M) units of BL/2 beats each; the buffer then turns full and the
// other buffer takes the following strip. Read side: a full buffer is sent
// as N lines of ceil(line/8) words on a valid/ready stream (px_*), with
// start/end-of-line flags; after its last word the buffer is freed and
// `released` pulses for one clock (a credit for the request generator).
//
// The use of line memories for the display follows the published text; the
// ping-pong organisation, the pixel packing and the stream interface are this
// design's choices.
module line_mem
  import mif_pkg::*;
#(
  parameter int unsigned M        = 16,
  parameter int unsigned N        = 4,
  parameter int unsigned BL       = 8,
  parameter int unsigned LINE_MAX = 1920
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] line,      // pixels per line, <= LINE_MAX
  // unit data from memory
  input  logic               wr_valid,
  input  logic [UC_W-1:0]    wr_ucol,
  input  logic [1:0]         wr_beat,
  input  ddr_beat_t          wr_data,
  // video lines out
  output logic               px_valid,
  input  logic               px_ready,
  output logic [DQ_W-1:0]    px_data,
  output logic               px_sol,
  output logic               px_eol,
  output logic               px_eof,    // last word of the strip
  output logic               released,
  output logic [1:0]         full
);
  localparam int unsigned WPL   = M / 8;            // words per unit line
  localparam int unsigned WLINE = LINE_MAX / 8;     // words per buffer line
  localparam int unsigned DEPTH = 2 * N * WLINE;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned BEATS = BL / 2;
  localparam int unsigned M_SH  = $clog2(M);

  logic [DQ_W-1:0] mem [DEPTH];

  logic                fill_buf, drain_buf;
  logic [COORD_W+1:0]  fill_cnt;     // beats received for the current strip
  logic [COORD_W-1:0]  units;        // units per strip
  logic [COORD_W-1:0]  wpline;       // words per displayed line
  logic [$clog2(N)-1:0] rl;
  logic [COORD_W-1:0]  rw;

  // write addresses of the two words of a beat
  logic [AW-1:0] wa [2];
  always_comb begin
    units  = (line + COORD_W'(M - 1)) >> M_SH;
    wpline = (line + COORD_W'(7)) >> 3;
    // word w = 2*beat + h of a unit is unit line w / WPL, word w % WPL of it
    for (int h = 0; h < 2; h++)
      wa[h] = AW'((int'(fill_buf) * N + (2 * int'(wr_beat) + h) / WPL) * WLINE
                  + int'(wr_ucol) * WPL + (2 * int'(wr_beat) + h) % WPL);
  end

  logic last_beat;
  assign last_beat = wr_valid && (fill_cnt + 1'b1 == (COORD_W+2)'(units) * (COORD_W+2)'(BEATS));

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      mem[wa[0]] <= wr_data[0];
      mem[wa[1]] <= wr_data[1];
    end
  end

  // read side
  logic px_fire, last_word;
  always_comb begin
    px_valid  = full[drain_buf];
    px_data   = mem[AW'((int'(drain_buf) * N + int'(rl)) * WLINE + int'(rw))];
    px_sol    = (rw == '0);
    px_eol    = (rw == wpline - 1'b1);
    last_word = px_eol && (int'(rl) == N - 1);
    px_eof    = last_word;
    px_fire   = px_valid && px_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_buf  <= 1'b0;
      drain_buf <= 1'b0;
      fill_cnt  <= '0;
      full      <= '0;
      rl        <= '0;
      rw        <= '0;
      released  <= 1'b0;
    end else begin
      released <= 1'b0;
      if (wr_valid) begin
        if (last_beat) begin
          fill_cnt       <= '0;
          full[fill_buf] <= 1'b1;
          fill_buf       <= ~fill_buf;
        end else fill_cnt <= fill_cnt + 1'b1;
      end
      if (px_fire) begin
        if (px_eol) begin
          rw <= '0;
          rl <= rl + 1'b1;
        end else rw <= rw + 1'b1;
        if (last_word) begin
          rl              <= '0;
          full[drain_buf] <= 1'b0;
          drain_buf       <= ~drain_buf;
          released        <= 1'b1;
        end
      end
    end
  end

  // a strip may only be written into an empty buffer
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 wr_valid |-> !full[fill_buf]);
endmodule
