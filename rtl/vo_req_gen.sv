// vo_req_gen: display read requests of the video output unit.
//
// For display the picture is read field by field in strips of N field lines.
// Each strip is fetched as a row of M x N field blocks (interl = 1), each one
// exactly covering one data unit, aligned to the unit grid (x = c*M,
// y = 2*N*s + field), so no pixel overhead arises; a line memory then turns
// the strip into video lines. A strip is only started when the line memory
// has an empty buffer: the generator holds CREDITS credits, spends one per
// strip and regains one on each `released` pulse.
//
// start (one clock, while idle) launches a frame of `height` frame lines and
// `line` pixels per line stored at `base`; busy stays high until the last
// request has been accepted. One request per clock on a valid/ready stream.
//
// Aligned M x N display requests follow the published display option with
// embedded line memories; the field-by-field order and the credit scheme are
// this design's choices.
module vo_req_gen
  import mif_pkg::*;
#(
  parameter int unsigned M       = 16,
  parameter int unsigned N       = 4,
  parameter int unsigned CREDITS = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [COORD_W-1:0] line,
  input  logic [COORD_W-1:0] height,
  input  logic [UIDX_W-1:0]  base,
  input  logic               released,
  output logic               busy,
  output logic               req_valid,
  input  logic               req_ready,
  output xfer_req_t          req
);
  localparam int unsigned M_SH = $clog2(M);
  localparam int unsigned N_SH = $clog2(N);

  logic [COORD_W-1:0] line_q, units, strips, c, s;
  logic [UIDX_W-1:0]  base_q;
  logic [COORD_W-1:0] height_q;
  logic               f;
  logic [2:0]         credits;
  logic               in_strip;   // credit for the current strip is held

  always_comb begin
    units  = (line_q + COORD_W'(M - 1)) >> M_SH;
    // field lines = height/2, strips of N field lines
    strips = ((height_q >> 1) + COORD_W'(N - 1)) >> N_SH;
    req_valid  = busy && (in_strip || credits != '0);
    req.rd     = 1'b1;
    req.interl = 1'b1;
    req.bx     = BSZ_W'(M);
    req.by     = BSZ_W'(N);
    req.x      = c << M_SH;
    req.y      = (s << (N_SH + 1)) | COORD_W'(f);
    req.line   = line_q;
    req.base   = base_q;
  end

  logic fire, take_credit;
  assign fire        = req_valid && req_ready;
  assign take_credit = fire && !in_strip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      line_q   <= '0;
      height_q <= '0;
      base_q   <= '0;
      c        <= '0;
      s        <= '0;
      f        <= 1'b0;
      credits  <= 3'(CREDITS);
      in_strip <= 1'b0;
    end else begin
      credits <= credits - 3'(take_credit) + 3'(released);
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          line_q   <= line;
          height_q <= height;
          base_q   <= base;
          c        <= '0;
          s        <= '0;
          f        <= 1'b0;
        end
      end else if (fire) begin
        in_strip <= 1'b1;
        if (c != units - 1'b1) c <= c + 1'b1;
        else begin
          c        <= '0;
          in_strip <= 1'b0;
          if (s != strips - 1'b1) s <= s + 1'b1;
          else begin
            s <= '0;
            if (f) busy <= 1'b0;
            f <= ~f;
          end
        end
      end
    end
  end
endmodule
