// block_xlate: turns one block transfer into the data units it touches.
//
// A client asks for a Bx x By pixel block at (x, y) of a picture, either as a
// field block (interl = 1: lines y, y+2, ... of one field) or as a frame block
// (interl = 0: lines y .. y+By-1, which fall into both fields). Because memory
// is only accessed in whole data units of M x N field pixels, every unit the
// block overlaps is transferred. For a field block that is
//   (1 + floor((Bx + m - 1) / M)) * (1 + floor((By + n - 1) / N))
// units, m = x mod M and n = (y/2) mod N. A frame block is split into its two
// field blocks, each covering the unit rows of its own lines.
//
// Units are issued row by row; inside a row column by column and, for frame
// blocks, both fields of a column back to back, so successive units fall in
// different banks (see du_addr_map). One unit per clock leaves on a
// valid/ready stream; a new transfer is accepted once the previous one has
// fully left (req_ready = idle). The unit ordering and the one-cycle gap
// between transfers are this design's choices; which units are covered
// follows the published overhead model.
module block_xlate
  import mif_pkg::*;
#(
  parameter int unsigned M             = 16,
  parameter int unsigned N             = 4,
  parameter int unsigned BL            = 8,
  parameter int unsigned UNITS_PER_ROW = 32,
  parameter logic [CID_W-1:0] CLIENT   = CID_MC
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  output logic      req_ready,
  input  xfer_req_t req,
  output logic      out_valid,
  input  logic      out_ready,
  output du_req_t   out
);
  localparam int unsigned M_SH = $clog2(M);
  localparam int unsigned N_SH = $clog2(N);

  // ---------------- set-up of a new transfer ----------------
  logic [COORD_W-1:0] yend, y0f [2], ylf [2];
  logic [UC_W-1:0]    n_clo, n_chi;
  logic [UR_W-1:0]    n_rlo [2], n_rhi [2];
  logic [1:0]         n_fen;

  always_comb begin
    n_clo = UC_W'(req.x >> M_SH);
    n_chi = UC_W'((req.x + COORD_W'(req.bx) - 1'b1) >> M_SH);
    yend  = req.y + COORD_W'(req.by) - 1'b1;
    n_fen = '0;
    for (int f = 0; f < 2; f++) begin
      if (req.interl) begin
        y0f[f] = req.y;
        ylf[f] = req.y + ((COORD_W'(req.by) - 1'b1) << 1);
        n_fen[f] = (req.y[0] == f[0]);
      end else begin
        y0f[f] = req.y + COORD_W'(req.y[0] ^ f[0]);
        ylf[f] = yend - COORD_W'(yend[0] ^ f[0]);
        n_fen[f] = (y0f[f] <= ylf[f]);
      end
      n_rlo[f] = UR_W'(y0f[f] >> (N_SH + 1));
      n_rhi[f] = UR_W'(ylf[f] >> (N_SH + 1));
    end
  end

  // ---------------- iteration state ----------------
  logic               busy;
  logic               rd_q;
  logic [COORD_W-1:0] line_q;
  logic [UIDX_W-1:0]  base_q;
  logic [UC_W-1:0]    clo, chi, c;
  logic [UR_W-1:0]    rlo [2], rhi [2], r, r_end;
  logic [1:0]         fen;
  logic               f, f_lo, f_hi;

  logic in_rng_cur, in_rng_hi, at_end, advance, last_u;

  always_comb begin
    in_rng_cur = fen[f]    && r >= rlo[f]    && r <= rhi[f];
    in_rng_hi  = fen[f_hi] && r >= rlo[f_hi] && r <= rhi[f_hi];
    at_end     = (r == r_end) && (c == chi) && (f == f_hi);
    last_u     = (r == r_end) && (c == chi) && (f == f_hi || !in_rng_hi);
    out_valid  = busy && in_rng_cur;
    advance    = busy && (!in_rng_cur || out_ready);
    req_ready  = !busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      rd_q <= 1'b1; line_q <= '0; base_q <= '0;
      clo <= '0; chi <= '0; c <= '0; r <= '0; r_end <= '0;
      rlo <= '{default: '0}; rhi <= '{default: '0};
      fen <= '0; f <= 1'b0; f_lo <= 1'b0; f_hi <= 1'b0;
    end else if (!busy) begin
      if (req_valid) begin
        busy   <= 1'b1;
        rd_q   <= req.rd;
        line_q <= req.line;
        base_q <= req.base;
        clo    <= n_clo;  chi <= n_chi;  c <= n_clo;
        rlo    <= n_rlo;  rhi <= n_rhi;  fen <= n_fen;
        // rows run from the lowest first row to the highest last row
        if (n_fen == 2'b11) begin
          r     <= (n_rlo[0] < n_rlo[1]) ? n_rlo[0] : n_rlo[1];
          r_end <= (n_rhi[0] > n_rhi[1]) ? n_rhi[0] : n_rhi[1];
          f <= 1'b0; f_lo <= 1'b0; f_hi <= 1'b1;
        end else begin
          r     <= n_fen[1] ? n_rlo[1] : n_rlo[0];
          r_end <= n_fen[1] ? n_rhi[1] : n_rhi[0];
          f <= n_fen[1]; f_lo <= n_fen[1]; f_hi <= n_fen[1];
        end
      end
    end else if (advance) begin
      if (at_end || (in_rng_cur && last_u)) busy <= 1'b0;
      else if (f != f_hi) f <= f_hi;
      else begin
        f <= f_lo;
        if (c != chi) c <= c + 1'b1;
        else begin
          c <= clo;
          r <= r + 1'b1;
        end
      end
    end
  end

  // ---------------- mapping onto the SDRAM ----------------
  logic [BANK_W-1:0] bank;
  logic [ROW_W-1:0]  row;
  logic [COL_W-1:0]  col;

  du_addr_map #(.M(M), .BL(BL), .UNITS_PER_ROW(UNITS_PER_ROW)) u_map (
    .field(f), .urow(r), .ucol(c), .line(line_q), .base(base_q),
    .bank(bank), .row(row), .col(col)
  );

  always_comb begin
    out.rd         = rd_q;
    out.bank       = bank;
    out.row        = row;
    out.col        = col;
    out.tag.client = CLIENT;
    out.tag.field  = f;
    out.tag.urow   = r;
    out.tag.ucol   = c;
    out.tag.last   = last_u;
  end
endmodule
