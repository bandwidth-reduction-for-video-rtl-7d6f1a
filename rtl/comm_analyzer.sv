// comm_analyzer: statistics collector for the memory traffic of video clients.
//
// The best data-unit shape depends on which blocks the application really
// requests and where. For every transfer that a client issues this block
// records, per block-type class:
//   occ    - number of requests (occurrence of the block type),
//   reqpix - requested pixels, Bx * By,
//   xfpix  - transferred pixels, (data units touched) * M * N, whose excess
//            over reqpix is the pixel overhead of the current mapping,
//   hist   - a position histogram over (m, n): m = x mod M, and n = (y/2) mod N
//            for field blocks or y mod 2N for frame blocks.
// The classes are the MPEG-2 prediction block types of the progressive and
// interlaced sets (mif_pkg::BTYPES), plus "write", "display read" and "other".
// A host reads the counters afterwards to evaluate other data-unit shapes
// off-line.
//
// Interface: one valid/ready event port per client (the client index is the
// port number), served round-robin; an event takes two clocks (select, then
// read-modify-write of all four tables). After reset the tables are cleared
// by a sweep of NCLASS*M*2N clocks during which no event is accepted (busy).
// Read-out: rd_en with rd_sel (0 occ, 1 reqpix, 2 xfpix, 3 hist) and rd_addr
// (class, or class*M*2N + n*M + m for hist); rd_data follows one clock later.
//
// What is recorded follows the published list of statistics; the class list,
// the counter widths and the read-out port are this design's choices.
module comm_analyzer
  import mif_pkg::*;
#(
  parameter int unsigned M    = 16,
  parameter int unsigned N    = 4,
  parameter int unsigned NCLI = 2,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NCLI-1:0]  ev_valid,
  output logic [NCLI-1:0]  ev_ready,
  input  xfer_req_t        ev_req [NCLI],
  output logic             busy,
  input  logic             rd_en,
  input  logic [1:0]       rd_sel,
  input  logic [11:0]      rd_addr,
  output logic [CNT_W-1:0] rd_data
);
  localparam int unsigned M_SH  = $clog2(M);
  localparam int unsigned N_SH  = $clog2(N);
  localparam int unsigned NBIN  = M * 2 * N;
  localparam int unsigned NHIST = NCLASS * NBIN;
  localparam int unsigned HW    = $clog2(NHIST);

  logic [CNT_W-1:0] occ    [NCLASS];
  logic [CNT_W-1:0] reqpix [NCLASS];
  logic [CNT_W-1:0] xfpix  [NCLASS];
  logic [CNT_W-1:0] hist   [NHIST];

  typedef enum logic [1:0] { S_CLR, S_IDLE, S_UPD } state_e;
  state_e state;

  logic [HW-1:0]      clr_idx;
  logic               rr;           // round-robin pointer (NCLI <= 2)
  logic [CLASS_W-1:0] u_cls;
  logic [HW-1:0]      u_bin;
  logic [CNT_W-1:0]   u_req, u_xf;

  // ---------------- selection and pre-computation ----------------
  logic [$clog2(NCLI > 1 ? NCLI : 2)-1:0] sel;
  logic      any;
  xfer_req_t e;
  logic [CLASS_W-1:0] e_cls;
  logic [COORD_W-1:0] m, nb, cols, rows, y0f, ylf, yend;
  logic [HW-1:0]      e_bin;

  always_comb begin
    any = |ev_valid;
    sel = '0;
    if (NCLI > 1 && ev_valid[int'(rr) % NCLI]) sel = rr;
    else for (int i = NCLI - 1; i >= 0; i--) if (ev_valid[i]) sel = i[$bits(sel)-1:0];
    e     = ev_req[sel];
    e_cls = classify(e, CID_W'(sel));

    m    = e.x & COORD_W'(M - 1);
    nb   = e.interl ? ((e.y >> 1) & COORD_W'(N - 1)) : (e.y & COORD_W'(2 * N - 1));
    cols = ((m + COORD_W'(e.bx) - 1'b1) >> M_SH) + 1'b1;
    rows = '0;
    yend = e.y + COORD_W'(e.by) - 1'b1;
    y0f  = '0;
    ylf  = '0;
    if (e.interl)
      rows = ((((e.y >> 1) & COORD_W'(N - 1)) + COORD_W'(e.by) - 1'b1) >> N_SH) + 1'b1;
    else
      for (int f = 0; f < 2; f++) begin
        y0f = e.y + COORD_W'(e.y[0] ^ f[0]);
        ylf = yend - COORD_W'(yend[0] ^ f[0]);
        if (y0f <= ylf)
          rows = rows + (ylf >> (N_SH + 1)) - (y0f >> (N_SH + 1)) + 1'b1;
      end
    e_bin = HW'(e_cls) * HW'(NBIN) + HW'(nb) * HW'(M) + HW'(m);

    ev_ready = '0;
    if (state == S_IDLE && any) ev_ready[sel] = 1'b1;
    busy = (state == S_CLR);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_CLR;
      clr_idx <= '0;
      rr      <= 1'b0;
      u_cls   <= '0;
      u_bin   <= '0;
      u_req   <= '0;
      u_xf    <= '0;
    end else begin
      case (state)
        S_CLR: begin
          hist[clr_idx] <= '0;
          if (int'(clr_idx) < NCLASS) begin
            occ[CLASS_W'(clr_idx)]    <= '0;
            reqpix[CLASS_W'(clr_idx)] <= '0;
            xfpix[CLASS_W'(clr_idx)]  <= '0;
          end
          clr_idx <= clr_idx + 1'b1;
          if (int'(clr_idx) == NHIST - 1) state <= S_IDLE;
        end
        S_IDLE: if (any) begin
          u_cls <= e_cls;
          u_bin <= e_bin;
          u_req <= CNT_W'(e.bx) * CNT_W'(e.by);
          u_xf  <= CNT_W'(cols) * CNT_W'(rows) * CNT_W'(M * N);
          rr    <= ~sel[0];
          state <= S_UPD;
        end
        S_UPD: begin
          occ[u_cls]    <= occ[u_cls] + 1'b1;
          reqpix[u_cls] <= reqpix[u_cls] + u_req;
          xfpix[u_cls]  <= xfpix[u_cls] + u_xf;
          hist[u_bin]   <= hist[u_bin] + 1'b1;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- read-out ----------------
  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_data <= '0;
      if (rd_sel != 2'd3 && int'(rd_addr) >= NCLASS) rd_data <= '0;
      else if (rd_sel == 2'd3 && int'(rd_addr) >= NHIST) rd_data <= '0;
      else case (rd_sel)
        2'd0:    rd_data <= occ[CLASS_W'(rd_addr)];
        2'd1:    rd_data <= reqpix[CLASS_W'(rd_addr)];
        2'd2:    rd_data <= xfpix[CLASS_W'(rd_addr)];
        default: rd_data <= hist[HW'(rd_addr)];
      endcase
    end
  end
endmodule
