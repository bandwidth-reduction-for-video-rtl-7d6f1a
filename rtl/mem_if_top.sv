// mem_if_top: main memory interface of a video decoder with a DDR SDRAM.
//
// Two clients share one off-chip SDRAM: the motion-compensation unit (MC),
// which reads prediction blocks and writes reconstructed macroblocks, and the
// video output (VO), which reads the picture for display. The picture is
// kept in data units of M x N pixels of one field, one burst each, spread
// over the four banks so that successive bursts can be interleaved (see
// du_addr_map). The interface
//   - translates each client block transfer into data units (block_xlate,
//     one per client),
//   - chooses between the clients per data unit, preferring a free bank
//     (unit_arbiter),
//   - issues ACT and column-with-auto-precharge commands under the SDRAM
//     timing rules and moves the burst data (sdram_sched),
//   - records request statistics for off-line choice of M and N
//     (comm_analyzer),
//   - converts display units into video lines (vo_req_gen + line_mem).
// A transfer is accepted from a client only when both its translator and
// the statistics collector take it, so every transfer is counted once.
//
// MC port: mc_req (valid/ready) takes a transfer; read bursts come back on
// mc_rd_* tagged with the data unit they belong to; for writes the interface
// asks for each beat on mc_wd_* and takes mc_wd_data in the same clock.
// VO port: vo_start launches the display of one frame (vo_line pixels per
// line, vo_height lines, stored at vo_base; hold them during the frame);
// pixels leave on px_* eight per word. SDRAM port: command, bank, address,
// and two 64-bit words per clock in each direction (DDR), with dq_oe.
// Analyzer port: see comm_analyzer.
module mem_if_top
  import mif_pkg::*;
#(
  parameter int unsigned M             = 16,
  parameter int unsigned N             = 4,
  parameter int unsigned BL            = 8,
  parameter int unsigned UNITS_PER_ROW = 32,
  parameter int unsigned LINE_MAX      = 1920,
  parameter int unsigned T_RCD         = 3,
  parameter int unsigned T_RAS         = 7,
  parameter int unsigned T_RP          = 3,
  parameter int unsigned T_RC          = 10,
  parameter int unsigned T_CL          = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // motion-compensation client
  input  logic               mc_req_valid,
  output logic               mc_req_ready,
  input  xfer_req_t          mc_req,
  output logic               mc_rd_valid,
  output du_tag_t            mc_rd_tag,
  output logic [1:0]         mc_rd_beat,
  output ddr_beat_t          mc_rd_data,
  output logic               mc_wd_req,
  output du_tag_t            mc_wd_tag,
  output logic [1:0]         mc_wd_beat,
  input  ddr_beat_t          mc_wd_data,
  // video output client
  input  logic               vo_start,
  input  logic [COORD_W-1:0] vo_line,
  input  logic [COORD_W-1:0] vo_height,
  input  logic [UIDX_W-1:0]  vo_base,
  output logic               vo_busy,
  output logic               px_valid,
  input  logic               px_ready,
  output logic [DQ_W-1:0]    px_data,
  output logic               px_sol,
  output logic               px_eol,
  output logic               px_eof,
  // statistics read-out
  output logic               an_busy,
  input  logic               an_rd_en,
  input  logic [1:0]         an_rd_sel,
  input  logic [11:0]        an_rd_addr,
  output logic [31:0]        an_rd_data,
  // SDRAM
  output sdram_cmd_e         sd_cmd,
  output logic [BANK_W-1:0]  sd_ba,
  output logic [ROW_W-1:0]   sd_addr,
  output ddr_beat_t          sd_dq_out,
  output logic               sd_dq_oe,
  input  ddr_beat_t          sd_dq_in
);
  // ---------------- client transfer requests ----------------
  logic      vo_req_valid, vo_req_ready, vo_released;
  xfer_req_t vo_req;

  logic [1:0] x_ready, x_valid, an_ready, an_valid;
  xfer_req_t  an_req [2];

  always_comb begin
    an_valid[0]  = mc_req_valid && x_ready[0];
    an_valid[1]  = vo_req_valid && x_ready[1];
    x_valid[0]   = mc_req_valid && an_ready[0];
    x_valid[1]   = vo_req_valid && an_ready[1];
    mc_req_ready = x_ready[0] && an_ready[0];
    vo_req_ready = x_ready[1] && an_ready[1];
    an_req[0]    = mc_req;
    an_req[1]    = vo_req;
  end

  vo_req_gen #(.M(M), .N(N)) u_vo (
    .clk, .rst_n, .start(vo_start), .line(vo_line), .height(vo_height),
    .base(vo_base), .released(vo_released), .busy(vo_busy),
    .req_valid(vo_req_valid), .req_ready(vo_req_ready), .req(vo_req)
  );

  // ---------------- translation to data units ----------------
  logic [1:0] u_valid, u_ready;
  du_req_t    u_req [2];

  block_xlate #(.M(M), .N(N), .BL(BL), .UNITS_PER_ROW(UNITS_PER_ROW), .CLIENT(CID_MC)) u_x_mc (
    .clk, .rst_n, .req_valid(x_valid[0]), .req_ready(x_ready[0]), .req(mc_req),
    .out_valid(u_valid[0]), .out_ready(u_ready[0]), .out(u_req[0])
  );

  block_xlate #(.M(M), .N(N), .BL(BL), .UNITS_PER_ROW(UNITS_PER_ROW), .CLIENT(CID_VO)) u_x_vo (
    .clk, .rst_n, .req_valid(x_valid[1]), .req_ready(x_ready[1]), .req(vo_req),
    .out_valid(u_valid[1]), .out_ready(u_ready[1]), .out(u_req[1])
  );

  // ---------------- arbitration and scheduling ----------------
  logic       s_valid, s_ready;
  du_req_t    s_req;
  logic [3:0] bank_busy;

  unit_arbiter #(.NCLI(2)) u_arb (
    .clk, .rst_n, .in_valid(u_valid), .in_ready(u_ready), .in_req(u_req),
    .bank_busy(bank_busy), .out_valid(s_valid), .out_ready(s_ready), .out(s_req)
  );

  logic       rd_valid;
  du_tag_t    rd_tag;
  logic [1:0] rd_beat;
  ddr_beat_t  rd_data;

  sdram_sched #(.BL(BL), .T_RCD(T_RCD), .T_RAS(T_RAS), .T_RP(T_RP), .T_RC(T_RC),
                .T_CL(T_CL)) u_sched (
    .clk, .rst_n, .in_valid(s_valid), .in_ready(s_ready), .in(s_req),
    .bank_busy(bank_busy),
    .cmd(sd_cmd), .ba(sd_ba), .addr(sd_addr),
    .dq_out(sd_dq_out), .dq_oe(sd_dq_oe), .dq_in(sd_dq_in),
    .rd_valid(rd_valid), .rd_tag(rd_tag), .rd_beat(rd_beat), .rd_data(rd_data),
    .wd_req(mc_wd_req), .wd_tag(mc_wd_tag), .wd_beat(mc_wd_beat), .wd_data(mc_wd_data)
  );

  // ---------------- read data routing ----------------
  logic vo_wr;
  always_comb begin
    vo_wr       = rd_valid && (rd_tag.client == CID_VO);
    mc_rd_valid = rd_valid && (rd_tag.client == CID_MC);
    mc_rd_tag   = rd_tag;
    mc_rd_beat  = rd_beat;
    mc_rd_data  = rd_data;
  end

  line_mem #(.M(M), .N(N), .BL(BL), .LINE_MAX(LINE_MAX)) u_lm (
    .clk, .rst_n, .line(vo_line),
    .wr_valid(vo_wr), .wr_ucol(rd_tag.ucol), .wr_beat(rd_beat), .wr_data(rd_data),
    .px_valid, .px_ready, .px_data, .px_sol, .px_eol, .px_eof,
    .released(vo_released), .full()
  );

  // ---------------- statistics ----------------
  comm_analyzer #(.M(M), .N(N), .NCLI(2)) u_an (
    .clk, .rst_n, .ev_valid(an_valid), .ev_ready(an_ready), .ev_req(an_req),
    .busy(an_busy), .rd_en(an_rd_en), .rd_sel(an_rd_sel), .rd_addr(an_rd_addr),
    .rd_data(an_rd_data)
  );
endmodule
