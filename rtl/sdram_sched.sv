// sdram_sched: SDRAM command scheduler for data-unit bursts.
//
// Every data unit is one burst of BL bus words (BL/2 clocks on a double-data-
// rate bus). Each unit is served with a row activate (ACT) followed, tRCD
// later, by a read or write with auto-precharge, so no page is left open and
// each access costs one row cycle of its bank. Full bus use comes from bank
// interleaving: while one bank bursts, the next unit's bank is activated.
// With tRC = 10 clocks and BL = 8, a bank can be reused after
// ceil(tRC / (BL/2)) = 3 bursts, so the bus stays busy whenever no bank
// repeats within any three successive units; two alternating banks give
// 2 bursts per row cycle.
//
// Structure: a unit is accepted (in_ready) in the cycle its ACT is issued,
// which needs the bank to have finished its row cycle and precharge and a
// free slot in the PEND-deep queue of activated units. The queue head gets
// its column command once tRCD has passed since its ACT and the data bus is
// free (BL/2 clocks after the previous column command, plus T_TURN on a
// read/write change). Column commands win the single command bus over ACT.
// At the column command the bank's next-ACT time is set to the end of its
// auto-precharge: max(end of burst (+ tWR for writes), ACT + tRAS) + tRP.
//
// Data: read data is taken from dq_in T_CL clocks after the column command,
// two words per clock, and passed on with the unit's tag and beat number
// (rd_*). For writes the scheduler asks for the beat (wd_req, wd_tag,
// wd_beat) one clock after the column command and drives the word pair the
// client returns in the same cycle onto dq_out.
//
// The timing rules, BL = 8, tRC = 10 clocks and the ACT / column-with-auto-
// precharge pattern follow the published timing diagram and text; tRCD, tRAS,
// tRP, CAS latency, tWR, the write latency of one clock, the turnaround gap
// and the queue depth are this design's choices (typical DDR-266 values).
// Refresh and mode-register programming are outside this block.
module sdram_sched
  import mif_pkg::*;
#(
  parameter int unsigned BL     = 8,
  parameter int unsigned T_RCD  = 3,
  parameter int unsigned T_RAS  = 7,
  parameter int unsigned T_RP   = 3,
  parameter int unsigned T_RC   = 10,
  parameter int unsigned T_CL   = 2,
  parameter int unsigned T_WR   = 2,
  parameter int unsigned T_TURN = 1,
  parameter int unsigned PEND   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // data-unit requests
  input  logic              in_valid,
  output logic              in_ready,
  input  du_req_t           in,
  output logic [3:0]        bank_busy,
  // SDRAM command / address
  output sdram_cmd_e        cmd,
  output logic [BANK_W-1:0] ba,
  output logic [ROW_W-1:0]  addr,
  // SDRAM data, one word pair per clock
  output ddr_beat_t         dq_out,
  output logic              dq_oe,
  input  ddr_beat_t         dq_in,
  // read data to the clients
  output logic              rd_valid,
  output du_tag_t           rd_tag,
  output logic [1:0]        rd_beat,
  output ddr_beat_t         rd_data,
  // write data from the clients
  output logic              wd_req,
  output du_tag_t           wd_tag,
  output logic [1:0]        wd_beat,
  input  ddr_beat_t         wd_data
);
  localparam int unsigned BEATS = BL / 2;
  localparam int unsigned CW    = 6;           // timing counter width
  localparam int unsigned PW    = $clog2(PEND);
  localparam int unsigned RDD   = T_CL + BEATS;

  typedef struct packed {
    logic    v;
    du_tag_t tag;
  } pipe_t;

  // ---------------- bank state ----------------
  logic [CW-1:0] act_wait  [4];   // clocks until the bank may be activated
  logic [CW-1:0] since_act [4];   // clocks since its last ACT (saturating)
  logic [3:0]    open_b;          // activated, column command still to come

  // ---------------- queue of activated units ----------------
  du_req_t       pq [PEND];
  logic [PW-1:0] ph, pt;
  logic [PW:0]   pcnt;

  logic [CW-1:0] gap;             // clocks since the last column command
  logic          last_rd;

  pipe_t rpipe [RDD];
  pipe_t wpipe [BEATS];

  du_req_t hd;
  logic    cas_go, act_go;
  logic [7:0] need_gap, a, pc_start, ready_in;

  always_comb begin
    hd       = pq[ph];
    need_gap = 8'(BEATS) + ((hd.rd != last_rd) ? 8'(T_TURN) : 8'd0);
    cas_go   = (pcnt != 0) && (int'(since_act[hd.bank]) >= int'(T_RCD))
               && (8'(gap) >= need_gap);
    act_go   = in_valid && !cas_go && (act_wait[in.bank] == '0)
               && !open_b[in.bank] && (pcnt < (PW+1)'(PEND));
    in_ready = act_go;
    for (int b = 0; b < 4; b++)
      bank_busy[b] = (act_wait[b] != '0) || open_b[b];

    // end of the auto-precharge of the head's bank, counted from now
    a        = 8'(since_act[hd.bank]);
    pc_start = hd.rd ? 8'(BEATS) : 8'(1 + BEATS + T_WR);
    if (a < 8'(T_RAS) && 8'(T_RAS) - a > pc_start) pc_start = 8'(T_RAS) - a;
    ready_in = pc_start + 8'(T_RP);

    cmd  = CMD_NOP;
    ba   = '0;
    addr = '0;
    if (cas_go) begin
      cmd  = hd.rd ? CMD_RDA : CMD_WRA;
      ba   = hd.bank;
      addr = ROW_W'(hd.col);
    end else if (act_go) begin
      cmd  = CMD_ACT;
      ba   = in.bank;
      addr = in.row;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 4; b++) begin
        act_wait[b]  <= '0;
        since_act[b] <= '1;
      end
      open_b  <= '0;
      ph      <= '0;
      pt      <= '0;
      pcnt    <= '0;
      gap     <= '1;
      last_rd <= 1'b1;
      for (int i = 0; i < PEND; i++) pq[i] <= '0;
    end else begin
      for (int b = 0; b < 4; b++) begin
        if (act_wait[b] != '0) act_wait[b] <= act_wait[b] - 1'b1;
        if (since_act[b] != '1) since_act[b] <= since_act[b] + 1'b1;
      end
      if (gap != '1) gap <= gap + 1'b1;

      if (act_go) begin
        act_wait[in.bank]  <= CW'(T_RC - 1);
        since_act[in.bank] <= CW'(1);
        open_b[in.bank]    <= 1'b1;
        pq[pt]             <= in;
        pt                 <= (int'(pt) == PEND - 1) ? '0 : pt + 1'b1;
      end
      if (cas_go) begin
        open_b[hd.bank] <= 1'b0;
        if (ready_in > 8'(act_wait[hd.bank]))
          act_wait[hd.bank] <= CW'(ready_in - 8'd1);
        ph      <= (int'(ph) == PEND - 1) ? '0 : ph + 1'b1;
        gap     <= CW'(1);
        last_rd <= hd.rd;
      end
      pcnt <= pcnt + (PW+1)'(act_go) - (PW+1)'(cas_go);
    end
  end

  // ---------------- data pipelines ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RDD; i++)   rpipe[i] <= '0;
      for (int i = 0; i < BEATS; i++) wpipe[i] <= '0;
    end else begin
      rpipe[0] <= '{v: cas_go && hd.rd,  tag: hd.tag};
      wpipe[0] <= '{v: cas_go && !hd.rd, tag: hd.tag};
      for (int i = 1; i < RDD; i++)   rpipe[i] <= rpipe[i-1];
      for (int i = 1; i < BEATS; i++) wpipe[i] <= wpipe[i-1];
    end
  end

  always_comb begin
    rd_valid = 1'b0;
    rd_tag   = '0;
    rd_beat  = '0;
    for (int k = 0; k < int'(BEATS); k++)
      if (rpipe[T_CL - 1 + k].v) begin
        rd_valid = 1'b1;
        rd_tag   = rpipe[T_CL - 1 + k].tag;
        rd_beat  = 2'(k);
      end
    rd_data = dq_in;

    wd_req  = 1'b0;
    wd_tag  = '0;
    wd_beat = '0;
    for (int k = 0; k < int'(BEATS); k++)
      if (wpipe[k].v) begin
        wd_req  = 1'b1;
        wd_tag  = wpipe[k].tag;
        wd_beat = 2'(k);
      end
    dq_oe  = wd_req;
    dq_out = wd_req ? wd_data : '0;
  end

  // one command per clock; a column command only to an activated bank
  a_cas_open: assert property (@(posedge clk) disable iff (!rst_n)
                               cas_go |-> open_b[hd.bank]);
  a_rcd:      assert property (@(posedge clk) disable iff (!rst_n)
                               cas_go |-> since_act[hd.bank] >= CW'(T_RCD));
endmodule
