// tb_sdram_sched: checks SDRAM command timing, data movement and bus rate.
//
// The scheduler drives a behavioural DDR SDRAM that flags any breach of the
// timing rules. Four phases:
//   1. reads rotating over four banks  - bursts must follow back to back,
//      one column command every BL/2 = 4 clocks;
//   2. reads rotating over three banks - still 4 clocks apart, since three
//      bursts (12 clocks) exceed the row cycle of 10 clocks;
//   3. reads alternating over two banks - the row cycle limits the rate to
//      two bursts per 10 clocks;
//   4. random reads and writes to random banks - every read beat must carry
//      the data last written to (or preset in) its address, every write beat
//      request must match the next queued write, and tags must come back in
//      order.
// Column-command spacing is measured on the command bus.
module tb_sdram_sched;
  import mif_pkg::*;

  localparam int BL = 8, T_RCD = 3, T_RAS = 7, T_RP = 3, T_RC = 10, T_CL = 2, T_WR = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  du_req_t in;
  logic [3:0] bank_busy;
  sdram_cmd_e cmd;
  logic [BANK_W-1:0] ba;
  logic [ROW_W-1:0] addr;
  ddr_beat_t dq_out, dq_in;
  logic dq_oe;
  logic rd_valid, wd_req;
  du_tag_t rd_tag, wd_tag;
  logic [1:0] rd_beat, wd_beat;
  ddr_beat_t rd_data, wd_data;

  sdram_sched #(.BL(BL), .T_RCD(T_RCD), .T_RAS(T_RAS), .T_RP(T_RP), .T_RC(T_RC),
                .T_CL(T_CL), .T_WR(T_WR)) dut (.*);

  ddr_sdram_model #(.BL(BL), .T_RCD(T_RCD), .T_RAS(T_RAS), .T_RP(T_RP), .T_RC(T_RC),
                    .T_CL(T_CL), .T_WR(T_WR)) mem (
    .clk, .cke(rst_n), .cmd, .ba, .addr, .dq_in(dq_out), .dq_oe, .dq_out(dq_in)
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference data ----------------
  typedef logic [BANK_W+ROW_W+COL_W-1:0] waddr_t;
  logic [DQ_W-1:0] refmem [waddr_t];
  function automatic logic [DQ_W-1:0] ref_word(input waddr_t a);
    return refmem.exists(a) ? refmem[a] : {32'hA5A5_0000 ^ 32'(a), 32'(a) * 32'h9E37_79B1};
  endfunction

  typedef struct { du_tag_t tag; ddr_beat_t d [4]; } burst_t;
  burst_t rq [$];   // expected reads, in order
  burst_t wq [$];   // queued write data, in order
  int rd_beats = 0, wr_beats = 0;

  // write data supplied on request
  always_comb begin
    wd_data = '0;
    if (wd_req && wq.size() > 0) wd_data = wq[0].d[wd_beat];
  end

  // column-command times; everything is sampled in the middle of the clock
  longint cyc = 0;
  longint cas_t [$];
  bit wpop = 0;
  always @(negedge clk) begin
    cyc++;
    // a finished write burst leaves the queue only once the memory took it
    if (wpop) begin
      void'(wq.pop_front());
      wpop = 0;
    end
    if (cmd == CMD_RDA || cmd == CMD_WRA) cas_t.push_back(cyc);
    if (rd_valid) begin
      check(rq.size() > 0, "read data expected");
      if (rq.size() > 0) begin
        check(rd_tag == rq[0].tag, "read tag order");
        check(rd_data == rq[0].d[rd_beat], $sformatf("read data beat %0d got %h exp %h", rd_beat, rd_data, rq[0].d[rd_beat]));
        rd_beats++;
        if (rd_beat == 2'd3) void'(rq.pop_front());
      end
    end
    if (wd_req) begin
      check(wq.size() > 0 && wd_tag == wq[0].tag, "write tag order");
      wr_beats++;
      if (wd_beat == 2'd3 && wq.size() > 0) wpop = 1;
    end
  end

  int uid = 0;
  task automatic send(input bit rd, input int bank, input int row, input int colu);
    du_req_t r;
    burst_t  b;
    r          = '0;
    r.rd       = rd;
    r.bank     = BANK_W'(bank);
    r.row      = ROW_W'(row);
    r.col      = COL_W'(colu * BL);
    r.tag      = du_tag_t'(uid);
    r.tag.last = 1'b0;
    uid++;
    b.tag = r.tag;
    for (int k = 0; k < 4; k++) begin
      waddr_t a;
      a = {r.bank, r.row, r.col + COL_W'(2 * k)};
      if (rd) b.d[k] = '{ref_word(a + 1'b1), ref_word(a)};
      else begin
        b.d[k] = '{{$urandom, $urandom}, {$urandom, $urandom}};
        refmem[a] = b.d[k][0];
        refmem[a + 1'b1] = b.d[k][1];
      end
    end
    @(negedge clk);
    in_valid = 1;
    in = r;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    if (rd) rq.push_back(b); else wq.push_back(b);
    @(posedge clk);
    #1;
    in_valid = 0;
  endtask

  task automatic drain();
    repeat (40) @(posedge clk);
  endtask

  task automatic run_rotation(input int nbanks, input int units, input int exp_gap,
                              input string name);
    int first;
    cas_t.delete();
    for (int u = 0; u < units; u++) send(1, (u % nbanks) * (nbanks == 2 ? 2 : 1), u, u % 32);
    drain();
    check(cas_t.size() == units, {name, ": all bursts issued"});
    // skip the start-up, then compare the mean spacing
    first = 4;
    check((cas_t[units - 1] - cas_t[first]) == longint'(exp_gap) * (units - 1 - first),
          $sformatf("%s: spacing %0d over %0d bursts", name, cas_t[units-1] - cas_t[first], units - 1 - first));
    $display("%s: %0d clocks for %0d bursts after start-up", name,
             cas_t[units - 1] - cas_t[first], units - 1 - first);
  endtask

  initial begin
    in_valid = 0; in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. four banks: 4 clocks per burst (exp_gap given per burst * 2 / 2)
    run_rotation(4, 40, 4, "four banks");
    // 2. three banks: still 4 clocks per burst
    run_rotation(3, 40, 4, "three banks");
    // 3. two banks: 10 clocks per two bursts = 5 per burst
    run_rotation(2, 41, 5, "two banks");
    // 4. random traffic
    for (int u = 0; u < 3000; u++)
      send($urandom_range(0, 1), $urandom_range(0, 3), $urandom_range(0, 7), $urandom_range(0, 3));
    drain();
    check(rq.size() == 0, "all reads returned");
    check(wq.size() == 0, "all writes taken");
    check(mem.violations == 0, $sformatf("SDRAM timing violations: %0d", mem.violations));
    check(mem.n_act == mem.n_rd + mem.n_wr, "one ACT per burst");
    $display("ACT %0d RDA %0d WRA %0d, read beats %0d write beats %0d",
             mem.n_act, mem.n_rd, mem.n_wr, rd_beats, wr_beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
