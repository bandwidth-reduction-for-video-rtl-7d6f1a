// tb_comm_analyzer: checks the request statistics.
//
// Random transfers from both client ports: prediction block types of the
// MPEG-2 sets, writes, display reads and odd sizes. A reference model in the
// testbench classifies each transfer, counts requested pixels and computes
// the transferred pixels from the unit-count formula
// (1 + floor((Bx+m-1)/M)) * (1 + floor((By+n-1)/N)) * M * N for field blocks,
// and for frame blocks by splitting them into their two fields. After the
// traffic all occurrence, pixel and histogram counters are read back and
// compared. Both ports request at once for part of the run, so the
// round-robin service and the back-pressure on ev_ready are exercised.
module tb_comm_analyzer;
  import mif_pkg::*;

  localparam int M = 16, N = 4;
  localparam int NBIN = M * 2 * N;

  logic clk = 0, rst_n = 0;
  logic [1:0] ev_valid, ev_ready;
  xfer_req_t  ev_req [2];
  logic       busy;
  logic       rd_en;
  logic [1:0] rd_sel;
  logic [11:0] rd_addr;
  logic [31:0] rd_data;

  comm_analyzer #(.M(M), .N(N), .NCLI(2)) dut (.*);

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

  int occ_m [NCLASS], req_m [NCLASS], xf_m [NCLASS];
  int hist_m [NCLASS * NBIN];
  int both_busy = 0;

  function automatic int ref_class(input xfer_req_t r, input int client);
    int sizes [22][3] = '{
      '{0,16,16}, '{0,17,16}, '{0,16,17}, '{0,17,17}, '{0,16,8}, '{0,18,8}, '{0,16,9}, '{0,18,9},
      '{1,16,16}, '{1,17,16}, '{1,16,17}, '{1,17,17}, '{1,16,8}, '{1,18,8}, '{1,16,9}, '{1,18,9},
      '{1,17,8}, '{1,17,9}, '{1,16,4}, '{1,18,4}, '{1,16,5}, '{1,18,5}};
    if (client == 1 && r.rd) return 23;
    if (!r.rd) return 22;
    for (int i = 0; i < 22; i++)
      if (sizes[i][0] == r.interl && sizes[i][1] == r.bx && sizes[i][2] == r.by) return i;
    return 24;
  endfunction

  function automatic int ref_units(input xfer_req_t r);
    int m, cols, rows;
    m = r.x % M;
    cols = 1 + (r.bx + m - 1) / M;
    if (r.interl) rows = 1 + (r.by + (r.y / 2) % N - 1) / N;
    else begin
      // field f holds frame lines of parity f; count the unit rows each touches
      rows = 0;
      for (int f = 0; f < 2; f++) begin
        int lo, hi;
        lo = -1; hi = -1;
        for (int l = r.y; l < r.y + r.by; l++)
          if (l % 2 == f) begin
            if (lo < 0) lo = (l / 2) / N;
            hi = (l / 2) / N;
          end
        if (lo >= 0) rows += hi - lo + 1;
      end
    end
    return cols * rows;
  endfunction

  function automatic xfer_req_t rand_req(input int client);
    xfer_req_t r;
    int sizes [8][2] = '{'{16,16}, '{17,16}, '{16,17}, '{17,17}, '{16,8}, '{18,8}, '{16,4}, '{18,5}};
    int k;
    r = '0;
    k = $urandom_range(0, 7);
    r.rd     = (client == 1) ? 1'b1 : ($urandom_range(0, 4) != 0);
    r.interl = $urandom_range(0, 1);
    r.bx     = BSZ_W'(sizes[k][0]);
    r.by     = BSZ_W'(sizes[k][1]);
    if ($urandom_range(0, 9) == 0) begin
      r.bx = BSZ_W'($urandom_range(1, 30));
      r.by = BSZ_W'($urandom_range(1, 30));
    end
    r.x    = COORD_W'($urandom_range(0, 1800));
    r.y    = COORD_W'($urandom_range(0, 1000));
    r.line = 1920;
    return r;
  endfunction

  task automatic account(input xfer_req_t r, input int client);
    int c, bin;
    c = ref_class(r, client);
    occ_m[c]++;
    req_m[c] += r.bx * r.by;
    xf_m[c]  += ref_units(r) * M * N;
    bin = c * NBIN + (r.interl ? ((r.y / 2) % N) : (r.y % (2 * N))) * M + (r.x % M);
    hist_m[bin]++;
  endtask

  initial begin
    xfer_req_t pend [2];
    int sent [2];
    ev_valid = 0; rd_en = 0; rd_sel = 0; rd_addr = 0;
    ev_req[0] = '0; ev_req[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (busy) @(negedge clk);
    sent = '{0, 0};
    pend[0] = rand_req(0); pend[1] = rand_req(1);
    while (sent[0] < 3000 || sent[1] < 3000) begin
      for (int i = 0; i < 2; i++) begin
        ev_valid[i] = (sent[i] < 3000) && ($urandom_range(0, 3) != 0);
        ev_req[i]   = pend[i];
      end
      #1;
      if (ev_valid == 2'b11) both_busy++;
      for (int i = 0; i < 2; i++)
        if (ev_valid[i] && ev_ready[i]) begin
          account(pend[i], i);
          sent[i]++;
          pend[i] = rand_req(i);
        end
      check($countones(ev_ready) <= 1, "one event per clock");
      @(negedge clk);
    end
    ev_valid = 0;
    repeat (3) @(negedge clk);
    // read back every counter
    for (int c = 0; c < NCLASS; c++)
      for (int s = 0; s < 3; s++) begin
        rd_en = 1; rd_sel = 2'(s); rd_addr = 12'(c);
        @(negedge clk);
        rd_en = 0;
        check(rd_data == 32'(s == 0 ? occ_m[c] : s == 1 ? req_m[c] : xf_m[c]),
              $sformatf("class %0d table %0d: %0d", c, s, rd_data));
      end
    for (int b = 0; b < NCLASS * NBIN; b++) begin
      rd_en = 1; rd_sel = 2'd3; rd_addr = 12'(b);
      @(negedge clk);
      rd_en = 0;
      check(rd_data == 32'(hist_m[b]), $sformatf("hist bin %0d: %0d vs %0d", b, rd_data, hist_m[b]));
    end
    check(both_busy > 100, "simultaneous requests exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
