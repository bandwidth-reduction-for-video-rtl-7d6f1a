// tb_block_xlate: checks which data units a block transfer is turned into.
//
// Random field and frame blocks (1..40 x 1..40 pixels) anywhere in a
// 1920-pixel-wide picture. The reference set of units is built pixel line by
// pixel line (a unit is needed when one of its field lines and columns holds
// a requested pixel). Each emitted unit must be in the set, appear once, and
// the whole set must be emitted, with `last` on the final unit only. For field
// blocks the count is also checked against the overhead formula
// (1 + floor((Bx+m-1)/M)) * (1 + floor((By+n-1)/N)), and with the consumer
// always ready the units must leave one per clock without gaps. Half of the
// transfers run with a randomly stalling consumer.
module tb_block_xlate;
  import mif_pkg::*;

  localparam int M = 16, N = 4;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, out_valid, out_ready;
  xfer_req_t req;
  du_req_t   out;

  block_xlate #(.M(M), .N(N)) dut (.*);

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

  initial begin
    req_valid = 0; out_ready = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      bit ref_set [int];
      bit got [int];
      int n_emit, first_cyc, last_cyc, cyc, nlines, eq3;
      bit stall, saw_last, ok_last;
      req.rd     = $urandom_range(0, 1);
      req.interl = $urandom_range(0, 1);
      req.bx     = BSZ_W'($urandom_range(1, 40));
      req.by     = BSZ_W'($urandom_range(1, 40));
      req.x      = COORD_W'($urandom_range(0, 1920 - 41));
      req.y      = COORD_W'($urandom_range(0, 1000));
      req.line   = 1920;
      req.base   = UIDX_W'($urandom_range(0, 1000));
      stall      = (t % 2 == 1);
      ref_set.delete();
      got.delete();
      // reference set of units, key = f*2^20 + r*2^10 + c
      for (int k = 0; k < req.by; k++) begin
        int ln, f, r;
        ln = req.interl ? int'(req.y) + 2 * k : int'(req.y) + k;
        f  = ln % 2;
        r  = (ln / 2) / N;
        for (int c = req.x / M; c <= (req.x + req.bx - 1) / M; c++)
          ref_set[f * (1 << 20) + r * (1 << 10) + c] = 1;
      end
      // send the request
      @(negedge clk);
      req_valid = 1;
      out_ready = 0;
      #1;
      while (!req_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      req_valid = 0;
      n_emit = 0; saw_last = 0; ok_last = 1; cyc = 0; first_cyc = -1; last_cyc = -1;
      while (!saw_last && cyc < 5000) begin
        // decide and sample in the middle of the cycle; the unit moves at the next edge
        out_ready = stall ? $urandom_range(0, 1) : 1;
        #1;
        cyc++;
        if (out_valid && out_ready) begin
          int key;
          key = int'(out.tag.field) * (1 << 20) + int'(out.tag.urow) * (1 << 10) + int'(out.tag.ucol);
          check(ref_set.exists(key), "unit outside block");
          check(!got.exists(key), "unit emitted twice");
          check(out.rd == req.rd, "direction");
          check(out.bank == {out.tag.ucol[0] ^ out.tag.urow[0], out.tag.field ^ out.tag.urow[1]},
                "bank of unit");
          got[key] = 1;
          n_emit++;
          if (first_cyc < 0) first_cyc = cyc;
          last_cyc = cyc;
          saw_last = out.tag.last;
          if (saw_last && n_emit != ref_set.num()) ok_last = 0;
        end
        @(negedge clk);
      end
      check(saw_last, "last flag seen");
      check(ok_last, "last flag only on final unit");
      check(n_emit == ref_set.num(), $sformatf("unit count %0d vs %0d (t=%0d)", n_emit, ref_set.num(), t));
      if (req.interl) begin
        int m, n;
        m = req.x % M;
        n = (req.y / 2) % N;
        eq3 = (1 + (req.bx + m - 1) / M) * (1 + (req.by + n - 1) / N);
        check(n_emit == eq3, "field block count against overhead formula");
        if (!stall) check(last_cyc - first_cyc == n_emit - 1, "one unit per clock");
      end
      // the translator must be idle again
      #1;
      check(req_ready, "idle after transfer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
