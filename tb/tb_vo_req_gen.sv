// tb_vo_req_gen: checks the display request sequence and its credits.
//
// A 64 x 40 frame (4 unit columns, 20 field lines = 5 strips per field) is
// requested with random back-pressure. Every request must be an M x N field
// read aligned to the unit grid, in the order field, strip, column, with the
// frame parameters passed through. Credits: the testbench returns a
// `released` pulse only a while after each strip has been requested, and the
// generator may never have more than two strips outstanding; the test
// counts how often it had to wait for a credit.
module tb_vo_req_gen;
  import mif_pkg::*;

  localparam int M = 16, N = 4, LINE = 64, HEIGHT = 40;
  localparam int UNITS = LINE / M, STRIPS = (HEIGHT / 2 + N - 1) / N;

  logic clk = 0, rst_n = 0;
  logic start, released, busy, req_valid, req_ready;
  logic [COORD_W-1:0] line, height;
  logic [UIDX_W-1:0] base;
  xfer_req_t req;

  vo_req_gen #(.M(M), .N(N)) dut (.*);

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

  int outstanding = 0, waits = 0, strips_started = 0, strips_done = 0;

  // display side: frees a strip buffer some clocks after a strip is complete
  initial begin
    released = 0;
    forever begin
      @(negedge clk);
      released = 0;
      if (strips_done > 0 && $urandom_range(0, 15) == 0) begin
        released = 1;
        strips_done--;
        outstanding--;
      end
    end
  end

  initial begin
    int f, s, c;
    start = 0; req_ready = 0; line = COORD_W'(LINE); height = COORD_W'(HEIGHT);
    base = UIDX_W'(1234);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    f = 0; s = 0; c = 0;
    while (busy) begin
      req_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (!req_valid && outstanding >= 2) waits++;
      if (req_valid && req_ready) begin
        check(req.rd && req.interl, "field read");
        check(req.bx == M && req.by == N, "M x N block");
        check(req.x == COORD_W'(c * M), $sformatf("x %0d", req.x));
        check(req.y == COORD_W'(2 * N * s + f), $sformatf("y %0d", req.y));
        check(req.line == line && req.base == base, "frame parameters");
        if (c == 0) begin
          outstanding++;
          strips_started++;
          check(outstanding <= 2, "at most two strips outstanding");
        end
        if (c == UNITS - 1) strips_done++;
        c++;
        if (c == UNITS) begin c = 0; s++; end
        if (s == STRIPS) begin s = 0; f++; end
      end
      @(negedge clk);
    end
    check(f == 2 && s == 0 && c == 0, "whole frame requested");
    check(strips_started == 2 * STRIPS, "strip count");
    check(waits > 0, "credit wait exercised");
    $display("credit waits: %0d", waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
