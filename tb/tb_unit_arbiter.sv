// tb_unit_arbiter: checks the bank-aware round-robin choice between clients.
//
// Random request patterns and bank states. A reference model keeps its own
// round-robin pointer and predicts the winner: the first client, starting
// from the pointer, whose unit's bank is free; failing that the first valid
// client. The test compares winner, forwarded unit, ready signals and the
// pointer update, and counts how often the bank rule overrode plain
// round-robin order.
module tb_unit_arbiter;
  import mif_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] in_valid, in_ready;
  du_req_t    in_req [2];
  logic [3:0] bank_busy;
  logic       out_valid, out_ready;
  du_req_t    out;

  unit_arbiter #(.NCLI(2)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, overrides = 0;
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

  int ptr_m;
  initial begin
    in_valid = 0; out_ready = 0; bank_busy = 0;
    in_req[0] = '0; in_req[1] = '0;
    ptr_m = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int exp_sel;
      bit exp_found, free0, free1;
      @(negedge clk);
      in_valid  = 2'($urandom);
      out_ready = ($urandom_range(0, 3) != 0);
      bank_busy = 4'($urandom);
      for (int i = 0; i < 2; i++) begin
        in_req[i] = du_req_t'({$urandom, $urandom});
        in_req[i].tag.client = i[0];
      end
      #1;
      free0 = in_valid[0] && !bank_busy[in_req[0].bank];
      free1 = in_valid[1] && !bank_busy[in_req[1].bank];
      exp_found = 0; exp_sel = 0;
      for (int k = 0; k < 2; k++) begin
        int i;
        i = (ptr_m + k) % 2;
        if (!exp_found && ((i == 0) ? free0 : free1)) begin exp_sel = i; exp_found = 1; end
      end
      for (int k = 0; k < 2; k++) begin
        int i;
        i = (ptr_m + k) % 2;
        if (!exp_found && in_valid[i]) begin exp_sel = i; exp_found = 1; end
      end
      if (exp_found && in_valid == 2'b11 && exp_sel != ptr_m) overrides++;
      check(out_valid == exp_found, "out_valid");
      if (exp_found) begin
        check(out == in_req[exp_sel], "forwarded unit");
        check(in_ready == (out_ready ? 2'(1 << exp_sel) : 2'b00), "in_ready");
        if (out_ready) ptr_m = (exp_sel + 1) % 2;
      end else
        check(in_ready == 2'b00, "no ready while idle");
    end
    check(overrides > 100, "bank rule exercised");
    $display("bank-rule overrides: %0d", overrides);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
