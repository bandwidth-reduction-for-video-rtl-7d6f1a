// tb_unit_shapes: the MPEG-2 decoding workload at three 64-byte data-unit
// shapes, 16x4 (the default), 32x2 and 8x8.
//
// Each shape runs the same kind of traffic through its own mem_if_top and
// SDRAM model (see shape_run):
//   - a full 1920 x 1088 frame written as macroblocks;
//   - the frame displayed through the line memory;
//   - 4000 prediction reads drawn from the measured MPEG-2 block-type mix.
// shape_run checks data, unit counts against the unit-count formula,
// statistics and SDRAM timing. This testbench adds up its checks and
// prints, per shape:
//   - the overhead of the prediction reads;
//   - the overhead of all traffic;
//   - the clocks taken.
// The display reads are aligned whole units, so they add no overhead.
// The overhead numbers are a report, not checks: they depend on the
// position model of the prediction blocks.
module tb_unit_shapes;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done [3];
  int   ck [3], fl [3], povh [3], tovh [3], clk_n [3];

  shape_run #(.M(16), .N(4)) s16x4 (.clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]),
                                    .pred_ovh_pm(povh[0]), .total_ovh_pm(tovh[0]), .clocks(clk_n[0]));
  shape_run #(.M(32), .N(2)) s32x2 (.clk, .done(done[1]), .checks(ck[1]), .failures(fl[1]),
                                    .pred_ovh_pm(povh[1]), .total_ovh_pm(tovh[1]), .clocks(clk_n[1]));
  shape_run #(.M(8),  .N(8)) s8x8  (.clk, .done(done[2]), .checks(ck[2]), .failures(fl[2]),
                                    .pred_ovh_pm(povh[2]), .total_ovh_pm(tovh[2]), .clocks(clk_n[2]));

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  string names [3] = '{"16x4", "32x2", "8x8"};

  initial begin
    repeat (2) @(posedge clk);
    wait (done[0] && done[1] && done[2]);
    for (int i = 0; i < 3; i++) begin
      checks   += ck[i];
      failures += fl[i];
      $display("%-5s prediction overhead %0d.%0d%%, all traffic %0d.%0d%%, %0d clocks",
               names[i], povh[i] / 10, povh[i] % 10, tovh[i] / 10, tovh[i] % 10, clk_n[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
