// tb_early_read: speed of the early-read variant on direct-mapped caches.
//
// Runs the same load/store trace (trace_cpu) on 4 x 1, 8 x 1 and 16 x 1
// direct-mapped caches, each built once normally and once with EARLY_READ,
// where a hit answers in the address cycle. Every load's data is checked.
// Both builds of one size must see the same hits, and the early-read build
// must finish exactly one cycle sooner per hit, since misses take the same
// time in both (write-back cycles are counted apart, as the unknown initial
// SRAM contents can make their number differ). Larger caches must hit more often. The cycle counts and the
// resulting speed-up are printed.
module tb_early_read;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done [6];
  int   checks [6];
  int   failures [6];
  int   cycles [6];
  int   hits [6];
  int   wbs [6];
  int   total_checks = 0;
  int   total_failures = 0;

  always #5 clk = ~clk;

  trace_cpu #(.SETS(4),  .WAYS(1), .EARLY_READ(1'b0)) cpu0 (.clk, .rst_n, .done(done[0]), .checks(checks[0]), .failures(failures[0]), .cycles(cycles[0]), .hits(hits[0]), .wbs(wbs[0]));
  trace_cpu #(.SETS(4),  .WAYS(1), .EARLY_READ(1'b1)) cpu1 (.clk, .rst_n, .done(done[1]), .checks(checks[1]), .failures(failures[1]), .cycles(cycles[1]), .hits(hits[1]), .wbs(wbs[1]));
  trace_cpu #(.SETS(8),  .WAYS(1), .EARLY_READ(1'b0)) cpu2 (.clk, .rst_n, .done(done[2]), .checks(checks[2]), .failures(failures[2]), .cycles(cycles[2]), .hits(hits[2]), .wbs(wbs[2]));
  trace_cpu #(.SETS(8),  .WAYS(1), .EARLY_READ(1'b1)) cpu3 (.clk, .rst_n, .done(done[3]), .checks(checks[3]), .failures(failures[3]), .cycles(cycles[3]), .hits(hits[3]), .wbs(wbs[3]));
  trace_cpu #(.SETS(16), .WAYS(1), .EARLY_READ(1'b0)) cpu4 (.clk, .rst_n, .done(done[4]), .checks(checks[4]), .failures(failures[4]), .cycles(cycles[4]), .hits(hits[4]), .wbs(wbs[4]));
  trace_cpu #(.SETS(16), .WAYS(1), .EARLY_READ(1'b1)) cpu5 (.clk, .rst_n, .done(done[5]), .checks(checks[5]), .failures(failures[5]), .cycles(cycles[5]), .hits(hits[5]), .wbs(wbs[5]));

  task automatic check(string what, int got, int exp);
    total_checks++;
    if (got != exp) begin
      total_failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic report();
    for (int i = 0; i < 6; i++) begin
      total_checks += checks[i];
      total_failures += failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    for (int s = 0; s < 3; s++) begin
      $display("%0d x 1: hits %0d, cycles %0d normal, %0d early read: %0d.%0d%% faster",
               4 << s, hits[2 * s], cycles[2 * s], cycles[2 * s + 1],
               (100 * (cycles[2 * s] - cycles[2 * s + 1])) / cycles[2 * s + 1],
               ((1000 * (cycles[2 * s] - cycles[2 * s + 1])) / cycles[2 * s + 1]) % 10);
      check("same hits in both builds", hits[2 * s + 1], hits[2 * s]);
      check("one cycle saved per hit",
            (cycles[2 * s] - wbs[2 * s]) - (cycles[2 * s + 1] - wbs[2 * s + 1]), hits[2 * s]);
    end
    check("8x1 hits more than 4x1", int'(hits[2] > hits[0]), 1);
    check("16x1 hits more than 8x1", int'(hits[4] > hits[2]), 1);
    report();
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    total_failures++;
    $display("watchdog expired");
    report();
    $finish;
  end
endmodule
