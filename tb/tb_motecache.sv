// tb_motecache: runs four MoteCache configurations side by side against
// the reference model in mc_env: the default 8-set x 4-way cache, the
// smallest direct-mapped 4 x 1 cache with early hit data, a fully
// associative 1 x 8 cache and the largest, 8 x 8, cache. Each configuration must show hits, misses,
// write-backs, filtered write-backs, silent and noisy stores.
module tb_motecache;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done [4];
  int   checks [4];
  int   failures [4];
  int   n_hit [4], n_miss [4], n_wb [4], n_cancel [4], n_silent [4], n_noisy [4], n_stall [4];
  int   total_checks;
  int   total_failures;

  always #5 clk = ~clk;

  mc_env #(.SETS(8), .WAYS(4), .EARLY_READ(1'b0)) env_samc (
    .clk, .rst_n, .done(done[0]), .checks(checks[0]), .failures(failures[0]),
    .n_hit(n_hit[0]), .n_miss(n_miss[0]), .n_wb(n_wb[0]), .n_cancel(n_cancel[0]),
    .n_silent(n_silent[0]), .n_noisy(n_noisy[0]), .n_stall(n_stall[0]));
  mc_env #(.SETS(4), .WAYS(1), .EARLY_READ(1'b1)) env_dmmc (
    .clk, .rst_n, .done(done[1]), .checks(checks[1]), .failures(failures[1]),
    .n_hit(n_hit[1]), .n_miss(n_miss[1]), .n_wb(n_wb[1]), .n_cancel(n_cancel[1]),
    .n_silent(n_silent[1]), .n_noisy(n_noisy[1]), .n_stall(n_stall[1]));
  mc_env #(.SETS(1), .WAYS(8), .EARLY_READ(1'b0)) env_famc (
    .clk, .rst_n, .done(done[2]), .checks(checks[2]), .failures(failures[2]),
    .n_hit(n_hit[2]), .n_miss(n_miss[2]), .n_wb(n_wb[2]), .n_cancel(n_cancel[2]),
    .n_silent(n_silent[2]), .n_noisy(n_noisy[2]), .n_stall(n_stall[2]));
  mc_env #(.SETS(8), .WAYS(8), .EARLY_READ(1'b0)) env_max (
    .clk, .rst_n, .done(done[3]), .checks(checks[3]), .failures(failures[3]),
    .n_hit(n_hit[3]), .n_miss(n_miss[3]), .n_wb(n_wb[3]), .n_cancel(n_cancel[3]),
    .n_silent(n_silent[3]), .n_noisy(n_noisy[3]), .n_stall(n_stall[3]));

  task automatic report();
    total_checks = 0;
    total_failures = 0;
    for (int i = 0; i < 4; i++) begin
      total_checks += checks[i];
      total_failures += failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < 4; i++) begin
      $display("config %0d: hits=%0d misses=%0d write-backs=%0d filtered=%0d silent=%0d noisy=%0d stalls=%0d",
               i, n_hit[i], n_miss[i], n_wb[i], n_cancel[i], n_silent[i], n_noisy[i], n_stall[i]);
      checks[i]++;
      if (n_hit[i] == 0 || n_miss[i] == 0 || n_wb[i] == 0 || n_cancel[i] == 0 ||
          n_silent[i] == 0 || n_noisy[i] == 0 || n_stall[i] == 0) begin
        failures[i]++;
        $display("FAIL config %0d: a mechanism never happened", i);
      end
    end
    report();
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures[0]++;
    $display("watchdog expired");
    report();
    $finish;
  end
endmodule
