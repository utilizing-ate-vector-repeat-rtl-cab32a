// tb_vr_workloads: runs the decompression logic in the configuration of
// each published benchmark circuit, for both tester modes: chain counts and
// CSG/USG sizes as published for s13207, s15850, s38417 and s38584; chain
// lengths from the circuits' scan-cell counts (35, 31, 42, 37). The real
// test sets are not available, so each configuration is driven with random
// encoded clusters by vr_wl_harness; every specified bit is checked, and
// each configuration must show common bits, unique bits, a replayed CSG
// stream and a repeat-disabled cube.
module tb_vr_workloads;
  import vr_pkg::*;

  localparam int NW = 8;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  logic go = 1'b0;

  logic done[NW];
  int   ck[NW], fl[NW], nc[NW], nu[NW], nr[NW], nd[NW], nt[NW];

  vr_wl_harness #(.MODE(ATE_RPG), .CHAINS(20), .LEN(35), .CSG_N(86),  .USG_N(27))  w0 (
    .clk, .rst_n, .go, .done(done[0]), .checks(ck[0]), .failures(fl[0]), .n_common_bits(nc[0]),
    .n_unique_bits(nu[0]), .n_repeated_cubes(nr[0]), .n_rd_cubes(nd[0]), .n_retries(nt[0]));
  vr_wl_harness #(.MODE(ATE_RPA), .CHAINS(20), .LEN(35), .CSG_N(78),  .USG_N(150)) w1 (
    .clk, .rst_n, .go, .done(done[1]), .checks(ck[1]), .failures(fl[1]), .n_common_bits(nc[1]),
    .n_unique_bits(nu[1]), .n_repeated_cubes(nr[1]), .n_rd_cubes(nd[1]), .n_retries(nt[1]));
  vr_wl_harness #(.MODE(ATE_RPG), .CHAINS(20), .LEN(31), .CSG_N(115), .USG_N(28))  w2 (
    .clk, .rst_n, .go, .done(done[2]), .checks(ck[2]), .failures(fl[2]), .n_common_bits(nc[2]),
    .n_unique_bits(nu[2]), .n_repeated_cubes(nr[2]), .n_rd_cubes(nd[2]), .n_retries(nt[2]));
  vr_wl_harness #(.MODE(ATE_RPA), .CHAINS(20), .LEN(31), .CSG_N(93),  .USG_N(142)) w3 (
    .clk, .rst_n, .go, .done(done[3]), .checks(ck[3]), .failures(fl[3]), .n_common_bits(nc[3]),
    .n_unique_bits(nu[3]), .n_repeated_cubes(nr[3]), .n_rd_cubes(nd[3]), .n_retries(nt[3]));
  vr_wl_harness #(.MODE(ATE_RPG), .CHAINS(40), .LEN(42), .CSG_N(275), .USG_N(41))  w4 (
    .clk, .rst_n, .go, .done(done[4]), .checks(ck[4]), .failures(fl[4]), .n_common_bits(nc[4]),
    .n_unique_bits(nu[4]), .n_repeated_cubes(nr[4]), .n_rd_cubes(nd[4]), .n_retries(nt[4]));
  vr_wl_harness #(.MODE(ATE_RPA), .CHAINS(40), .LEN(42), .CSG_N(231), .USG_N(261)) w5 (
    .clk, .rst_n, .go, .done(done[5]), .checks(ck[5]), .failures(fl[5]), .n_common_bits(nc[5]),
    .n_unique_bits(nu[5]), .n_repeated_cubes(nr[5]), .n_rd_cubes(nd[5]), .n_retries(nt[5]));
  vr_wl_harness #(.MODE(ATE_RPG), .CHAINS(40), .LEN(37), .CSG_N(145), .USG_N(48))  w6 (
    .clk, .rst_n, .go, .done(done[6]), .checks(ck[6]), .failures(fl[6]), .n_common_bits(nc[6]),
    .n_unique_bits(nu[6]), .n_repeated_cubes(nr[6]), .n_rd_cubes(nd[6]), .n_retries(nt[6]));
  vr_wl_harness #(.MODE(ATE_RPA), .CHAINS(40), .LEN(37), .CSG_N(112), .USG_N(284)) w7 (
    .clk, .rst_n, .go, .done(done[7]), .checks(ck[7]), .failures(fl[7]), .n_common_bits(nc[7]),
    .n_unique_bits(nu[7]), .n_repeated_cubes(nr[7]), .n_rd_cubes(nd[7]), .n_retries(nt[7]));

  string names[NW] = '{"s13207 pin-group", "s13207 all-pins", "s15850 pin-group", "s15850 all-pins",
                       "s38417 pin-group", "s38417 all-pins", "s38584 pin-group", "s38584 all-pins"};

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    bit all_done;
    checks = 0; failures = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    go = 1'b1;
    do begin
      @(negedge clk);
      all_done = 1;
      for (int w = 0; w < NW; w++) if (!done[w]) all_done = 0;
    end while (!all_done);
    for (int w = 0; w < NW; w++) begin
      $display("%-18s checks=%0d failures=%0d common_bits=%0d unique_bits=%0d replayed_cubes=%0d rd_cubes=%0d retries=%0d",
               names[w], ck[w], fl[w], nc[w], nu[w], nr[w], nd[w], nt[w]);
      checks += ck[w] + 1;
      failures += fl[w];
      if (nc[w] == 0 || nu[w] == 0 || nr[w] == 0 || nd[w] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
