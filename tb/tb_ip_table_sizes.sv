// tb_ip_table_sizes: speedup of instruction precomputation against table size.
//
// Units with 16, 32, 256 and 2048 entries (the sizes at which the technique
// is usually compared) run the same synthetic program, each profiled on
// input A and run on input A and on input B. Each size is built twice: once
// filled with the most frequent computations, once with those of the largest
// frequency x latency product (F/LP). Every PT answer inside each run is
// checked by ip_size_run. This testbench then requires
// that every size speeds both inputs up, that the largest table does at least
// as well as the smallest, and that a profile from input A still helps on
// input B. It prints the speedup table.
module tb_ip_table_sizes;

  localparam int NS = 8;
  localparam int unsigned SIZES [NS] = '{16, 32, 256, 2048, 16, 32, 256, 2048};
  localparam bit          BYFLP [NS] = '{0, 0, 0, 0, 1, 1, 1, 1};

  int cyc_aa [NS], cyc_ab [NS], cyc_ba [NS], cyc_bb [NS], n_stored [NS];
  int chk [NS], fail [NS];
  bit done [NS];

  for (genvar g = 0; g < NS; g++) begin : g_size
    ip_size_run #(.ENTRIES(SIZES[g]), .FLP(BYFLP[g])) u_run (
      .cyc_aa     (cyc_aa[g]),
      .cyc_ab     (cyc_ab[g]),
      .cyc_base_a (cyc_ba[g]),
      .cyc_base_b (cyc_bb[g]),
      .n_stored   (n_stored[g]),
      .checks     (chk[g]),
      .failures   (fail[g]),
      .done       (done[g])
    );
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real pct(int base, int with_pt);
    return 100.0 * (real'(base) / real'(with_pt) - 1.0);
  endfunction

  initial begin
    real s_aa [NS], s_ab [NS];
    wait (done.and() == 1'b1);
    $display("select     entries  stored  profile A/run A  profile A/run B");
    for (int g = 0; g < NS; g++) begin
      s_aa[g] = pct(cyc_ba[g], cyc_aa[g]);
      s_ab[g] = pct(cyc_bb[g], cyc_ab[g]);
      $display("%-9s  %7d  %6d  %14.1f%%  %14.1f%%", BYFLP[g] ? "F/LP" : "frequency",
               SIZES[g], n_stored[g], s_aa[g], s_ab[g]);
      checks   += chk[g];
      failures += fail[g];
      check(cyc_ba[g] == cyc_ba[0] && cyc_bb[g] == cyc_bb[0], "same base run for every size");
      check(cyc_aa[g] < cyc_ba[g], "speedup on input A");
      check(cyc_ab[g] < cyc_bb[g], "speedup on input B");
    end
    check(s_aa[3] >= s_aa[0] && s_ab[3] >= s_ab[0], "largest table at least as good as smallest");
    check(s_aa[7] >= s_aa[4] && s_ab[7] >= s_ab[4], "same with F/LP selection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
