// tb_pt_dispatch_check: self-checking testbench of the dispatch-stage check.
//
// Random dispatch groups of four slots (valid or not, arithmetic or not,
// operands ready or not) are applied together with random PT answers. The
// expected lookup requests and the expected "done at dispatch" flags and
// results are computed from the rules: only a valid arithmetic instruction
// with both operands available looks the PT up, and only such an instruction
// that hits is removed from the pipeline with the PT's result.
module tb_pt_dispatch_check;
  import ip_pkg::*;

  localparam int unsigned W = 4;

  disp_slot_t slot      [W];
  pt_req_t    pt_req    [W];
  pt_rsp_t    pt_rsp    [W];
  logic       pt_done   [W];
  data_t      pt_result [W];

  int checks = 0, failures = 0;
  int n_done = 0, n_miss = 0, n_notready = 0, n_nonarith = 0;
  logic clk = 1'b0;

  pt_dispatch_check #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int i = 0; i < int'(W); i++) begin
        slot[i].valid      = ($urandom_range(0, 7) != 0);
        slot[i].is_arith   = ($urandom_range(0, 3) != 0);
        slot[i].op1_ready  = ($urandom_range(0, 4) != 0);
        slot[i].op2_ready  = ($urandom_range(0, 4) != 0);
        slot[i].key.opcode = 8'($urandom);
        slot[i].key.op1    = {$urandom, $urandom};
        slot[i].key.op2    = {$urandom, $urandom};
        pt_rsp[i].hit      = $urandom_range(0, 1) == 1;
        pt_rsp[i].result   = {$urandom, $urandom};
      end
      #1;
      for (int i = 0; i < int'(W); i++) begin
        bit want_req, want_done;
        want_req  = slot[i].valid && slot[i].is_arith && slot[i].op1_ready && slot[i].op2_ready;
        want_done = want_req && pt_rsp[i].hit;
        check(pt_req[i].valid == want_req, "lookup request gating");
        check(!want_req || pt_req[i].key == slot[i].key, "lookup key");
        check(pt_done[i] == want_done, "done-at-dispatch flag");
        check(!want_done || pt_result[i] == pt_rsp[i].result, "PT result passed on");
        if (want_done) n_done++;
        else if (want_req) n_miss++;
        else if (slot[i].valid && slot[i].is_arith) n_notready++;
        else if (slot[i].valid) n_nonarith++;
      end
    end
    check(n_done > 0 && n_miss > 0 && n_notready > 0 && n_nonarith > 0, "all cases seen");
    $display("done=%0d miss=%0d not_ready=%0d non_arith=%0d", n_done, n_miss, n_notready, n_nonarith);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
