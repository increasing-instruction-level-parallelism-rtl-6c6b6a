// tb_pt_issue_select: self-checking testbench of the issue-stage check.
//
// Random groups of four ready instructions (unit class, arithmetic or not)
// are offered with random free-unit counts (0 to 2 per class, so units run
// out often) and random PT answers. A reference model walks the slots oldest
// first: a free unit of the class is taken if there is one, else a PT hit of
// an arithmetic instruction completes it from the PT, else it waits. Every
// action, every PT result and the lookup requests are compared.
module tb_pt_issue_select;
  import ip_pkg::*;

  localparam int unsigned W = 4;

  issue_slot_t          slot      [W];
  logic [FU_CNT_W-1:0]  fu_free   [NUM_FU_CLASSES];
  pt_req_t              pt_req    [W];
  pt_rsp_t              pt_rsp    [W];
  issue_act_e           act       [W];
  data_t                pt_result [W];

  int checks = 0, failures = 0;
  int n_fu = 0, n_pt = 0, n_wait = 0, n_fu_with_hit = 0;
  logic clk = 1'b0;

  pt_issue_select #(.W(W)) dut (.*);

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
      int left [NUM_FU_CLASSES];
      @(negedge clk);
      for (int c = 0; c < int'(NUM_FU_CLASSES); c++) begin
        fu_free[c] = FU_CNT_W'($urandom_range(0, 2));
        left[c]    = int'(fu_free[c]);
      end
      for (int i = 0; i < int'(W); i++) begin
        slot[i].valid      = ($urandom_range(0, 7) != 0);
        slot[i].fu         = fu_class_e'($urandom_range(0, NUM_FU_CLASSES - 1));
        slot[i].is_arith   = (slot[i].fu != FU_MEM) && ($urandom_range(0, 5) != 0);
        slot[i].key.opcode = 8'($urandom);
        slot[i].key.op1    = {$urandom, $urandom};
        slot[i].key.op2    = {$urandom, $urandom};
        pt_rsp[i].hit      = $urandom_range(0, 1) == 1;
        pt_rsp[i].result   = {$urandom, $urandom};
      end
      #1;
      for (int i = 0; i < int'(W); i++) begin
        issue_act_e want;
        bit want_req;
        want_req = slot[i].valid && slot[i].is_arith;
        want = ISSUE_WAIT;
        if (slot[i].valid) begin
          if (left[slot[i].fu] > 0) begin
            want = ISSUE_FU;
            left[slot[i].fu]--;
          end else if (want_req && pt_rsp[i].hit) begin
            want = ISSUE_PT;
          end
        end
        check(pt_req[i].valid == want_req, "lookup request gating");
        check(!want_req || pt_req[i].key == slot[i].key, "lookup key");
        check(act[i] == want, "issue action");
        check(want != ISSUE_PT || pt_result[i] == pt_rsp[i].result, "PT result");
        case (want)
          ISSUE_FU:   begin n_fu++; if (want_req && pt_rsp[i].hit) n_fu_with_hit++; end
          ISSUE_PT:   n_pt++;
          default:    if (slot[i].valid) n_wait++;
        endcase
      end
    end
    check(n_fu > 0 && n_pt > 0 && n_wait > 0 && n_fu_with_hit > 0, "all cases seen");
    $display("fu=%0d pt=%0d wait=%0d fu_despite_hit=%0d", n_fu, n_pt, n_wait, n_fu_with_hit);
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
