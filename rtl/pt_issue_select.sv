// pt_issue_select: functional-unit selection and precomputation-table check
// in the issue stage.
//
// Up to W ready instructions are offered per cycle, oldest in slot 0. Going
// from oldest to youngest, an instruction that finds a free functional unit
// of its class takes it and executes as normal, even if the PT holds its
// result. An instruction that finds no free unit but whose opcode and operand
// values hit in the PT obtains its result from the PT and leaves the pipeline
// (ISSUE_PT). Otherwise it waits in the instruction window (ISSUE_WAIT). These
// rules are the source design's; the oldest-first order and the form of the
// free-unit counts are this design's choices.
//
// Interface and timing: purely combinational. fu_free[c] is the number of
// idle units of class c this cycle, from the core's resource pool.
// pt_req[i] / pt_rsp[i] connect to PT lookup ports. act[i] tells the core what
// to do with slot i, pt_result[i] carries the PT value for ISSUE_PT.
module pt_issue_select
  import ip_pkg::*;
#(
  parameter int unsigned W = 4  // issue width of the 4-way machine
) (
  input  issue_slot_t               slot      [W],
  input  logic [FU_CNT_W-1:0]       fu_free   [NUM_FU_CLASSES],
  output pt_req_t                   pt_req    [W],
  input  pt_rsp_t                   pt_rsp    [W],
  output issue_act_e                act       [W],
  output data_t                     pt_result [W]
);

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      pt_req[i].valid = slot[i].valid && slot[i].is_arith;
      pt_req[i].key   = slot[i].key;
    end
  end

  always_comb begin
    logic [FU_CNT_W-1:0] left [NUM_FU_CLASSES];
    for (int c = 0; c < int'(NUM_FU_CLASSES); c++) left[c] = fu_free[c];
    for (int i = 0; i < int'(W); i++) begin
      act[i]          = ISSUE_WAIT;
      pt_result[i]    = '0;
      if (slot[i].valid) begin
        if (left[slot[i].fu] != '0) begin
          act[i]           = ISSUE_FU;
          left[slot[i].fu] = left[slot[i].fu] - 1'b1;
        end else if (slot[i].is_arith && pt_rsp[i].hit) begin
          act[i]       = ISSUE_PT;
          pt_result[i] = pt_rsp[i].result;
        end
      end
    end
  end

  // Never more units of a class handed out than were free.
  always_comb begin
    for (int c = 0; c < int'(NUM_FU_CLASSES); c++) begin
      int unsigned used;
      used = 0;
      for (int i = 0; i < int'(W); i++)
        if (act[i] == ISSUE_FU && slot[i].fu == fu_class_e'(c)) used++;
      assert (used <= fu_free[c]) else $error("pt_issue_select: unit class %0d over-issued", c);
    end
  end

endmodule
