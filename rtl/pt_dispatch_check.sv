// pt_dispatch_check: precomputation-table check in the dispatch stage.
//
// For each of the W instructions dispatched in a cycle it asks the PT whether
// the instruction's opcode and operand values form a stored unique
// computation. On a hit the instruction takes its result from the PT and
// leaves the pipeline: the core marks it complete at once, so it never enters
// the issue queue and waits only for in-order commit; its result is also
// available to dependent instructions. On a miss the instruction continues
// through the pipeline as normal. These are the source design's rules.
//
// This design's own choices: only instructions flagged arithmetic by decode
// are looked up (only arithmetic computations are ever loaded into the PT), and
// only when both operand values are already available at dispatch; an
// instruction still waiting for an operand gets its second chance at issue.
//
// Interface and timing: purely combinational. slot[i] comes from decode,
// pt_req[i] / pt_rsp[i] connect to PT lookup ports, pt_done[i] with
// pt_result[i] go to the dispatch logic of the core in the same cycle.
module pt_dispatch_check
  import ip_pkg::*;
#(
  parameter int unsigned W = 4  // dispatch width of the 4-way machine
) (
  input  disp_slot_t slot      [W],
  output pt_req_t    pt_req    [W],
  input  pt_rsp_t    pt_rsp    [W],
  output logic       pt_done   [W],
  output data_t      pt_result [W]
);

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      pt_req[i].valid = slot[i].valid && slot[i].is_arith &&
                        slot[i].op1_ready && slot[i].op2_ready;
      pt_req[i].key   = slot[i].key;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      pt_done[i]      = pt_req[i].valid && pt_rsp[i].hit;
      pt_result[i]    = pt_done[i] ? pt_rsp[i].result : '0;
    end
  end

endmodule
