// ip_unit: instruction precomputation unit of a 4-way issue out-of-order core.
//
// Instruction precomputation replaces dynamic value reuse by a table that a
// profiling run fills: the arithmetic unique computations (opcode plus operand
// values) executed most often, or with the largest frequency x latency
// product, are written with their results into the precomputation table (PT)
// before the program starts, and the table is not changed while the program
// runs. The core then consults the PT in two places:
//   dispatch - an instruction that hits takes its result from the PT and
//              leaves the pipeline, waiting only for in-order commit;
//   issue    - a ready instruction that finds no free functional unit but
//              hits takes its result from the PT; one that finds a free unit
//              executes as normal.
// This unit holds the PT (pt_table, 2048 entries, W lookups for dispatch and
// W for issue) with the two checks (pt_dispatch_check, pt_issue_select). The
// rest of the core (instruction window, load/store queue, functional units,
// caches, branch predictor) is outside and connects through the ports below.
//
// Load mode (this design's choice): while `loading` is high the load port
// writes profiled entries and no lookup hits; while it is low the program runs,
// lookups are answered and the load port is ignored. `flush` empties the table
// (new program or context switch).
//
// Timing: loads and flush take effect at the clock edge; dispatch and issue
// results are combinational from their slot inputs within the cycle.
module ip_unit
  import ip_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048,  // PT entries
  parameter int unsigned WAYS    = 8,     // PT associativity (assumed)
  parameter int unsigned W       = 4      // dispatch and issue width
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // table management
  input  logic                         loading,
  input  logic                         flush,
  input  logic                         ld_valid,
  input  pt_entry_t                    ld_entry,
  output logic                         ld_accept,
  output logic                         ld_drop,
  output logic                         ld_dup,
  output logic [$clog2(ENTRIES+1)-1:0] n_loaded,
  // dispatch stage
  input  disp_slot_t                   disp_slot      [W],
  output logic                         disp_pt_done   [W],
  output data_t                        disp_pt_result [W],
  // issue stage
  input  issue_slot_t                  iss_slot       [W],
  input  logic [FU_CNT_W-1:0]          fu_free        [NUM_FU_CLASSES],
  output issue_act_e                   iss_act        [W],
  output data_t                        iss_pt_result  [W]
);

  pt_req_t disp_req [W];
  pt_rsp_t disp_rsp [W];
  pt_req_t iss_req  [W];
  pt_rsp_t iss_rsp  [W];
  pt_req_t pt_req   [2*W];
  pt_rsp_t pt_rsp   [2*W];

  // Ports 0..W-1 serve dispatch, W..2W-1 serve issue; no hits while loading.
  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      pt_req[i]           = disp_req[i];
      pt_req[i].valid     = disp_req[i].valid && !loading;
      pt_req[W + i]       = iss_req[i];
      pt_req[W + i].valid = iss_req[i].valid && !loading;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      disp_rsp[i] = pt_rsp[i];
      iss_rsp[i]  = pt_rsp[W + i];
    end
  end

  pt_table #(
    .ENTRIES (ENTRIES),
    .WAYS    (WAYS),
    .NPORTS  (2 * W)
  ) u_pt (
    .clk       (clk),
    .rst_n     (rst_n),
    .flush     (flush),
    .ld_valid  (ld_valid && loading),
    .ld_entry  (ld_entry),
    .ld_accept (ld_accept),
    .ld_drop   (ld_drop),
    .ld_dup    (ld_dup),
    .req       (pt_req),
    .rsp       (pt_rsp),
    .n_loaded  (n_loaded)
  );

  pt_dispatch_check #(.W(W)) u_disp (
    .slot      (disp_slot),
    .pt_req    (disp_req),
    .pt_rsp    (disp_rsp),
    .pt_done   (disp_pt_done),
    .pt_result (disp_pt_result)
  );

  pt_issue_select #(.W(W)) u_iss (
    .slot      (iss_slot),
    .fu_free   (fu_free),
    .pt_req    (iss_req),
    .pt_rsp    (iss_rsp),
    .act       (iss_act),
    .pt_result (iss_pt_result)
  );

  // No instruction may take a PT result while the table is being loaded.
  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      assert (!(loading && (disp_pt_done[i] || iss_act[i] == ISSUE_PT)))
        else $error("ip_unit: PT result delivered in load mode");
    end
  end

endmodule
