// pt_table: the precomputation table (PT).
//
// The PT holds the unique computations (opcode + two operand values) that a
// profiling run found to be executed most often, each with its result. It is
// filled through a single load port before the program starts and is never
// updated or replaced while the program runs; only a flush (program load or
// context switch) empties it. During execution it answers NPORTS lookups per
// cycle: a lookup hits when a valid entry has exactly the same opcode and
// operand values, and then returns the stored result.
//
// Organisation. The table is indexed by the input operands, as in the source
// design. How the index is formed is this design's choice: the set is an XOR
// fold of op1, op2 (shifted by one bit) and the opcode, and each set has WAYS
// ways whose full keys are compared. WAYS = ENTRIES gives a fully associative
// table. A load goes to the next free way of its set; a load into a full set is
// dropped and a load of a key already present is ignored, so at most one way
// of a set can match a lookup. The loader, which writes entries in decreasing
// order of frequency (or frequency/latency product), thus keeps the most
// valuable computation when a set overflows.
//
// Interface and timing:
//   flush             empties the table at the next clock edge.
//   ld_valid/ld_entry writes one entry at the next clock edge; ld_accept,
//                     ld_drop (set full) and ld_dup (already present) tell in
//                     the same cycle what happens to it.
//   req[p] / rsp[p]   combinational lookup, result valid in the same cycle.
//   n_loaded          number of valid entries.
// A lookup and a load in the same cycle see the table before the load.
module pt_table
  import ip_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048,  // table size of the main configuration
  parameter int unsigned WAYS    = 8,     // associativity (assumed)
  parameter int unsigned NPORTS  = 8      // 4 dispatch + 4 issue lookups (assumed)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      flush,
  input  logic      ld_valid,
  input  pt_entry_t ld_entry,
  output logic      ld_accept,
  output logic      ld_drop,
  output logic      ld_dup,
  input  pt_req_t   req [NPORTS],
  output pt_rsp_t   rsp [NPORTS],
  output logic [$clog2(ENTRIES+1)-1:0] n_loaded
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned FILL_W = $clog2(WAYS + 1);
  localparam int unsigned CNT_W = $clog2(ENTRIES + 1);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  initial begin
    assert (SETS * WAYS == ENTRIES && (SETS & (SETS - 1)) == 0)
      else $error("pt_table: ENTRIES/WAYS must be a power of two");
  end

  // Set index of a key: XOR fold of the operands and the opcode.
  function automatic logic [IDX_W-1:0] set_of(input uc_key_t k);
    logic [IDX_W-1:0] h;
    h = '0;
    if (SETS > 1) begin
      for (int b = 0; b < int'(DATA_W); b++) begin
        h[b % IDX_W]       ^= k.op1[b];
        h[(b + 1) % IDX_W] ^= k.op2[b];
      end
      for (int b = 0; b < int'(OPC_W); b++) h[b % IDX_W] ^= k.opcode[b];
    end
    return h;
  endfunction

  pt_entry_t              entry_q [SETS][WAYS];
  logic [WAYS-1:0]        valid_q [SETS];
  logic [FILL_W-1:0]      fill_q  [SETS];
  logic [CNT_W-1:0]       count_q;

  // ---------------------------------------------------------------- lookups
  always_comb begin
    for (int p = 0; p < int'(NPORTS); p++) begin
      logic [IDX_W-1:0] s;
      int unsigned      nmatch;
      s          = set_of(req[p].key);
      rsp[p]     = '0;
      nmatch     = 0;
      for (int w = int'(WAYS) - 1; w >= 0; w--) begin
        if (valid_q[s][w] && entry_q[s][w].key == req[p].key) begin
          rsp[p].hit    = req[p].valid;
          rsp[p].result = entry_q[s][w].result;
          nmatch++;
        end
      end
      // Loads never create a second copy of a key.
      assert (nmatch <= 1) else $error("pt_table: key stored twice");
    end
  end

  // ---------------------------------------------------------------- load port
  logic [IDX_W-1:0] ld_set;
  logic             ld_present;
  logic [WAY_W-1:0] ld_way;

  always_comb begin
    ld_set     = set_of(ld_entry.key);
    ld_present = 1'b0;
    ld_way     = fill_q[ld_set][WAY_W-1:0];
    for (int w = 0; w < int'(WAYS); w++)
      if (valid_q[ld_set][w] && entry_q[ld_set][w].key == ld_entry.key) ld_present = 1'b1;
    ld_dup    = ld_valid && !flush && ld_present;
    ld_drop   = ld_valid && !flush && !ld_present && (fill_q[ld_set] == FILL_W'(WAYS));
    ld_accept = ld_valid && !flush && !ld_present && (fill_q[ld_set] != FILL_W'(WAYS));
  end

  // Entry storage has no reset: an entry is read only when its valid bit is set.
  always_ff @(posedge clk) begin
    if (ld_accept) entry_q[ld_set][ld_way] <= ld_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++) begin
        valid_q[s] <= '0;
        fill_q[s]  <= '0;
      end
      count_q <= '0;
    end else if (flush) begin
      for (int s = 0; s < int'(SETS); s++) begin
        valid_q[s] <= '0;
        fill_q[s]  <= '0;
      end
      count_q <= '0;
    end else if (ld_accept) begin
      valid_q[ld_set][ld_way] <= 1'b1;
      fill_q[ld_set] <= fill_q[ld_set] + 1'b1;
      count_q        <= count_q + 1'b1;
    end
  end

  assign n_loaded = count_q;

endmodule
