// tb_pt_table: self-checking testbench of the precomputation table.
//
// A small table (32 entries, 2 ways, 16 sets) is loaded with random unique
// computations, some of them repeated and many falling into already full sets,
// while four lookup ports ask for loaded keys, keys never loaded and idle
// requests. A reference model (list of stored keys, fill count per set, set
// index computed from the documented XOR fold) predicts ld_accept, ld_drop,
// ld_dup, every hit and result, and n_loaded. Every stored key is also
// looked up with two bits of its opcode, op1 or op2 flipped. The table is then flushed and
// must miss on everything, and loaded again. Lookups are combinational, so
// they are checked in the cycle they are made.
module tb_pt_table;
  import ip_pkg::*;

  localparam int unsigned ENTRIES = 32;
  localparam int unsigned WAYS    = 2;
  localparam int unsigned NPORTS  = 4;
  localparam int unsigned SETS    = ENTRIES / WAYS;
  localparam int unsigned IDX_W   = $clog2(SETS);

  logic      clk = 1'b0;
  logic      rst_n;
  logic      flush;
  logic      ld_valid;
  pt_entry_t ld_entry;
  logic      ld_accept, ld_drop, ld_dup;
  pt_req_t   req [NPORTS];
  pt_rsp_t   rsp [NPORTS];
  logic [$clog2(ENTRIES+1)-1:0] n_loaded;

  int checks = 0, failures = 0;
  int n_acc = 0, n_drop = 0, n_dup = 0, n_hit = 0, n_miss = 0;

  pt_table #(.ENTRIES(ENTRIES), .WAYS(WAYS), .NPORTS(NPORTS)) dut (.*);

  always #5 clk = ~clk;

  // Reference model.
  uc_key_t m_key [$];
  data_t   m_res [$];
  int      m_fill [SETS];

  function automatic int ref_set(uc_key_t k);
    logic [IDX_W-1:0] h = '0;
    for (int b = 0; b < 64; b++) begin
      h[b % IDX_W]       ^= k.op1[b];
      h[(b + 1) % IDX_W] ^= k.op2[b];
    end
    for (int b = 0; b < 8; b++) h[b % IDX_W] ^= k.opcode[b];
    return int'(h);
  endfunction

  function automatic int ref_find(uc_key_t k);
    foreach (m_key[i]) if (m_key[i] == k) return i;
    return -1;
  endfunction

  function automatic data_t rnd64();
    return {$urandom, $urandom};
  endfunction

  function automatic uc_key_t rnd_key();
    uc_key_t k;
    k.opcode = 8'($urandom_range(0, 15));
    // small operand values make repeated keys likely, as in real programs
    k.op1 = ($urandom_range(0, 3) == 0) ? rnd64() : data_t'($urandom_range(0, 40));
    k.op2 = ($urandom_range(0, 3) == 0) ? rnd64() : data_t'($urandom_range(0, 40));
    return k;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One cycle: optionally load, make random lookups, check, advance the model.
  task automatic cycle(input bit do_load);
    int idx [NPORTS];
    int s, f;
    @(negedge clk);
    ld_valid = do_load;
    if (m_key.size() > 0 && $urandom_range(0, 4) == 0)
      ld_entry.key = m_key[$urandom_range(0, m_key.size() - 1)];
    else
      ld_entry.key = rnd_key();
    ld_entry.result = rnd64();
    for (int p = 0; p < int'(NPORTS); p++) begin
      req[p].valid = ($urandom_range(0, 5) != 0);
      if (m_key.size() > 0 && $urandom_range(0, 1) == 0)
        req[p].key = m_key[$urandom_range(0, m_key.size() - 1)];
      else
        req[p].key = rnd_key();
    end
    #1;
    for (int p = 0; p < int'(NPORTS); p++) begin
      idx[p] = ref_find(req[p].key);
      if (req[p].valid && idx[p] >= 0) begin
        check(rsp[p].hit === 1'b1 && rsp[p].result === m_res[idx[p]], "lookup hit/result");
        n_hit++;
      end else begin
        check(rsp[p].hit === 1'b0, "lookup miss");
        n_miss++;
      end
    end
    check(int'(n_loaded) == m_key.size(), "n_loaded before edge");
    f = ref_find(ld_entry.key);
    s = ref_set(ld_entry.key);
    if (do_load) begin
      if (f >= 0) begin
        check(ld_dup && !ld_drop && !ld_accept, "duplicate load ignored"); n_dup++;
      end else if (m_fill[s] == int'(WAYS)) begin
        check(ld_drop && !ld_dup && !ld_accept, "load into full set dropped"); n_drop++;
      end else begin
        check(ld_accept && !ld_dup && !ld_drop, "load accepted"); n_acc++;
        m_key.push_back(ld_entry.key);
        m_res.push_back(ld_entry.result);
        m_fill[s]++;
      end
    end else begin
      check(!ld_accept && !ld_drop && !ld_dup, "no load status when idle");
    end
  endtask

  task automatic do_flush();
    @(negedge clk);
    ld_valid = 1'b0;
    flush    = 1'b1;
    #1 check(!ld_accept, "no load accepted while flushing");
    @(negedge clk);
    flush = 1'b0;
    m_key.delete();
    m_res.delete();
    foreach (m_fill[i]) m_fill[i] = 0;
    check(n_loaded == '0, "flush empties table");
  endtask

  initial begin
    rst_n    = 1'b0;
    flush    = 1'b0;
    ld_valid = 1'b0;
    ld_entry = '0;
    foreach (req[p]) req[p] = '0;
    foreach (m_fill[i]) m_fill[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(n_loaded == '0, "empty after reset");
    for (int r = 0; r < 2; r++) begin
      for (int c = 0; c < 120; c++) cycle(1'b1);
      for (int c = 0; c < 60; c++) cycle(1'b0);
      // every stored key must still be found (entries are never replaced)
      foreach (m_key[i]) begin
        @(negedge clk);
        ld_valid   = 1'b0;
        req[0].valid = 1'b1;
        req[0].key   = m_key[i];
        // near misses: one field changed in two bits that fold onto the same
        // index bit, so the lookup lands in the same set and only the key
        // comparison can tell the keys apart
        for (int p = 1; p < 4; p++) begin
          req[p].valid = 1'b1;
          req[p].key   = m_key[i];
        end
        req[1].key.opcode[0]     = ~req[1].key.opcode[0];
        req[1].key.opcode[IDX_W] = ~req[1].key.opcode[IDX_W];
        req[2].key.op1[0]        = ~req[2].key.op1[0];
        req[2].key.op1[IDX_W]    = ~req[2].key.op1[IDX_W];
        req[3].key.op2[0]        = ~req[3].key.op2[0];
        req[3].key.op2[IDX_W]    = ~req[3].key.op2[IDX_W];
        #1 check(rsp[0].hit && rsp[0].result == m_res[i], "stored key still present");
        for (int p = 1; p < 4; p++) begin
          int j;
          j = ref_find(req[p].key);
          check(rsp[p].hit == (j >= 0) && (j < 0 || rsp[p].result == m_res[j]),
                "near-miss key compared on every field");
        end
      end
      // after a flush nothing hits
      begin
        uc_key_t keep [$];
        keep = m_key;
        do_flush();
        foreach (keep[i]) begin
          @(negedge clk);
          req[0].valid = 1'b1;
          req[0].key   = keep[i];
          #1 check(!rsp[0].hit, "miss after flush");
        end
      end
    end
    check(n_acc > 0 && n_drop > 0 && n_dup > 0 && n_hit > 0, "all load and lookup cases seen");
    $display("accepted=%0d dropped=%0d duplicates=%0d hits=%0d misses=%0d",
             n_acc, n_drop, n_dup, n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
