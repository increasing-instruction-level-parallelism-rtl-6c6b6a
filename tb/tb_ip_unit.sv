// tb_ip_unit: end-to-end testbench of the instruction precomputation unit at
// its default size (2048-entry PT, 8 ways, 4-wide dispatch and issue).
//
// The testbench plays the rest of the processor:
//   1. Profiling. A synthetic program trace ("input A") is generated; its
//      arithmetic unique computations are counted and sorted by frequency.
//   2. Loading. In load mode the most frequent computations are written into
//      the PT in decreasing frequency order, with their results from the
//      testbench's own ALU model, until the table holds ENTRIES of them or the
//      candidates run out. Loads into full sets are dropped, one repeated
//      load is ignored, and a lookup made while loading must not hit.
//   3. Running. A second trace from the same program ("input B") runs
//      through a small out-of-order core model: 4 instructions dispatched per
//      cycle into a 64-entry window, operands becoming ready after a delay,
//      up to 4 ready instructions offered to issue oldest first, and the base
//      machine's functional units (2 integer ALUs, 1 integer mul/div, 2 FP
//      ALUs, 1 FP mul/div, 2 memory ports) kept busy for their latencies.
//      Every PT answer is checked against a model of what was loaded and
//      every PT result against the ALU model.
//   4. The table is flushed (context switch), and the same trace runs again
//      with nothing to hit; the cycle counts of the two runs give the speedup,
//      which must be positive.
// Each mechanism (load accept, drop, duplicate, blocked lookup while loading,
// dispatch hit, dispatch miss, issue to a unit despite a hit, issue from the
// PT, wait, flush) is counted, and one that never happened is a failure.
module tb_ip_unit;
  import ip_pkg::*;

  localparam int unsigned ENTRIES  = 2048;
  localparam int unsigned W        = 4;
  localparam int unsigned RUU      = 64;
  localparam int          N_INSTR  = 24000;
  localparam int          N_HOT    = 4000;
  localparam int          N_OPC    = 7;

  logic                         clk = 1'b0;
  logic                         rst_n;
  logic                         loading;
  logic                         flush;
  logic                         ld_valid;
  pt_entry_t                    ld_entry;
  logic                         ld_accept, ld_drop, ld_dup;
  logic [$clog2(ENTRIES+1)-1:0] n_loaded;
  disp_slot_t                   disp_slot      [W];
  logic                         disp_pt_done   [W];
  data_t                        disp_pt_result [W];
  issue_slot_t                  iss_slot       [W];
  logic [FU_CNT_W-1:0]          fu_free        [NUM_FU_CLASSES];
  issue_act_e                   iss_act        [W];
  data_t                        iss_pt_result  [W];

  ip_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- program
  typedef struct {
    uc_key_t   key;
    logic      is_arith;
    fu_class_e fu;
    int        delay;  // cycles after dispatch until both operands are ready
  } instr_t;

  // Functional unit class and latency of each opcode of the synthetic ISA;
  // opcode N_OPC is a load.
  function automatic fu_class_e fu_of(int opc);
    case (opc)
      0, 1, 2, 4: return FU_IALU;
      3:          return FU_IMULT;
      5:          return FU_FPALU;
      6:          return FU_FPMULT;
      default:    return FU_MEM;
    endcase
  endfunction

  function automatic int lat_of(fu_class_e fu);
    case (fu)
      FU_IALU:   return 1;
      FU_IMULT:  return 3;
      FU_FPALU:  return 2;
      FU_FPMULT: return 4;
      default:   return 1;
    endcase
  endfunction

  function automatic data_t alu(uc_key_t k);
    case (int'(k.opcode))
      0:       return k.op1 + k.op2;
      1:       return k.op1 - k.op2;
      2:       return k.op1 ^ k.op2;
      3:       return k.op1 * k.op2;
      4:       return k.op1 << k.op2[5:0];
      5:       return k.op1 + (k.op2 << 1) + 64'd7;
      default: return k.op1 * k.op2 + 64'd1;
    endcase
  endfunction

  // A skewed mix: 30% of the instructions repeat a few thousand "hot"
  // computations, a hot computation's rank being cubed towards the front; the
  // rest are one-off computations (45%) and loads (25%).
  function automatic instr_t gen_instr();
    instr_t in;
    int r;
    real u;
    r = $urandom_range(0, 99);
    if (r < 25) begin
      in.key.opcode = 8'(N_OPC);
      in.key.op1    = {$urandom, $urandom};
      in.key.op2    = data_t'($urandom_range(0, 255));
      in.is_arith   = 1'b0;
    end else if (r < 70) begin
      in.key.opcode = 8'($urandom_range(0, N_OPC - 1));
      in.key.op1    = {$urandom, $urandom};
      in.key.op2    = {$urandom, $urandom};
      in.is_arith   = 1'b1;
    end else begin
      int h;
      u = real'($urandom_range(0, 1000000)) / 1000000.0;
      h = int'($floor(real'(N_HOT - 1) * u * u * u));
      in.key.opcode = 8'(h % N_OPC);
      in.key.op1    = data_t'(h);
      in.key.op2    = data_t'((h * 37) % 101);
      in.is_arith   = 1'b1;
    end
    in.fu    = fu_of(int'(in.key.opcode));
    in.delay = ($urandom_range(0, 9) < 6) ? 0 : $urandom_range(1, 4);
    return in;
  endfunction

  instr_t prof [$];
  instr_t run  [$];

  // Keys the PT holds, with their results (model of the table's contents).
  data_t  loaded [uc_key_t];

  // ---------------------------------------------------------------- mechanism counters
  int n_ld_acc = 0, n_ld_drop = 0, n_ld_dup = 0, n_blocked = 0, n_flush = 0;
  int n_disp_hit = 0, n_disp_miss = 0, n_iss_fu = 0, n_iss_fu_hit = 0;
  int n_iss_pt = 0, n_iss_wait = 0;

  // ---------------------------------------------------------------- core model
  typedef struct {
    instr_t in;
    int     ready_at;
  } win_t;

  task automatic idle_inputs();
    ld_valid = 1'b0;
    foreach (disp_slot[i]) disp_slot[i] = '0;
    foreach (iss_slot[i])  iss_slot[i]  = '0;
    foreach (fu_free[c])   fu_free[c]   = '0;
  endtask

  // Runs the trace; returns the number of cycles until the last instruction
  // left the window. use_pt only selects whether hits are expected.
  task automatic run_trace(input bit use_pt, output int cycles);
    win_t win [$];
    int   busy [NUM_FU_CLASSES][$];  // cycle each unit of a class becomes free
    int   units [NUM_FU_CLASSES] = '{2, 1, 2, 1, 2};
    int   next = 0;
    int   now  = 0;
    for (int c = 0; c < int'(NUM_FU_CLASSES); c++)
      for (int u = 0; u < units[c]; u++) busy[c].push_back(0);
    while (next < run.size() || win.size() > 0) begin
      int n_disp;
      int offered [$];
      @(negedge clk);
      idle_inputs();
      // dispatch group
      n_disp = 0;
      for (int i = 0; i < int'(W); i++) begin
        if (next + i < run.size() && win.size() + i < int'(RUU)) begin
          instr_t in;
          in = run[next + i];
          disp_slot[i].valid     = 1'b1;
          disp_slot[i].is_arith  = in.is_arith;
          disp_slot[i].op1_ready = (in.delay == 0);
          disp_slot[i].op2_ready = (in.delay == 0) || (in.delay == 1);
          disp_slot[i].key       = in.key;
          n_disp++;
        end
      end
      // issue group: oldest ready instructions of the window
      foreach (win[j]) begin
        if (offered.size() < int'(W) && win[j].ready_at <= now) offered.push_back(j);
      end
      foreach (offered[i]) begin
        iss_slot[i].valid    = 1'b1;
        iss_slot[i].is_arith = win[offered[i]].in.is_arith;
        iss_slot[i].fu       = win[offered[i]].in.fu;
        iss_slot[i].key      = win[offered[i]].in.key;
      end
      for (int c = 0; c < int'(NUM_FU_CLASSES); c++) begin
        int f = 0;
        foreach (busy[c][u]) if (busy[c][u] <= now) f++;
        fu_free[c] = FU_CNT_W'(f);
      end
      #1;
      // check and retire the dispatch group
      for (int i = 0; i < n_disp; i++) begin
        instr_t in;
        bit hit;
        in  = run[next + i];
        hit = use_pt && in.is_arith && in.delay == 0 && loaded.exists(in.key);
        check(disp_pt_done[i] == hit, "dispatch PT hit as loaded");
        if (hit) begin
          check(disp_pt_result[i] == alu(in.key), "dispatch PT result");
          n_disp_hit++;
        end else begin
          win_t e;
          if (in.is_arith && in.delay == 0) n_disp_miss++;
          e.in       = in;
          e.ready_at = now + 1 + in.delay;
          win.push_back(e);
        end
      end
      // check the issue group against the selection rules
      begin
        int left [NUM_FU_CLASSES];
        int gone [$];
        for (int c = 0; c < int'(NUM_FU_CLASSES); c++) left[c] = int'(fu_free[c]);
        foreach (offered[i]) begin
          instr_t in;
          issue_act_e want;
          bit hit;
          in   = win[offered[i]].in;
          hit  = use_pt && in.is_arith && loaded.exists(in.key);
          want = ISSUE_WAIT;
          if (left[in.fu] > 0) begin
            want = ISSUE_FU;
            left[in.fu]--;
          end else if (hit) begin
            want = ISSUE_PT;
          end
          check(iss_act[i] == want, "issue action");
          case (want)
            ISSUE_FU: begin
              // occupy the unit that frees earliest
              int best = 0;
              foreach (busy[in.fu][u]) if (busy[in.fu][u] < busy[in.fu][best]) best = u;
              busy[in.fu][best] = now + lat_of(in.fu);
              n_iss_fu++;
              if (hit) n_iss_fu_hit++;
              gone.push_back(offered[i]);
            end
            ISSUE_PT: begin
              check(iss_pt_result[i] == alu(in.key), "issue PT result");
              n_iss_pt++;
              gone.push_back(offered[i]);
            end
            default: n_iss_wait++;
          endcase
        end
        for (int g = gone.size() - 1; g >= 0; g--) win.delete(gone[g]);
      end
      next += n_disp;
      now++;
    end
    cycles = now;
  endtask

  // ---------------------------------------------------------------- test
  initial begin
    int cnt [uc_key_t];
    uc_key_t cand [$];
    int cyc_pt, cyc_base;
    real speedup;

    rst_n   = 1'b0;
    loading = 1'b0;
    flush   = 1'b0;
    ld_entry = '0;
    idle_inputs();

    // 1. profile input A
    for (int i = 0; i < N_INSTR; i++) prof.push_back(gen_instr());
    foreach (prof[i]) if (prof[i].is_arith) begin
      if (cnt.exists(prof[i].key)) cnt[prof[i].key]++;
      else cnt[prof[i].key] = 1;
    end
    foreach (cnt[k]) if (cnt[k] > 1) cand.push_back(k);
    cand.rsort() with (cnt[item]);
    $display("profile: %0d unique arithmetic computations, %0d redundant",
             cnt.num(), cand.size());
    for (int i = 0; i < N_INSTR; i++) run.push_back(gen_instr());

    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 2. load mode
    @(negedge clk);
    loading = 1'b1;
    foreach (cand[i]) begin
      if (loaded.num() >= int'(ENTRIES)) break;
      @(negedge clk);
      idle_inputs();
      ld_valid        = 1'b1;
      ld_entry.key    = cand[i];
      ld_entry.result = alu(cand[i]);
      // a lookup of an already loaded key must not hit while loading
      if (loaded.num() > 0) begin
        disp_slot[0].valid     = 1'b1;
        disp_slot[0].is_arith  = 1'b1;
        disp_slot[0].op1_ready = 1'b1;
        disp_slot[0].op2_ready = 1'b1;
        disp_slot[0].key       = cand[0];
      end
      #1;
      if (loaded.num() > 0) begin
        check(!disp_pt_done[0], "no hit while loading");
        n_blocked++;
      end
      check(ld_accept ^ ld_drop, "load accepted or dropped");
      check(!ld_dup, "first load of a key is no duplicate");
      if (ld_accept) begin
        loaded[cand[i]] = alu(cand[i]);
        n_ld_acc++;
      end
      if (ld_drop) n_ld_drop++;
      // the same entry again must be recognised once it is in
      if (i == 5 && ld_accept) begin
        @(negedge clk);
        #1 check(ld_dup && !ld_accept, "repeated load ignored");
        if (ld_dup) n_ld_dup++;
      end
    end
    @(negedge clk);
    idle_inputs();
    loading = 1'b0;
    #1 check(int'(n_loaded) == loaded.num(), "table count after loading");
    $display("loaded %0d entries, %0d dropped for full sets", n_ld_acc, n_ld_drop);

    // 3. run input B with the table
    run_trace(1'b1, cyc_pt);

    // 4. context switch: flush, then the same trace without any hit
    @(negedge clk);
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    #1 check(n_loaded == '0, "flush empties the table");
    n_flush++;
    begin
      int save_hit;
      save_hit = n_disp_hit + n_iss_pt;
      run_trace(1'b0, cyc_base);
      check(n_disp_hit + n_iss_pt == save_hit, "no PT completions after flush");
    end

    speedup = 100.0 * (real'(cyc_base) / real'(cyc_pt) - 1.0);
    $display("cycles with PT %0d, without %0d, speedup %0.1f%%", cyc_pt, cyc_base, speedup);
    check(cyc_pt < cyc_base, "precomputation speeds the trace up");

    $display("mechanisms: load_accept=%0d load_drop=%0d load_dup=%0d blocked_while_loading=%0d",
             n_ld_acc, n_ld_drop, n_ld_dup, n_blocked);
    $display("            dispatch_hit=%0d dispatch_miss=%0d issue_fu=%0d issue_fu_despite_hit=%0d",
             n_disp_hit, n_disp_miss, n_iss_fu, n_iss_fu_hit);
    $display("            issue_pt=%0d issue_wait=%0d flush=%0d", n_iss_pt, n_iss_wait, n_flush);
    check(n_ld_acc > 0,     "mechanism: load accepted");
    check(n_ld_drop > 0,    "mechanism: load dropped, set full");
    check(n_ld_dup > 0,     "mechanism: duplicate load ignored");
    check(n_blocked > 0,    "mechanism: lookup blocked while loading");
    check(n_disp_hit > 0,   "mechanism: hit at dispatch");
    check(n_disp_miss > 0,  "mechanism: miss at dispatch");
    check(n_iss_fu_hit > 0, "mechanism: unit used despite a hit");
    check(n_iss_pt > 0,     "mechanism: result from PT at issue");
    check(n_iss_wait > 0,   "mechanism: wait for a unit");
    check(n_flush > 0,      "mechanism: flush");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
