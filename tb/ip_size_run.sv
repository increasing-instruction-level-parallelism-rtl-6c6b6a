// ip_size_run: one instruction precomputation unit of a given table size,
// driven through a profile / load / run sequence by a small core model. Used
// by tb_ip_table_sizes to compare table sizes on the same program.
//
// The synthetic program comes from a seeded xorshift generator, so every
// instance, whatever its size, sees exactly the same two traces: input A
// (used for profiling) and input B. The unit is loaded with the arithmetic
// unique computations of A ranked by frequency, or by frequency x latency
// when FLP is set, then runs A and B with the table, is
// flushed, and runs A and B again without it. The core model dispatches 4
// instructions per cycle into a 64-entry window and issues up to 4 ready ones
// oldest first to the base machine's units (2 integer ALUs, 1 integer
// mul/div, 2 FP ALUs, 1 FP mul/div, 2 memory ports). Every PT answer is
// checked against the loaded contents and every PT result against the ALU
// model. The cycle counts and check totals are outputs; done rises at the end.
module ip_size_run
  import ip_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned WAYS    = 8,
  parameter int          N_INSTR = 16000,
  parameter bit          FLP     = 1'b0   // rank by frequency x latency, not frequency
) (
  output int cyc_aa,      // profile A, run A, with the table
  output int cyc_ab,      // profile A, run B, with the table
  output int cyc_base_a,  // run A without a table
  output int cyc_base_b,  // run B without a table
  output int n_stored,
  output int checks,
  output int failures,
  output bit done
);

  localparam int unsigned W     = 4;
  localparam int unsigned RUU   = 64;
  localparam int          N_HOT = 4000;
  localparam int          N_OPC = 7;

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

  ip_unit #(.ENTRIES(ENTRIES), .WAYS(WAYS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%0d entries] %s at %0t", ENTRIES, what, $time);
    end
  endtask

  // ---------------------------------------------------------------- program
  logic [31:0] rng = 32'h2545_f491;

  function automatic int unsigned rnd(int unsigned n);
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng % n;
  endfunction

  typedef struct {
    uc_key_t   key;
    logic      is_arith;
    fu_class_e fu;
    int        delay;
  } instr_t;

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

  // Same mix as the full-size testbench: 25% loads, 45% one-off arithmetic,
  // 30% drawn from N_HOT computations with rank (N_HOT-1)*u^3, u uniform.
  function automatic instr_t gen_instr();
    instr_t in;
    int unsigned r;
    r = rnd(100);
    if (r < 25) begin
      in.key.opcode = 8'(N_OPC);
      in.key.op1    = {32'(rnd(32'hffff_fff0)), 32'(rnd(32'hffff_fff0))};
      in.key.op2    = data_t'(rnd(256));
      in.is_arith   = 1'b0;
    end else if (r < 70) begin
      in.key.opcode = 8'(rnd(N_OPC));
      in.key.op1    = {32'(rnd(32'hffff_fff0)), 32'(rnd(32'hffff_fff0))};
      in.key.op2    = {32'(rnd(32'hffff_fff0)), 32'(rnd(32'hffff_fff0))};
      in.is_arith   = 1'b1;
    end else begin
      longint u, h;
      u = longint'(rnd(1024));
      h = ((longint'(N_HOT) - 64'd1) * u * u * u) / (64'd1023 * 64'd1023 * 64'd1023);
      in.key.opcode = 8'(h % N_OPC);
      in.key.op1    = data_t'(h);
      in.key.op2    = data_t'((h * 37) % 101);
      in.is_arith   = 1'b1;
    end
    in.fu    = fu_of(int'(in.key.opcode));
    in.delay = (rnd(10) < 6) ? 0 : int'(rnd(4)) + 1;
    return in;
  endfunction

  instr_t trace_a [$];
  instr_t trace_b [$];
  data_t  loaded [uc_key_t];

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

  task automatic run_trace(input bit use_pt, input bit use_b, output int cycles);
    win_t win [$];
    int   busy [NUM_FU_CLASSES][$];
    int   units [NUM_FU_CLASSES];
    int   next;
    int   now;
    int   len;
    units = '{2, 1, 2, 1, 2};
    next  = 0;
    now   = 0;
    len   = use_b ? trace_b.size() : trace_a.size();
    for (int c = 0; c < int'(NUM_FU_CLASSES); c++)
      for (int u = 0; u < units[c]; u++) busy[c].push_back(0);
    while (next < len || win.size() > 0) begin
      int n_disp;
      int offered [$];
      int left [NUM_FU_CLASSES];
      int gone [$];
      @(negedge clk);
      idle_inputs();
      n_disp = 0;
      for (int i = 0; i < int'(W); i++) begin
        if (next + i < len && win.size() + i < int'(RUU)) begin
          instr_t in;
          in = use_b ? trace_b[next + i] : trace_a[next + i];
          disp_slot[i].valid     = 1'b1;
          disp_slot[i].is_arith  = in.is_arith;
          disp_slot[i].op1_ready = (in.delay == 0);
          disp_slot[i].op2_ready = (in.delay <= 1);
          disp_slot[i].key       = in.key;
          n_disp++;
        end
      end
      foreach (win[j])
        if (offered.size() < int'(W) && win[j].ready_at <= now) offered.push_back(j);
      foreach (offered[i]) begin
        iss_slot[i].valid    = 1'b1;
        iss_slot[i].is_arith = win[offered[i]].in.is_arith;
        iss_slot[i].fu       = win[offered[i]].in.fu;
        iss_slot[i].key      = win[offered[i]].in.key;
      end
      for (int c = 0; c < int'(NUM_FU_CLASSES); c++) begin
        int f;
        f = 0;
        foreach (busy[c][u]) if (busy[c][u] <= now) f++;
        fu_free[c] = FU_CNT_W'(f);
        left[c]    = f;
      end
      #1;
      for (int i = 0; i < n_disp; i++) begin
        instr_t in;
        bit hit;
        in  = use_b ? trace_b[next + i] : trace_a[next + i];
        hit = use_pt && in.is_arith && in.delay == 0 && loaded.exists(in.key);
        check(disp_pt_done[i] == hit, "dispatch PT hit as loaded");
        if (hit) check(disp_pt_result[i] == alu(in.key), "dispatch PT result");
        else begin
          win_t e;
          e.in       = in;
          e.ready_at = now + 1 + in.delay;
          win.push_back(e);
        end
      end
      foreach (offered[i]) begin
        instr_t in;
        issue_act_e want;
        in   = win[offered[i]].in;
        want = ISSUE_WAIT;
        if (left[in.fu] > 0) begin
          want = ISSUE_FU;
          left[in.fu]--;
        end else if (use_pt && in.is_arith && loaded.exists(in.key)) begin
          want = ISSUE_PT;
        end
        check(iss_act[i] == want, "issue action");
        if (want == ISSUE_FU) begin
          int best;
          best = 0;
          foreach (busy[in.fu][u]) if (busy[in.fu][u] < busy[in.fu][best]) best = u;
          busy[in.fu][best] = now + lat_of(in.fu);
          gone.push_back(offered[i]);
        end else if (want == ISSUE_PT) begin
          check(iss_pt_result[i] == alu(in.key), "issue PT result");
          gone.push_back(offered[i]);
        end
      end
      for (int g = gone.size() - 1; g >= 0; g--) win.delete(gone[g]);
      next += n_disp;
      now++;
    end
    cycles = now;
  endtask

  initial begin
    int cnt [uc_key_t];
    uc_key_t cand [$];
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    rst_n    = 1'b0;
    loading  = 1'b0;
    flush    = 1'b0;
    ld_entry = '0;
    idle_inputs();
    for (int i = 0; i < N_INSTR; i++) trace_a.push_back(gen_instr());
    for (int i = 0; i < N_INSTR; i++) trace_b.push_back(gen_instr());
    foreach (trace_a[i]) if (trace_a[i].is_arith) begin
      if (cnt.exists(trace_a[i].key)) cnt[trace_a[i].key]++;
      else cnt[trace_a[i].key] = 1;
    end
    foreach (cnt[k]) if (cnt[k] > 1) cand.push_back(k);
    if (FLP) cand.rsort() with (cnt[item] * lat_of(fu_of(int'(item.opcode))));
    else     cand.rsort() with (cnt[item]);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    loading = 1'b1;
    foreach (cand[i]) begin
      if (loaded.num() >= int'(ENTRIES)) break;
      @(negedge clk);
      ld_valid        = 1'b1;
      ld_entry.key    = cand[i];
      ld_entry.result = alu(cand[i]);
      #1 check(ld_accept ^ ld_drop, "load accepted or dropped");
      if (ld_accept) loaded[cand[i]] = alu(cand[i]);
    end
    @(negedge clk);
    idle_inputs();
    loading = 1'b0;
    #1 check(int'(n_loaded) == loaded.num(), "table count after loading");
    n_stored = loaded.num();
    run_trace(1'b1, 1'b0, cyc_aa);
    run_trace(1'b1, 1'b1, cyc_ab);
    @(negedge clk);
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    loaded.delete();
    run_trace(1'b0, 1'b0, cyc_base_a);
    run_trace(1'b0, 1'b1, cyc_base_b);
    done = 1'b1;
  end

endmodule
