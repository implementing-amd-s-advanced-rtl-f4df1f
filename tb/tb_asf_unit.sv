// tb_asf_unit: end-to-end test of the ASF unit at its default sizes.
// Plays the role of the core around it: retires SPECULATE / asf.mfence /
// COMMIT / ABORT micro-ops, issues LOCK MOV accesses, reports retirement and
// annulment, and plays the other cores' probes. It runs, in both the LLB
// and the cache-based mode:
//   a DCAS-like region that commits, an LLB conflict with partial rollback
//   and full rollback, LLB second-stage overflow (capacity), first-stage
//   replay, nesting, the ABORT instruction, a cache-mode conflict on a line
//   flagged by the miss buffer, the orphan case (annulled ASF miss fills
//   clean), store-to-load forwarding monitor entries, the clean write-back
//   before a speculative store, and a store tracked in the abort cycle.
// Each mechanism is counted, and one that never happens counts a failure.
module tb_asf_unit;
  import asf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mode_llb, retire_valid, exc_event;
  uop_kind_e retire_kind;
  logic [63:0] retire_next_rip, retire_rsp, redirect_rip, redirect_rsp, abort_rax;
  logic in_region, commit_pulse, commit_error, abort_pulse, abort_zf;
  logic [7:0] depth, issue_ok, mb_busy;
  abort_code_e abort_code;
  logic fence_dispatch, mop_dispatch, mop_is_asf;
  logic [5:0] fence_annul, fences_in_flight;
  logic [2:0] mop_slot, acc_llb_idx, mem_ret_idx, mem_ann_idx, miss_idx, mem_req_idx, ld_annul_idx, fill_idx;
  logic [6:0] rob_head_seq, acc_seq, replay_seq;
  logic acc_valid, acc_write, acc_asf, acc_hit, acc_go, replay_valid, clean_wb_req;
  line_addr_t acc_line, clean_wb_line, miss_line, mem_req_line, evict_line, stlf_line, probe_line, wb_line;
  line_data_t acc_old_data, probe_data, wb_data;
  logic mem_ret_valid, mem_ann_valid, miss_valid, miss_asf, miss_full, mem_req_valid;
  logic ld_annul_valid, ld_annul_asf, fill_valid, evict_valid, evict_dirty, stlf_valid, stlf_ready;
  logic probe_valid, probe_write, probe_conflict, probe_data_valid, wb_valid, llb_busy, l1_probe_hit;
  logic [3:0] llb_s1_used, llb_s2_used;

  asf_unit dut (.*);

  int checks = 0, failures = 0;
  int n_commit = 0, n_contention = 0, n_capacity = 0, n_software = 0, n_fence_stall = 0;
  int n_partial_rb = 0, n_full_rb_wb = 0, n_replay = 0, n_nest = 0, n_orphan_avoided = 0;
  int n_stlf = 0, n_clean_wb = 0, n_abort_cycle_store = 0, n_mode_switch = 0, n_cache_conflict = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic idle();
    retire_valid = 0; retire_kind = UOP_OTHER; retire_next_rip = '0; retire_rsp = '0; exc_event = 0;
    fence_dispatch = 0; fence_annul = 0; mop_dispatch = 0; mop_slot = 0; mop_is_asf = 0;
    acc_valid = 0; acc_line = '0; acc_write = 0; acc_asf = 0; acc_seq = '0; acc_old_data = '0;
    mem_ret_valid = 0; mem_ret_idx = 0; mem_ann_valid = 0; mem_ann_idx = 0;
    miss_valid = 0; miss_line = '0; miss_asf = 0; ld_annul_valid = 0; ld_annul_idx = 0; ld_annul_asf = 0;
    fill_valid = 0; fill_idx = 0; stlf_valid = 0; stlf_line = '0;
    probe_valid = 0; probe_line = '0; probe_write = 0;
  endtask
  task automatic cyc();
    @(posedge clk); #1;
    if (wb_valid && llb_busy) n_full_rb_wb++;
    idle();
  endtask
  task automatic retire(input uop_kind_e k);
    retire_valid = 1; retire_kind = k; retire_next_rip = 64'h401004; retire_rsp = 64'h7fff0;
    cyc();
  endtask
  function automatic line_data_t pat(input line_addr_t l);
    return {16{l[31:0] ^ 32'hc3a5_5a3c}};
  endfunction
  // enter a region: SPECULATE (spec + mfence) with an ASF memop waiting in slot 0
  task automatic enter_region();
    fence_dispatch = 1; mop_dispatch = 1; mop_slot = 0; mop_is_asf = 1; cyc();
    chk(issue_ok[0] == 0, "ASF memop waits for the fence");
    if (!issue_ok[0]) n_fence_stall++;
    retire(UOP_SPEC);
    chk(in_region, "region open after asf.spec retires");
    chk(issue_ok[0] == 0, "still waiting until the fence retires");
    retire(UOP_MFENCE);
    chk(issue_ok[0] == 1, "memop released by fence retirement");
  endtask
  task automatic access(input line_addr_t l, input bit wr, input bit asf, input int seq,
                        output bit go, output int idx, output bit hit);
    acc_valid = 1; acc_line = l; acc_write = wr; acc_asf = asf; acc_seq = 7'(seq); acc_old_data = pat(l); #1;
    go = acc_go; idx = int'(acc_llb_idx); hit = acc_hit;
    cyc();
  endtask
  task automatic mret(input int idx); mem_ret_valid = 1; mem_ret_idx = 3'(idx); cyc(); endtask
  task automatic expect_abort(input abort_code_e code, input string what);
    chk(abort_pulse && abort_code == code && abort_rax == 64'(code) && !abort_zf, what);
    chk(redirect_rip == 64'h401004 && redirect_rsp == 64'h7fff0, {what, ": redirect to after SPECULATE"});
    if (abort_pulse) case (code)
      ABORT_CONTENTION: n_contention++;
      ABORT_CAPACITY:   n_capacity++;
      ABORT_SOFTWARE:   n_software++;
      default: ;
    endcase
  endtask
  task automatic wait_llb();
    int n = 0;
    while (llb_busy && n < 20) begin cyc(); n++; end
    chk(!llb_busy, "LLB rollback finished");
  endtask
  task automatic miss_fill(input line_addr_t l, input bit asf, input bit annul);
    int ix;
    miss_valid = 1; miss_line = l; miss_asf = asf; #1;
    chk(mem_req_valid && mem_req_line == l, "miss goes to memory");
    ix = int'(miss_idx);
    cyc();
    if (annul) begin ld_annul_valid = 1; ld_annul_idx = 3'(ix); ld_annul_asf = 1; cyc(); end
    repeat (3) cyc();           // memory latency
    fill_valid = 1; fill_idx = 3'(ix); cyc();
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit go, hit; int ia, ib, ix; int held [4];
  initial begin
    idle(); mode_llb = 1; rob_head_seq = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // ---------------- LLB mode ----------------
    // 1. DCAS-like region: two protected lines, commit
    enter_region();
    access(42'h40, 0, 1, 5, go, ia, hit); chk(go, "LOCK MOV load gets an LLB entry");
    access(42'h41, 0, 1, 6, go, ib, hit); chk(go && ib != ia, "second line gets its own entry");
    access(42'h40, 1, 1, 7, go, ix, hit); chk(go && ix == ia, "store to first line hits its entry");
    mret(ia); mret(ib); mret(ia);
    chk(llb_s2_used == 2 && llb_s1_used == 0, "retired lines in second stage");
    retire(UOP_COMMIT);
    chk(commit_pulse && !in_region, "COMMIT ends the region");
    if (commit_pulse) n_commit++;
    cyc();
    chk(llb_s2_used == 0, "LLB empty after commit");

    // 2. conflict: remote read of a speculatively written line
    enter_region();
    access(42'h50, 1, 1, 10, go, ia, hit);
    access(42'h51, 1, 1, 11, go, ib, hit);
    probe_valid = 1; probe_line = 42'h50; probe_write = 0; #1;
    chk(probe_conflict && probe_data_valid && probe_data == pat(42'h50), "probe answered with the backup");
    chk(wb_valid && wb_line == 42'h50, "partial rollback of the probed line");
    if (probe_data_valid && wb_valid) n_partial_rb++;
    cyc();
    expect_abort(ABORT_CONTENTION, "LLB contention abort");
    cyc();
    chk(!in_region && llb_busy, "full rollback running");
    wait_llb();
    chk(n_full_rb_wb == 1, "remaining written line restored by full rollback");

    // 3. nesting and capacity: five lines retired in one region
    enter_region();
    retire(UOP_SPEC);
    chk(depth == 2, "nested region"); if (depth == 2) n_nest++;
    for (int k = 0; k < 4; k++) begin
      access(42'h60 + 42'(k), 0, 1, 20 + k, go, ix, hit); mret(ix);
    end
    retire(UOP_COMMIT);
    chk(depth == 1 && !commit_pulse, "inner COMMIT keeps the region");
    chk(llb_s2_used == 4 && abort_code == ABORT_NONE, "four lines guaranteed");
    access(42'h64, 0, 1, 24, go, ix, hit);
    mem_ret_valid = 1; mem_ret_idx = 3'(ix); cyc();
    expect_abort(ABORT_CAPACITY, "fifth line: capacity abort");
    cyc(); wait_llb();

    // 4. replay of younger holders of the first stage, then ABORT
    enter_region();
    rob_head_seq = 7'd30;
    for (int k = 0; k < 4; k++) begin access(42'h70 + 42'(k), 0, 1, 40 + k, go, ix, hit); held[k] = ix; end
    acc_valid = 1; acc_line = 42'h7f; acc_asf = 1; acc_seq = 7'd35; #1;
    chk(!acc_go && replay_valid && replay_seq == 7'd43, "older op triggers replay of the youngest holder");
    if (replay_valid) n_replay++;
    cyc();
    mem_ann_valid = 1; mem_ann_idx = 3'(held[3]); cyc();
    access(42'h7f, 0, 1, 35, go, ix, hit); chk(go, "older op granted after replay");
    retire_valid = 1; retire_kind = UOP_ABORT; #1;
    expect_abort(ABORT_SOFTWARE, "ABORT instruction");
    cyc(); wait_llb();
    rob_head_seq = 0;

    // ---------------- cache mode ----------------
    mode_llb = 0; n_mode_switch++;
    // 5. ASF load misses; miss buffer flags the fill; remote write conflicts
    enter_region();
    miss_fill(42'h1080, 1, 0);
    probe_valid = 1; probe_line = 42'h1080; probe_write = 1; #1;
    chk(probe_conflict, "L1 spec-read line conflicts with remote write");
    if (probe_conflict) n_cache_conflict++;
    cyc();
    expect_abort(ABORT_CONTENTION, "cache-mode contention abort");
    cyc();
    // 6. orphan case: the ASF load is annulled before its line arrives
    enter_region();
    miss_valid = 1; miss_line = 42'h1090; miss_asf = 1; #1 ix = int'(miss_idx); cyc();
    ld_annul_valid = 1; ld_annul_idx = 3'(ix); ld_annul_asf = 1; cyc();
    retire(UOP_COMMIT);
    if (commit_pulse) n_commit++;
    cyc();
    fill_valid = 1; fill_idx = 3'(ix); cyc();
    probe_valid = 1; probe_line = 42'h1090; probe_write = 1; #1;
    chk(l1_probe_hit && !probe_conflict, "late fill did not leave an orphan spec-read line");
    if (l1_probe_hit && !probe_conflict) n_orphan_avoided++;
    cyc();
    // 7. store-to-load forwarded ASF load: monitor entry
    enter_region();
    stlf_valid = 1; stlf_line = 42'h10a0; #1 chk(stlf_ready, "stlf accepted"); cyc();
    probe_valid = 1; probe_line = 42'h10a0; probe_write = 1; #1;
    chk(probe_conflict, "forwarded load is monitored");
    if (probe_conflict) n_stlf++;
    cyc();
    expect_abort(ABORT_CONTENTION, "stlf contention abort");
    cyc();
    // 8. dirty line cleaned before the first speculative store; commit keeps it
    miss_fill(42'h10b0, 0, 0);
    access(42'h10b0, 1, 0, 0, go, ix, hit); chk(hit, "plain store hits");
    enter_region();
    acc_valid = 1; acc_line = 42'h10b0; acc_write = 1; acc_asf = 1; #1;
    chk(acc_hit && clean_wb_req && clean_wb_line == 42'h10b0, "clean write-back before speculative store");
    if (clean_wb_req) n_clean_wb++;
    cyc();
    retire(UOP_COMMIT);
    if (commit_pulse) n_commit++;
    cyc();
    access(42'h10b0, 0, 0, 0, go, ix, hit); chk(hit, "committed line stays in L1");
    // 9. store in the abort cycle is still tracked and rolled back
    miss_fill(42'h10c0, 0, 0);
    enter_region();
    exc_event = 1; acc_valid = 1; acc_line = 42'h10c0; acc_write = 1; acc_asf = 1; #1;
    chk(abort_pulse && abort_code == ABORT_FAR, "exception aborts the region");
    cyc();
    access(42'h10c0, 0, 0, 0, go, ix, hit);
    chk(!hit, "store of the abort cycle was rolled back");
    if (!hit) n_abort_cycle_store++;

    // every mechanism happened
    chk(n_commit == 3, "commits");
    chk(n_contention == 3, "contention aborts");
    chk(n_capacity == 1, "capacity abort");
    chk(n_software == 1, "software abort");
    chk(n_fence_stall == 9, "fence stalls");
    chk(n_partial_rb == 1, "partial rollback");
    chk(n_full_rb_wb >= 1, "full rollback write-back");
    chk(n_replay == 1, "replay");
    chk(n_nest == 1, "nesting");
    chk(n_orphan_avoided == 1, "orphan avoided");
    chk(n_stlf == 1, "stlf monitor");
    chk(n_clean_wb == 1, "clean write-back");
    chk(n_abort_cycle_store == 1, "abort-cycle store");
    chk(n_mode_switch == 1 && n_cache_conflict == 1, "mode switch and cache conflict");
    $display("mechanisms: commit=%0d contention=%0d capacity=%0d software=%0d fence_stall=%0d partial_rb=%0d full_rb_wb=%0d replay=%0d nest=%0d orphan_avoided=%0d stlf=%0d clean_wb=%0d abort_cycle_store=%0d mode_switch=%0d",
             n_commit, n_contention, n_capacity, n_software, n_fence_stall, n_partial_rb, n_full_rb_wb,
             n_replay, n_nest, n_orphan_avoided, n_stlf, n_clean_wb, n_abort_cycle_store, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
