// tb_asf_list_walk: workload test, a linked-list search inside one
// speculative region, run on the ASF unit in LLB mode at default sizes.
//
// Each node of the list sits in its own line. For every node visited the
// core issues two LOCK MOV loads (value and next pointer, same line) and
// retires them. The loop branch is mispredicted once per node: the core has
// already issued an ASF load to a wrong-path line, which is annulled when
// the branch resolves. Precise tracking must drop those wrong-path lines, so
// only the visited nodes count against the four-line guarantee: lists of 1
// to 4 nodes commit, a list of 5 nodes aborts with a capacity code. The
// test also checks that no wrong-path line stays protected (a remote write to
// it causes no conflict) and counts the wrong-path loads it annulled.
module tb_asf_list_walk;
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

  int checks = 0, failures = 0, n_wrong_path = 0, n_commit = 0, n_capacity = 0;

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
  task automatic cyc(); @(posedge clk); #1 idle(); endtask
  task automatic retire(input uop_kind_e k);
    retire_valid = 1; retire_kind = k; retire_next_rip = 64'h500010; retire_rsp = 64'h7f000; cyc();
  endtask
  // one ASF load; returns LLB index (waits while the LLB holds it back)
  task automatic ld(input line_addr_t l, input int seq, output int idx);
    int tries = 0;
    acc_valid = 1; acc_line = l; acc_asf = 1; acc_seq = 7'(seq); #1;
    while (!acc_go && tries < 10) begin @(posedge clk); #1 tries++; end
    chk(acc_go, "ASF load granted");
    idx = int'(acc_llb_idx);
    cyc();
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    idle(); mode_llb = 1; rob_head_seq = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int len = 1; len <= 5; len++) begin
      int seq;
      bit aborted;
      seq = 0; aborted = 0;
      rob_head_seq = 0;
      fence_dispatch = 1; cyc();
      retire(UOP_SPEC);
      retire(UOP_MFENCE);
      for (int k = 0; k < len && !aborted; k++) begin
        int iv, inx, iw;
        line_addr_t node;
        node = 42'h2000 + 42'(k * 8);
        ld(node, seq, iv);                   // LOCK MOV RDX, [RSI + val]
        ld(node, seq + 1, inx);              // LOCK MOV RSI, [RSI + next]
        // mispredicted loop branch: a wrong-path load to a line far away
        ld(42'h9000 + 42'(len * 16 + k), seq + 2, iw);
        mem_ann_valid = 1; mem_ann_idx = 3'(iw); cyc();
        n_wrong_path++;
        mem_ret_valid = 1; mem_ret_idx = 3'(iv); cyc();
        if (abort_pulse) begin
          aborted = 1;
          chk(abort_code == ABORT_CAPACITY, "over-long list aborts with capacity");
          if (abort_code == ABORT_CAPACITY) n_capacity++;
          cyc();
        end else begin
          mem_ret_valid = 1; mem_ret_idx = 3'(inx); cyc();
        end
        seq += 3;
        rob_head_seq = 7'(seq);
      end
      if (!aborted) begin
        chk(llb_s2_used == 4'(len) && llb_s1_used == 0,
            $sformatf("list of %0d: only visited nodes protected (%0d/%0d)", len, llb_s2_used, llb_s1_used));
        probe_valid = 1; probe_line = 42'h9000 + 42'(len * 16); probe_write = 1; #1;
        chk(!probe_conflict, "wrong-path line not protected");
        cyc();
        retire(UOP_COMMIT);
        chk(commit_pulse, $sformatf("list of %0d commits", len));
        if (commit_pulse) n_commit++;
        cyc();
      end else begin
        while (llb_busy) cyc();
      end
      chk(aborted == (len > 4), $sformatf("list of %0d: abort only beyond four nodes", len));
    end
    chk(n_commit == 4 && n_capacity == 1 && n_wrong_path == 15, "workload outcomes");
    $display("list walk: commits=%0d capacity_aborts=%0d wrong_path_loads_annulled=%0d", n_commit, n_capacity, n_wrong_path);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
