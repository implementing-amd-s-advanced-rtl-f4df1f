// tb_asf_llb: self-checking test of the locked line buffer. Covers hits and
// allocation, backup capture on the first speculative write, precise
// tracking (an annulled micro-op's line leaves the set), the move from the
// first to the second stage at retirement, first-stage exhaustion with and
// without a younger victim to replay, second-stage overflow (capacity),
// probe conflicts with partial rollback, full rollback write-back (one line
// per cycle) and commit.
module tb_asf_llb;
  import asf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [6:0] rob_head_seq, acc_seq, replay_seq;
  logic acc_valid, acc_write, acc_grant, replay_valid, ret_valid, ann_valid;
  logic probe_valid, probe_write, probe_conflict, probe_data_valid, wb_valid;
  logic commit, rollback, conflict, capacity, busy;
  logic [2:0] acc_idx, ret_idx, ann_idx;
  logic [3:0] s1_used, s2_used;
  line_addr_t acc_line, probe_line, wb_line;
  line_data_t acc_old_data, probe_data, wb_data;
  int checks = 0, failures = 0;

  asf_llb dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic idle();
    acc_valid = 0; acc_write = 0; acc_line = '0; acc_seq = '0; acc_old_data = '0;
    ret_valid = 0; ret_idx = 0; ann_valid = 0; ann_idx = 0;
    probe_valid = 0; probe_write = 0; probe_line = '0; commit = 0; rollback = 0;
  endtask
  task automatic cyc(); @(posedge clk); #1 idle(); endtask
  function automatic line_data_t pat(input int k);
    return {16{32'(k * 32'h01010101 + 32'h5a)}};
  endfunction

  // access; returns granted index or -1
  task automatic acc(input line_addr_t l, input bit wr, input int seq, output int idx);
    acc_valid = 1; acc_line = l; acc_write = wr; acc_seq = 7'(seq); acc_old_data = pat(int'(l)); #1;
    idx = acc_grant ? int'(acc_idx) : -1;
    cyc();
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int ia, ib, ic, i2, tmp, n_replay = 0, n_stall = 0;
  int idx_l [int];
  initial begin
    idle(); rob_head_seq = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    acc(42'h10, 0, 1, ia);
    chk(ia >= 0 && s1_used == 1 && s2_used == 0, "alloc read line in stage 1");
    acc(42'h20, 1, 2, ib);
    chk(ib >= 0 && ib != ia && s1_used == 2, "alloc written line");
    acc(42'h10, 1, 3, tmp);
    chk(tmp == ia && s1_used == 2, "hit on existing line");
    // precise tracking: annul the only op on line 0x20
    ann_valid = 1; ann_idx = 3'(ib); cyc();
    chk(s1_used == 1, "annulled line released");
    probe_valid = 1; probe_line = 42'h20; probe_write = 1; #1;
    chk(!probe_conflict, "released line no longer conflicts"); cyc();
    // retire one of the two ops on 0x10: stage 2
    ret_valid = 1; ret_idx = 3'(ia); cyc();
    chk(s1_used == 0 && s2_used == 1, "line moved to stage 2");
    ann_valid = 1; ann_idx = 3'(ia); cyc();
    chk(s2_used == 1, "stage-2 line survives annul of a later op");
    // fill stage 1 with young ops seq 20..23
    for (int k = 0; k < 4; k++) begin acc(42'h100 + 42'(k), k[0], 20 + k, tmp); idx_l[k] = tmp; end
    chk(s1_used == 4, "stage 1 full");
    // older op (seq 10) needs a line: replay the youngest holder
    acc_valid = 1; acc_line = 42'h200; acc_seq = 7'd10; #1;
    chk(!acc_grant && replay_valid && replay_seq == 7'd23, "replay of younger holder requested");
    if (replay_valid) n_replay++;
    cyc();
    ann_valid = 1; ann_idx = 3'(idx_l[3]); cyc();
    acc(42'h200, 0, 10, tmp);
    chk(tmp >= 0, "older op granted after replay");
    idx_l[3] = tmp;
    // a younger op (seq 40) finds stage 1 full of older holders: stalls, no replay
    acc_valid = 1; acc_line = 42'h300; acc_seq = 7'd40; #1;
    chk(!acc_grant && !replay_valid, "younger op stalls");
    if (!acc_grant) n_stall++;
    cyc();
    // retire three: stage 2 reaches 4 of 4
    for (int k = 0; k < 3; k++) begin ret_valid = 1; ret_idx = 3'(idx_l[k]); cyc(); end
    chk(s2_used == 4 && s1_used == 1 && !capacity, "stage 2 full, four lines guaranteed");
    ret_valid = 1; ret_idx = 3'(idx_l[3]); cyc();
    chk(capacity, "fifth retired line overflows stage 2");
    // probes: 0x101 was written (k=1) with backup pat(0x101)
    probe_valid = 1; probe_line = 42'h101; probe_write = 0; #1;
    chk(probe_conflict && probe_data_valid && probe_data == pat(32'h101), "read probe to written line returns backup");
    chk(wb_valid && wb_line == 42'h101 && wb_data == pat(32'h101), "partial rollback writes the line back");
    cyc();
    chk(conflict, "conflict flagged");
    probe_valid = 1; probe_line = 42'h100; probe_write = 0; #1;
    chk(!probe_conflict, "read probe to read line is compatible"); cyc();
    probe_valid = 1; probe_line = 42'h100; probe_write = 1; #1;
    chk(probe_conflict && !probe_data_valid, "write probe to read line conflicts"); cyc();
    // full rollback: the only written line left is 0x10 (0x101 was already
    // rolled back by the probe, 0x103 left the set when replayed)
    rollback = 1; cyc();
    chk(busy && !conflict && !capacity, "rollback started, flags cleared");
    begin
      int wbs = 0, cycles = 0;
      while (busy && cycles < 20) begin
        if (wb_valid) begin
          wbs++;
          chk(wb_data == pat(int'(wb_line)), "rollback restores the backup");
        end
        cyc(); cycles++;
      end
      chk(wbs == 1, $sformatf("one line left to write back (%0d)", wbs));
      chk(cycles == 8, $sformatf("one entry per cycle (%0d cycles)", cycles));
    end
    chk(s1_used == 0 && s2_used == 0, "empty after rollback");
    // commit clears everything at once
    acc(42'h500, 1, 50, tmp);
    acc(42'h501, 0, 51, tmp);
    commit = 1; cyc();
    chk(s1_used == 0 && s2_used == 0, "commit empties the buffer");
    // wrap-around age compare: head near the top
    rob_head_seq = 7'd120;
    for (int k = 0; k < 4; k++) acc(42'h600 + 42'(k), 0, (125 + k) % 128, tmp);
    acc_valid = 1; acc_line = 42'h700; acc_seq = 7'd122; #1;
    chk(!acc_grant && replay_valid && replay_seq == 7'd0, "wrapped ages compared correctly");
    cyc();
    chk(n_replay == 1 && n_stall == 1, "replay and stall both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
