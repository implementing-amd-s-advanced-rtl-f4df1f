// tb_asf_l1_spec: self-checking test of the L1 tag array with speculative
// read/write bits. Covers marking on hits and on flagged fills, conflict
// rules for read and write probes, partial rollback of a probed written line,
// cleaning of a dirty line before its first speculative write, monitor-only
// entries for store-to-load-forwarded ASF loads, victim choice that spares
// protected lines, capacity abort when only protected victims remain,
// commit (bits cleared, data kept) and rollback (written lines dropped).
module tb_asf_l1_spec;
  import asf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic acc_valid, acc_write, acc_asf, acc_hit, wb_req, stlf_valid, stlf_ready;
  logic fill_valid, fill_spec_r, evict_valid, evict_dirty, probe_valid, probe_write;
  logic probe_hit, probe_conflict, commit, rollback, conflict, capacity;
  line_addr_t acc_line, wb_line, stlf_line, fill_line, evict_line, probe_line;
  int checks = 0, failures = 0;

  asf_l1_spec dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic idle();
    acc_valid = 0; acc_write = 0; acc_asf = 0; acc_line = '0; stlf_valid = 0; stlf_line = '0;
    fill_valid = 0; fill_line = '0; fill_spec_r = 0; probe_valid = 0; probe_write = 0; probe_line = '0;
    commit = 0; rollback = 0;
  endtask
  task automatic cyc(); @(posedge clk); #1 idle(); endtask
  function automatic line_addr_t L(input int tg, input int st);
    return {33'(tg), 9'(st)};
  endfunction
  task automatic fill(input line_addr_t l, input bit spr);
    fill_valid = 1; fill_line = l; fill_spec_r = spr; cyc();
  endtask
  task automatic access(input line_addr_t l, input bit wr, input bit asf, output bit hit, output bit wbr);
    acc_valid = 1; acc_line = l; acc_write = wr; acc_asf = asf; #1;
    hit = acc_hit; wbr = wb_req; cyc();
  endtask
  task automatic probe(input line_addr_t l, input bit wr, output bit cf);
    probe_valid = 1; probe_line = l; probe_write = wr; #1;
    cf = probe_conflict; cyc();
  endtask
  task automatic end_region(input bit rb);
    if (rb) rollback = 1; else commit = 1;
    cyc();
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit h, w, cf;
  initial begin
    idle();
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // A: ASF read hit marks sr; read probe compatible, write probe conflicts
    fill(L(1, 5), 0);
    access(L(1, 5), 0, 1, h, w);   chk(h, "A hits after fill");
    probe(L(1, 5), 0, cf);         chk(!cf, "read probe on sr line is compatible");
    probe(L(1, 5), 1, cf);         chk(cf, "write probe on sr line conflicts");
    chk(conflict, "conflict flag set");
    end_region(0);                 chk(!conflict, "commit clears conflict");
    // B: dirty line cleaned before its first speculative write
    fill(L(2, 6), 0);
    access(L(2, 6), 1, 0, h, w);   chk(h && !w, "plain store makes B dirty");
    access(L(2, 6), 1, 1, h, w);   chk(h && w, "first ASF store to dirty line asks for clean write-back");
    access(L(2, 6), 1, 1, h, w);   chk(h && !w, "second ASF store needs no write-back");
    probe(L(2, 6), 0, cf);         chk(cf, "read probe on sw line conflicts");
    access(L(2, 6), 0, 0, h, w);   chk(!h, "partial rollback dropped the written line");
    end_region(1);
    // C/D: fill flag from the miss buffer
    fill(L(3, 7), 1);
    probe(L(3, 7), 1, cf);         chk(cf, "line filled with spec-read is monitored");
    end_region(1);
    fill(L(4, 8), 0);
    probe(L(4, 8), 1, cf);         chk(!cf, "line filled without spec-read is not");
    // E: store-to-load forwarding on an absent line: monitor-only entry
    stlf_valid = 1; stlf_line = L(5, 9); #1 chk(stlf_ready, "stlf accepted"); cyc();
    access(L(5, 9), 0, 0, h, w);   chk(!h, "monitor entry holds no data");
    probe(L(5, 9), 1, cf);         chk(cf, "monitor entry catches the conflict");
    end_region(1);
    // F: stlf on a present line sets sr
    fill(L(6, 10), 0);
    stlf_valid = 1; stlf_line = L(6, 10); cyc();
    probe(L(6, 10), 1, cf);        chk(cf, "stlf marks a present line");
    end_region(1);
    // set 11: one protected, one plain line; refill spares the protected one
    fill(L(7, 11), 0); access(L(7, 11), 0, 1, h, w);
    fill(L(8, 11), 0); access(L(8, 11), 0, 0, h, w);
    access(L(7, 11), 0, 0, h, w);  // make the protected line most recently used
    fill_valid = 1; fill_line = L(9, 11); #1;
    chk(evict_valid && evict_line == L(8, 11), "plain line chosen as victim");
    cyc();
    chk(!capacity, "no capacity abort");
    access(L(7, 11), 0, 0, h, w);  chk(h, "protected line kept");
    // set 12: both ways protected, refill must evict one: capacity
    fill(L(10, 12), 0); access(L(10, 12), 0, 1, h, w);
    fill(L(11, 12), 0); access(L(11, 12), 1, 1, h, w);
    fill(L(12, 12), 0);
    chk(capacity, "evicting a protected line raises capacity");
    end_region(1);
    chk(!capacity, "rollback clears capacity");
    // commit keeps written data, rollback drops it
    fill(L(13, 20), 0); access(L(13, 20), 1, 1, h, w);
    fill(L(14, 21), 0); access(L(14, 21), 0, 1, h, w);
    end_region(0);
    access(L(13, 20), 0, 0, h, w); chk(h, "committed write stays");
    probe(L(13, 20), 0, cf);       chk(!cf, "committed line no longer protected");
    access(L(13, 20), 1, 1, h, w);
    access(L(14, 21), 0, 1, h, w);
    end_region(1);
    access(L(13, 20), 0, 0, h, w); chk(!h, "rolled-back write dropped");
    access(L(14, 21), 0, 0, h, w); chk(h, "read line survives rollback");
    probe(L(14, 21), 1, cf);       chk(!cf, "read line unprotected after rollback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
