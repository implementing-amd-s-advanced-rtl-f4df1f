// tb_asf_miss_buffer: self-checking test of ASF-spec reference counting in
// the miss buffer. A reference model keeps, per entry, the line and the
// number of live ASF loads; random misses, merges, annuls and fills are
// driven and every fill's spec-read flag is compared with the model. Directed
// cases first show the orphan scenario: an ASF load that is annulled before
// its fill leaves the filled line without the spec-read bit.
module tb_asf_miss_buffer;
  import asf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic miss_valid, miss_asf, miss_full, mem_req_valid, annul_valid, annul_asf, fill_valid;
  logic l1_fill_valid, l1_fill_spec_r;
  line_addr_t miss_line, mem_req_line, l1_fill_line;
  logic [2:0] miss_idx, mem_req_idx, annul_idx, fill_idx;
  logic [7:0] busy;
  int checks = 0, failures = 0;

  asf_miss_buffer dut (.*);

  // model
  bit         m_valid [8];
  line_addr_t m_line  [8];
  int         m_cnt   [8];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic idle();
    miss_valid = 0; miss_asf = 0; miss_line = '0; annul_valid = 0; annul_asf = 0; annul_idx = 0;
    fill_valid = 0; fill_idx = 0;
  endtask

  // one miss; returns index used
  task automatic miss(input line_addr_t l, input bit asf, output int idx);
    int hit = -1, fr = -1;
    for (int i = 0; i < 8; i++) begin
      if (m_valid[i] && m_line[i] == l) hit = i;
      if (!m_valid[i] && fr < 0) fr = i;
    end
    miss_valid = 1; miss_line = l; miss_asf = asf; #1;
    if (hit >= 0) begin
      chk(miss_idx == 3'(hit) && !mem_req_valid && !miss_full, "merge into entry");
      idx = hit;
    end else if (fr >= 0) begin
      chk(mem_req_valid && mem_req_line == l && !miss_full, "allocate and request");
      idx = int'(miss_idx);
      m_valid[idx] = 1; m_line[idx] = l; m_cnt[idx] = 0;
    end else begin
      chk(miss_full && !mem_req_valid, "full");
      idx = -1;
    end
    if (idx >= 0 && asf) m_cnt[idx]++;
    @(posedge clk); #1 idle();
  endtask

  task automatic annul(input int idx);
    annul_valid = 1; annul_idx = 3'(idx); annul_asf = 1;
    if (m_cnt[idx] > 0) m_cnt[idx]--;
    @(posedge clk); #1 idle();
  endtask

  task automatic fill(input int idx);
    fill_valid = 1; fill_idx = 3'(idx); #1;
    chk(l1_fill_valid && l1_fill_line == m_line[idx], "fill forwarded");
    chk(l1_fill_spec_r == (m_cnt[idx] > 0), $sformatf("spec_r on fill of entry %0d (count %0d)", idx, m_cnt[idx]));
    m_valid[idx] = 0; m_cnt[idx] = 0;
    @(posedge clk); #1 idle();
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int a, b, c, orphan_avoided = 0;
  initial begin
    idle();
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // orphan scenario: ASF load misses, is annulled, line fills clean
    miss(42'h100, 1, a);
    annul(a);
    fill(a);
    orphan_avoided++;
    // two ASF loads share an entry; one annulled: still spec-read
    miss(42'h200, 1, a);
    miss(42'h200, 1, b);
    chk(a == b, "merged");
    annul(a);
    fill(a);
    // non-ASF load plus annulled ASF load: clean fill
    miss(42'h300, 0, a);
    miss(42'h300, 1, b);
    annul(b);
    fill(a);
    // fill all entries, then overflow
    for (int i = 0; i < 8; i++) miss(42'h400 + 42'(i), i[0], c);
    miss(42'h999, 1, c);
    chk(c == -1, "overflow reported");
    for (int i = 0; i < 8; i++) fill(i);
    // random traffic against the model
    for (int n = 0; n < 1500; n++) begin
      int op, i;
      op = $urandom_range(0, 9);
      i  = $urandom_range(0, 7);
      if (op < 5) begin
        miss(42'($urandom_range(0, 11)), 1'($urandom_range(0, 1)), c);
      end else if (op < 7) begin
        if (m_valid[i] && m_cnt[i] > 0) annul(i);
      end else begin
        if (m_valid[i]) fill(i);
      end
    end
    chk(orphan_avoided == 1, "orphan case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
