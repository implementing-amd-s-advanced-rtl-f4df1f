// tb_asf_region_ctrl: self-checking test of the speculative-region controller.
// Covers nesting (only the outermost COMMIT commits), saving rIP/rSP at the
// outermost SPECULATE, every abort reason and its code, ZF clear on abort,
// tracking kept on during the abort cycle, abort winning over a same-cycle
// COMMIT, conflicts ignored outside a region, and a COMMIT outside a region.
module tb_asf_region_ctrl;
  import asf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic retire_valid; uop_kind_e retire_kind;
  logic [63:0] retire_next_rip, retire_rsp;
  logic conflict, capacity, exc_event;
  logic in_region, track_en, commit_pulse, commit_error, abort_pulse, abort_zf;
  logic [7:0] depth; abort_code_e abort_code;
  logic [63:0] redirect_rip, redirect_rsp, abort_rax;
  int checks = 0, failures = 0;

  asf_region_ctrl dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle();
    retire_valid = 0; retire_kind = UOP_OTHER; conflict = 0; capacity = 0; exc_event = 0;
  endtask

  task automatic retire(input uop_kind_e k, input logic [63:0] rip, input logic [63:0] rsp);
    retire_valid = 1; retire_kind = k; retire_next_rip = rip; retire_rsp = rsp;
    @(posedge clk); #1 idle();
  endtask

  task automatic expect_abort(input abort_code_e code, input string what);
    #1;
    chk(abort_pulse == 1 && abort_code == code && abort_rax == 64'(code) && abort_zf == 0, what);
    chk(redirect_rip == 64'h1004 && redirect_rsp == 64'h7ff0, {what, " redirect"});
    chk(track_en == 1, {what, " tracking on in abort cycle"});
    @(posedge clk); #1 idle();
    chk(in_region == 0 && track_en == 0 && depth == 0, {what, " region closed"});
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    idle(); retire_next_rip = 0; retire_rsp = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // conflict outside a region is ignored
    conflict = 1; #1 chk(abort_pulse == 0, "no abort outside region"); @(posedge clk); #1 idle();
    // nesting: outer SPECULATE saves rip/rsp, inner does not
    retire(UOP_SPEC, 64'h1004, 64'h7ff0);
    chk(in_region && depth == 1 && track_en, "region entered");
    retire(UOP_MFENCE, 0, 0);
    retire(UOP_SPEC, 64'h2000, 64'h6000);
    chk(depth == 2, "nested depth 2");
    retire(UOP_COMMIT, 0, 0);
    chk(depth == 1 && commit_pulse == 0, "inner commit does not commit");
    retire(UOP_COMMIT, 0, 0);
    chk(depth == 0 && commit_pulse == 1 && track_en == 0, "outer commit commits");
    // contention abort; redirect to the outer region's saved values
    retire(UOP_SPEC, 64'h1004, 64'h7ff0);
    retire(UOP_SPEC, 64'h3000, 64'h5000);
    conflict = 1; expect_abort(ABORT_CONTENTION, "contention");
    // capacity
    retire(UOP_SPEC, 64'h1004, 64'h7ff0);
    capacity = 1; expect_abort(ABORT_CAPACITY, "capacity");
    // exception / interrupt
    retire(UOP_SPEC, 64'h1004, 64'h7ff0);
    exc_event = 1; expect_abort(ABORT_FAR, "exception");
    // ABORT instruction
    retire(UOP_SPEC, 64'h1004, 64'h7ff0);
    retire_valid = 1; retire_kind = UOP_ABORT; expect_abort(ABORT_SOFTWARE, "ABORT instruction");
    // disallowed instruction
    retire(UOP_SPEC, 64'h1004, 64'h7ff0);
    retire_valid = 1; retire_kind = UOP_DISALLOWED; expect_abort(ABORT_DISALLOWED, "disallowed");
    // priority: contention over capacity
    retire(UOP_SPEC, 64'h1004, 64'h7ff0);
    conflict = 1; capacity = 1; expect_abort(ABORT_CONTENTION, "priority");
    // abort beats a same-cycle outermost COMMIT
    retire(UOP_SPEC, 64'h1004, 64'h7ff0);
    retire_valid = 1; retire_kind = UOP_COMMIT; conflict = 1;
    #1 chk(abort_pulse == 1, "abort wins over commit");
    @(posedge clk); #1 idle();
    chk(commit_pulse == 0 && depth == 0, "no commit after abort");
    // COMMIT outside a region
    retire(UOP_COMMIT, 0, 0);
    chk(commit_error == 1 && commit_pulse == 0, "commit outside region flagged");
    // non-ASF uops do not change state
    retire(UOP_OTHER, 0, 0);
    chk(depth == 0 && !in_region, "other uop no effect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
