// tb_asf_fence_gate: self-checking test of the ASF fence dependency.
// An ASF memory micro-op dispatched after an asf.mfence must wait until that
// fence retires; regular memory micro-ops never wait; back-to-back regions
// (two fences) hold the second region's access until the second fence
// retires; annulled fences release their dependants' slots correctly.
module tb_asf_fence_gate;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fence_dispatch, fence_retire, mop_dispatch, mop_is_asf;
  logic [5:0] fence_annul, fences_in_flight;
  logic [2:0] mop_slot;
  logic [7:0] issue_ok;
  int checks = 0, failures = 0;

  asf_fence_gate dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic idle();
    fence_dispatch = 0; fence_retire = 0; fence_annul = 0; mop_dispatch = 0; mop_is_asf = 0; mop_slot = 0;
  endtask
  task automatic cyc(); @(posedge clk); #1 idle(); endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int wait_cycles;
    idle();
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // region 1: fence, then an ASF load in slot 0 and a plain load in slot 1
    fence_dispatch = 1; mop_dispatch = 1; mop_slot = 0; mop_is_asf = 1; cyc();
    mop_dispatch = 1; mop_slot = 1; mop_is_asf = 0; cyc();
    chk(issue_ok[0] == 0, "ASF op waits for fence");
    chk(issue_ok[1] == 1, "plain op never waits");
    chk(fences_in_flight == 1, "one fence in flight");
    // fence stays in ROB for 3 cycles
    wait_cycles = 0;
    repeat (3) begin cyc(); wait_cycles++; chk(issue_ok[0] == 0, "still waiting"); end
    fence_retire = 1; cyc();
    chk(issue_ok[0] == 1, "ASF op released after fence retires");
    // an ASF op dispatched with no fence in flight issues at once
    mop_dispatch = 1; mop_slot = 2; mop_is_asf = 1; cyc();
    chk(issue_ok[2] == 1, "no fence: no wait");
    // two regions back to back: op A after fence 1, op B after fence 2
    fence_dispatch = 1; cyc();
    mop_dispatch = 1; mop_slot = 3; mop_is_asf = 1; cyc();
    fence_dispatch = 1; cyc();
    mop_dispatch = 1; mop_slot = 4; mop_is_asf = 1; cyc();
    chk(issue_ok[3] == 0 && issue_ok[4] == 0, "both wait");
    fence_retire = 1; cyc();
    chk(issue_ok[3] == 1 && issue_ok[4] == 0, "first region released, second held");
    fence_retire = 1; cyc();
    chk(issue_ok[4] == 1, "second region released");
    // flush annuls an unretired fence; a new op after it issues at once
    fence_dispatch = 1; cyc();
    chk(fences_in_flight == 1, "fence before flush");
    fence_annul = 1; cyc();
    chk(fences_in_flight == 0, "fence annulled");
    mop_dispatch = 1; mop_slot = 5; mop_is_asf = 1; cyc();
    chk(issue_ok[5] == 1, "op after annulled fence free");
    // many fences: counter wrap-around
    for (int i = 0; i < 70; i++) begin
      fence_dispatch = 1; mop_dispatch = 1; mop_slot = 6; mop_is_asf = 1; cyc();
      chk(issue_ok[6] == 0, "wrap: waits");
      fence_retire = 1; cyc();
      chk(issue_ok[6] == 1, "wrap: released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
