// Self-checking test of the synchronizer with eight cores. Directed
// sequences check each duty against values worked out by hand:
//   * a miss stall clears only that core's run enable;
//   * a barrier over a subset holds every arrival until the last member
//     arrives and releases them all in the same cycle, leaving others alone;
//   * a notification sent before WAIT is consumed without stalling, one sent
//     after WAIT lets the waiting core run from the next cycle;
//   * when all cores sleep the unit asks for a flush, waits for flush_done,
//     gates power until wake_i, and releases all cores one cycle after the
//     wake state.
module tb_synchronizer;
  import wbsn_pkg::*;
  localparam int NC = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic          sync_req [NC];
  sync_op_e      sync_op  [NC];
  logic [NC-1:0] sync_arg [NC];
  logic [NC-1:0] miss_stall, core_run;
  logic          mmu_busy, flush_req, flush_done, wake_i, pwr_gate, ev_barrier, ev_notify_wait;
  pwr_state_e    pstate;
  int checks = 0, failures = 0;

  synchronizer #(.N_CORES(NC)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (core_run=%b)", what, core_run); end
  endtask

  task automatic cmd(input int c, input sync_op_e op, input logic [NC-1:0] arg);
    sync_req[c] = 1; sync_op[c] = op; sync_arg[c] = arg;
  endtask
  task automatic tick();
    @(posedge clk); #1;
    for (int c = 0; c < NC; c++) sync_req[c] = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst_n = 0; miss_stall = '0; mmu_busy = 0; flush_done = 0; wake_i = 0;
    for (int c = 0; c < NC; c++) begin sync_req[c] = 0; sync_op[c] = SYNC_BARRIER; sync_arg[c] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1 check(core_run == 8'hFF, "all run after reset");
    // miss stall
    miss_stall = 8'b0010_0100;
    #1 check(core_run == 8'b1101_1011, "miss stall is per core");
    miss_stall = '0;
    tick();
    // barrier over cores 1,3,5 (mask 0010_1010); core 1 then 3 then 5 arrive
    cmd(1, SYNC_BARRIER, 8'b0010_1010); tick();
    check(core_run == 8'b1111_1101, "core 1 parked at barrier");
    cmd(3, SYNC_BARRIER, 8'b0010_1010); tick();
    check(core_run == 8'b1111_0101, "cores 1,3 parked");
    repeat (3) tick();
    check(core_run == 8'b1111_0101, "still parked");
    cmd(5, SYNC_BARRIER, 8'b0010_1010);
    #1 check(ev_barrier, "barrier releases when last member arrives");
    tick();
    check(core_run == 8'hFF, "all three released together");
    // full barrier, all cores in one cycle
    for (int c = 0; c < NC; c++) cmd(c, SYNC_BARRIER, 8'hFF);
    #1 check(ev_barrier, "simultaneous barrier");
    tick();
    check(core_run == 8'hFF, "nobody parked after simultaneous barrier");
    // notify before wait: no stall
    cmd(0, SYNC_NOTIFY, 8'b0000_0100); tick();
    cmd(2, SYNC_WAIT, '0); tick();
    check(core_run[2], "early notification consumed without waiting");
    // wait before notify: core 6 parks, wakes when core 0 notifies
    cmd(6, SYNC_WAIT, '0); tick();
    check(!core_run[6], "core 6 waits");
    repeat (4) tick();
    check(!core_run[6], "core 6 still waits");
    cmd(0, SYNC_NOTIFY, 8'b0100_0000);
    #1 check(!core_run[6], "core 6 parked in the notify cycle");
    tick();
    check(core_run[6] && ev_notify_wait, "core 6 runs in the cycle after the notify");
    // a second WAIT must park again (flag was consumed)
    cmd(6, SYNC_WAIT, '0); tick();
    check(!core_run[6], "flag consumed");
    cmd(1, SYNC_NOTIFY, 8'b0100_0000); tick();
    check(core_run[6], "core 6 released by core 1");
    // deep sleep: cores go to sleep one by one, MMU busy delays the flush
    for (int c = 0; c < NC; c++) begin cmd(c, SYNC_SLEEP, '0); tick(); end
    check(core_run == '0, "all asleep");
    mmu_busy = 1;
    tick(); tick();
    check(pstate == PS_ACTIVE && !flush_req, "flush waits for the MMU");
    mmu_busy = 0;
    tick();
    check(flush_req && pstate == PS_FLUSH, "flush requested");
    repeat (5) tick();
    check(flush_req && !pwr_gate, "flush held until done");
    flush_done = 1; tick(); flush_done = 0;
    check(pwr_gate && !flush_req && pstate == PS_DEEP, "power gated after flush");
    n = 0;
    repeat (20) begin tick(); n += int'(pwr_gate); end
    check(n == 20 && core_run == '0, "stays gated until wake");
    wake_i = 1; tick(); wake_i = 0;
    check(!pwr_gate && pstate == PS_WAKE && core_run == '0, "wake state");
    tick();
    check(pstate == PS_ACTIVE && core_run == 8'hFF, "all cores released after wake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
