// Synchronizer: decides, cycle by cycle, which cores may run, and sequences
// the platform in and out of deep-sleep sensing.
//
// A core is stopped (`core_run` low) while any of these holds:
//   * its instruction or data request misses in the page buffers
//     (`miss_stall` from the MMU);
//   * it waits at a barrier: SYNC_BARRIER with a core mask in `sync_arg`
//     parks the core until every core of the mask has arrived, then all of
//     them are released in the same cycle. This is how cores that split on a
//     data-dependent branch join again, so that they fetch the same
//     instructions in lock-step (SIMD) afterwards;
//   * it waits for a notification: SYNC_NOTIFY sets the event flag of every
//     core in the mask (producer), SYNC_WAIT consumes this core's flag, or
//     parks the core until it is set (consumer);
//   * it has gone to sleep (SYNC_SLEEP) or the platform is not active.
// A command is taken when `sync_req` is high in a cycle where `core_run` is
// high; the core is parked from the next cycle. A released core sees
// `core_run` high again in the cycle after the release condition.
//
// Deep-sleep sensing: when every core sleeps and the MMU is idle, the unit
// asks the MMU to flush (write back every dirty data page, because the page
// buffers lose their content), then raises `pwr_gate` to power the digital
// domain down. `wake_i` (a new sample from the sensing front end) lowers
// `pwr_gate`; one cycle later all cores are released together.
//
// Stalling on misses, tracking producer-consumer relations and branches, and
// managing deep sleep are what the platform description gives this unit; the
// command set, its encoding and the exact sequence are this design's own.
module synchronizer
  import wbsn_pkg::*;
#(
  parameter int unsigned N_CORES = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sync_req [N_CORES],
  input  sync_op_e           sync_op  [N_CORES],
  input  logic [N_CORES-1:0] sync_arg [N_CORES],
  input  logic [N_CORES-1:0] miss_stall,
  input  logic               mmu_busy,
  output logic [N_CORES-1:0] core_run,
  // deep-sleep sequencing
  output logic               flush_req,
  input  logic               flush_done,
  input  logic               wake_i,
  output logic               pwr_gate,
  output pwr_state_e         pstate,
  // events
  output logic               ev_barrier,   // a barrier released its cores
  output logic               ev_notify_wait // a waiting core was woken by a notification
);

  logic [N_CORES-1:0] bar_wait, evt_wait, slp_wait, event_flag;
  logic [N_CORES-1:0] bar_mask [N_CORES];
  logic [N_CORES-1:0] take;        // command accepted this cycle
  logic [N_CORES-1:0] bar_rel;     // barrier waiters released this cycle
  logic [N_CORES-1:0] notify_set;

  always_comb begin
    for (int c = 0; c < int'(N_CORES); c++)
      core_run[c] = (pstate == PS_ACTIVE) && !miss_stall[c] &&
                    !bar_wait[c] && !evt_wait[c] && !slp_wait[c];
  end

  // Arrivals this cycle count together with cores already waiting.
  logic [N_CORES-1:0] arrived;
  logic [N_CORES-1:0] mask_now [N_CORES];
  always_comb begin
    notify_set = '0;
    for (int c = 0; c < int'(N_CORES); c++) begin
      take[c]     = sync_req[c] && core_run[c];
      arrived[c]  = bar_wait[c] || (take[c] && sync_op[c] == SYNC_BARRIER);
      mask_now[c] = bar_wait[c] ? bar_mask[c] : (sync_arg[c] | (N_CORES'(1) << c));
      if (take[c] && sync_op[c] == SYNC_NOTIFY) notify_set |= sync_arg[c];
    end
    for (int c = 0; c < int'(N_CORES); c++)
      bar_rel[c] = arrived[c] && ((mask_now[c] & ~arrived) == '0);
  end

  assign flush_req  = pstate == PS_FLUSH;
  assign pwr_gate   = pstate == PS_DEEP;
  assign ev_barrier = bar_rel != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bar_wait       <= '0;
      evt_wait       <= '0;
      slp_wait       <= '0;
      event_flag     <= '0;
      pstate         <= PS_ACTIVE;
      ev_notify_wait <= 1'b0;
      for (int c = 0; c < int'(N_CORES); c++) bar_mask[c] <= '0;
    end else begin
      ev_notify_wait <= 1'b0;
      // barriers
      for (int c = 0; c < int'(N_CORES); c++) begin
        if (take[c] && sync_op[c] == SYNC_BARRIER) bar_mask[c] <= mask_now[c];
        bar_wait[c] <= arrived[c] && !bar_rel[c];
      end
      // notifications: a parked waiter consumes a flag as soon as it is set
      for (int c = 0; c < int'(N_CORES); c++) begin
        logic flag;
        flag = event_flag[c] || notify_set[c];
        if (evt_wait[c] && flag) begin
          evt_wait[c]    <= 1'b0;
          event_flag[c]  <= 1'b0;
          ev_notify_wait <= 1'b1;
        end else if (take[c] && sync_op[c] == SYNC_WAIT) begin
          evt_wait[c]   <= !flag;
          event_flag[c] <= 1'b0;
        end else begin
          event_flag[c] <= flag;
        end
        if (take[c] && sync_op[c] == SYNC_SLEEP) slp_wait[c] <= 1'b1;
      end
      // power states
      unique case (pstate)
        PS_ACTIVE: if (slp_wait == '1 && !mmu_busy) pstate <= PS_FLUSH;
        PS_FLUSH:  if (flush_done) pstate <= PS_DEEP;
        PS_DEEP:   if (wake_i) pstate <= PS_WAKE;
        PS_WAKE: begin
          slp_wait <= '0;
          pstate   <= PS_ACTIVE;
        end
        default:   pstate <= PS_ACTIVE;
      endcase
    end
  end

  // A core never sits in two waits at once.
  a_one_wait: assert property (@(posedge clk) disable iff (!rst_n)
    ((bar_wait & evt_wait) | (bar_wait & slp_wait) | (evt_wait & slp_wait)) == '0)
    else $error("a core sits in two waits");

endmodule
